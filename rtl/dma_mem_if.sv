// dma_mem_if: the memory interface (DMA) between the two memory cores.
//
// Copies a block of words from the shared memory of one cluster's MCore straight into
// the shared memory of the other cluster's MCore, without any PCore or the network.
// Each MCore forwards DMA commands from its PCores on cmd port c (c = its cluster); the
// source is cluster c and the destination the other cluster. For every word the engine
// reads the source memory, keeps the word in its buffer register (the interfacing
// component) and writes it to the destination memory. When the last word is written it
// sends a one-cycle notice to the destination MCore, which sets mailbox bit 8 of PCore
// `notify` there. One command runs at a time; cluster 1's port has priority when both
// wait. Memory ports are the MCore request/grant ports (req held until gnt, read data
// one cycle after the grant). A word therefore takes at least three cycles. The original
// says only that a prototype DMA with few functions serves as the memory interface
// between the MCores; the command format, sequencing and notice are this design's own.
module dma_mem_if
  import icc_pkg::*;
(
  input  logic      clk,
  input  logic      rst,
  input  logic      cmd_valid[N_CLUSTERS],
  input  dma_cmd_t  cmd      [N_CLUSTERS],
  output logic      cmd_ready[N_CLUSTERS],
  output logic      m_req    [N_CLUSTERS],
  output logic      m_we     [N_CLUSTERS],
  output shm_addr_t m_addr   [N_CLUSTERS],
  output word_t     m_wdata  [N_CLUSTERS],
  input  logic      m_gnt    [N_CLUSTERS],
  input  logic      m_rvalid [N_CLUSTERS],
  input  word_t     m_rdata  [N_CLUSTERS],
  output logic       notify_valid[N_CLUSTERS],
  output logic [2:0] notify_dst  [N_CLUSTERS],
  output logic      busy,
  output logic [15:0] words_moved
);
  typedef enum logic [2:0] {S_IDLE, S_RD, S_RWAIT, S_WR, S_NOTIFY} state_e;

  state_e     state;
  dma_cmd_t   cur;
  logic       src;       // source cluster
  logic [4:0] idx;
  word_t      buf_q;     // interfacing component
  logic [4:0] last;

  assign busy = (state != S_IDLE);
  assign last = (cur.len == 5'd0) ? 5'd0 : cur.len - 5'd1;

  always_comb begin
    for (int c = 0; c < N_CLUSTERS; c++) begin
      cmd_ready[c]    = 1'b0;
      m_req[c]        = 1'b0;
      m_we[c]         = 1'b0;
      m_addr[c]       = '0;
      m_wdata[c]      = buf_q;
      notify_valid[c] = 1'b0;
      notify_dst[c]   = cur.notify;
    end
    if (state == S_IDLE) begin
      if (cmd_valid[0])      cmd_ready[0] = 1'b1;
      else if (cmd_valid[1]) cmd_ready[1] = 1'b1;
    end
    if (state == S_RD) begin
      m_req[src]  = 1'b1;
      m_addr[src] = cur.src_addr + SHM_AW'(idx);
    end
    if (state == S_WR) begin
      m_req[!src]  = 1'b1;
      m_we[!src]   = 1'b1;
      m_addr[!src] = cur.dst_addr + SHM_AW'(idx);
    end
    if (state == S_NOTIFY) notify_valid[!src] = 1'b1;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state       <= S_IDLE;
      cur         <= '0;
      src         <= 1'b0;
      idx         <= '0;
      buf_q       <= '0;
      words_moved <= '0;
    end else begin
      unique case (state)
        S_IDLE: begin
          idx <= '0;
          if (cmd_valid[0]) begin
            cur <= cmd[0]; src <= 1'b0; state <= S_RD;
          end else if (cmd_valid[1]) begin
            cur <= cmd[1]; src <= 1'b1; state <= S_RD;
          end
        end
        S_RD:    if (m_gnt[src]) state <= S_RWAIT;
        S_RWAIT: if (m_rvalid[src]) begin
          buf_q <= m_rdata[src];
          state <= S_WR;
        end
        S_WR: if (m_gnt[!src]) begin
          words_moved <= words_moved + 16'd1;
          if (idx == last) state <= S_NOTIFY;
          else begin
            idx   <= idx + 5'd1;
            state <= S_RD;
          end
        end
        S_NOTIFY: state <= S_IDLE;
        default:  state <= S_IDLE;
      endcase
    end
  end

endmodule
