// mcore_rx: input FIFO and receiver of a memory core (MCore).
//
// Serves shared-memory accesses that arrive over the network from tiles outside the
// MCore's hard-wired cluster. Flits from the router's Local output are buffered in an
// input FIFO. A PT_WR packet (head with address, tail with data) becomes one write of
// the shared memory; a PT_RD packet (single head flit) becomes one read, and the word is
// returned to the requesting tile as a two-flit PT_RESP packet through the router's
// Local input. Any other packet is dropped up to its tail. The memory port is the
// MCore's request/grant port: req is held until gnt, and read data arrives with rvalid
// one cycle after the grant. One request is handled at a time. The original draws an
// input FIFO and a receiver between the MCore router and the shared memories but does
// not describe them; packet formats and this sequencing are this design's own.
module mcore_rx
  import icc_pkg::*;
#(
  parameter logic [XW-1:0] MY_X = XW'(1),
  parameter logic [YW-1:0] MY_Y = YW'(1),
  parameter int unsigned   FIFO_DEPTH = 4
) (
  input  logic      clk,
  input  logic      rst,
  // from the router (Local output)
  input  flit_t     in_flit,
  input  logic      in_valid,
  output logic      in_ready,
  // to the router (Local input)
  output flit_t     out_flit,
  output logic      out_valid,
  input  logic      out_ready,
  // shared-memory port
  output logic      m_req,
  output logic      m_we,
  output shm_addr_t m_addr,
  output word_t     m_wdata,
  input  logic      m_gnt,
  input  logic      m_rvalid,
  input  word_t     m_rdata
);
  typedef enum logic [2:0] {
    S_IDLE, S_WDATA, S_WREQ, S_RREQ, S_RWAIT, S_RESP_H, S_RESP_T, S_DROP
  } state_e;

  state_e        state;
  flit_t         f;
  logic          f_empty, f_full, f_pop;
  shm_addr_t     addr_q;
  logic [XW-1:0] rx_q;
  logic [YW-1:0] ry_q;
  word_t         data_q;
  head_t         h;
  head_t         resp_h;
  logic [$clog2(FIFO_DEPTH):0] unused_cnt;

  sync_fifo #(.WIDTH($bits(flit_t)), .DEPTH(FIFO_DEPTH)) u_in_fifo (
    .clk, .rst,
    .wr_en(in_valid), .wr_data(in_flit), .full(f_full),
    .rd_en(f_pop), .rd_data(f), .empty(f_empty), .count(unused_cnt)
  );
  assign in_ready = !f_full;
  assign h        = head_t'(f.data);

  always_comb begin
    f_pop = 1'b0;
    unique case (state)
      S_IDLE, S_WDATA, S_DROP: f_pop = !f_empty;
      default:                 f_pop = 1'b0;
    endcase
  end

  always_comb begin
    resp_h       = '0;
    resp_h.ptype = PT_RESP;
    resp_h.dst_x = rx_q;
    resp_h.dst_y = ry_q;
    resp_h.src_x = MY_X;
    resp_h.src_y = MY_Y;
    resp_h.addr  = addr_q;
    out_flit     = '0;
    out_valid    = 1'b0;
    if (state == S_RESP_H) begin
      out_flit  = '{head: 1'b1, tail: 1'b0, data: word_t'(resp_h)};
      out_valid = 1'b1;
    end else if (state == S_RESP_T) begin
      out_flit  = '{head: 1'b0, tail: 1'b1, data: data_q};
      out_valid = 1'b1;
    end
  end

  assign m_req   = (state == S_WREQ) || (state == S_RREQ);
  assign m_we    = (state == S_WREQ);
  assign m_addr  = addr_q;
  assign m_wdata = data_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      state  <= S_IDLE;
      addr_q <= '0;
      rx_q   <= '0;
      ry_q   <= '0;
      data_q <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (!f_empty) begin
          if (f.head && h.ptype == PT_WR && !f.tail) begin
            addr_q <= h.addr;
            state  <= S_WDATA;
          end else if (f.head && h.ptype == PT_RD) begin
            addr_q <= h.addr;
            rx_q   <= h.src_x;
            ry_q   <= h.src_y;
            state  <= f.tail ? S_RREQ : S_DROP;
          end else if (!f.tail) begin
            state  <= S_DROP;
          end
        end
        S_WDATA: if (!f_empty) begin
          data_q <= f.data;
          state  <= f.tail ? S_WREQ : S_DROP;
        end
        S_WREQ:   if (m_gnt) state <= S_IDLE;
        S_RREQ:   if (m_gnt) state <= S_RWAIT;
        S_RWAIT:  if (m_rvalid) begin
          data_q <= m_rdata;
          state  <= S_RESP_H;
        end
        S_RESP_H: if (out_ready) state <= S_RESP_T;
        S_RESP_T: if (out_ready) state <= S_IDLE;
        S_DROP:   if (!f_empty && f.tail) state <= S_IDLE;
        default:  state <= S_IDLE;
      endcase
    end
  end

endmodule
