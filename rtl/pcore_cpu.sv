// pcore_cpu: the small processor inside each PCore.
//
// A multi-cycle, non-pipelined core with eight 32-bit registers (r0 reads as zero) and
// the 16-instruction set of icc_pkg (op_e), made to move data between the chip's
// communication resources: the external input/output streams, private and shared memory
// (LD/ST), the cluster mailbox (SYNC/WAIT), the network (SEND, remote write RWR, remote
// read request RRD), the two input FIFOs (RECV) and the DMA memory interface (DMA), plus
// LI/ADDI/BNZ for loops. After reset the core waits for run, then starts at address 0
// and executes until HALT. Every instruction takes a fetch cycle, a latch cycle and at
// least one execute cycle; an instruction that waits (IN on an empty stream, OUT to a
// full one, LD/ST until the MCore grants, WAIT until the mailbox bit is set, RECV on an
// empty FIFO, SEND until the router accepts, DMA until the interface takes the command)
// holds the execute state, and stall counts those cycles. The original uses a SIMD RISC
// processor whose instruction set it does not give, and says a simple processor was
// used; this instruction set, its encoding and timing are this design's own, and there is
// no SIMD datapath.
module pcore_cpu
  import icc_pkg::*;
#(
  parameter logic [XW-1:0] MY_X    = '0,
  parameter logic [YW-1:0] MY_Y    = '0,
  parameter int unsigned   IMEM_AW = 5
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               run,
  output logic               halted,
  output logic [IMEM_AW-1:0] pc,
  output logic [31:0]        stall,
  // instruction fetch
  output logic               if_req,
  output logic [IMEM_AW-1:0] if_addr,
  input  word_t              if_rdata,
  // data memory
  output logic               d_req,
  output logic               d_we,
  output logic [7:0]         d_addr,
  output word_t              d_wdata,
  input  logic               d_gnt,
  input  logic               d_rvalid,
  input  word_t              d_rdata,
  // external streams
  input  logic               in_valid,
  input  word_t              in_data,
  output logic               in_ready,
  output logic               out_valid,
  output word_t              out_data,
  input  logic               out_ready,
  // mailbox
  output logic               sync_valid,
  output logic [2:0]         sync_dst,
  input  logic [MB_SRCS-1:0] mb_flags,
  output logic [MB_SRCS-1:0] mb_clr,
  // network injection
  output flit_t              net_flit,
  output logic               net_valid,
  input  logic               net_ready,
  // input FIFOs
  input  logic               f1_empty,
  input  word_t              f1_data,
  output logic               f1_pop,
  input  logic               f2_empty,
  input  word_t              f2_data,
  output logic               f2_pop,
  // DMA command
  output logic               dma_req,
  output dma_cmd_t           dma_cmd,
  input  logic               dma_gnt
);
  typedef enum logic [2:0] {S_IDLE, S_FETCH, S_LATCH, S_EXEC, S_DWAIT, S_TAIL, S_HALT} state_e;

  state_e state;
  instr_t ir;
  word_t  rf [8];
  word_t  rd_val, rs_val;
  logic   done;        // the instruction in S_EXEC completes this cycle
  logic   wr_en;
  word_t  wr_val;
  head_t  hd;
  logic   mb_hit;

  assign rd_val = (ir.rd == 3'd0) ? '0 : rf[ir.rd];
  assign rs_val = (ir.rs == 3'd0) ? '0 : rf[ir.rs];
  assign halted = (state == S_HALT);
  assign if_req  = (state == S_FETCH);
  assign if_addr = pc;
  assign mb_hit  = (ir.imm[3:0] < 4'(MB_SRCS)) && mb_flags[ir.imm[3:0]];

  always_comb begin
    hd       = '0;
    hd.src_x = MY_X;
    hd.src_y = MY_Y;
    hd.addr  = ir.imm[6:0];
    if (ir.op == OP_SEND) begin
      hd.ptype = PT_MSG;
      hd.dst_x = ir.imm[2:0];
      hd.dst_y = ir.imm[4:3];
    end else begin
      hd.ptype = (ir.op == OP_RRD) ? PT_RD : PT_WR;
      hd.dst_x = ir.imm[9:7];
      hd.dst_y = ir.imm[11:10];
    end
  end

  always_comb begin
    done       = 1'b0;
    wr_en      = 1'b0;
    wr_val     = '0;
    d_req      = 1'b0;
    d_we       = 1'b0;
    d_addr     = rs_val[7:0] + ir.imm[7:0];
    d_wdata    = rd_val;
    in_ready   = 1'b0;
    out_valid  = 1'b0;
    out_data   = rd_val;
    sync_valid = 1'b0;
    sync_dst   = ir.imm[2:0];
    mb_clr     = '0;
    net_valid  = 1'b0;
    net_flit   = '{head: 1'b1, tail: (ir.op == OP_RRD), data: word_t'(hd)};
    f1_pop     = 1'b0;
    f2_pop     = 1'b0;
    dma_req    = 1'b0;
    dma_cmd    = '{src_addr: ir.imm[6:0], dst_addr: ir.imm[13:7],
                   len: ir.imm[18:14], notify: ir.imm[21:19]};
    if (state == S_TAIL) begin
      net_valid = 1'b1;
      net_flit  = '{head: 1'b0, tail: 1'b1, data: rd_val};
    end
    if (state == S_EXEC) begin
      unique case (ir.op)
        OP_LI:   begin wr_en = 1'b1; wr_val = word_t'(ir.imm); done = 1'b1; end
        OP_ADDI: begin
          wr_en  = 1'b1;
          wr_val = rd_val + {{16{ir.imm[15]}}, ir.imm[15:0]};
          done   = 1'b1;
        end
        OP_IN:   begin
          in_ready = 1'b1;
          wr_en    = in_valid; wr_val = in_data; done = in_valid;
        end
        OP_OUT:  begin out_valid = 1'b1; done = out_ready; end
        OP_LD:   d_req = 1'b1;
        OP_ST:   begin d_req = 1'b1; d_we = 1'b1; done = d_gnt; end
        OP_SYNC: begin sync_valid = 1'b1; done = 1'b1; end
        OP_WAIT: begin
          if (mb_hit) mb_clr[ir.imm[3:0]] = 1'b1;
          done = mb_hit;
        end
        OP_SEND, OP_RWR: net_valid = 1'b1;
        OP_RRD:  begin net_valid = 1'b1; done = net_ready; end
        OP_RECV: begin
          if (!ir.imm[0]) begin
            f1_pop = !f1_empty; wr_en = !f1_empty; wr_val = f1_data; done = !f1_empty;
          end else begin
            f2_pop = !f2_empty; wr_en = !f2_empty; wr_val = f2_data; done = !f2_empty;
          end
        end
        OP_DMA:  begin dma_req = 1'b1; done = dma_gnt; end
        OP_BNZ, OP_NOP: done = 1'b1;
        default: done = 1'b0;  // OP_HALT
      endcase
    end
    if (state == S_DWAIT) begin
      wr_en  = d_rvalid;
      wr_val = d_rdata;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_IDLE;
      pc    <= '0;
      ir    <= '0;
      stall <= '0;
      for (int i = 0; i < 8; i++) rf[i] <= '0;
    end else begin
      if (wr_en && ir.rd != 3'd0) rf[ir.rd] <= wr_val;
      unique case (state)
        S_IDLE:  if (run) begin pc <= '0; state <= S_FETCH; end
        S_FETCH: state <= S_LATCH;
        S_LATCH: begin ir <= instr_t'(if_rdata); state <= S_EXEC; end
        S_EXEC: begin
          if (ir.op == OP_HALT) begin
            state <= S_HALT;
          end else if (ir.op == OP_BNZ) begin
            pc    <= (rs_val != '0) ? ir.imm[IMEM_AW-1:0] : pc + 1'b1;
            state <= S_FETCH;
          end else if (ir.op == OP_LD) begin
            if (d_gnt) state <= S_DWAIT;
            else       stall <= stall + 1;
          end else if ((ir.op == OP_SEND || ir.op == OP_RWR)) begin
            if (net_ready) state <= S_TAIL;
            else           stall <= stall + 1;
          end else if (done) begin
            pc    <= pc + 1'b1;
            state <= S_FETCH;
          end else begin
            stall <= stall + 1;
          end
        end
        S_DWAIT: if (d_rvalid) begin pc <= pc + 1'b1; state <= S_FETCH; end
        S_TAIL:  if (net_ready) begin pc <= pc + 1'b1; state <= S_FETCH; end
        S_HALT:  state <= S_HALT;
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
