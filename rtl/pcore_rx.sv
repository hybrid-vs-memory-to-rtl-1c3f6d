// pcore_rx: receiver and the two input FIFOs of a processor core.
//
// Takes packets from the router's Local output and keeps the data word of each packet in
// one of two FIFOs, so the processor can tell where a word came from: a message from
// another PCore (PT_MSG) goes to FIFO 1, data coming from an MCore (PT_RESP) to FIFO 2.
// Head flits are always accepted and only remembered; a data flit is accepted when its
// FIFO has room, which back-pressures the network otherwise. Packets of other types are
// dropped. The two input FIFOs and their split by origin are from the original; the
// packet formats and the FIFO depth are this design's own.
module pcore_rx
  import icc_pkg::*;
#(
  parameter int unsigned DEPTH = 4
) (
  input  logic  clk,
  input  logic  rst,
  input  flit_t in_flit,
  input  logic  in_valid,
  output logic  in_ready,
  input  logic  f1_pop,
  output word_t f1_data,
  output logic  f1_empty,
  input  logic  f2_pop,
  output word_t f2_data,
  output logic  f2_empty
);
  logic   in_body;  // a head has been taken, data flits follow
  ptype_e ptype_q;
  logic   f1_full, f2_full, f1_push, f2_push, take;
  logic [$clog2(DEPTH):0] unused_c1, unused_c2;
  head_t  h;

  assign h = head_t'(in_flit.data);

  always_comb begin
    in_ready = 1'b1;
    if (in_body && !in_flit.head) begin
      if (ptype_q == PT_MSG)  in_ready = !f1_full;
      if (ptype_q == PT_RESP) in_ready = !f2_full;
    end
  end

  assign take    = in_valid && in_ready;
  assign f1_push = take && in_body && !in_flit.head && ptype_q == PT_MSG;
  assign f2_push = take && in_body && !in_flit.head && ptype_q == PT_RESP;

  always_ff @(posedge clk) begin
    if (rst) begin
      in_body <= 1'b0;
      ptype_q <= PT_MSG;
    end else if (take) begin
      if (in_flit.head) begin
        ptype_q <= h.ptype;
        in_body <= !in_flit.tail;
      end else if (in_flit.tail) begin
        in_body <= 1'b0;
      end
    end
  end

  sync_fifo #(.WIDTH(DATA_W), .DEPTH(DEPTH)) u_fifo1 (
    .clk, .rst, .wr_en(f1_push), .wr_data(in_flit.data), .full(f1_full),
    .rd_en(f1_pop), .rd_data(f1_data), .empty(f1_empty), .count(unused_c1)
  );
  sync_fifo #(.WIDTH(DATA_W), .DEPTH(DEPTH)) u_fifo2 (
    .clk, .rst, .wr_en(f2_push), .wr_data(in_flit.data), .full(f2_full),
    .rd_en(f2_pop), .rd_data(f2_data), .empty(f2_empty), .count(unused_c2)
  );

endmodule
