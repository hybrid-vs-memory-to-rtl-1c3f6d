// sync_fifo: single-clock first-in first-out buffer.
//
// Used for the chip's input FIFO (data_in side) and output FIFO (data_out side), for the
// two input FIFOs of every PCore, for the MCore's input FIFO and for the input buffers
// of the routers. The head entry is always visible on rd_data (first-word fall-through);
// rd_en pops it. A push into a full FIFO and a pop from an empty one are ignored, and
// full / empty are registered-state flags, so they never depend combinationally on
// wr_en or rd_en. A push and a pop in the same cycle are both done. The depth is a
// parameter (a power of two); the original gives no FIFO depth, so the defaults are
// this design's own. Reset empties the FIFO.
module sync_fifo #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 8
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  output logic             full,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rd_data,
  output logic             empty,
  output logic [$clog2(DEPTH):0] count
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wp, rp;
  logic             do_wr, do_rd;

  assign full    = (count == (AW+1)'(DEPTH));
  assign empty   = (count == '0);
  assign do_wr   = wr_en && !full;
  assign do_rd   = rd_en && !empty;
  assign rd_data = mem[rp];

  always_ff @(posedge clk) begin
    if (rst) begin
      wp    <= '0;
      rp    <= '0;
      count <= '0;
    end else begin
      if (do_wr) wp <= wp + 1'b1;
      if (do_rd) rp <= rp + 1'b1;
      count <= count + (AW+1)'(do_wr) - (AW+1)'(do_rd);
    end
  end

  always_ff @(posedge clk) begin
    if (do_wr) mem[wp] <= wr_data;
  end

endmodule
