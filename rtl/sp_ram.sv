// sp_ram: synchronous single-port RAM.
//
// One access per cycle: with en high, a write (we high) stores wdata at addr, and a read
// (we low) puts mem[addr] on rdata at the next clock edge. rdata holds its value until
// the next read. Used for the PCore instruction memory and private data memory and for
// the four shared-memory banks of each MCore. The original names these memories; their
// word counts are this design's own (see the instantiating modules). Contents are not
// reset; everything that is read is written first.
module sp_ram #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned WORDS = 32
) (
  input  logic                     clk,
  input  logic                     en,
  input  logic                     we,
  input  logic [$clog2(WORDS)-1:0] addr,
  input  logic [WIDTH-1:0]         wdata,
  output logic [WIDTH-1:0]         rdata
);
  logic [WIDTH-1:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= wdata;
      else    rdata     <= mem[addr];
    end
  end

endmodule
