// mailbox: hardware synchronization flags of one PCore.
//
// One flag per source: the eight PCores of the cluster (bits 0-7) and the DMA memory
// interface (bit 8). A one-cycle pulse on set[i] raises flag i; clr[i] lowers it, and
// the processor clears a flag when it consumes it. A set and a clear of the same flag in
// one cycle leave it set, so a new synchronization is never lost. Two syncs from the same
// source before one is consumed merge into one. The original says only that inter-core
// synchronization uses a hardware-aided mailbox; the flag-per-source organisation follows
// the eight-input selector drawn in front of the mailbox, the rest is this design's own.
module mailbox #(
  parameter int unsigned NSRC = 9
) (
  input  logic            clk,
  input  logic            rst,
  input  logic [NSRC-1:0] set,
  input  logic [NSRC-1:0] clr,
  output logic [NSRC-1:0] flags
);
  always_ff @(posedge clk) begin
    if (rst) flags <= '0;
    else     flags <= (flags & ~clr) | set;
  end

endmodule
