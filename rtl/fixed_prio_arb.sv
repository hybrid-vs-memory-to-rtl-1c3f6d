// fixed_prio_arb: fixed-priority arbiter.
//
// Grants the lowest-numbered active request: bit 0 has the highest priority. In the MCore
// bit 0 is PCore 1, the top-left PCore of the cluster, and bit 7 is PCore 8, the
// bottom-right one, the order the original gives for shared-memory access. Purely
// combinational: gnt is one-hot (or zero when no request) in the same cycle.
module fixed_prio_arb #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0] req,
  output logic [N-1:0] gnt
);
  always_comb begin
    gnt = '0;
    for (int i = N - 1; i >= 0; i--) begin
      if (req[i]) gnt = N'(1) << i;
    end
  end

endmodule
