// fixed_prio_arb_tb: exhaustive check that the lowest-numbered request wins.
module fixed_prio_arb_tb;
  localparam int N = 10;
  logic [N-1:0] req, gnt, exp;
  int checks = 0, failures = 0;

  fixed_prio_arb #(.N(N)) dut (.*);

  initial begin
    for (int v = 0; v < (1 << N); v++) begin
      req = N'(v);
      #1;
      exp = '0;
      for (int i = 0; i < N; i++) if (req[i]) begin exp[i] = 1'b1; break; end
      checks++;
      if (gnt !== exp) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
