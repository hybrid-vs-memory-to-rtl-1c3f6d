// clk_ctrl_tb: counts core clock edges with each clock source selected and with the
// gate closed; the counts must match the selected source and drop to zero when gated.
module clk_ctrl_tb;
  logic ext_clk = 0, vco_clk = 0, clk_mux = 0, clk_gating = 0, core_clk;
  int checks = 0, failures = 0, edges = 0;

  clk_ctrl dut (.*);
  always #5 ext_clk = ~ext_clk;   // 10 time-unit period
  always #2 vco_clk = ~vco_clk;   // 4 time-unit period
  always @(posedge core_clk) edges++;

  task automatic window(input int exp);
    edges = 0;
    #200;
    checks++;
    if (edges < exp - 1 || edges > exp + 1) begin
      failures++;
      $display("edges=%0d expected=%0d", edges, exp);
    end
  endtask

  initial begin
    #20;
    window(20);                 // ext_clk
    clk_mux = 1; #20;
    window(50);                 // vco_clk
    clk_gating = 1; #20;
    window(0);                  // gated
    clk_gating = 0; clk_mux = 0; #20;
    window(20);
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
