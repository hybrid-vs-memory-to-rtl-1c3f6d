// mailbox_tb: random set and clear pulses against a model; a simultaneous set and clear
// must leave the flag set.
module mailbox_tb;
  localparam int N = 9;
  logic clk = 0, rst = 1;
  logic [N-1:0] set, clr, flags, model;
  int checks = 0, failures = 0, both = 0;

  mailbox #(.NSRC(N)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    set = 0; clr = 0; model = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    checks++;
    if (flags !== '0) failures++;
    for (int i = 0; i < 2000; i++) begin
      set = N'($urandom) & N'($urandom);
      clr = N'($urandom);
      if ((set & clr) != 0) both++;
      model = (model & ~clr) | set;
      @(negedge clk);
      checks++;
      if (flags !== model) failures++;
    end
    checks++;
    if (both == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
