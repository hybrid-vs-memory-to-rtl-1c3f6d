// sp_ram_tb: random writes and reads against an array model; read data must appear one
// cycle after the read and hold while the RAM is idle.
module sp_ram_tb;
  localparam int W = 32, N = 32;
  logic clk = 0, en, we;
  logic [$clog2(N)-1:0] addr;
  logic [W-1:0] wdata, rdata;
  logic [W-1:0] model [N];
  int checks = 0, failures = 0;

  sp_ram #(.WIDTH(W), .WORDS(N)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 0; we = 0; addr = 0; wdata = 0;
    for (int i = 0; i < N; i++) begin
      @(negedge clk); en = 1; we = 1; addr = i; wdata = $urandom; model[i] = wdata;
    end
    for (int i = 0; i < 1000; i++) begin
      logic [W-1:0] exp;
      @(negedge clk);
      en = 1; addr = $urandom % N;
      we = ($urandom % 3) == 0;
      wdata = $urandom;
      exp = model[addr];
      if (we) model[addr] = wdata;
      @(negedge clk);
      if (!we) begin
        checks++;
        en = 0;
        if (rdata !== exp) failures++;
        @(negedge clk);
        checks++;
        if (rdata !== exp) failures++;
      end
      en = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
