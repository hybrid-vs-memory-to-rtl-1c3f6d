// sync_fifo_tb: random pushes and pops against a queue model; checks data order and the
// full / empty flags, including pushes into a full FIFO, which must be dropped.
module sync_fifo_tb;
  localparam int W = 16, D = 4;
  logic clk = 0, rst = 1;
  logic wr_en, rd_en, full, empty;
  logic [W-1:0] wr_data, rd_data;
  logic [$clog2(D):0] count;
  int checks = 0, failures = 0;
  logic [W-1:0] model[$];
  int n_full = 0;

  sync_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_en = 0; rd_en = 0; wr_data = 0;
    repeat (2) @(posedge clk);
    rst = 0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      checks++;
      if (empty != (model.size() == 0) || full != (model.size() == D) || count != model.size()) failures++;
      if (model.size() > 0) begin
        checks++;
        if (rd_data != model[0]) failures++;
      end
      if (full) n_full++;
      wr_en   = ($urandom % 3) != 0;
      rd_en   = ($urandom % 2) != 0;
      wr_data = W'($urandom);
      @(posedge clk);
      #1;
    end
    // model update is done in the clocked process below
    checks++;
    if (n_full == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (!rst) begin
    automatic bit do_rd = rd_en && model.size() > 0;
    automatic bit do_wr = wr_en && model.size() < D;
    if (do_rd) void'(model.pop_front());
    if (do_wr) model.push_back(wr_data);
  end
endmodule
