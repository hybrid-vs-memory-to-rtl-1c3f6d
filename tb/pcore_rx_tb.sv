// pcore_rx_tb: random PT_MSG and PT_RESP packets, plus single-flit packets that carry no
// data, arrive while the two FIFOs are drained at random. Checked: message words come out
// of FIFO 1 and MCore words out of FIFO 2, each in arrival order, and a full FIFO holds
// the network back (in_ready low) instead of losing words.
module pcore_rx_tb;
  import icc_pkg::*;
  logic clk = 0, rst = 1;
  flit_t in_flit;
  logic in_valid, in_ready, f1_pop, f1_empty, f2_pop, f2_empty;
  word_t f1_data, f2_data;
  word_t q1[$], q2[$];
  int checks = 0, failures = 0, backpressure = 0, got = 0, sent = 0;
  bit slow = 1;

  pcore_rx dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) begin
    f1_pop = !f1_empty && ($urandom % (slow ? 6 : 2) == 0);
    f2_pop = !f2_empty && ($urandom % (slow ? 6 : 2) == 0);
  end
  always @(posedge clk) if (!rst) begin
    if (f1_pop) begin checks++; if (q1.size() == 0 || f1_data != q1.pop_front()) failures++; got++; end
    if (f2_pop) begin checks++; if (q2.size() == 0 || f2_data != q2.pop_front()) failures++; got++; end
    if (in_valid && !in_ready) backpressure++;
  end

  task automatic put(input flit_t f);
    @(negedge clk);
    in_valid = 1; in_flit = f;
    @(posedge clk);
    while (!in_ready) @(posedge clk);
    @(negedge clk) in_valid = 0;
  endtask

  initial begin
    in_valid = 0; in_flit = '0;
    repeat (3) @(posedge clk);
    rst = 0;
    for (int i = 0; i < 400; i++) begin
      head_t h;
      word_t d;
      int k;
      h = '0;
      k = $urandom % 5;
      d = $urandom;
      if (k == 4) begin
        h.ptype = PT_RD;
        put('{head: 1, tail: 1, data: word_t'(h)});
      end else begin
        h.ptype = (k < 2) ? PT_MSG : PT_RESP;
        put('{head: 1, tail: 0, data: word_t'(h)});
        if (k < 2) q1.push_back(d); else q2.push_back(d);
        sent++;
        put('{head: 0, tail: 1, data: d});
      end
      if (i == 200) slow = 0;
    end
    wait (got == sent);
    checks++;
    if (backpressure == 0) failures++;
    $display("words=%0d backpressure cycles=%0d", got, backpressure);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
