// dma_mem_if_tb: two shared-memory models, one per cluster, behind the memory interface.
// Block copies are requested from both clusters (also at the same time, where cluster 1's
// command must go first). Checked: the destination block equals the source block, nothing
// else in the destination changes, the completion notice names the right PCore on the
// destination side, and with memories that grant at once a copy of L words keeps the
// interface busy for exactly 3L + 1 cycles (read, read data, write per word, one notice).
module dma_mem_if_tb;
  import icc_pkg::*;
  logic      clk = 0, rst = 1;
  logic      cmd_valid[2];
  dma_cmd_t  cmd      [2];
  logic      cmd_ready[2];
  logic      m_req    [2];
  logic      m_we     [2];
  shm_addr_t m_addr   [2];
  word_t     m_wdata  [2];
  logic      m_gnt    [2];
  logic      m_rvalid [2];
  word_t     m_rdata  [2];
  logic       notify_valid[2];
  logic [2:0] notify_dst  [2];
  logic      busy;
  logic [15:0] words_moved;

  word_t mem [2][128];
  word_t ref_mem [2][128];
  int checks = 0, failures = 0, busy_cyc = 0, notices = 0;
  logic [2:0] last_notify;
  int last_notify_cl;
  bit random_gnt = 0;

  dma_mem_if dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar c = 0; c < 2; c++) begin : g_mem
    always @(negedge clk) m_gnt[c] = m_req[c] && (!random_gnt || ($urandom % 2));
    always @(posedge clk) begin
      m_rvalid[c] <= 1'b0;
      if (m_req[c] && m_gnt[c]) begin
        if (m_we[c]) mem[c][m_addr[c]] <= m_wdata[c];
        else begin m_rdata[c] <= mem[c][m_addr[c]]; m_rvalid[c] <= 1'b1; end
      end
      if (notify_valid[c]) begin
        notices++; last_notify = notify_dst[c]; last_notify_cl = c;
      end
    end
  end
  always @(posedge clk) if (busy) busy_cyc++;

  task automatic copy(input int c, input int src, input int dst, input int len, input int nt,
                      input bit check_time);
    int n0;
    @(negedge clk);
    cmd_valid[c] = 1;
    cmd[c] = '{src_addr: 7'(src), dst_addr: 7'(dst), len: 5'(len), notify: 3'(nt)};
    @(posedge clk);
    while (!cmd_ready[c]) @(posedge clk);
    @(negedge clk) cmd_valid[c] = 0;
    busy_cyc = 0;
    n0 = notices;
    wait (notices == n0 + 1);
    @(negedge clk);
    for (int i = 0; i < len; i++) ref_mem[1-c][dst+i] = ref_mem[c][src+i];
    checks++;
    if (last_notify != 3'(nt) || last_notify_cl != 1 - c) failures++;
    if (check_time) begin
      checks++;
      if (busy_cyc != 3 * len + 1) begin
        failures++;
        $display("busy %0d cycles for %0d words", busy_cyc, len);
      end
    end
    for (int a = 0; a < 128; a++) begin
      checks++;
      if (mem[1-c][a] != ref_mem[1-c][a]) failures++;
    end
  endtask

  initial begin
    cmd_valid[0] = 0; cmd_valid[1] = 0; cmd[0] = '0; cmd[1] = '0;
    for (int c = 0; c < 2; c++) for (int a = 0; a < 128; a++) begin
      mem[c][a] = $urandom; ref_mem[c][a] = mem[c][a];
    end
    repeat (3) @(posedge clk);
    rst = 0;
    copy(0, 7'h00, 7'h20, 1, 7, 1);
    copy(0, 7'h10, 7'h40, 5, 3, 1);
    copy(1, 7'h60, 7'h05, 16, 0, 1);
    random_gnt = 1;
    for (int t = 0; t < 20; t++)
      copy($urandom % 2, $urandom % 64, $urandom % 64, 1 + $urandom % 31, $urandom % 8, 0);
    // Both clusters at once: cluster 1 (port 0) is served first.
    @(negedge clk);
    cmd_valid[0] = 1; cmd_valid[1] = 1;
    cmd[0] = '{src_addr: 7'h01, dst_addr: 7'h70, len: 5'd2, notify: 3'd1};
    cmd[1] = '{src_addr: 7'h02, dst_addr: 7'h71, len: 5'd2, notify: 3'd2};
    #1;
    checks++;
    if (!cmd_ready[0] || cmd_ready[1]) failures++;
    @(negedge clk) cmd_valid[0] = 0;
    @(posedge clk);
    while (!cmd_ready[1]) @(posedge clk);
    @(negedge clk) cmd_valid[1] = 0;
    wait (!busy);
    checks++;
    if (last_notify != 3'd2 || last_notify_cl != 0) failures++;
    $display("words moved=%0d", words_moved);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
