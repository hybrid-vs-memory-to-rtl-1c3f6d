// mcore_rx_tb: feeds remote write, remote read and stray message packets into an MCore
// receiver whose memory port is served by a model that grants at random. Checked: each
// write lands in the memory, each read returns a two-flit PT_RESP packet addressed to
// the requester with the current memory word, and messages of other types cause no
// memory access.
module mcore_rx_tb;
  import icc_pkg::*;
  logic      clk = 0, rst = 1;
  flit_t     in_flit, out_flit;
  logic      in_valid, in_ready, out_valid, out_ready;
  logic      m_req, m_we, m_gnt, m_rvalid;
  shm_addr_t m_addr;
  word_t     m_wdata, m_rdata;
  word_t     mem [128];
  int checks = 0, failures = 0, n_rd = 0, n_wr_access = 0, n_resp = 0;
  word_t     exp_q[$];
  logic [XW-1:0] exp_x[$];

  mcore_rx #(.MY_X(3'd1), .MY_Y(2'd1)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Memory model.
  always @(negedge clk) begin
    m_gnt     = m_req && ($urandom % 2);
    out_ready = ($urandom % 3) != 0;
  end
  always @(posedge clk) begin
    m_rvalid <= 1'b0;
    if (m_req && m_gnt) begin
      if (m_we) begin mem[m_addr] <= m_wdata; n_wr_access++; end
      else begin m_rdata <= mem[m_addr]; m_rvalid <= 1'b1; end
    end
  end

  // Response checker.
  bit in_resp = 0;
  always @(posedge clk) if (!rst && out_valid && out_ready) begin
    if (out_flit.head) begin
      head_t h;
      h = head_t'(out_flit.data);
      checks++;
      if (in_resp || h.ptype != PT_RESP || h.dst_x != exp_x[0] || h.src_x != 3'd1 || out_flit.tail)
        failures++;
      in_resp = 1;
    end else begin
      checks++;
      if (!in_resp || !out_flit.tail || out_flit.data != exp_q[0]) failures++;
      void'(exp_q.pop_front());
      void'(exp_x.pop_front());
      in_resp = 0;
      n_resp++;
    end
  end

  task automatic put(input flit_t f);
    @(negedge clk);
    in_valid = 1; in_flit = f;
    @(posedge clk);
    while (!in_ready) @(posedge clk);
    @(negedge clk) in_valid = 0;
  endtask

  word_t model [128];
  initial begin
    in_valid = 0; in_flit = '0; m_rvalid = 0;
    for (int i = 0; i < 128; i++) begin mem[i] = 0; model[i] = 0; end
    repeat (3) @(posedge clk);
    rst = 0;
    for (int i = 0; i < 300; i++) begin
      head_t h;
      int k;
      h = '0;
      h.addr  = 7'($urandom);
      h.src_x = 3'($urandom % 6);
      h.src_y = 2'($urandom % 3);
      k = $urandom % 5;
      if (k < 2) begin
        word_t d;
        d = $urandom;
        h.ptype = PT_WR;
        put('{head: 1, tail: 0, data: word_t'(h)});
        put('{head: 0, tail: 1, data: d});
        model[h.addr] = d;
      end else if (k < 4) begin
        h.ptype = PT_RD;
        exp_q.push_back(model[h.addr]);
        exp_x.push_back(h.src_x);
        n_rd++;
        put('{head: 1, tail: 1, data: word_t'(h)});
      end else begin
        h.ptype = PT_MSG;
        put('{head: 1, tail: 0, data: word_t'(h)});
        put('{head: 0, tail: 1, data: 32'hDEAD});
      end
    end
    wait (n_resp == n_rd);
    repeat (5) @(posedge clk);
    for (int i = 0; i < 128; i++) begin
      checks++;
      if (mem[i] != model[i]) failures++;
    end
    $display("reads=%0d writes=%0d", n_rd, n_wr_access);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
