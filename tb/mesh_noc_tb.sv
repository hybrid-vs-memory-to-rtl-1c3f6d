// mesh_noc_tb: the 3 x 6 mesh. First one two-flit packet crosses the empty mesh from
// node 0 (top-left) to node 17 (bottom-right); its head must take one cycle per router
// (8 routers). Then every node sends random packets to random nodes while the tiles
// accept flits at random. Checked: each packet leaves the mesh at its destination node,
// whole and in order, packets between one pair of nodes keep their order, and all
// arrive.
module mesh_noc_tb;
  import icc_pkg::*;
  localparam int N = N_NODES;
  localparam int NPKT = 40;

  logic  clk = 0, rst = 1;
  flit_t inj_flit [N];
  logic  inj_valid[N];
  logic  inj_ready[N];
  flit_t ej_flit  [N];
  logic  ej_valid [N];
  logic  ej_ready [N];
  int checks = 0, failures = 0, received = 0, cyc = 0;
  int last_seq [N][N];
  bit phase2 = 0;
  int t_inj = -1, t_ej = -1;

  mesh_noc dut (.*);
  always #5 clk = ~clk;
  always @(negedge clk) cyc++;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog: received %0d", received);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic word_t mk_head(input int src, input int dst, input int seq);
    head_t h;
    h = '0;
    h.dst_x = XW'(dst % MESH_COLS);
    h.dst_y = YW'(dst / MESH_COLS);
    h.src_x = XW'(src % MESH_COLS);
    h.src_y = YW'(src / MESH_COLS);
    h.rsvd  = {5'(src), 8'(seq)};
    return word_t'(h);
  endfunction

  for (genvar n = 0; n < N; n++) begin : g_node
    initial begin
      inj_valid[n] = 0; inj_flit[n] = '0; ej_ready[n] = 1;
      for (int s = 0; s < N; s++) last_seq[s][n] = -1;
      wait (phase2);
      for (int s = 0; s < NPKT; s++) begin
        int dst, len;
        dst = $urandom % N;
        len = 1 + $urandom % 3;
        for (int f = 0; f < len; f++) begin
          @(negedge clk);
          inj_valid[n] = 1;
          inj_flit[n] = '{head: f == 0, tail: f == len - 1,
                          data: (f == 0) ? mk_head(n, dst, s) : {8'(n), 8'(s), 8'(f), 8'(dst)}};
          @(posedge clk);
          while (!inj_ready[n]) @(posedge clk);
        end
        @(negedge clk) inj_valid[n] = 0;
      end
    end

    int cur_s, cur_src, cur_f;
    bit busy = 0;
    always @(negedge clk) if (phase2) ej_ready[n] = ($urandom % 3) != 0;
    always @(posedge clk) if (!rst && ej_valid[n] && ej_ready[n]) begin
      if (ej_flit[n].head) begin
        head_t h;
        h = head_t'(ej_flit[n].data);
        checks++;
        if (busy || int'(h.dst_x) + MESH_COLS * int'(h.dst_y) != n) failures++;
        cur_src = int'(h.rsvd[12:8]); cur_s = int'(h.rsvd[7:0]); cur_f = 1;
        if (phase2) begin
          checks++;
          if (cur_s <= last_seq[cur_src][n]) failures++;
          last_seq[cur_src][n] = cur_s;
        end else t_ej = cyc;
        busy = !ej_flit[n].tail;
        if (ej_flit[n].tail) received++;
      end else begin
        checks++;
        if (!busy || ej_flit[n].data != {8'(cur_src), 8'(cur_s), 8'(cur_f), 8'(n)}) failures++;
        cur_f++;
        if (ej_flit[n].tail) begin busy = 0; received++; end
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    // One packet across the empty mesh.
    @(negedge clk);
    inj_valid[0] = 1;
    inj_flit[0]  = '{head: 1'b1, tail: 1'b0, data: mk_head(0, N - 1, 0)};
    @(posedge clk) t_inj = cyc;
    @(negedge clk) inj_flit[0] = '{head: 1'b0, tail: 1'b1, data: {8'd0, 8'd0, 8'd1, 8'(N - 1)}};
    @(negedge clk) inj_valid[0] = 0;
    wait (received == 1);
    checks++;
    if (t_ej - t_inj != 8) failures++;
    $display("corner-to-corner head latency = %0d cycles", t_ej - t_inj);
    received = 0;
    last_seq[0][N-1] = -1;
    phase2 = 1;
    wait (received == N * NPKT);
    $display("packets=%0d", received);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
