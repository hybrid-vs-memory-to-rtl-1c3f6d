// xy_router_tb: the router at column 2, row 1 receives random packets of one to four
// flits on all five inputs at once, with random back-pressure on the outputs. Checked:
// every head leaves on the port that XY routing selects, the flits of a packet leave in
// order on the same port without flits of other packets in between, and every packet
// arrives. Output contention (two heads wanting one output) is counted and must occur.
module xy_router_tb;
  import icc_pkg::*;
  localparam logic [XW-1:0] MX = 3'd2;
  localparam logic [YW-1:0] MY = 2'd1;
  localparam int NPKT = 150;

  logic  clk = 0, rst = 1;
  flit_t in_flit  [N_PORTS];
  logic  in_valid [N_PORTS];
  logic  in_ready [N_PORTS];
  flit_t out_flit [N_PORTS];
  logic  out_valid[N_PORTS];
  logic  out_ready[N_PORTS];
  int checks = 0, failures = 0, contention = 0, received = 0;

  xy_router #(.MY_X(MX), .MY_Y(MY)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog: received %0d", received);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int route(input logic [XW-1:0] x, input logic [YW-1:0] y);
    if (x > MX) return P_EAST;
    if (x < MX) return P_WEST;
    if (y > MY) return P_SOUTH;
    if (y < MY) return P_NORTH;
    return P_LOCAL;
  endfunction

  // Sources.
  int sent_pkts [N_PORTS];
  for (genvar p = 0; p < N_PORTS; p++) begin : g_src
    initial begin
      in_valid[p] = 0; in_flit[p] = '0; sent_pkts[p] = 0;
      wait (!rst);
      for (int s = 0; s < NPKT; s++) begin
        head_t h;
        int len;
        len = 1 + $urandom % 4;
        h = '0;
        h.dst_x = 3'($urandom % 6);
        h.dst_y = 2'($urandom % 3);
        h.rsvd  = {3'(p), 10'(s)};
        for (int f = 0; f < len; f++) begin
          @(negedge clk);
          in_valid[p] = 1;
          in_flit[p].head = (f == 0);
          in_flit[p].tail = (f == len - 1);
          in_flit[p].data = (f == 0) ? word_t'(h) : {8'(p), 8'(s), 8'(f), 3'(route(h.dst_x, h.dst_y)), 5'(len)};
          @(posedge clk);
          while (!in_ready[p]) @(posedge clk);
        end
        @(negedge clk);
        in_valid[p] = 0;
        sent_pkts[p]++;
      end
    end
  end

  // Sinks.
  for (genvar o = 0; o < N_PORTS; o++) begin : g_sink
    logic busy = 0;
    int cur_p, cur_s, cur_f;
    always @(negedge clk) out_ready[o] = ($urandom % 4) != 0;
    always @(posedge clk) if (!rst && out_valid[o] && out_ready[o]) begin
      if (out_flit[o].head) begin
        head_t h;
        h = head_t'(out_flit[o].data);
        checks++;
        if (busy || route(h.dst_x, h.dst_y) != o) failures++;
        cur_p = int'(h.rsvd[12:10]); cur_s = int'(h.rsvd[9:0]); cur_f = 1;
        busy = !out_flit[o].tail;
        if (out_flit[o].tail) received++;
      end else begin
        checks++;
        if (!busy || out_flit[o].data[31:8] != {8'(cur_p), 8'(cur_s), 8'(cur_f)} ||
            out_flit[o].data[7:5] != 3'(o)) failures++;
        cur_f++;
        if (out_flit[o].tail) begin busy = 0; received++; end
      end
    end
  end

  // Contention monitor: two input heads requesting one free output in the same cycle.
  always @(posedge clk) if (!rst) begin
    for (int o = 0; o < N_PORTS; o++) begin
      int n;
      n = 0;
      for (int i = 0; i < N_PORTS; i++)
        if (!dut.q_empty[i] && dut.q_flit[i].head && dut.want[i] == 3'(o) && !dut.lock[o]) n++;
      if (n > 1) contention++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst = 0;
    wait (received == N_PORTS * NPKT);
    repeat (5) @(posedge clk);
    checks++;
    if (contention == 0) failures++;
    $display("packets=%0d contention_cycles=%0d", received, contention);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
