// xy_router: five-port wormhole router with XY dimension-ordered routing.
//
// Ports are Local (the tile), North (row - 1), East (column + 1), South (row + 1) and
// West (column - 1), numbered as in icc_pkg. Every input has a small flit FIFO. The head
// flit of a packet is routed by its destination coordinates: first along the row (X)
// until the column matches, then along the column (Y), then to Local. An output that
// receives a head flit is locked to that input until the packet's tail flit has passed,
// so the flits of a packet follow each other without interleaving (wormhole switching).
// When several heads want the same free output, a round-robin pointer per output picks
// one. Links use valid/ready: a flit moves when valid and ready are both high. out_valid
// depends only on FIFO state and locks, and in_ready is the registered not-full flag of
// the input FIFO, so chained routers form no combinational loop. One cycle per hop once a
// flit is in the input FIFO. XY dimension-ordered wormhole routing is from the original;
// the buffer depth, the round-robin choice and the handshake are this design's own.
module xy_router
  import icc_pkg::*;
#(
  parameter logic [XW-1:0] MY_X    = '0,
  parameter logic [YW-1:0] MY_Y    = '0,
  parameter int unsigned   BUF_DEPTH = 4
) (
  input  logic  clk,
  input  logic  rst,
  input  flit_t in_flit  [N_PORTS],
  input  logic  in_valid [N_PORTS],
  output logic  in_ready [N_PORTS],
  output flit_t out_flit [N_PORTS],
  output logic  out_valid[N_PORTS],
  input  logic  out_ready[N_PORTS]
);
  localparam int unsigned PW = $clog2(N_PORTS);

  flit_t       q_flit  [N_PORTS];
  logic        q_empty [N_PORTS];
  logic        q_full  [N_PORTS];
  logic        q_pop   [N_PORTS];
  logic [PW-1:0] route_q [N_PORTS];  // output held by the packet in progress at input i
  logic [PW-1:0] want    [N_PORTS];  // output requested by the flit at the head of input i

  logic          lock     [N_PORTS];  // output o is held by a packet
  logic [PW-1:0] owner    [N_PORTS];
  logic [PW-1:0] rr       [N_PORTS];
  logic [PW-1:0] sel      [N_PORTS];  // input connected to output o this cycle
  logic          sel_ok   [N_PORTS];

  function automatic logic [PW-1:0] xy_route(input word_t d);
    head_t h;
    h = head_t'(d);
    if      (h.dst_x > MY_X) return PW'(P_EAST);
    else if (h.dst_x < MY_X) return PW'(P_WEST);
    else if (h.dst_y > MY_Y) return PW'(P_SOUTH);
    else if (h.dst_y < MY_Y) return PW'(P_NORTH);
    else                     return PW'(P_LOCAL);
  endfunction

  for (genvar i = 0; i < N_PORTS; i++) begin : g_in
    logic [$clog2(BUF_DEPTH):0] unused_cnt;
    sync_fifo #(.WIDTH($bits(flit_t)), .DEPTH(BUF_DEPTH)) u_buf (
      .clk, .rst,
      .wr_en(in_valid[i]), .wr_data(in_flit[i]), .full(q_full[i]),
      .rd_en(q_pop[i]), .rd_data(q_flit[i]), .empty(q_empty[i]), .count(unused_cnt)
    );
    assign in_ready[i] = !q_full[i];
    assign want[i]     = q_flit[i].head ? xy_route(q_flit[i].data) : route_q[i];
  end

  // Candidate inputs of output o in round-robin order, starting at rr[o].
  logic [PW-1:0] cand [N_PORTS][N_PORTS];
  always_comb begin
    for (int o = 0; o < N_PORTS; o++) begin
      for (int k = 0; k < N_PORTS; k++) begin
        cand[o][k] = ({1'b0, rr[o]} + (PW+1)'(k) >= (PW+1)'(N_PORTS))
                     ? PW'({1'b0, rr[o]} + (PW+1)'(k) - (PW+1)'(N_PORTS))
                     : PW'({1'b0, rr[o]} + (PW+1)'(k));
      end
    end
  end

  // Output allocation and crossbar.
  always_comb begin
    for (int o = 0; o < N_PORTS; o++) begin
      sel[o]    = owner[o];
      sel_ok[o] = 1'b0;
      if (lock[o]) begin
        sel_ok[o] = !q_empty[owner[o]];
      end else begin
        for (int k = N_PORTS - 1; k >= 0; k--) begin
          if (!q_empty[cand[o][k]] && q_flit[cand[o][k]].head && want[cand[o][k]] == PW'(o)) begin
            sel[o]    = cand[o][k];
            sel_ok[o] = 1'b1;
          end
        end
      end
      out_valid[o] = sel_ok[o];
      out_flit[o]  = q_flit[sel[o]];
    end
  end

  // An input is popped when the output it is connected to takes its flit.
  always_comb begin
    for (int i = 0; i < N_PORTS; i++) begin
      q_pop[i] = 1'b0;
      for (int o = 0; o < N_PORTS; o++) begin
        if (sel_ok[o] && out_ready[o] && sel[o] == PW'(i)) q_pop[i] = 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int o = 0; o < N_PORTS; o++) begin
        lock[o]    <= 1'b0;
        owner[o]   <= '0;
        rr[o]      <= '0;
        route_q[o] <= '0;
      end
    end else begin
      for (int o = 0; o < N_PORTS; o++) begin
        if (sel_ok[o] && out_ready[o]) begin
          if (q_flit[sel[o]].head) begin
            route_q[sel[o]] <= PW'(o);
            rr[o]           <= (sel[o] == PW'(N_PORTS - 1)) ? '0 : sel[o] + 1'b1;
          end
          if (q_flit[sel[o]].tail) begin
            lock[o] <= 1'b0;
          end else begin
            lock[o]  <= 1'b1;
            owner[o] <= sel[o];
          end
        end
      end
    end
  end

  // A body flit must never reach an output that its packet does not hold.
  for (genvar o = 0; o < N_PORTS; o++) begin : g_chk
    always_ff @(posedge clk) begin
      if (!rst && out_valid[o] && !out_flit[o].head) begin
        assert (lock[o]) else $error("body flit on unlocked output %0d", o);
      end
    end
  end

endmodule
