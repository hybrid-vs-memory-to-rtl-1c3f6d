// mesh_noc: the 3 x 6 two-dimensional mesh network-on-chip.
//
// One xy_router per tile; node n sits at column n % COLS and row n / COLS. Neighbouring
// routers are joined by a pair of opposite valid/ready links. Links that would leave the
// mesh are tied off (never valid, always ready); XY routing never sends a flit there when
// destinations are inside the mesh. Each tile connects to its router's Local port through
// the node arrays. The mesh size and XY wormhole routing are from the original; the link
// protocol is this design's own.
module mesh_noc
  import icc_pkg::*;
#(
  parameter int unsigned ROWS = MESH_ROWS,
  parameter int unsigned COLS = MESH_COLS,
  parameter int unsigned BUF_DEPTH = 4
) (
  input  logic  clk,
  input  logic  rst,
  input  flit_t inj_flit  [ROWS*COLS],   // tile -> network
  input  logic  inj_valid [ROWS*COLS],
  output logic  inj_ready [ROWS*COLS],
  output flit_t ej_flit   [ROWS*COLS],   // network -> tile
  output logic  ej_valid  [ROWS*COLS],
  input  logic  ej_ready  [ROWS*COLS]
);
  localparam int unsigned N = ROWS * COLS;

  flit_t r_in_flit  [N][N_PORTS];
  logic  r_in_valid [N][N_PORTS];
  logic  r_in_ready [N][N_PORTS];
  flit_t r_out_flit [N][N_PORTS];
  logic  r_out_valid[N][N_PORTS];
  logic  r_out_ready[N][N_PORTS];

  for (genvar n = 0; n < N; n++) begin : g_node
    localparam int unsigned X = n % COLS;
    localparam int unsigned Y = n / COLS;

    xy_router #(.MY_X(XW'(X)), .MY_Y(YW'(Y)), .BUF_DEPTH(BUF_DEPTH)) u_router (
      .clk, .rst,
      .in_flit (r_in_flit[n]),  .in_valid (r_in_valid[n]),  .in_ready (r_in_ready[n]),
      .out_flit(r_out_flit[n]), .out_valid(r_out_valid[n]), .out_ready(r_out_ready[n])
    );

    // Local port.
    assign r_in_flit[n][P_LOCAL]   = inj_flit[n];
    assign r_in_valid[n][P_LOCAL]  = inj_valid[n];
    assign inj_ready[n]            = r_in_ready[n][P_LOCAL];
    assign ej_flit[n]              = r_out_flit[n][P_LOCAL];
    assign ej_valid[n]             = r_out_valid[n][P_LOCAL];
    assign r_out_ready[n][P_LOCAL] = ej_ready[n];

    // North neighbour (row - 1): its South output feeds my North input.
    if (Y > 0) begin : g_n
      assign r_in_flit[n][P_NORTH]   = r_out_flit[n-COLS][P_SOUTH];
      assign r_in_valid[n][P_NORTH]  = r_out_valid[n-COLS][P_SOUTH];
      assign r_out_ready[n][P_NORTH] = r_in_ready[n-COLS][P_SOUTH];
    end else begin : g_n_edge
      assign r_in_flit[n][P_NORTH]   = '0;
      assign r_in_valid[n][P_NORTH]  = 1'b0;
      assign r_out_ready[n][P_NORTH] = 1'b1;
    end
    if (Y < ROWS - 1) begin : g_s
      assign r_in_flit[n][P_SOUTH]   = r_out_flit[n+COLS][P_NORTH];
      assign r_in_valid[n][P_SOUTH]  = r_out_valid[n+COLS][P_NORTH];
      assign r_out_ready[n][P_SOUTH] = r_in_ready[n+COLS][P_NORTH];
    end else begin : g_s_edge
      assign r_in_flit[n][P_SOUTH]   = '0;
      assign r_in_valid[n][P_SOUTH]  = 1'b0;
      assign r_out_ready[n][P_SOUTH] = 1'b1;
    end
    if (X > 0) begin : g_w
      assign r_in_flit[n][P_WEST]   = r_out_flit[n-1][P_EAST];
      assign r_in_valid[n][P_WEST]  = r_out_valid[n-1][P_EAST];
      assign r_out_ready[n][P_WEST] = r_in_ready[n-1][P_EAST];
    end else begin : g_w_edge
      assign r_in_flit[n][P_WEST]   = '0;
      assign r_in_valid[n][P_WEST]  = 1'b0;
      assign r_out_ready[n][P_WEST] = 1'b1;
    end
    if (X < COLS - 1) begin : g_e
      assign r_in_flit[n][P_EAST]   = r_out_flit[n+1][P_WEST];
      assign r_in_valid[n][P_EAST]  = r_out_valid[n+1][P_WEST];
      assign r_out_ready[n][P_EAST] = r_in_ready[n+1][P_WEST];
    end else begin : g_e_edge
      assign r_in_flit[n][P_EAST]   = '0;
      assign r_in_valid[n][P_EAST]  = 1'b0;
      assign r_out_ready[n][P_EAST] = 1'b1;
    end
  end

endmodule
