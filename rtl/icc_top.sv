// icc_top: sixteen-core processor with hybrid and memory-to-memory inter-core
// communication.
//
// Sixteen processor cores (PCores) and two memory cores (MCores) sit on a 3 x 6 mesh
// network-on-chip (mesh_noc, XY wormhole routing). They form two clusters of eight
// PCores around one MCore each (columns 0-2 and 3-5). Inside a cluster every PCore
// reaches the MCore's shared memory over hard wires, with fixed priority, and signals
// other PCores through their mailboxes (shared-memory communication). Any two tiles can
// exchange packets over the mesh (message passing). A DMA memory interface joins the two
// MCores and copies blocks between their shared memories (memory-to-memory communication).
// Which of these paths a transfer takes is decided by the programs loaded into the cores,
// so the hybrid path (PCore 1 -> MCore 1 -> PCore 3 -> network -> PCore 9 -> MCore 2 ->
// PCore 16) and the memory-to-memory path (PCore 1 -> MCore 1 -> DMA -> MCore 2 ->
// PCore 16) both run on this one chip.
//
// Interface: data_in/write_enb fill the input FIFO, which only PCore 1 (top-left, the
// source) reads; PCore 16 (bottom-right, the destination) writes the output FIFO, read
// with data_out/read_enb (data_out shows the oldest word while data_valid is high).
// OUT instructions of the other cores wait forever. Programs are loaded word by word
// through prog_* (prog_core 0..15 = PCore 1..16) while run is low; run high starts every
// core at address 0. The core clock is ext_clk or vco_clk, chosen by clk_mux and gated
// by clk_gating (clk_ctrl); all control inputs are sampled on its rising edge, and rst is
// synchronous and active high. The cluster and mesh organisation, the I/O FIFOs and the
// source and destination cores follow the original; port protocols, FIFO depths and the
// programmable cores are this design's own. The VCO and the test_config / test_output
// pins are not part of this RTL.
module icc_top
  import icc_pkg::*;
#(
  parameter int unsigned IO_FIFO_DEPTH = 16
) (
  input  logic        ext_clk,
  input  logic        vco_clk,
  input  logic        clk_mux,
  input  logic        clk_gating,
  input  logic        rst,
  // input FIFO
  input  word_t       data_in,
  input  logic        write_enb,
  output logic        in_full,
  // output FIFO
  output word_t       data_out,
  input  logic        read_enb,
  output logic        data_valid,
  // program loading and control
  input  logic        prog_we,
  input  logic [3:0]  prog_core,
  input  logic [4:0]  prog_addr,
  input  word_t       prog_data,
  input  logic        run,
  output logic [N_PCORES-1:0] halted,
  output logic        dma_busy,
  output logic [15:0] dma_words
);
  logic clk;

  clk_ctrl u_clk (.ext_clk, .vco_clk, .clk_mux, .clk_gating, .core_clk(clk));

  // Mesh.
  flit_t inj_flit [N_NODES];
  logic  inj_valid[N_NODES];
  logic  inj_ready[N_NODES];
  flit_t ej_flit  [N_NODES];
  logic  ej_valid [N_NODES];
  logic  ej_ready [N_NODES];

  mesh_noc u_noc (.clk, .rst, .inj_flit, .inj_valid, .inj_ready, .ej_flit, .ej_valid, .ej_ready);

  // Input and output FIFOs.
  logic  in_empty, in_pop, out_full, out_empty, out_push;
  word_t in_head, out_word;
  logic [$clog2(IO_FIFO_DEPTH):0] unused_ci, unused_co;

  sync_fifo #(.WIDTH(DATA_W), .DEPTH(IO_FIFO_DEPTH)) u_in_fifo (
    .clk, .rst, .wr_en(write_enb), .wr_data(data_in), .full(in_full),
    .rd_en(in_pop), .rd_data(in_head), .empty(in_empty), .count(unused_ci)
  );
  sync_fifo #(.WIDTH(DATA_W), .DEPTH(IO_FIFO_DEPTH)) u_out_fifo (
    .clk, .rst, .wr_en(out_push), .wr_data(out_word), .full(out_full),
    .rd_en(read_enb), .rd_data(data_out), .empty(out_empty), .count(unused_co)
  );
  assign data_valid = !out_empty;

  // Per-cluster wiring between PCores and their MCore.
  logic      s_req   [N_CLUSTERS][PC_PER_CL];
  logic      s_we    [N_CLUSTERS][PC_PER_CL];
  shm_addr_t s_addr  [N_CLUSTERS][PC_PER_CL];
  word_t     s_wdata [N_CLUSTERS][PC_PER_CL];
  logic      s_gnt   [N_CLUSTERS][PC_PER_CL];
  logic      s_rvalid[N_CLUSTERS][PC_PER_CL];
  word_t     s_rdata [N_CLUSTERS][PC_PER_CL];
  logic      sy_valid[N_CLUSTERS][PC_PER_CL];
  logic [2:0] sy_dst [N_CLUSTERS][PC_PER_CL];
  logic [MB_SRCS-1:0] mb_set[N_CLUSTERS][PC_PER_CL];
  logic      pd_req  [N_CLUSTERS][PC_PER_CL];
  dma_cmd_t  pd_cmd  [N_CLUSTERS][PC_PER_CL];
  logic      pd_gnt  [N_CLUSTERS][PC_PER_CL];
  logic      c_in_ready [N_CLUSTERS][PC_PER_CL];
  logic      c_out_valid[N_CLUSTERS][PC_PER_CL];
  word_t     c_out_data [N_CLUSTERS][PC_PER_CL];

  // DMA memory interface wiring.
  logic      dc_valid[N_CLUSTERS];
  dma_cmd_t  dc_cmd  [N_CLUSTERS];
  logic      dc_ready[N_CLUSTERS];
  logic      dm_req  [N_CLUSTERS];
  logic      dm_we   [N_CLUSTERS];
  shm_addr_t dm_addr [N_CLUSTERS];
  word_t     dm_wdata[N_CLUSTERS];
  logic      dm_gnt  [N_CLUSTERS];
  logic      dm_rvalid[N_CLUSTERS];
  word_t     dm_rdata[N_CLUSTERS];
  logic      dn_valid[N_CLUSTERS];
  logic [2:0] dn_dst [N_CLUSTERS];

  for (genvar c = 0; c < N_CLUSTERS; c++) begin : g_cl
    localparam int unsigned MN = 1 * MESH_COLS + c * CL_COLS + 1;  // MCore node

    mcore #(.MY_X(mcore_x(c)), .MY_Y(YW'(1))) u_mcore (
      .clk, .rst,
      .pc_req(s_req[c]), .pc_we(s_we[c]), .pc_addr(s_addr[c]), .pc_wdata(s_wdata[c]),
      .pc_gnt(s_gnt[c]), .pc_rvalid(s_rvalid[c]), .pc_rdata(s_rdata[c]),
      .pc_sync_valid(sy_valid[c]), .pc_sync_dst(sy_dst[c]),
      .dma_notify_valid(dn_valid[c]), .dma_notify_dst(dn_dst[c]), .mb_set(mb_set[c]),
      .pc_dma_req(pd_req[c]), .pc_dma_cmd(pd_cmd[c]), .pc_dma_gnt(pd_gnt[c]),
      .dma_cmd_valid(dc_valid[c]), .dma_cmd(dc_cmd[c]), .dma_cmd_ready(dc_ready[c]),
      .dma_req(dm_req[c]), .dma_we(dm_we[c]), .dma_addr(dm_addr[c]), .dma_wdata(dm_wdata[c]),
      .dma_gnt(dm_gnt[c]), .dma_rvalid(dm_rvalid[c]), .dma_rdata(dm_rdata[c]),
      .ej_flit(ej_flit[MN]), .ej_valid(ej_valid[MN]), .ej_ready(ej_ready[MN]),
      .inj_flit(inj_flit[MN]), .inj_valid(inj_valid[MN]), .inj_ready(inj_ready[MN])
    );

    for (genvar k = 0; k < PC_PER_CL; k++) begin : g_pc
      localparam int unsigned P  = c * PC_PER_CL + k;
      localparam int unsigned PN = int'(pcore_y(k)) * MESH_COLS + int'(pcore_x(c, k));
      logic  p_in_valid, p_out_ready;
      word_t p_in_data;
      logic [31:0] unused_stall;

      if (P == 0) begin : g_src
        assign p_in_valid = !in_empty;
        assign p_in_data  = in_head;
      end else begin : g_nosrc
        assign p_in_valid = 1'b0;
        assign p_in_data  = '0;
      end
      if (P == N_PCORES - 1) begin : g_dst
        assign p_out_ready = !out_full;
      end else begin : g_nodst
        assign p_out_ready = 1'b0;
      end

      pcore #(.MY_X(pcore_x(c, k)), .MY_Y(pcore_y(k))) u_pcore (
        .clk, .rst, .run, .halted(halted[P]), .stall(unused_stall),
        .prog_we(prog_we && prog_core == 4'(P)), .prog_addr, .prog_data,
        .in_valid(p_in_valid), .in_data(p_in_data), .in_ready(c_in_ready[c][k]),
        .out_valid(c_out_valid[c][k]), .out_data(c_out_data[c][k]), .out_ready(p_out_ready),
        .s_req(s_req[c][k]), .s_we(s_we[c][k]), .s_addr(s_addr[c][k]), .s_wdata(s_wdata[c][k]),
        .s_gnt(s_gnt[c][k]), .s_rvalid(s_rvalid[c][k]), .s_rdata(s_rdata[c][k]),
        .sync_valid(sy_valid[c][k]), .sync_dst(sy_dst[c][k]), .mb_set(mb_set[c][k]),
        .dma_req(pd_req[c][k]), .dma_cmd(pd_cmd[c][k]), .dma_gnt(pd_gnt[c][k]),
        .inj_flit(inj_flit[PN]), .inj_valid(inj_valid[PN]), .inj_ready(inj_ready[PN]),
        .ej_flit(ej_flit[PN]), .ej_valid(ej_valid[PN]), .ej_ready(ej_ready[PN])
      );
    end
  end

  assign in_pop   = c_in_ready[0][0] && !in_empty;
  assign out_push = c_out_valid[N_CLUSTERS-1][PC_PER_CL-1] && !out_full;
  assign out_word = c_out_data[N_CLUSTERS-1][PC_PER_CL-1];

  dma_mem_if u_dma (
    .clk, .rst,
    .cmd_valid(dc_valid), .cmd(dc_cmd), .cmd_ready(dc_ready),
    .m_req(dm_req), .m_we(dm_we), .m_addr(dm_addr), .m_wdata(dm_wdata),
    .m_gnt(dm_gnt), .m_rvalid(dm_rvalid), .m_rdata(dm_rdata),
    .notify_valid(dn_valid), .notify_dst(dn_dst),
    .busy(dma_busy), .words_moved(dma_words)
  );

endmodule
