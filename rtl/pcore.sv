// pcore: one processor core tile.
//
// Groups the blocks of a PCore: the processor (pcore_cpu), the memory access arbitrator
// with the instruction memory and the private data memory, the mailbox and the network
// receiver with its two input FIFOs (pcore_rx). The tile's router lives in the mesh
// (mesh_noc) and is reached through the inj_* / ej_* ports. The shared memory of the
// cluster's MCore is reached over the hard-wired s_* port, and synchronization pulses to
// other PCores leave on sync_*; the MCore returns the mailbox set pulses on mb_set.
// Programs are written into the instruction memory through prog_* while run is low.
// Memory sizes (32 instruction words, 32 private data words) are this design's own; the
// original gives only the block structure.
module pcore
  import icc_pkg::*;
#(
  parameter logic [XW-1:0] MY_X    = '0,
  parameter logic [YW-1:0] MY_Y    = '0,
  parameter int unsigned   IMEM_AW = 5,
  parameter int unsigned   PMEM_AW = 5
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               run,
  output logic               halted,
  output logic [31:0]        stall,
  input  logic               prog_we,
  input  logic [IMEM_AW-1:0] prog_addr,
  input  word_t              prog_data,
  // external streams (used by the source and destination cores)
  input  logic               in_valid,
  input  word_t              in_data,
  output logic               in_ready,
  output logic               out_valid,
  output word_t              out_data,
  input  logic               out_ready,
  // shared memory port to the MCore
  output logic               s_req,
  output logic               s_we,
  output shm_addr_t          s_addr,
  output word_t              s_wdata,
  input  logic               s_gnt,
  input  logic               s_rvalid,
  input  word_t              s_rdata,
  // synchronization
  output logic               sync_valid,
  output logic [2:0]         sync_dst,
  input  logic [MB_SRCS-1:0] mb_set,
  // DMA command
  output logic               dma_req,
  output dma_cmd_t           dma_cmd,
  input  logic               dma_gnt,
  // router Local port
  output flit_t              inj_flit,
  output logic               inj_valid,
  input  logic               inj_ready,
  input  flit_t              ej_flit,
  input  logic               ej_valid,
  output logic               ej_ready
);
  logic               if_req;
  logic [IMEM_AW-1:0] if_addr, unused_pc;
  word_t              if_rdata;
  logic               d_req, d_we, d_gnt, d_rvalid;
  logic [7:0]         d_addr;
  word_t              d_wdata, d_rdata;
  logic               im_en, im_we, pm_en, pm_we;
  logic [IMEM_AW-1:0] im_addr;
  logic [PMEM_AW-1:0] pm_addr;
  word_t              im_wdata, im_rdata, pm_wdata, pm_rdata;
  logic [MB_SRCS-1:0] mb_flags, mb_clr;
  logic               f1_empty, f1_pop, f2_empty, f2_pop;
  word_t              f1_data, f2_data;

  pcore_cpu #(.MY_X(MY_X), .MY_Y(MY_Y), .IMEM_AW(IMEM_AW)) u_cpu (
    .clk, .rst, .run, .halted, .pc(unused_pc), .stall,
    .if_req, .if_addr, .if_rdata,
    .d_req, .d_we, .d_addr, .d_wdata, .d_gnt, .d_rvalid, .d_rdata,
    .in_valid, .in_data, .in_ready, .out_valid, .out_data, .out_ready,
    .sync_valid, .sync_dst, .mb_flags, .mb_clr,
    .net_flit(inj_flit), .net_valid(inj_valid), .net_ready(inj_ready),
    .f1_empty, .f1_data, .f1_pop, .f2_empty, .f2_data, .f2_pop,
    .dma_req, .dma_cmd, .dma_gnt
  );

  mem_access_arb #(.IMEM_AW(IMEM_AW), .PMEM_AW(PMEM_AW)) u_arb (
    .clk, .rst, .prog_we, .prog_addr, .prog_data,
    .if_req, .if_addr, .if_rdata,
    .d_req, .d_we, .d_addr, .d_wdata, .d_gnt, .d_rvalid, .d_rdata,
    .im_en, .im_we, .im_addr, .im_wdata, .im_rdata,
    .pm_en, .pm_we, .pm_addr, .pm_wdata, .pm_rdata,
    .s_req, .s_we, .s_addr, .s_wdata, .s_gnt, .s_rvalid, .s_rdata
  );

  sp_ram #(.WIDTH(DATA_W), .WORDS(2 ** IMEM_AW)) u_imem (
    .clk, .en(im_en), .we(im_we), .addr(im_addr), .wdata(im_wdata), .rdata(im_rdata)
  );

  sp_ram #(.WIDTH(DATA_W), .WORDS(2 ** PMEM_AW)) u_pmem (
    .clk, .en(pm_en), .we(pm_we), .addr(pm_addr), .wdata(pm_wdata), .rdata(pm_rdata)
  );

  mailbox #(.NSRC(MB_SRCS)) u_mailbox (.clk, .rst, .set(mb_set), .clr(mb_clr), .flags(mb_flags));

  pcore_rx u_rx (
    .clk, .rst, .in_flit(ej_flit), .in_valid(ej_valid), .in_ready(ej_ready),
    .f1_pop, .f1_data, .f1_empty, .f2_pop, .f2_data, .f2_empty
  );

endmodule
