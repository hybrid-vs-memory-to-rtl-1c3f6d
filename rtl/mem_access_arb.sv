// mem_access_arb: memory access arbitrator of a processor core (PCore).
//
// Sits between the processor and its three memories. Instruction memory: program words
// written from outside through the prog port (only while the core is stopped) take
// priority over instruction fetches. Data accesses are steered by address bit 7: a clear
// bit selects the private data memory (address bits 6:0), which always grants at once; a
// set bit selects the cluster's shared memory in the MCore (address bits 6:0 =
// {bank, word}) over the hard-wired request/grant port, where the processor waits for the
// MCore's fixed-priority grant. Read data returns one cycle after the grant from either
// side, with d_rvalid. The original draws this arbitrator between the processor, the
// instruction memory, the private data memory and the MCore; the address map and timing
// are this design's own.
module mem_access_arb
  import icc_pkg::*;
#(
  parameter int unsigned IMEM_AW = 5,
  parameter int unsigned PMEM_AW = 5
) (
  input  logic               clk,
  input  logic               rst,
  // program loading
  input  logic               prog_we,
  input  logic [IMEM_AW-1:0] prog_addr,
  input  word_t              prog_data,
  // processor fetch
  input  logic               if_req,
  input  logic [IMEM_AW-1:0] if_addr,
  output word_t              if_rdata,
  // processor data
  input  logic               d_req,
  input  logic               d_we,
  input  logic [7:0]         d_addr,
  input  word_t              d_wdata,
  output logic               d_gnt,
  output logic               d_rvalid,
  output word_t              d_rdata,
  // instruction memory
  output logic               im_en,
  output logic               im_we,
  output logic [IMEM_AW-1:0] im_addr,
  output word_t              im_wdata,
  input  word_t              im_rdata,
  // private data memory
  output logic               pm_en,
  output logic               pm_we,
  output logic [PMEM_AW-1:0] pm_addr,
  output word_t              pm_wdata,
  input  word_t              pm_rdata,
  // shared memory in the MCore
  output logic               s_req,
  output logic               s_we,
  output shm_addr_t          s_addr,
  output word_t              s_wdata,
  input  logic               s_gnt,
  input  logic               s_rvalid,
  input  word_t              s_rdata
);
  logic shared;
  logic pm_rd_q;

  assign im_en    = prog_we || if_req;
  assign im_we    = prog_we;
  assign im_addr  = prog_we ? prog_addr : if_addr;
  assign im_wdata = prog_data;
  assign if_rdata = im_rdata;

  assign shared   = d_addr[7];
  assign pm_en    = d_req && !shared;
  assign pm_we    = d_we;
  assign pm_addr  = d_addr[PMEM_AW-1:0];
  assign pm_wdata = d_wdata;
  assign s_req    = d_req && shared;
  assign s_we     = d_we;
  assign s_addr   = d_addr[SHM_AW-1:0];
  assign s_wdata  = d_wdata;
  assign d_gnt    = shared ? s_gnt : d_req;

  always_ff @(posedge clk) begin
    if (rst) pm_rd_q <= 1'b0;
    else     pm_rd_q <= pm_en && !d_we;
  end

  assign d_rvalid = pm_rd_q || s_rvalid;
  assign d_rdata  = pm_rd_q ? pm_rdata : s_rdata;

endmodule
