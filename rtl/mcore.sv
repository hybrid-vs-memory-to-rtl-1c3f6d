// mcore: memory core of one cluster.
//
// Holds the cluster's shared memory as four banks (Shared Mem #1-#4) of BANK_WORDS
// 32-bit words; a shared address is {bank[1:0], word[4:0]}. Ten masters can reach it:
// the eight PCores of the cluster over hard wires (ports 0-7, PCore 1 = top-left first),
// the DMA memory interface and the MCore's own network receiver (mcore_rx). Each bank has
// a fixed-priority arbiter, so accesses to different banks proceed in the same cycle; on
// one bank the lowest port number wins (PCores in the order of the original, then DMA,
// then network). A master holds req until gnt (same cycle); read data comes on
// rdata/rvalid one cycle after the grant.
//
// The MCore also routes the cluster's synchronization signals: a sync pulse from PCore i
// to PCore j sets bit i of PCore j's mailbox, and a DMA completion notice sets bit 8.
// DMA commands issued by the cluster's PCores are forwarded to the memory interface one
// at a time, again in fixed priority order. Banking, fixed priority and mailbox syncs are
// from the original; bank size, port protocol and the priority of the DMA and network
// ports are this design's own.
module mcore
  import icc_pkg::*;
#(
  parameter logic [XW-1:0] MY_X = XW'(1),
  parameter logic [YW-1:0] MY_Y = YW'(1),
  parameter int unsigned   BANK_WORDS = 2 ** SHM_WORD_AW
) (
  input  logic      clk,
  input  logic      rst,
  // PCore shared-memory ports
  input  logic      pc_req   [PC_PER_CL],
  input  logic      pc_we    [PC_PER_CL],
  input  shm_addr_t pc_addr  [PC_PER_CL],
  input  word_t     pc_wdata [PC_PER_CL],
  output logic      pc_gnt   [PC_PER_CL],
  output logic      pc_rvalid[PC_PER_CL],
  output word_t     pc_rdata [PC_PER_CL],
  // mailbox synchronization
  input  logic                pc_sync_valid[PC_PER_CL],
  input  logic [2:0]          pc_sync_dst  [PC_PER_CL],
  input  logic                dma_notify_valid,
  input  logic [2:0]          dma_notify_dst,
  output logic [MB_SRCS-1:0]  mb_set       [PC_PER_CL],
  // DMA commands from the PCores, forwarded to the memory interface
  input  logic      pc_dma_req[PC_PER_CL],
  input  dma_cmd_t  pc_dma_cmd[PC_PER_CL],
  output logic      pc_dma_gnt[PC_PER_CL],
  output logic      dma_cmd_valid,
  output dma_cmd_t  dma_cmd,
  input  logic      dma_cmd_ready,
  // memory interface (DMA) shared-memory port
  input  logic      dma_req,
  input  logic      dma_we,
  input  shm_addr_t dma_addr,
  input  word_t     dma_wdata,
  output logic      dma_gnt,
  output logic      dma_rvalid,
  output word_t     dma_rdata,
  // network (router Local port)
  input  flit_t     ej_flit,
  input  logic      ej_valid,
  output logic      ej_ready,
  output flit_t     inj_flit,
  output logic      inj_valid,
  input  logic      inj_ready
);
  localparam int unsigned NM    = PC_PER_CL + 2;  // masters
  localparam int unsigned M_DMA = PC_PER_CL;
  localparam int unsigned M_NET = PC_PER_CL + 1;
  localparam int unsigned BW    = $clog2(SHM_BANKS);
  localparam int unsigned WAW   = $clog2(BANK_WORDS);

  logic      m_req  [NM];
  logic      m_we   [NM];
  shm_addr_t m_addr [NM];
  word_t     m_wdata[NM];
  logic      m_gnt  [NM];
  logic      m_rd_q [NM];   // read granted last cycle
  logic [BW-1:0] m_bank_q[NM];

  logic          rx_req, rx_we, rx_gnt, rx_rvalid;
  shm_addr_t     rx_addr;
  word_t         rx_wdata, rx_rdata;

  logic [NM-1:0] bank_req[SHM_BANKS];
  logic [NM-1:0] bank_gnt[SHM_BANKS];
  logic          bank_en [SHM_BANKS];
  logic          bank_we [SHM_BANKS];
  logic [WAW-1:0] bank_addr[SHM_BANKS];
  word_t         bank_wdata[SHM_BANKS];
  word_t         bank_rdata[SHM_BANKS];

  // Gather the masters.
  always_comb begin
    for (int i = 0; i < PC_PER_CL; i++) begin
      m_req[i]   = pc_req[i];
      m_we[i]    = pc_we[i];
      m_addr[i]  = pc_addr[i];
      m_wdata[i] = pc_wdata[i];
    end
    m_req[M_DMA]   = dma_req;
    m_we[M_DMA]    = dma_we;
    m_addr[M_DMA]  = dma_addr;
    m_wdata[M_DMA] = dma_wdata;
    m_req[M_NET]   = rx_req;
    m_we[M_NET]    = rx_we;
    m_addr[M_NET]  = rx_addr;
    m_wdata[M_NET] = rx_wdata;
  end

  for (genvar b = 0; b < SHM_BANKS; b++) begin : g_bank
    always_comb begin
      for (int i = 0; i < NM; i++) begin
        bank_req[b][i] = m_req[i] && (m_addr[i][SHM_AW-1 -: BW] == BW'(b));
      end
    end

    fixed_prio_arb #(.N(NM)) u_arb (.req(bank_req[b]), .gnt(bank_gnt[b]));

    always_comb begin
      bank_en[b]    = |bank_gnt[b];
      bank_we[b]    = 1'b0;
      bank_addr[b]  = '0;
      bank_wdata[b] = '0;
      for (int i = 0; i < NM; i++) begin
        if (bank_gnt[b][i]) begin
          bank_we[b]    = m_we[i];
          bank_addr[b]  = m_addr[i][WAW-1:0];
          bank_wdata[b] = m_wdata[i];
        end
      end
    end

    sp_ram #(.WIDTH(DATA_W), .WORDS(BANK_WORDS)) u_shm (
      .clk, .en(bank_en[b]), .we(bank_we[b]), .addr(bank_addr[b]),
      .wdata(bank_wdata[b]), .rdata(bank_rdata[b])
    );
  end

  always_comb begin
    for (int i = 0; i < NM; i++) begin
      m_gnt[i] = 1'b0;
      for (int b = 0; b < SHM_BANKS; b++) m_gnt[i] = m_gnt[i] | bank_gnt[b][i];
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < NM; i++) begin
        m_rd_q[i]   <= 1'b0;
        m_bank_q[i] <= '0;
      end
    end else begin
      for (int i = 0; i < NM; i++) begin
        m_rd_q[i]   <= m_gnt[i] && !m_we[i];
        m_bank_q[i] <= m_addr[i][SHM_AW-1 -: BW];
      end
    end
  end

  always_comb begin
    for (int i = 0; i < PC_PER_CL; i++) begin
      pc_gnt[i]    = m_gnt[i];
      pc_rvalid[i] = m_rd_q[i];
      pc_rdata[i]  = bank_rdata[m_bank_q[i]];
    end
    dma_gnt    = m_gnt[M_DMA];
    dma_rvalid = m_rd_q[M_DMA];
    dma_rdata  = bank_rdata[m_bank_q[M_DMA]];
    rx_gnt     = m_gnt[M_NET];
    rx_rvalid  = m_rd_q[M_NET];
    rx_rdata   = bank_rdata[m_bank_q[M_NET]];
  end

  // Mailbox sync routing.
  always_comb begin
    for (int j = 0; j < PC_PER_CL; j++) begin
      mb_set[j] = '0;
      for (int i = 0; i < PC_PER_CL; i++) begin
        mb_set[j][i] = pc_sync_valid[i] && (pc_sync_dst[i] == 3'(j));
      end
      mb_set[j][MB_DMA_ID] = dma_notify_valid && (dma_notify_dst == 3'(j));
    end
  end

  // DMA command forwarding.
  logic [PC_PER_CL-1:0] dreq, dgnt;
  always_comb begin
    for (int i = 0; i < PC_PER_CL; i++) dreq[i] = pc_dma_req[i];
  end
  fixed_prio_arb #(.N(PC_PER_CL)) u_dma_arb (.req(dreq), .gnt(dgnt));
  always_comb begin
    dma_cmd_valid = |dreq;
    dma_cmd       = '0;
    for (int i = 0; i < PC_PER_CL; i++) begin
      if (dgnt[i]) dma_cmd = pc_dma_cmd[i];
      pc_dma_gnt[i] = dgnt[i] && dma_cmd_ready;
    end
  end

  mcore_rx #(.MY_X(MY_X), .MY_Y(MY_Y)) u_rx (
    .clk, .rst,
    .in_flit(ej_flit), .in_valid(ej_valid), .in_ready(ej_ready),
    .out_flit(inj_flit), .out_valid(inj_valid), .out_ready(inj_ready),
    .m_req(rx_req), .m_we(rx_we), .m_addr(rx_addr), .m_wdata(rx_wdata),
    .m_gnt(rx_gnt), .m_rvalid(rx_rvalid), .m_rdata(rx_rdata)
  );

  // A granted master's request must be seen by exactly one bank.
  always_ff @(posedge clk) begin
    if (!rst) begin
      for (int b = 0; b < SHM_BANKS; b++) begin
        assert ($onehot0(bank_gnt[b])) else $error("bank %0d: several grants", b);
      end
    end
  end

endmodule
