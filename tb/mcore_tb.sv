// mcore_tb: the memory core with eight PCore masters and the DMA port all issuing random
// reads and writes at once, crowded onto few addresses so that banks are contested.
// Checked every cycle: on each bank the lowest-numbered requester, and only it, is
// granted (PCore 1 first); read data matches a memory model. Then mailbox sync pulses
// must set the right bit of the right PCore, DMA commands must be forwarded in priority
// order, and a remote write and read over the network port must be served.
module mcore_tb;
  import icc_pkg::*;
  logic      clk = 0, rst = 1;
  logic      pc_req   [PC_PER_CL];
  logic      pc_we    [PC_PER_CL];
  shm_addr_t pc_addr  [PC_PER_CL];
  word_t     pc_wdata [PC_PER_CL];
  logic      pc_gnt   [PC_PER_CL];
  logic      pc_rvalid[PC_PER_CL];
  word_t     pc_rdata [PC_PER_CL];
  logic                pc_sync_valid[PC_PER_CL];
  logic [2:0]          pc_sync_dst  [PC_PER_CL];
  logic                dma_notify_valid;
  logic [2:0]          dma_notify_dst;
  logic [MB_SRCS-1:0]  mb_set       [PC_PER_CL];
  logic      pc_dma_req[PC_PER_CL];
  dma_cmd_t  pc_dma_cmd[PC_PER_CL];
  logic      pc_dma_gnt[PC_PER_CL];
  logic      dma_cmd_valid, dma_cmd_ready;
  dma_cmd_t  dma_cmd;
  logic      dma_req, dma_we, dma_gnt, dma_rvalid;
  shm_addr_t dma_addr;
  word_t     dma_wdata, dma_rdata;
  flit_t     ej_flit, inj_flit;
  logic      ej_valid, ej_ready, inj_valid, inj_ready;

  int checks = 0, failures = 0, contested = 0;
  word_t model [128];
  bit    seen  [128];
  bit phase1 = 1;
  int done_cnt = 0;

  mcore #(.MY_X(3'd1), .MY_Y(2'd1)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Masters 0..7 are PCores, 8 is the DMA port.
  logic      mq [9];
  logic      mw [9];
  shm_addr_t ma [9];
  word_t     md [9];
  logic      mg [9];
  logic      mv [9];
  word_t     mr [9];
  always_comb begin
    for (int i = 0; i < 8; i++) begin
      pc_req[i] = mq[i]; pc_we[i] = mw[i]; pc_addr[i] = ma[i]; pc_wdata[i] = md[i];
      mg[i] = pc_gnt[i]; mv[i] = pc_rvalid[i]; mr[i] = pc_rdata[i];
    end
    dma_req = mq[8]; dma_we = mw[8]; dma_addr = ma[8]; dma_wdata = md[8];
    mg[8] = dma_gnt; mv[8] = dma_rvalid; mr[8] = dma_rdata;
  end

  for (genvar m = 0; m < 9; m++) begin : g_m
    initial begin
      word_t exp;
      bit chk;
      mq[m] = 0; mw[m] = 0; ma[m] = 0; md[m] = 0;
      wait (!rst);
      for (int t = 0; t < 200; t++) begin
        @(negedge clk);
        mq[m] = 1;
        mw[m] = $urandom % 2;
        ma[m] = {2'($urandom % 4), 5'($urandom % 4)};
        md[m] = $urandom;
        @(posedge clk);
        while (!mg[m]) @(posedge clk);
        exp = model[ma[m]];
        chk = seen[ma[m]];
        if (mw[m]) begin model[ma[m]] = md[m]; seen[ma[m]] = 1; end
        @(negedge clk);
        mq[m] = 0;
        if (!mw[m] && chk) begin
          checks++;
          if (!mv[m] || mr[m] != exp) failures++;
        end
      end
      done_cnt++;
    end
  end

  // Per-bank fixed priority.
  always @(posedge clk) if (!rst && phase1) begin
    for (int b = 0; b < 4; b++) begin
      int first, n;
      first = -1; n = 0;
      for (int i = 0; i < 9; i++) if (mq[i] && ma[i][6:5] == 2'(b)) begin
        if (first < 0) first = i;
        n++;
      end
      if (n > 1) contested++;
      for (int i = 0; i < 9; i++) if (mq[i] && ma[i][6:5] == 2'(b)) begin
        checks++;
        if (mg[i] != (i == first)) failures++;
      end
    end
  end

  task automatic put(input flit_t f);
    @(negedge clk);
    ej_valid = 1; ej_flit = f;
    @(posedge clk);
    while (!ej_ready) @(posedge clk);
    @(negedge clk) ej_valid = 0;
  endtask

  initial begin
    head_t h;
    for (int i = 0; i < 128; i++) begin model[i] = 0; seen[i] = 0; end
    for (int i = 0; i < 8; i++) begin
      pc_sync_valid[i] = 0; pc_sync_dst[i] = 0; pc_dma_req[i] = 0; pc_dma_cmd[i] = '0;
    end
    dma_notify_valid = 0; dma_notify_dst = 0; dma_cmd_ready = 0;
    ej_valid = 0; ej_flit = '0; inj_ready = 1;
    repeat (3) @(posedge clk);
    rst = 0;
    wait (done_cnt == 9);
    phase1 = 0;
    checks++;
    if (contested == 0) failures++;
    // Sync routing.
    for (int t = 0; t < 200; t++) begin
      logic [MB_SRCS-1:0] exp [8];
      @(negedge clk);
      for (int j = 0; j < 8; j++) exp[j] = '0;
      for (int i = 0; i < 8; i++) begin
        pc_sync_valid[i] = $urandom % 2;
        pc_sync_dst[i]   = 3'($urandom);
        if (pc_sync_valid[i]) exp[pc_sync_dst[i]][i] = 1'b1;
      end
      dma_notify_valid = $urandom % 2;
      dma_notify_dst   = 3'($urandom);
      if (dma_notify_valid) exp[dma_notify_dst][8] = 1'b1;
      #1;
      for (int j = 0; j < 8; j++) begin
        checks++;
        if (mb_set[j] != exp[j]) failures++;
      end
    end
    @(negedge clk);
    for (int i = 0; i < 8; i++) pc_sync_valid[i] = 0;
    dma_notify_valid = 0;
    // DMA command forwarding.
    for (int i = 0; i < 8; i++) begin
      pc_dma_req[i] = (i == 2 || i == 5);
      pc_dma_cmd[i] = '{src_addr: 7'(i), dst_addr: 7'(i), len: 5'd1, notify: 3'(i)};
    end
    dma_cmd_ready = 1;
    #1;
    checks++;
    if (!dma_cmd_valid || dma_cmd.notify != 3'd2 || !pc_dma_gnt[2] || pc_dma_gnt[5]) failures++;
    @(negedge clk) pc_dma_req[2] = 0;
    #1;
    checks++;
    if (!dma_cmd_valid || dma_cmd.notify != 3'd5 || !pc_dma_gnt[5]) failures++;
    @(negedge clk) pc_dma_req[5] = 0;
    #1;
    checks++;
    if (dma_cmd_valid) failures++;
    // Network write then read of address 0x45.
    h = '0; h.ptype = PT_WR; h.addr = 7'h45;
    put('{head: 1, tail: 0, data: word_t'(h)});
    put('{head: 0, tail: 1, data: 32'h0F0F0F0F});
    h.ptype = PT_RD; h.src_x = 3'd5; h.src_y = 2'd2;
    put('{head: 1, tail: 1, data: word_t'(h)});
    while (!(inj_valid && !inj_flit.head)) @(posedge clk);
    checks++;
    if (inj_flit.data != 32'h0F0F0F0F) failures++;
    $display("contested bank cycles=%0d", contested);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
