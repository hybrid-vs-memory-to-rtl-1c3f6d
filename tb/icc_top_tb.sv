// icc_top_tb: end-to-end test of the whole chip at its default size.
//
// Four runs, each after a reset and a fresh program load through the prog port:
//  1. hybrid, one word: PCore 1 stores the input word in MCore 1 and syncs PCore 3,
//     which loads it and sends it over the mesh to PCore 9; PCore 9 stores it in MCore 2
//     and syncs PCore 16, which loads it and writes the output FIFO.
//  2. memory-to-memory, one word: PCore 1 stores it in MCore 1 and starts the DMA, which
//     copies it to MCore 2 and notifies PCore 16, which outputs it.
//  3. hybrid, 24 words, with background traffic: PCore 2 and PCore 4 send messages to
//     PCore 10 that meet in the mesh, PCore 5 and PCore 6 store into one shared-memory
//     bank at the same time, and PCore 10 then reads word 0 of MCore 1 over the network
//     (the answer arrives in its FIFO 2) and writes it to MCore 2 by a remote write.
//  4. memory-to-memory, 24 words, on the VCO clock, with the clock gated for a while.
// Checked: the words leave data_out unchanged and in order; the single-word latency from
// write_enb to data_valid is shorter for memory-to-memory than for hybrid, as in the
// original; the remote read and write moved the right word; nothing moves while the clock
// is gated. Counted, and failed if never seen: shared-memory bank contention, blocked
// heads in the mesh, mailbox waits, FIFO 2 use, DMA words, input FIFO full, output FIFO
// full, the VCO clock and clock gating.
module icc_top_tb;
  import icc_pkg::*;
  logic ext_clk = 0, vco_clk = 0, clk_mux = 0, clk_gating = 0, rst = 1;
  word_t data_in, data_out, prog_data;
  logic write_enb = 0, in_full, read_enb = 0, data_valid, prog_we = 0, run = 0;
  logic [3:0] prog_core;
  logic [4:0] prog_addr;
  logic [N_PCORES-1:0] halted;
  logic dma_busy;
  logic [15:0] dma_words;

  icc_top dut (.*);
  always #5 ext_clk = ~ext_clk;
  always #4 vco_clk = ~vco_clk;
  wire cclk = dut.clk;

  int checks = 0, failures = 0, cyc = 0;
  int n_shm_cont = 0, n_noc_block = 0, n_mb_wait = 0, n_f2 = 0, n_in_full = 0, n_out_full = 0;
  int n_vco = 0, n_gated = 0;
  always @(posedge cclk) cyc++;

  initial begin
    #2000000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Mechanism monitors.
  always @(posedge cclk) if (!rst) begin
    for (int b = 0; b < SHM_BANKS; b++) begin
      if ($countones(dut.g_cl[0].u_mcore.bank_req[b]) > 1) n_shm_cont++;
      if ($countones(dut.g_cl[1].u_mcore.bank_req[b]) > 1) n_shm_cont++;
    end
    if (dut.g_cl[1].g_pc[7].u_pcore.u_cpu.state == 3'd3 &&
        dut.g_cl[1].g_pc[7].u_pcore.u_cpu.ir.op == OP_WAIT &&
        !dut.g_cl[1].g_pc[7].u_pcore.u_cpu.mb_hit) n_mb_wait++;
    if (dut.g_cl[1].g_pc[1].u_pcore.u_rx.f2_push) n_f2++;
    if (in_full) n_in_full++;
    if (dut.out_full) n_out_full++;
    if (clk_mux) n_vco++;
  end
  for (genvar n = 0; n < N_NODES; n++) begin : g_mon
    always @(posedge cclk) if (!rst) begin
      for (int i = 0; i < N_PORTS; i++)
        if (!dut.u_noc.g_node[n].u_router.q_empty[i] && dut.u_noc.g_node[n].u_router.q_flit[i].head &&
            !dut.u_noc.g_node[n].u_router.q_pop[i]) n_noc_block++;
    end
  end

  function automatic word_t enc(input op_e op, input int rd, input int rs, input int imm);
    instr_t i;
    i = '{op: op, rd: 3'(rd), rs: 3'(rs), imm: 22'(imm)};
    return word_t'(i);
  endfunction

  task automatic load(input int core, input word_t p[$]);
    for (int i = 0; i < p.size(); i++) begin
      @(negedge cclk);
      prog_we = 1; prog_core = 4'(core); prog_addr = 5'(i); prog_data = p[i];
    end
    @(negedge cclk) prog_we = 0;
  endtask

  // Program images (see the header for what each core does).
  task automatic load_programs(input bit m2m, input int n, input bit background);
    word_t p[$];
    // PCore 1: input FIFO -> MCore 1 words 0..n-1
    p = {enc(OP_LI, 3, 0, n), enc(OP_LI, 2, 0, 0), enc(OP_IN, 1, 0, 0),
         enc(OP_ST, 1, 2, 8'h80), enc(OP_ADDI, 2, 0, 1), enc(OP_ADDI, 3, 0, 16'hFFFF),
         enc(OP_BNZ, 0, 3, 2)};
    if (m2m) p.push_back(enc(OP_DMA, 0, 0, (7 << 19) | (n << 14)));
    else     p.push_back(enc(OP_SYNC, 0, 0, 2));
    p.push_back(enc(OP_HALT, 0, 0, 0));
    load(0, p);
    // PCore 16: wait for PCore 9 (hybrid) or the DMA (m2m), MCore 2 -> output FIFO
    p = {enc(OP_LI, 3, 0, n), enc(OP_LI, 2, 0, 0), enc(OP_WAIT, 0, 0, m2m ? 8 : 0),
         enc(OP_LD, 1, 2, 8'h80), enc(OP_OUT, 1, 0, 0), enc(OP_ADDI, 2, 0, 1),
         enc(OP_ADDI, 3, 0, 16'hFFFF), enc(OP_BNZ, 0, 3, 3), enc(OP_HALT, 0, 0, 0)};
    load(15, p);
    if (!m2m) begin
      // PCore 3: MCore 1 -> messages to PCore 9 at (3,0)
      p = {enc(OP_LI, 3, 0, n), enc(OP_LI, 2, 0, 0), enc(OP_WAIT, 0, 0, 0),
           enc(OP_LD, 1, 2, 8'h80), enc(OP_SEND, 1, 0, 3), enc(OP_ADDI, 2, 0, 1),
           enc(OP_ADDI, 3, 0, 16'hFFFF), enc(OP_BNZ, 0, 3, 3), enc(OP_HALT, 0, 0, 0)};
      load(2, p);
      // PCore 9: messages -> MCore 2, then sync PCore 16
      p = {enc(OP_LI, 3, 0, n), enc(OP_LI, 2, 0, 0), enc(OP_RECV, 1, 0, 0),
           enc(OP_ST, 1, 2, 8'h80), enc(OP_ADDI, 2, 0, 1), enc(OP_ADDI, 3, 0, 16'hFFFF),
           enc(OP_BNZ, 0, 3, 2), enc(OP_SYNC, 0, 0, 7), enc(OP_HALT, 0, 0, 0)};
      load(8, p);
    end else begin
      load(2, {enc(OP_HALT, 0, 0, 0)});
      load(8, {enc(OP_HALT, 0, 0, 0)});
    end
    if (background) begin
      // PCore 2 and PCore 4: 8 messages each to PCore 10 at (4,0); they meet in the mesh
      p = {enc(OP_LI, 3, 0, 8), enc(OP_LI, 1, 0, 32'h55), enc(OP_SEND, 1, 0, 4),
           enc(OP_ADDI, 3, 0, 16'hFFFF), enc(OP_BNZ, 0, 3, 2), enc(OP_HALT, 0, 0, 0)};
      load(1, p);
      load(3, p);
      // PCore 5 and PCore 6: the same store loop into bank 0 word 30, started together,
      // so their requests collide on the bank
      p = {enc(OP_LI, 3, 0, 20), enc(OP_ST, 3, 0, 8'h9E), enc(OP_ADDI, 3, 0, 16'hFFFF),
           enc(OP_BNZ, 0, 3, 1), enc(OP_HALT, 0, 0, 0)};
      load(4, p);
      load(5, p);
      // PCore 10: take the 16 messages, read MCore 1 word 0 remotely, write it to MCore 2
      // address 0x60 remotely
      p = {enc(OP_LI, 3, 0, 16), enc(OP_RECV, 1, 0, 0), enc(OP_ADDI, 3, 0, 16'hFFFF),
           enc(OP_BNZ, 0, 3, 1), enc(OP_RRD, 0, 0, (1 << 10) | (1 << 7)),
           enc(OP_RECV, 2, 0, 1), enc(OP_RWR, 2, 0, (1 << 10) | (4 << 7) | 7'h60),
           enc(OP_HALT, 0, 0, 0)};
      load(9, p);
    end else begin
      for (int c = 1; c < 10; c++)
        if (c inside {1, 3, 4, 5, 9}) load(c, {enc(OP_HALT, 0, 0, 0)});
    end
    for (int c = 0; c < N_PCORES; c++)
      if (!(c inside {0, 1, 2, 3, 4, 5, 8, 9, 15})) load(c, {enc(OP_HALT, 0, 0, 0)});
  endtask

  // One run: returns the cycles from the first write_enb to the first data_valid.
  task automatic transfer(input bit m2m, input int n, input bit background, input bit gate,
                          output int latency);
    word_t sent[$], got[$];
    int t0, t1, wi;
    @(negedge cclk) rst = 1; run = 0;
    repeat (3) @(negedge cclk);
    rst = 0;
    load_programs(m2m, n, background);
    @(negedge cclk) run = 1;
    t0 = cyc; t1 = -1; wi = 0;
    // Write all words as fast as the input FIFO takes them; read only after all are in,
    // so the output FIFO fills up on the long runs.
    while (wi < n || got.size() < n) begin
      @(negedge cclk);
      write_enb = 0; read_enb = 0;
      if (wi < n && !in_full) begin
        data_in = (wi == 0) ? 32'h0F0F0F0F : $urandom;
        write_enb = 1;
        sent.push_back(data_in);
        if (wi == 0) t0 = cyc;
        wi++;
      end
      if (data_valid && t1 < 0) t1 = cyc;
      if (data_valid && (n == 1 || dut.out_full || halted[15])) begin
        read_enb = 1;
        got.push_back(data_out);
      end
      if (gate && dma_busy && n_gated == 0) begin
        int w;
        w = dma_words;
        @(negedge ext_clk);
        clk_gating = 1;
        repeat (30) @(negedge ext_clk);
        checks++;
        if (dma_words != 16'(w)) failures++;
        n_gated++;
        clk_gating = 0;
        @(negedge cclk);
      end
    end
    @(negedge cclk) write_enb = 0; read_enb = 0;
    for (int i = 0; i < n; i++) begin
      checks++;
      if (got[i] != sent[i]) failures++;
    end
    latency = t1 - t0;
    wait (halted[15]);
  endtask

  int lat_h, lat_m, dummy;
  initial begin
    data_in = 0; prog_core = 0; prog_addr = 0; prog_data = 0;
    repeat (5) @(negedge ext_clk);
    transfer(0, 1, 0, 0, lat_h);
    transfer(1, 1, 0, 0, lat_m);
    $display("single word latency: hybrid %0d cycles, memory-to-memory %0d cycles", lat_h, lat_m);
    checks++;
    if (!(lat_m < lat_h)) failures++;
    transfer(0, 24, 1, 0, dummy);
    repeat (200) @(negedge cclk);
    checks++;
    if (dut.g_cl[1].u_mcore.g_bank[3].u_shm.mem[0] != 32'h0F0F0F0F) failures++;
    // Switch to the VCO clock while in reset.
    @(negedge ext_clk) rst = 1;
    clk_mux = 1;
    transfer(1, 24, 0, 1, dummy);
    checks++;
    if (dma_words != 16'd24) failures++;
    $display("shm contention=%0d noc blocked=%0d mailbox waits=%0d fifo2=%0d in_full=%0d out_full=%0d vco=%0d gated=%0d",
             n_shm_cont, n_noc_block, n_mb_wait, n_f2, n_in_full, n_out_full, n_vco, n_gated);
    checks++; if (n_shm_cont == 0)  failures++;
    checks++; if (n_noc_block == 0) failures++;
    checks++; if (n_mb_wait == 0)   failures++;
    checks++; if (n_f2 == 0)        failures++;
    checks++; if (n_in_full == 0)   failures++;
    checks++; if (n_out_full == 0)  failures++;
    checks++; if (n_vco == 0)       failures++;
    checks++; if (n_gated == 0)     failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
