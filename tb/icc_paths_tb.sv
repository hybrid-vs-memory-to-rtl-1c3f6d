// icc_paths_tb: the two single-mechanism transfers that the hybrid and memory-to-memory
// paths are compared with, each carrying one word on the full chip at its default size.
//  1. message passing only: PCore 1 sends the input word over the mesh straight to
//     PCore 16, which takes it from its FIFO 1 and outputs it.
//  2. shared memory: shared memory only reaches inside one cluster, so PCore 1 stores the
//     word in MCore 1 and syncs PCore 8 (bottom-right of cluster 1, the lowest priority),
//     which loads it and passes it on to PCore 16 as a message for output.
// Checked: the word arrives unchanged, and the shared-memory run takes longer than the
// message-only run. The cycle counts from write_enb to data_valid are printed.
module icc_paths_tb;
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
  always @(posedge cclk) cyc++;

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
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

  task automatic one_word(input word_t w, output int latency);
    int t0;
    @(negedge cclk) run = 1;
    @(negedge cclk);
    data_in = w; write_enb = 1; t0 = cyc;
    @(negedge cclk) write_enb = 0;
    while (!data_valid) @(negedge cclk);
    latency = cyc - t0;
    checks++;
    if (data_out != w) failures++;
    read_enb = 1;
    @(negedge cclk) read_enb = 0;
  endtask

  int lat_mp, lat_sm;
  initial begin
    data_in = 0; prog_core = 0; prog_addr = 0; prog_data = 0;
    repeat (3) @(negedge ext_clk);
    @(negedge cclk) rst = 0;
    for (int c = 0; c < N_PCORES; c++) load(c, {enc(OP_HALT, 0, 0, 0)});
    // Message passing: PCore 1 -> (5,2).
    load(0, {enc(OP_IN, 1, 0, 0), enc(OP_SEND, 1, 0, (2 << 3) | 5), enc(OP_HALT, 0, 0, 0)});
    load(15, {enc(OP_RECV, 1, 0, 0), enc(OP_OUT, 1, 0, 0), enc(OP_HALT, 0, 0, 0)});
    one_word(32'h0F0F0F0F, lat_mp);
    // Shared memory inside cluster 1: PCore 1 -> MCore 1 -> PCore 8, then to PCore 16.
    @(negedge cclk) rst = 1; run = 0;
    repeat (2) @(negedge cclk);
    rst = 0;
    for (int c = 0; c < N_PCORES; c++) load(c, {enc(OP_HALT, 0, 0, 0)});
    load(0, {enc(OP_IN, 1, 0, 0), enc(OP_ST, 1, 0, 8'h80), enc(OP_SYNC, 0, 0, 7),
             enc(OP_HALT, 0, 0, 0)});
    load(7, {enc(OP_WAIT, 0, 0, 0), enc(OP_LD, 1, 0, 8'h80), enc(OP_SEND, 1, 0, (2 << 3) | 5),
             enc(OP_HALT, 0, 0, 0)});
    load(15, {enc(OP_RECV, 1, 0, 0), enc(OP_OUT, 1, 0, 0), enc(OP_HALT, 0, 0, 0)});
    one_word(32'hA5A50F0F, lat_sm);
    $display("message passing PCore 1 -> PCore 16: %0d cycles", lat_mp);
    $display("shared memory PCore 1 -> PCore 8, then message to PCore 16: %0d cycles", lat_sm);
    checks++;
    if (lat_sm <= lat_mp) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
