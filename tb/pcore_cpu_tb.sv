// pcore_cpu_tb: runs one program that uses every instruction class on the processor
// alone, with models of its memories, streams, mailbox, network port, FIFOs and DMA port
// that answer with random delays. Checked: the words it outputs, the flits it sends
// (message, remote write, remote read request), the sync pulse, the mailbox clear, the
// DMA command, stalls while waiting, HALT, and that register instructions and taken
// branches take three cycles each (21 cycles for the seven of the counting loop).
module pcore_cpu_tb;
  import icc_pkg::*;
  logic clk = 0, rst = 1, run = 0, halted;
  logic [4:0] pc, if_addr;
  logic [31:0] stall;
  logic if_req, d_req, d_we, d_gnt, d_rvalid;
  word_t if_rdata, d_wdata, d_rdata, in_data, out_data, f1_data, f2_data;
  logic [7:0] d_addr;
  logic in_valid, in_ready, out_valid, out_ready, sync_valid;
  logic [2:0] sync_dst;
  logic [MB_SRCS-1:0] mb_flags, mb_clr;
  flit_t net_flit;
  logic net_valid, net_ready, f1_empty, f1_pop, f2_empty, f2_pop, dma_req, dma_gnt;
  dma_cmd_t dma_cmd;

  int checks = 0, failures = 0, cyc = 0;
  word_t imem [32], dmem [256];
  word_t outs[$];
  flit_t flits[$];
  int n_sync = 0, n_clr = 0, n_dma = 0, t5 = -1, t8 = -1;

  pcore_cpu #(.MY_X(3'd2), .MY_Y(2'd0)) dut (.*);
  always #5 clk = ~clk;
  always @(negedge clk) cyc++;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic word_t enc(input op_e op, input int rd, input int rs, input int imm);
    instr_t i;
    i = '{op: op, rd: 3'(rd), rs: 3'(rs), imm: 22'(imm)};
    return word_t'(i);
  endfunction

  // Memory and port models.
  always @(posedge clk) begin
    if (if_req) if_rdata <= imem[if_addr];
    if (if_req && if_addr == 5'd5 && t5 < 0) t5 = cyc;
    if (if_req && if_addr == 5'd8 && t8 < 0) t8 = cyc;
    d_rvalid <= d_req && d_gnt && !d_we;
    if (d_req && d_gnt) begin
      if (d_we) dmem[d_addr] <= d_wdata; else d_rdata <= dmem[d_addr];
    end
    if (out_valid && out_ready) outs.push_back(out_data);
    if (net_valid && net_ready) flits.push_back(net_flit);
    if (sync_valid) begin
      n_sync++; checks++; if (sync_dst != 3'd4) failures++;
    end
    if (mb_clr != '0) begin
      n_clr++; checks++; if (mb_clr != 9'h100) failures++;
      mb_flags[8] <= 1'b0;
    end
    if (dma_req && dma_gnt) begin
      n_dma++; checks++;
      if (dma_cmd != '{src_addr: 7'h10, dst_addr: 7'h20, len: 5'd4, notify: 3'd7}) failures++;
    end
  end
  always @(negedge clk) begin
    d_gnt     = d_req && (!d_addr[7] || ($urandom % 3 == 0));
    out_ready = ($urandom % 2);
    net_ready = ($urandom % 2);
    dma_gnt   = dma_req && ($urandom % 2);
  end

  initial begin
    for (int i = 0; i < 32; i++) imem[i] = enc(OP_HALT, 0, 0, 0);
    imem[0]  = enc(OP_IN,   1, 0, 0);
    imem[1]  = enc(OP_ST,   1, 0, 8'h85);                  // shared word 5
    imem[2]  = enc(OP_LD,   2, 0, 8'h85);
    imem[3]  = enc(OP_ADDI, 2, 0, 1);
    imem[4]  = enc(OP_OUT,  2, 0, 0);
    imem[5]  = enc(OP_LI,   3, 0, 3);
    imem[6]  = enc(OP_ADDI, 3, 0, 16'hFFFF);                // -1
    imem[7]  = enc(OP_BNZ,  0, 3, 6);
    imem[8]  = enc(OP_SYNC, 0, 0, 4);
    imem[9]  = enc(OP_WAIT, 0, 0, 8);
    imem[10] = enc(OP_SEND, 1, 0, (2 << 3) | 5);            // to (5,2)
    imem[11] = enc(OP_RECV, 4, 0, 1);                       // FIFO 2
    imem[12] = enc(OP_OUT,  4, 0, 0);
    imem[13] = enc(OP_RWR,  1, 0, (1 << 10) | (4 << 7) | 7'h22);
    imem[14] = enc(OP_RRD,  0, 0, (1 << 10) | (4 << 7) | 7'h22);
    imem[15] = enc(OP_ST,   1, 0, 8'h03);                   // private word 3
    imem[16] = enc(OP_LD,   5, 0, 8'h03);
    imem[17] = enc(OP_OUT,  5, 0, 0);
    imem[18] = enc(OP_DMA,  0, 0, (7 << 19) | (4 << 14) | (7'h20 << 7) | 7'h10);
    imem[19] = enc(OP_RECV, 6, 0, 0);                       // FIFO 1
    imem[20] = enc(OP_OUT,  6, 0, 0);
    imem[21] = enc(OP_HALT, 0, 0, 0);
    in_valid = 0; in_data = 0; mb_flags = '0; f1_empty = 1; f2_empty = 1;
    f1_data = 0; f2_data = 0; d_rvalid = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    @(negedge clk) run = 1;
    repeat (10) @(negedge clk);
    in_valid = 1; in_data = 32'h0F0F0F0F;
    @(posedge clk);
    while (!in_ready) @(posedge clk);
    @(negedge clk) in_valid = 0;
    wait (n_sync == 1);
    repeat (20) @(negedge clk);
    mb_flags[8] = 1'b1;
    repeat (30) @(negedge clk);
    f2_empty = 0; f2_data = 32'hCAFE0002;
    @(posedge clk);
    while (!f2_pop) @(posedge clk);
    @(negedge clk) f2_empty = 1;
    repeat (30) @(negedge clk);
    f1_empty = 0; f1_data = 32'hCAFE0001;
    @(posedge clk);
    while (!f1_pop) @(posedge clk);
    @(negedge clk) f1_empty = 1;
    wait (halted);
    // Results.
    checks++;
    if (outs.size() != 4 || outs[0] != 32'h0F0F0F10 || outs[1] != 32'hCAFE0002 ||
        outs[2] != 32'h0F0F0F0F || outs[3] != 32'hCAFE0001) failures++;
    checks++;
    if (flits.size() != 5) failures++;
    else begin
      head_t h0, h2, h4;
      h0 = head_t'(flits[0].data); h2 = head_t'(flits[2].data); h4 = head_t'(flits[4].data);
      checks++;
      if (!flits[0].head || flits[0].tail || h0.ptype != PT_MSG || h0.dst_x != 3'd5 ||
          h0.dst_y != 2'd2 || h0.src_x != 3'd2 || h0.src_y != 2'd0) failures++;
      checks++;
      if (flits[1].head || !flits[1].tail || flits[1].data != 32'h0F0F0F0F) failures++;
      checks++;
      if (h2.ptype != PT_WR || h2.dst_x != 3'd4 || h2.dst_y != 2'd1 || h2.addr != 7'h22 ||
          flits[3].data != 32'h0F0F0F0F || !flits[3].tail) failures++;
      checks++;
      if (h4.ptype != PT_RD || !flits[4].head || !flits[4].tail || h4.addr != 7'h22) failures++;
    end
    checks++;
    if (n_sync != 1 || n_clr != 1 || n_dma != 1) failures++;
    checks++;
    if (t8 - t5 != 21) failures++;
    checks++;
    if (stall == 0) failures++;
    checks++;
    if (dmem[8'h85] != 32'h0F0F0F0F || dmem[8'h03] != 32'h0F0F0F0F) failures++;
    $display("loop cycles=%0d stall cycles=%0d", t8 - t5, stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
