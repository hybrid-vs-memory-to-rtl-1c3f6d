// pcore_tb: one PCore tile with its real memories, mailbox and receiver. A program is
// loaded through the prog port, then the core: reads a word from its input stream,
// stores it in private memory and in shared memory (through the MCore port, served by a
// model with random grant delay), sends a sync to PCore 2, waits for a mailbox sync from
// PCore 4, sends the word as a message, receives a message packet and a MCore response
// packet from the network, and outputs what it got. Checked: output words, the shared
// memory write, the sync destination, and the sent flits.
module pcore_tb;
  import icc_pkg::*;
  logic clk = 0, rst = 1, run = 0, halted;
  logic [31:0] stall;
  logic prog_we;
  logic [4:0] prog_addr;
  word_t prog_data;
  logic in_valid, in_ready, out_valid, out_ready;
  word_t in_data, out_data;
  logic s_req, s_we, s_gnt, s_rvalid;
  shm_addr_t s_addr;
  word_t s_wdata, s_rdata;
  logic sync_valid;
  logic [2:0] sync_dst;
  logic [MB_SRCS-1:0] mb_set;
  logic dma_req, dma_gnt;
  dma_cmd_t dma_cmd;
  flit_t inj_flit, ej_flit;
  logic inj_valid, inj_ready, ej_valid, ej_ready;

  int checks = 0, failures = 0, n_sync = 0;
  word_t shm [128];
  word_t outs[$];
  flit_t sent[$];

  pcore #(.MY_X(3'd0), .MY_Y(2'd0)) dut (.*);
  always #5 clk = ~clk;

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

  always @(negedge clk) begin
    s_gnt = s_req && ($urandom % 3 == 0);
    out_ready = $urandom % 2;
    inj_ready = $urandom % 2;
  end
  always @(posedge clk) begin
    s_rvalid <= 0;
    if (s_req && s_gnt) begin
      if (s_we) shm[s_addr] <= s_wdata; else begin s_rdata <= shm[s_addr]; s_rvalid <= 1; end
    end
    if (out_valid && out_ready) outs.push_back(out_data);
    if (inj_valid && inj_ready) sent.push_back(inj_flit);
    if (sync_valid) begin n_sync++; checks++; if (sync_dst != 3'd2) failures++; end
  end

  task automatic put(input flit_t f);
    @(negedge clk);
    ej_valid = 1; ej_flit = f;
    @(posedge clk);
    while (!ej_ready) @(posedge clk);
    @(negedge clk) ej_valid = 0;
  endtask

  word_t prog [16];
  initial begin
    head_t h;
    prog[0]  = enc(OP_IN,   1, 0, 0);
    prog[1]  = enc(OP_ST,   1, 0, 8'h07);        // private word 7
    prog[2]  = enc(OP_LD,   2, 0, 8'h07);
    prog[3]  = enc(OP_ST,   2, 0, 8'hC1);        // shared bank 2, word 1
    prog[4]  = enc(OP_LD,   3, 0, 8'hC1);
    prog[5]  = enc(OP_OUT,  3, 0, 0);
    prog[6]  = enc(OP_SYNC, 0, 0, 2);
    prog[7]  = enc(OP_WAIT, 0, 0, 4);
    prog[8]  = enc(OP_SEND, 3, 0, (1 << 3) | 4);  // to (4,1)
    prog[9]  = enc(OP_RECV, 4, 0, 0);
    prog[10] = enc(OP_RECV, 5, 0, 1);
    prog[11] = enc(OP_OUT,  4, 0, 0);
    prog[12] = enc(OP_OUT,  5, 0, 0);
    prog[13] = enc(OP_HALT, 0, 0, 0);
    prog_we = 0; prog_addr = 0; prog_data = 0; in_valid = 0; in_data = 0; mb_set = '0;
    dma_gnt = 0; ej_valid = 0; ej_flit = '0; s_rvalid = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    for (int i = 0; i < 14; i++) begin
      @(negedge clk) prog_we = 1; prog_addr = 5'(i); prog_data = prog[i];
    end
    @(negedge clk) prog_we = 0; run = 1;
    @(negedge clk) in_valid = 1; in_data = 32'h0F0F0F0F;
    @(posedge clk);
    while (!in_ready) @(posedge clk);
    @(negedge clk) in_valid = 0;
    wait (n_sync == 1);
    repeat (10) @(negedge clk);
    mb_set = 9'h010;
    @(negedge clk) mb_set = '0;
    // A response packet arrives before the message: it must still go to FIFO 2.
    h = '0; h.ptype = PT_RESP;
    put('{head: 1, tail: 0, data: word_t'(h)});
    put('{head: 0, tail: 1, data: 32'h22222222});
    h.ptype = PT_MSG;
    put('{head: 1, tail: 0, data: word_t'(h)});
    put('{head: 0, tail: 1, data: 32'h11111111});
    wait (halted);
    checks++;
    if (outs.size() != 3 || outs[0] != 32'h0F0F0F0F || outs[1] != 32'h11111111 ||
        outs[2] != 32'h22222222) failures++;
    checks++;
    if (shm[7'h41] != 32'h0F0F0F0F) failures++;
    checks++;
    h = head_t'(sent[0].data);
    if (sent.size() != 2 || h.dst_x != 3'd4 || sent[1].data != 32'h0F0F0F0F)
      failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
