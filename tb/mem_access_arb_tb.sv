// mem_access_arb_tb: the arbitrator with real instruction and private data memories and a
// shared-memory model that grants at random. Checked: program words written through the
// prog port are fetched back; data accesses with address bit 7 clear reach the private
// memory and are granted at once; those with bit 7 set reach the shared memory with the
// address's low seven bits and wait for its grant; read data returns one cycle after the
// grant from the right memory.
module mem_access_arb_tb;
  import icc_pkg::*;
  logic clk = 0, rst = 1;
  logic prog_we, if_req, d_req, d_we, d_gnt, d_rvalid;
  logic [4:0] prog_addr, if_addr;
  word_t prog_data, if_rdata, d_wdata, d_rdata;
  logic [7:0] d_addr;
  logic im_en, im_we, pm_en, pm_we;
  logic [4:0] im_addr, pm_addr;
  word_t im_wdata, im_rdata, pm_wdata, pm_rdata;
  logic s_req, s_we, s_gnt, s_rvalid;
  shm_addr_t s_addr;
  word_t s_wdata, s_rdata;
  word_t shm [128];
  word_t pm_model [32], sh_model [128], im_model [32];
  int checks = 0, failures = 0, waits = 0;

  mem_access_arb dut (.*);
  sp_ram #(.WORDS(32)) u_im (.clk, .en(im_en), .we(im_we), .addr(im_addr), .wdata(im_wdata), .rdata(im_rdata));
  sp_ram #(.WORDS(32)) u_pm (.clk, .en(pm_en), .we(pm_we), .addr(pm_addr), .wdata(pm_wdata), .rdata(pm_rdata));
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) s_gnt = s_req && ($urandom % 2);
  always @(posedge clk) begin
    s_rvalid <= 0;
    if (s_req && s_gnt) begin
      if (s_we) shm[s_addr] <= s_wdata;
      else begin s_rdata <= shm[s_addr]; s_rvalid <= 1; end
    end
  end

  initial begin
    prog_we = 0; if_req = 0; d_req = 0; d_we = 0; prog_addr = 0; if_addr = 0;
    prog_data = 0; d_wdata = 0; d_addr = 0; s_rvalid = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    for (int i = 0; i < 32; i++) begin
      @(negedge clk) prog_we = 1; prog_addr = 5'(i); prog_data = $urandom; im_model[i] = prog_data;
    end
    @(negedge clk) prog_we = 0;
    for (int i = 0; i < 32; i++) begin
      @(negedge clk) if_req = 1; if_addr = 5'(31 - i);
      @(negedge clk) if_req = 0;
      checks++;
      if (if_rdata != im_model[31 - i]) failures++;
    end
    // initialise both data memories
    for (int i = 0; i < 160; i++) begin
      @(negedge clk);
      d_req = 1; d_we = 1;
      d_addr = (i < 32) ? 8'(i) : 8'h80 | 8'(i - 32);
      d_wdata = $urandom;
      if (i < 32) pm_model[i] = d_wdata; else sh_model[i - 32] = d_wdata;
      #1;
      if (d_addr[7]) begin
        checks++;
        if (pm_en || s_addr != d_addr[6:0]) failures++;
      end else begin
        checks++;
        if (!d_gnt || s_req) failures++;
      end
      @(posedge clk);
      while (!d_gnt) begin waits++; @(posedge clk); end
    end
    @(negedge clk) d_req = 0;
    for (int t = 0; t < 400; t++) begin
      word_t exp;
      @(negedge clk);
      d_req = 1; d_we = 0;
      d_addr = ($urandom % 2) ? 8'h80 | 8'($urandom % 128) : 8'($urandom % 32);
      exp = d_addr[7] ? sh_model[d_addr[6:0]] : pm_model[d_addr[4:0]];
      @(posedge clk);
      while (!d_gnt) @(posedge clk);
      @(negedge clk) d_req = 0;
      checks++;
      if (!d_rvalid || d_rdata != exp) failures++;
    end
    checks++;
    if (waits == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
