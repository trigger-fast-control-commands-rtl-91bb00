// tb_fc_mem_ctrl: self-checking test of the non-run-time command executor.
//
// Headers and payload fields are presented as the CLINK receiver would
// deliver them. The testbench holds a reference memory (written only from the
// test's own knowledge of the commands), answers memory reads one cycle late,
// answers CSR reads with a function of the address, and plays the DLINK
// serializer: it grants reg_req, checks the register header, word count and
// width, and pulls the words. Covered: Write/Read CSR, address and block
// address registers, single writes and reads (16 and 32 bit), read with
// increment, variable block write and block read (setup + read), the address
// left at start + N, TSF reframing and User Reset.
module tb_fc_mem_ctrl;
  import fc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic hdr_valid = 1'b0, fld_valid = 1'b0;
  logic [4:0] hdr_op = '0, hdr_sub = '0;
  logic [31:0] fld_data = '0;
  logic [16:0] fld_idx = '0;
  logic csr_we;
  logic [4:0] csr_waddr, csr_raddr;
  logic [15:0] csr_wdata, csr_rdata;
  logic mem_req, mem_we, mem_wide;
  logic [31:0] mem_addr, mem_wdata, mem_rdata;
  logic [15:0] cur_addr, blk_addr;
  logic reg_req, reg_wide, reg_gnt = 1'b0, reg_rd_req = 1'b0;
  logic [15:0] reg_hdr, reg_nwords;
  logic [31:0] reg_rd_data;
  logic reframe, user_reset;
  int checks = 0, failures = 0, n_reframe = 0, n_ureset = 0, n_csrw = 0;
  logic [4:0] last_csr_a;
  logic [15:0] last_csr_d;

  fc_mem_ctrl dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // board memory model and CSR read model
  logic [31:0] mem [logic [31:0]];
  always @(posedge clk) if (rst_n) begin
    if (mem_req && mem_we) mem[mem_addr] = mem_wdata;
    if (mem_req && !mem_we) mem_rdata <= mem.exists(mem_addr) ? mem[mem_addr] : 32'hBAD0_BAD0;
    if (reframe) n_reframe++;
    if (user_reset) n_ureset++;
    if (csr_we) begin n_csrw++; last_csr_a <= csr_waddr; last_csr_d <= csr_wdata; end
  end
  assign csr_rdata = {11'h5C5, csr_raddr};

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h expected %h", what, got, exp); end
  endtask

  task automatic hdr(input logic [4:0] op, input logic [4:0] sub);
    @(negedge clk);
    hdr_valid = 1'b1; hdr_op = op; hdr_sub = sub;
    @(negedge clk) hdr_valid = 1'b0;
  endtask

  task automatic fld(input int idx, input logic [31:0] v);
    repeat (2) @(negedge clk);
    fld_valid = 1'b1; fld_idx = 17'(idx); fld_data = v;
    @(negedge clk) fld_valid = 1'b0;
  endtask

  // serializer side: expect a transfer, pull its words, compare
  task automatic expect_xfer(input logic [4:0] op, input logic [4:0] sub, input int n,
                             input bit wide, input logic [31:0] exp_words [$]);
    int w;
    w = 0;
    while (!reg_req && w < 10) begin @(negedge clk); w++; end
    check("reg_req", {31'h0, reg_req}, 1);
    check("reg_hdr", {16'h0, reg_hdr}, {16'h0, reg_header(op, sub)});
    check("reg_nwords", {16'h0, reg_nwords}, n);
    check("reg_wide", {31'h0, reg_wide}, {31'h0, wide});
    reg_gnt = 1'b1;
    @(negedge clk) reg_gnt = 1'b0;
    for (int i = 0; i < n; i++) begin
      repeat (2) @(negedge clk);
      reg_rd_req = 1'b1;
      @(negedge clk) reg_rd_req = 1'b0;
      check($sformatf("word %0d", i), reg_rd_data & (wide ? 32'hFFFF_FFFF : 32'h0000_FFFF),
            exp_words[i]);
    end
    @(negedge clk);
    check("no further request", {31'h0, reg_req}, 0);
  endtask

  logic [31:0] q[$];

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;

    // Write CSR 5 <= 0x000A
    hdr(OP_WR_CSR, 5'd5); fld(0, 32'h000A);
    @(negedge clk);
    check("csr write count", n_csrw, 1);
    check("csr write addr", {27'h0, last_csr_a}, 5);
    check("csr write data", {16'h0, last_csr_d}, 16'h000A);

    // Read CSR 3
    hdr(OP_RD_CSR, 5'd3);
    q = {32'h0000_B8A3};
    expect_xfer(OP_RD_CSR, 5'd3, 1, 1'b0, q);

    // block and current address
    hdr(OP_WR_BLK, 5'd0); fld(0, 32'h0007);
    hdr(OP_WR_ADDR, 5'd0); fld(0, 32'h0100);
    check("blk_addr", {16'h0, blk_addr}, 16'h0007);
    check("cur_addr", {16'h0, cur_addr}, 16'h0100);

    // single 32-bit write, then read it back
    hdr(OP_WR_MEM, 5'd1); fld(0, 32'h0120); fld(1, 32'hCAFE_F00D);
    @(negedge clk);
    check("mem written", mem[32'h0007_0120], 32'hCAFE_F00D);
    check("address follows write", {16'h0, cur_addr}, 16'h0120);
    hdr(OP_RD_MEM, 5'd1);
    q = {32'hCAFE_F00D};
    expect_xfer(OP_RD_MEM, 5'd1, 1, 1'b1, q);
    check("plain read keeps address", {16'h0, cur_addr}, 16'h0120);

    // 16-bit write
    hdr(OP_WR_MEM, 5'd0); fld(0, 32'h0121); fld(1, 32'h0000_1357);
    @(negedge clk);
    check("mem16 written", mem[32'h0007_0121], 32'h0000_1357);

    // read with increment, twice
    hdr(OP_WR_ADDR, 5'd0); fld(0, 32'h0120);
    hdr(OP_RD_MEM_INC, 5'd0);
    q = {32'h0000_F00D};
    expect_xfer(OP_RD_MEM_INC, 5'd0, 1, 1'b0, q);
    check("incremented", {16'h0, cur_addr}, 16'h0121);
    hdr(OP_RD_MEM_INC, 5'd0);
    q = {32'h0000_1357};
    expect_xfer(OP_RD_MEM_INC, 5'd0, 1, 1'b0, q);
    check("incremented twice", {16'h0, cur_addr}, 16'h0122);

    // variable block write, 32-bit, 5 words at 0x0200
    hdr(OP_BWR_VAR, 5'd1); fld(0, 32'h0200); fld(1, 32'd5);
    for (int i = 0; i < 5; i++) fld(2 + i, 32'h1000_0000 + 32'(i * 7));
    @(negedge clk);
    for (int i = 0; i < 5; i++) check("block written", mem[32'h0007_0200 + 32'(i)], 32'h1000_0000 + 32'(i * 7));
    check("address after block write", {16'h0, cur_addr}, 16'h0205);

    // block read: setup 0x0201, 3 words, then read
    hdr(OP_BRD_SETUP, 5'd1); fld(0, 32'h0201); fld(1, 32'd3);
    hdr(OP_BRD_VAR, 5'd1);
    q = {32'h1000_0007, 32'h1000_000E, 32'h1000_0015};
    expect_xfer(OP_BRD_VAR, 5'd1, 3, 1'b1, q);
    check("address after block read", {16'h0, cur_addr}, 16'h0204);

    // carry from current into block address
    hdr(OP_WR_ADDR, 5'd0); fld(0, 32'hFFFF);
    hdr(OP_RD_MEM_INC, 5'd0);
    q = {32'h0000_BAD0};
    expect_xfer(OP_RD_MEM_INC, 5'd0, 1, 1'b0, q);
    check("carry block", {16'h0, blk_addr}, 16'h0008);
    check("carry addr", {16'h0, cur_addr}, 16'h0000);

    // reframe and user reset
    hdr(OP_REFRAME, 5'd0);
    hdr(OP_USER_RST, 5'd0);
    @(negedge clk);
    check("reframe pulse", n_reframe, 1);
    check("user reset pulse", n_ureset, 1);
    check("reset blk", {16'h0, blk_addr}, 0);
    check("reset addr", {16'h0, cur_addr}, 0);

    // run-time header is not executed here
    hdr(5'h04, 5'd0);
    repeat (3) @(negedge clk);
    check("run-time op ignored", {31'h0, reg_req}, 0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
