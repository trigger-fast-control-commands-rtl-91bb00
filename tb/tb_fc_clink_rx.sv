// tb_fc_clink_rx: self-checking test of the CLINK deserializer.
//
// Sends run-time and non-run-time commands bit by bit (leading 0, start 1,
// op-code and data LSB first, then payload) and checks every decoded header
// and payload field against the values that were sent, the field widths that
// the op-code and sub-command imply, the block-write word count, and that an
// old 0x16 block write blanks the line for exactly GUARD_BITS bit times (a
// command hidden inside the blanking window must not be decoded).
module tb_fc_clink_rx;
  import fc_pkg::*;

  localparam int unsigned GUARD = 64;

  logic clk = 1'b0, rst_n = 1'b0, clink_in = 1'b0;
  logic hdr_valid, fld_valid, fld_last, busy, guard_active;
  logic [4:0] hdr_op, hdr_sub;
  logic [31:0] fld_data;
  logic [16:0] fld_idx;
  int checks = 0, failures = 0;

  fc_clink_rx #(.GUARD_BITS(GUARD)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // captured events
  logic [9:0]  hq[$];
  logic [31:0] fq[$];
  logic [16:0] iq[$];
  logic        lq[$];
  int guard_cycles = 0;
  always @(posedge clk) if (rst_n) begin
    if (hdr_valid) hq.push_back({hdr_sub, hdr_op});
    if (fld_valid) begin fq.push_back(fld_data); iq.push_back(fld_idx); lq.push_back(fld_last); end
    if (guard_active) guard_cycles++;
  end

  task automatic send_bits(input logic [31:0] v, input int n);
    for (int i = 0; i < n; i++) begin
      @(negedge clk) clink_in = v[i];
    end
  endtask

  task automatic send_hdr(input logic [4:0] op, input logic [4:0] sub);
    send_bits(32'b10, 2);
    send_bits({27'h0, op}, 5);
    send_bits({27'h0, sub}, 5);
  endtask

  task automatic idle(input int n);
    for (int i = 0; i < n; i++) @(negedge clk) clink_in = 1'b0;
  endtask

  task automatic expect_hdr(input logic [4:0] op, input logic [4:0] sub);
    idle(3);
    checks++;
    if (hq.size() != 1) begin failures++; $display("FAIL header count %0d", hq.size()); end
    else begin
      logic [9:0] h = hq.pop_front();
      check("op", {27'h0, h[4:0]}, {27'h0, op});
      check("sub", {27'h0, h[9:5]}, {27'h0, sub});
    end
    hq.delete();
  endtask

  task automatic expect_fld(input int idx, input logic [31:0] v, input logic last);
    checks++;
    if (fq.size() == 0) begin failures++; $display("FAIL missing field %0d", idx); end
    else begin
      check("field", fq.pop_front(), v);
      check("field idx", {15'h0, iq.pop_front()}, idx);
      check("field last", {31'h0, lq.pop_front()}, {31'h0, last});
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    idle(4);

    // run-time: L1 accept with tag 0x15
    send_hdr(5'h03, 5'h15);
    expect_hdr(5'h03, 5'h15);
    check("no payload", fq.size(), 0);

    // Write CSR 3 <= 0x02A5
    send_hdr(OP_WR_CSR, 5'd3);
    send_bits(32'h02A5, 16);
    expect_hdr(OP_WR_CSR, 5'd3);
    expect_fld(0, 32'h02A5, 1'b1);

    // Write Memory, 32-bit: address 0x1234, data 0xDEADBEEF
    send_hdr(OP_WR_MEM, 5'd1);
    send_bits(32'h1234, 16);
    send_bits(32'hDEADBEEF, 32);
    expect_hdr(OP_WR_MEM, 5'd1);
    expect_fld(0, 32'h1234, 1'b0);
    expect_fld(1, 32'hDEADBEEF, 1'b1);

    // Write Memory, 16-bit: only 16 data bits follow
    send_hdr(OP_WR_MEM, 5'd0);
    send_bits(32'h0042, 16);
    send_bits(32'hBEEF, 16);
    expect_hdr(OP_WR_MEM, 5'd0);
    expect_fld(0, 32'h0042, 1'b0);
    expect_fld(1, 32'h0000BEEF, 1'b1);

    // Block write, 16-bit, 3 words
    send_hdr(OP_BWR_VAR, 5'd0);
    send_bits(32'h0100, 16);
    send_bits(32'd3, 16);
    send_bits(32'hA001, 16);
    send_bits(32'hA002, 16);
    send_bits(32'hA003, 16);
    expect_hdr(OP_BWR_VAR, 5'd0);
    expect_fld(0, 32'h0100, 1'b0);
    expect_fld(1, 32'd3, 1'b0);
    expect_fld(2, 32'hA001, 1'b0);
    expect_fld(3, 32'hA002, 1'b0);
    expect_fld(4, 32'hA003, 1'b1);

    // Block write, 32-bit, 2 words
    send_hdr(OP_BWR_VAR, 5'd1);
    send_bits(32'h0200, 16);
    send_bits(32'd2, 16);
    send_bits(32'h11112222, 32);
    send_bits(32'h33334444, 32);
    expect_hdr(OP_BWR_VAR, 5'd1);
    expect_fld(0, 32'h0200, 1'b0);
    expect_fld(1, 32'd2, 1'b0);
    expect_fld(2, 32'h11112222, 1'b0);
    expect_fld(3, 32'h33334444, 1'b1);

    // Block write with zero words ends after the count
    send_hdr(OP_BWR_VAR, 5'd0);
    send_bits(32'h0300, 16);
    send_bits(32'd0, 16);
    expect_hdr(OP_BWR_VAR, 5'd0);
    expect_fld(0, 32'h0300, 1'b0);
    expect_fld(1, 32'd0, 1'b1);

    // Block read setup: two 16-bit fields
    send_hdr(OP_BRD_SETUP, 5'd1);
    send_bits(32'h0040, 16);
    send_bits(32'h0005, 16);
    expect_hdr(OP_BRD_SETUP, 5'd1);
    expect_fld(0, 32'h0040, 1'b0);
    expect_fld(1, 32'h0005, 1'b1);

    // Read CSR has no payload
    send_hdr(OP_RD_CSR, 5'd1);
    expect_hdr(OP_RD_CSR, 5'd1);
    check("no payload 1D", fq.size(), 0);

    // Old block write: line blanked for GUARD bits; a command inside is ignored
    guard_cycles = 0;
    send_hdr(OP_BWR_OLD, 5'd0);
    send_bits(32'h0000_0000, 8);
    send_hdr(OP_WR_CSR, 5'd5);          // lies inside the blanking window
    send_bits(32'hFFFF, 16);
    idle(GUARD);
    check("guard length", guard_cycles, GUARD);
    checks++;
    if (hq.size() != 1) begin failures++; $display("FAIL guard let %0d headers through", hq.size()); end
    hq.delete();
    check("guard no fields", fq.size(), 0);
    // line works again afterwards
    send_hdr(OP_WR_ADDR, 5'd0);
    send_bits(32'h5A5A, 16);
    expect_hdr(OP_WR_ADDR, 5'd0);
    expect_fld(0, 32'h5A5A, 1'b1);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
