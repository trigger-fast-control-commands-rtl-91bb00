// tb_fc_dlink_tx: self-checking test of the DLINK serializer.
//
// Behavioural sources answer word pulls with known patterns one cycle later.
// A receiver in the testbench records every bit on the line from the first
// start bit and compares the stream with the expected header and words (LSB
// first), checks the transfer length in cycles (header bits plus words times
// word width, plus the cycle from the grant to the first bit), and checks that the event port wins when both ports request
// in the same cycle and that the register transfer follows afterwards.
module tb_fc_dlink_tx;
  logic clk = 1'b0, rst_n = 1'b0;
  logic evt_req = 1'b0, reg_req = 1'b0, reg_wide = 1'b0;
  logic [31:0] evt_hdr = '0;
  logic [15:0] reg_hdr = '0, evt_nwords = '0, reg_nwords = '0;
  logic evt_gnt, evt_rd_req, reg_gnt, reg_rd_req, dlink_out, busy, done;
  logic [31:0] evt_rd_data = '0, reg_rd_data = '0;
  int checks = 0, failures = 0;
  int evt_i = 0, reg_i = 0;

  fc_dlink_tx dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask

  // sources: one-cycle read latency
  always @(posedge clk) if (rst_n) begin
    if (evt_rd_req) begin evt_rd_data <= 32'h0000_C000 + 32'(evt_i); evt_i++; end
    if (reg_rd_req) begin reg_rd_data <= 32'h5A00_0000 + 32'(reg_i * 32'h0001_0003); reg_i++; end
    if (evt_gnt) evt_req <= 1'b0;
    if (reg_gnt) reg_req <= 1'b0;
  end

  // line recorder
  bit line[$];
  always @(posedge clk) if (rst_n && (busy || dlink_out)) line.push_back(dlink_out);

  function automatic void push_field(ref bit q[$], input logic [31:0] v, input int n);
    for (int i = 0; i < n; i++) q.push_back(v[i]);
  endfunction

  task automatic compare(input string what, ref bit exp[$]);
    int first;
    first = -1;
    foreach (line[i]) if (line[i] && first < 0) first = i;
    checks++;
    if (first < 0) begin failures++; $display("FAIL %s: no start bit", what); return; end
    for (int i = 0; i < first; i++) void'(line.pop_front());
    for (int i = 0; i < exp.size(); i++) begin
      checks++;
      if (line.size() == 0 || line.pop_front() != exp[i]) begin
        failures++; $display("FAIL %s: bit %0d", what, i); return;
      end
    end
  endtask

  bit exp[$];
  int t0, tdone;

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // 1) register read of 3 32-bit words
    @(negedge clk);
    reg_hdr = 16'h1F75; reg_nwords = 3; reg_wide = 1'b1; reg_req = 1'b1;
    t0 = $time;
    @(posedge done); tdone = $time;
    check("reg transfer cycles", (tdone - t0) / 10, 1 + 16 + 3 * 32);
    exp.delete();
    push_field(exp, 32'h1F75, 16);
    for (int i = 0; i < 3; i++) push_field(exp, 32'h5A00_0000 + 32'(i * 32'h0001_0003), 32);
    compare("reg 32-bit", exp);
    line.delete();

    // 2) both ports at once: event first (32-bit header, 4 x 16-bit words)
    @(negedge clk);
    evt_hdr = 32'hA5C3_1E0F; evt_nwords = 4; evt_req = 1'b1;
    reg_hdr = 16'h0075; reg_nwords = 2; reg_wide = 1'b0; reg_req = 1'b1;
    @(posedge clk);
    check("event granted first", evt_gnt, 1);
    check("register waits", reg_gnt, 0);
    @(posedge done);
    @(posedge done);
    repeat (3) @(posedge clk);
    exp.delete();
    push_field(exp, 32'hA5C3_1E0F, 32);
    for (int i = 0; i < 4; i++) push_field(exp, 32'h0000_C000 + 32'(i), 16);
    compare("event", exp);
    exp.delete();
    push_field(exp, 32'h0075, 16);
    for (int i = 0; i < 2; i++) push_field(exp, (32'h5A00_0000 + 32'((3 + i) * 32'h0001_0003)) & 32'hFFFF, 16);
    compare("reg after event", exp);
    line.delete();

    // 3) header-only transfer
    @(negedge clk);
    reg_hdr = 16'h0F81; reg_nwords = 0; reg_req = 1'b1;
    t0 = $time;
    @(posedge done); tdone = $time;
    check("header-only cycles", (tdone - t0) / 10, 1 + 16);
    exp.delete();
    push_field(exp, 32'h0F81, 16);
    compare("header only", exp);
    check("pull count evt", evt_i, 4);
    check("pull count reg", reg_i, 5);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
