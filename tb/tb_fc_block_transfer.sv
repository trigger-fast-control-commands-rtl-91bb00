// tb_fc_block_transfer: maximum-size block transfers through the whole FC.
//
// The readout module buffers at most 512 long words per transfer, so the
// largest transfers a host sends are 512 32-bit words or 1024 16-bit words.
// This testbench drives fc_top at its default parameters with a variable
// block write of each size (random data), checks every word that reaches
// the board memory model, then reads each block back with Block Read Setup +
// Block Read and compares the DLINK frame bit for bit. It also checks the
// rate: the frame must hold the line for exactly 16 + N*W consecutive
// cycles (one bit per clock, no gaps), and the address must end at
// start + N.
module tb_fc_block_transfer;
  import fc_pkg::*;

  localparam int NW = 8;

  logic clk = 1'b0, rst_n = 1'b0, clink_in = 1'b0;
  logic dlink_out;
  logic [2:0] board_id = BID_TSF_X;
  logic glink_ready = 1'b1, glink_sync = 1'b1;
  logic [15:0] event_data [NW];
  logic mem_req, mem_we, mem_wide;
  logic [31:0] mem_addr, mem_wdata, mem_rdata;
  logic [4:0] clk_count, clk_en;
  logic tsf_fifo_clear, user_reset;
  logic [3:0] leds;
  logic [1:0] daq_fmt;
  logic [5:0] pb_active, pb_we, pb_re;
  logic [7:0] pb_addr;
  logic l1a_seen, daq_overflow, daq_rd_empty, runcmd_ignored, guard_active, dlink_busy;
  logic [2:0] daq_count;
  logic pb_sweep_done;

  fc_top dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h expected %h", what, got, exp); end
  endtask

  // board memory model, one-cycle read latency
  logic [31:0] mem [logic [31:0]];
  always @(posedge clk) if (rst_n) begin
    if (mem_req && mem_we) mem[mem_addr] = mem_wide ? mem_wdata : {16'h0, mem_wdata[15:0]};
    if (mem_req && !mem_we) mem_rdata <= mem.exists(mem_addr) ? mem[mem_addr] : 32'h0;
  end

  // DLINK: record the frame and how long the line is busy
  bit line[$];
  int busy_cycles = 0;
  always @(negedge clk) if (rst_n) begin
    if (dlink_busy) busy_cycles++;
    if (dlink_out || line.size() != 0) line.push_back(dlink_out);
  end

  task automatic send_bits(input logic [31:0] v, input int n);
    for (int i = 0; i < n; i++) @(negedge clk) clink_in = v[i];
  endtask
  task automatic cmd(input logic [4:0] op, input logic [4:0] sub);
    send_bits(32'b10, 2);
    send_bits({27'h0, op}, 5);
    send_bits({27'h0, sub}, 5);
  endtask
  task automatic idle(input int n);
    for (int i = 0; i < n; i++) @(negedge clk) clink_in = 1'b0;
  endtask

  task automatic run_size(input bit wide, input int n, input logic [15:0] blk,
                          input logic [15:0] start);
    logic [31:0] data [];
    int wb, errs;
    wb = wide ? 32 : 16;
    data = new[n];
    foreach (data[i]) data[i] = wide ? $urandom : {16'h0, 16'($urandom)};

    cmd(OP_WR_BLK, 5'd0); send_bits({16'h0, blk}, 16); idle(3);
    cmd(OP_BWR_VAR, {4'h0, wide});
    send_bits({16'h0, start}, 16);
    send_bits(32'(n), 16);
    foreach (data[i]) send_bits(data[i], wb);
    idle(3);
    errs = 0;
    foreach (data[i]) begin
      logic [31:0] a;
      a = {blk, start} + 32'(i);
      if (!mem.exists(a) || mem[a] !== data[i]) errs++;
    end
    check($sformatf("%0d words of %0d bits written", n, wb), errs, 0);
    check("address after block write", {blk, start} + 32'(n), {dut.blk_addr, dut.cur_addr});

    // read back; the write may have carried into the next block, and the
    // setup command loads only the low address half
    cmd(OP_WR_BLK, 5'd0); send_bits({16'h0, blk}, 16); idle(3);
    cmd(OP_BRD_SETUP, {4'h0, wide}); send_bits({16'h0, start}, 16); send_bits(32'(n), 16);
    idle(3);
    line.delete();
    busy_cycles = 0;
    cmd(OP_BRD_VAR, {4'h0, wide});
    idle(16 + n * wb + 20);
    checks++;
    begin
      int p;
      logic [15:0] h;
      h = reg_header(OP_BRD_VAR, {4'h0, wide});
      p = 0;
      errs = 0;
      for (int i = 0; i < 16; i++) begin if (p >= line.size() || line[p] != h[i]) errs++; p++; end
      foreach (data[w])
        for (int i = 0; i < wb; i++) begin if (p >= line.size() || line[p] != data[w][i]) errs++; p++; end
      for (int i = p; i < line.size(); i++) if (line[i]) errs++;   // nothing after the frame
      if (errs != 0) begin failures++; $display("FAIL block read frame: %0d bit errors", errs); end
    end
    // serializer busy = one start cycle + the frame bits
    check("line held for header + N*W cycles", busy_cycles, 1 + 16 + n * wb);
    check("address after block read", {blk, start} + 32'(n), {dut.blk_addr, dut.cur_addr});
  endtask

  initial begin
    for (int w = 0; w < NW; w++) event_data[w] = '0;
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    idle(5);
    run_size(1'b1, 512, 16'h0012, 16'h0100);    // 512 long words
    run_size(1'b0, 1024, 16'h0013, 16'hFE00);   // 1024 16-bit words, crosses into block 0x0014
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
