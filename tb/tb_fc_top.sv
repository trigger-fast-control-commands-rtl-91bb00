// tb_fc_top: end-to-end test of the Fast Control front end at its default
// parameters.
//
// The testbench acts as the crate controller on the CLINK (commands sent bit
// by bit) and as the readout module on the DLINK (every frame captured from
// its start bit and compared bit for bit with a frame built here from the
// header definitions). A behavioural board memory answers reads one cycle
// late; the event data source is a pattern the testbench sets before each
// L1 Accept. The sequence takes the design through one complete operation:
// configuration by Write CSR, CSR read-back, single and block memory writes
// and reads, a run with L1 Accepts and Read Events (including buffer
// overflow, a Read Event with nothing stored, and a Read Event that waits
// for a register readout on the DLINK), Sync, TSF Reframing, a
// play/record sweep, the old block-write guard and User Reset. Each of these
// mechanisms is counted and a failure is recorded for any that never
// happened.
module tb_fc_top;
  import fc_pkg::*;

  localparam int NW = 8;          // DAQ words per event (design default)

  logic clk = 1'b0, rst_n = 1'b0, clink_in = 1'b0;
  logic dlink_out;
  logic [2:0] board_id = BID_ZPD;
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
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h expected %h", what, got, exp); end
  endtask

  // ------------------------------------------------------- board memory model
  logic [31:0] mem [logic [31:0]];
  always @(posedge clk) if (rst_n) begin
    if (mem_req && mem_we) mem[mem_addr] = mem_wide ? mem_wdata : {16'h0, mem_wdata[15:0]};
    if (mem_req && !mem_we) mem_rdata <= mem.exists(mem_addr) ? mem[mem_addr] : 32'h0;
  end

  // ------------------------------------------------------- mechanism counters
  int n_ignored = 0, n_overflow = 0, n_empty = 0, n_evt_wait = 0, n_guard = 0;
  int n_sync = 0, n_reframe = 0, n_sweep = 0, n_ureset = 0, n_l1a = 0;
  int n_bwr = 0, n_brd = 0;
  logic [4:0] l1a_cnt_q[$];
  always @(posedge clk) if (rst_n) begin
    if (runcmd_ignored) n_ignored++;
    if (daq_overflow) n_overflow++;
    if (daq_rd_empty) n_empty++;
    if (dut.u_daq.evt_req && dlink_busy && !dut.u_tx.sel_evt) n_evt_wait++;
    if (guard_active && !dut.u_rx.guard_active) ;
    if (dut.u_run.sync) n_sync++;
    if (tsf_fifo_clear) n_reframe++;
    if (pb_sweep_done) n_sweep++;
    if (user_reset) n_ureset++;
    if (l1a_seen && daq_count < 3'd4) begin n_l1a++; l1a_cnt_q.push_back(clk_count); end
  end
  logic guard_q = 1'b0;
  always @(posedge clk) if (rst_n) begin
    guard_q <= guard_active;
    if (guard_active && !guard_q) n_guard++;
  end

  // ------------------------------------------------------- CLINK driver
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

  // ------------------------------------------------------- DLINK receiver
  typedef bit frame_t[$];
  frame_t expq[$];
  int frames_ok = 0;
  bit rx_on = 0;
  frame_t cur;
  frame_t want;
  always @(negedge clk) if (rst_n) begin
    if (!rx_on) begin
      if (dlink_out) begin
        checks++;
        if (expq.size() == 0) begin
          failures++; $display("FAIL unexpected DLINK frame at %0t", $time);
        end else begin
          want = expq.pop_front();
          cur.delete();
          cur.push_back(1'b1);
          rx_on = 1;
        end
      end
    end else begin
      cur.push_back(dlink_out);
      if (cur.size() == want.size()) begin
        rx_on = 0;
        if (cur != want) begin
          failures++;
          $display("FAIL DLINK frame mismatch at %0t", $time);
          for (int i = 0; i < want.size(); i++)
            if (cur[i] != want[i]) begin $display("  first difference at bit %0d", i); break; end
        end else frames_ok++;
      end
    end
  end

  function automatic void put(ref frame_t f, input logic [31:0] v, input int n);
    for (int i = 0; i < n; i++) f.push_back(v[i]);
  endfunction

  task automatic expect_reg(input logic [4:0] op, input logic [4:0] sub,
                            input logic [31:0] words [$], input int wbits);
    frame_t f;
    put(f, {16'h0, reg_header(op, sub)}, 16);
    foreach (words[i]) put(f, words[i], wbits);
    expq.push_back(f);
  endtask

  task automatic wait_quiet();
    int n = 0;
    idle(4);
    while ((expq.size() != 0 || rx_on || dlink_busy) && n < 20000) begin @(negedge clk); n++; end
    idle(2);
  endtask

  // ------------------------------------------------------- model of CSR state
  logic [15:0] csr1_w = 0, csr2_w = 0, csr3_w = 0, csr4_w = 0, csr5_w = 0;

  function automatic logic [15:0] summary_model(input logic [2:0] act);
    logic [15:0] s;
    s = '0;
    s[0] = csr1_w[0]; s[1] = csr1_w[1]; s[2] = board_id[2];
    s[4:3] = csr2_w[1:0];
    s[5] = csr3_w[0]; s[6] = csr3_w[1]; s[7] = csr3_w[2]; s[8] = csr3_w[3];
    s[9] = csr4_w[0]; s[10] = glink_ready; s[11] = glink_sync;
    s[12] = act[0]; s[13] = act[1];
    s[14] = board_id[0]; s[15] = board_id[1];
    return s;
  endfunction

  task automatic wr_csr(input int a, input logic [15:0] v);
    cmd(OP_WR_CSR, 5'(a));
    send_bits({16'h0, v}, 16);
    case (a)
      1: csr1_w = v; 2: csr2_w = v; 3: csr3_w = v; 4: csr4_w = v; 5: csr5_w = v;
      default: ;
    endcase
    idle(3);
  endtask

  // ------------------------------------------------------- events
  typedef struct { logic [4:0] tag; logic [15:0] csr; logic [15:0] d [NW]; } ev_t;
  ev_t evq[$];
  int buf_no = 0;

  task automatic l1a(input logic [4:0] tag, input bit stored);
    ev_t e;
    e.tag = tag;
    e.csr = summary_model(3'b000);
    for (int w = 0; w < NW; w++) begin
      e.d[w] = 16'($urandom);
      event_data[w] = e.d[w];
    end
    cmd(OP_L1A, tag);
    idle(4);
    if (stored) evq.push_back(e);
  endtask

  // expected frame of the oldest event; trigger counter from the L1 Accept log
  task automatic expect_event();
    ev_t e;
    frame_t f;
    logic [31:0] h;
    logic [4:0] tc;
    e = evq.pop_front();
    tc = l1a_cnt_q.pop_front();
    h = '0;
    h[0] = 1; h[1] = 1;
    for (int i = 0; i < 5; i++) begin h[2 + i] = e.tag[i]; h[8 + i] = tc[i]; end
    h[13] = buf_no[1]; h[14] = buf_no[0];
    for (int i = 0; i < 16; i++) h[16 + i] = e.csr[15 - i];
    put(f, h, 32);
    for (int w = 0; w < NW; w++) put(f, {16'h0, e.d[w]}, 16);
    expq.push_back(f);
    buf_no = (buf_no + 1) % 4;
  endtask

  logic [31:0] q[$];
  int t0;

  initial begin
    for (int w = 0; w < NW; w++) event_data[w] = '0;
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    idle(5);

    // run-time command in non-run mode is ignored
    cmd(OP_L1A, 5'd3);
    idle(4);
    check("no event stored in non-run mode", daq_count, 0);

    // configuration
    wr_csr(1, 16'h0007);            // run mode, spare; bit 2 is not writable
    csr1_w[2] = 1'b0;
    wr_csr(2, 16'h0002);
    wr_csr(3, 16'h0025);            // enable lines 0, 1 and 3, all record
    wr_csr(4, 16'h0001);            // single shot
    wr_csr(5, 16'h0009);
    check("leds", leds, 4'h9);
    check("daq_fmt", daq_fmt, 2'd2);

    // CSR read-back
    cmd(OP_RD_CSR, 5'd1);
    q = {{16'h0, summary_model(3'b000)}};
    expect_reg(OP_RD_CSR, 5'd1, q, 16);
    wait_quiet();
    cmd(OP_RD_CSR, 5'd5);
    q = {32'h0000_0082};            // enable line 3 set, new-system flag
    expect_reg(OP_RD_CSR, 5'd5, q, 16);
    wait_quiet();

    // memory: block address, 32-bit single write and read back
    cmd(OP_WR_BLK, 5'd0); send_bits(32'h0003, 16); idle(3);
    cmd(OP_WR_MEM, 5'd1); send_bits(32'h0010, 16); send_bits(32'h8765_4321, 32); idle(3);
    check("memory written", mem[32'h0003_0010], 32'h8765_4321);
    cmd(OP_RD_MEM, 5'd1);
    q = {32'h8765_4321};
    expect_reg(OP_RD_MEM, 5'd1, q, 32);
    wait_quiet();
    // read with increment (16 bit), then CSR3 shows the advanced address
    cmd(OP_RD_MEM_INC, 5'd0);
    q = {32'h0000_4321};
    expect_reg(OP_RD_MEM_INC, 5'd0, q, 16);
    wait_quiet();
    cmd(OP_RD_CSR, 5'd3);
    q = {32'h0000_0011};
    expect_reg(OP_RD_CSR, 5'd3, q, 16);
    wait_quiet();

    // variable block write, 16 bit, 6 words at 0x0040; then block read of 4
    cmd(OP_BWR_VAR, 5'd0);
    send_bits(32'h0040, 16);
    send_bits(32'd6, 16);
    for (int i = 0; i < 6; i++) send_bits(32'hB000 + 32'(i), 16);
    idle(3);
    n_bwr++;
    for (int i = 0; i < 6; i++) check("block word", mem[32'h0003_0040 + 32'(i)], 32'hB000 + 32'(i));
    cmd(OP_BRD_SETUP, 5'd0); send_bits(32'h0041, 16); send_bits(32'd4, 16); idle(3);
    cmd(OP_BRD_VAR, 5'd0);
    q = {32'hB001, 32'hB002, 32'hB003, 32'hB004};
    expect_reg(OP_BRD_VAR, 5'd0, q, 16);
    t0 = $time;
    wait_quiet();
    n_brd++;

    // Sync and TSF reframing realign the clock counter
    cmd(OP_SYNC, 5'd0);
    idle(4);
    cmd(OP_REFRAME, 5'd0);
    idle(4);

    // run: four events fill the buffers, the fifth overflows
    l1a(5'h11, 1); l1a(5'h02, 1); l1a(5'h1F, 1); l1a(5'h08, 1);
    l1a(5'h15, 0);
    check("buffers full", daq_count, 4);
    for (int i = 0; i < 4; i++) begin
      cmd(OP_RD_EVENT, 5'd0);
      expect_event();
      wait_quiet();
    end
    cmd(OP_RD_EVENT, 5'd0);         // nothing left
    idle(6);

    // Read Event while a register readout holds the DLINK
    l1a(5'h0A, 1);
    cmd(OP_RD_CSR, 5'd2);
    q = {32'h0000_0009};
    expect_reg(OP_RD_CSR, 5'd2, q, 16);
    cmd(OP_RD_EVENT, 5'd0);
    expect_event();
    wait_quiet();

    // Clear Readout empties the buffers
    l1a(5'h01, 1);
    cmd(OP_CLR_RD, 5'd0);
    idle(4);
    check("cleared", daq_count, 0);
    void'(evq.pop_front());
    void'(l1a_cnt_q.pop_front());
    buf_no = 0;

    // play/record sweep, single shot
    cmd(OP_PLAYBACK, 5'd0);
    idle(4);
    check("playback active", pb_active, 6'b110011);
    repeat (300) @(negedge clk);
    check("playback finished", pb_active, 6'b000000);

    // old block write is blanked: a Write CSR hidden in its payload has no effect
    cmd(OP_BWR_OLD, 5'd0);
    send_bits(32'h0, 4);
    cmd(OP_WR_CSR, 5'd5); send_bits(32'h0006, 16);
    idle(OLD_BWR_WORDS * 32);
    check("leds untouched by blanked payload", leds, 4'h9);
    wr_csr(5, 16'h0006);
    check("commands work after guard", leds, 4'h6);

    // User Reset clears the address registers
    cmd(OP_USER_RST, 5'd0);
    idle(4);
    cmd(OP_RD_CSR, 5'd4);
    q = {32'h0000_0000};
    expect_reg(OP_RD_CSR, 5'd4, q, 16);
    wait_quiet();

    // every mechanism must have happened
    check("frames received", frames_ok, 13);
    check("mechanism: run-time command ignored outside run mode", n_ignored > 0, 1);
    check("mechanism: DAQ overflow", n_overflow > 0, 1);
    check("mechanism: read event with empty buffers", n_empty > 0, 1);
    check("mechanism: event waits for register readout", n_evt_wait > 0, 1);
    check("mechanism: old block write guard", n_guard, 1);
    check("mechanism: sync", n_sync, 1);
    check("mechanism: TSF reframing", n_reframe, 1);
    check("mechanism: playback sweep", n_sweep, 1);
    check("mechanism: user reset", n_ureset, 1);
    check("mechanism: block write", n_bwr, 1);
    check("mechanism: block read", n_brd, 1);
    check("mechanism: L1 accepts stored", n_l1a, 6);
    $display("mechanisms: ignored=%0d overflow=%0d empty=%0d evt_wait=%0d guard=%0d sync=%0d reframe=%0d sweep=%0d ureset=%0d",
             n_ignored, n_overflow, n_empty, n_evt_wait, n_guard, n_sync, n_reframe, n_sweep, n_ureset);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
