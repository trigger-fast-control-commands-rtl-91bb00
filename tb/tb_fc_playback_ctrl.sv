// tb_fc_playback_ctrl: self-checking test of the play/record sequencer.
//
// Uses a short DEPTH. Checks the mapping of the shared enable lines onto the
// six memories, that each active memory gets a read enable (play) or write
// enable (record) at every address of the sweep, that a single-shot sweep
// covers DEPTH addresses exactly once and stops, that a cyclic sweep wraps
// and stops when its enable line is cleared, and that stop ends everything.
module tb_fc_playback_ctrl;
  localparam int D = 8;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, stop = 1'b0, single_shot = 1'b0;
  logic [3:0] mem_en = '0;
  logic [5:0] mem_play = '0;
  logic [5:0] active, mem_we, mem_re;
  logic [2:0] addr;
  logic sweep_done;
  int checks = 0, failures = 0;
  int we_cnt [6], re_cnt [6];
  int n_done = 0;

  fc_playback_ctrl #(.NMEM(6), .NEN(4), .DEPTH(D)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    for (int k = 0; k < 6; k++) begin
      if (mem_we[k]) we_cnt[k]++;
      if (mem_re[k]) re_cnt[k]++;
    end
    if (sweep_done) n_done++;
  end

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask

  task automatic clear_counts();
    for (int k = 0; k < 6; k++) begin we_cnt[k] = 0; re_cnt[k] = 0; end
    n_done = 0;
  endtask

  task automatic pulse_start();
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;

    // single shot: lines 0 and 2 enabled -> mem0, mem2, mem3 active
    single_shot = 1'b1;
    mem_en = 4'b0101;
    mem_play = 6'b001001;   // mem0 play, mem3 play, mem2 record
    clear_counts();
    pulse_start();
    check("active set", active, 6'b001101);
    check("start address", addr, 0);
    repeat (D + 4) @(negedge clk);
    check("single shot stopped", active, 0);
    check("mem0 reads", re_cnt[0], D);
    check("mem2 writes", we_cnt[2], D);
    check("mem3 reads", re_cnt[3], D);
    check("mem1 idle", re_cnt[1] + we_cnt[1], 0);
    check("mem4 idle", re_cnt[4] + we_cnt[4], 0);
    check("mem0 no writes", we_cnt[0], 0);
    check("one sweep", n_done, 1);

    // cyclic: line 3 (mem4, mem5) and line 1 (mem1), runs 3 sweeps
    single_shot = 1'b0;
    mem_en = 4'b1010;
    mem_play = 6'b100000;   // mem5 play, mem4 and mem1 record
    clear_counts();
    pulse_start();
    check("cyclic active", active, 6'b110010);
    repeat (3 * D) @(negedge clk);
    check("still active", active, 6'b110010);
    check("mem4 writes", we_cnt[4], 3 * D);
    check("mem5 reads", re_cnt[5], 3 * D);
    @(negedge clk);
    check("three sweeps", n_done, 3);
    // clearing line 3 stops mem4 and mem5 only
    mem_en = 4'b0010;
    repeat (2) @(negedge clk);
    check("line 3 cleared", active, 6'b000010);
    // stop ends the rest
    @(negedge clk) stop = 1'b1;
    @(negedge clk) stop = 1'b0;
    check("stopped", active, 0);
    // start with nothing enabled does nothing
    mem_en = 4'b0000;
    pulse_start();
    check("nothing enabled", active, 0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
