// tb_fc_clock_counter: self-checking test of the local clock counter.
//
// Compares the counter with a reference count kept in the testbench over
// several wraps, checks each slow-clock enable against its period
// (clk_en[k] once every 2^(k+1) clocks), and checks that sync restarts the
// count at 0 in the next cycle so the enables realign.
module tb_fc_clock_counter;
  logic clk = 1'b0, rst_n = 1'b0, sync = 1'b0;
  logic [4:0] count, clk_en;
  int checks = 0, failures = 0;
  int ref_cnt;
  int en_hits [5];

  fc_clock_counter #(.WIDTH(5)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    ref_cnt = 0;
    for (int c = 0; c < 128; c++) begin
      check("count", count, ref_cnt % 32);
      for (int k = 0; k < 5; k++) begin
        check("enable", clk_en[k], ((ref_cnt % (1 << (k + 1))) == (1 << (k + 1)) - 1));
        if (clk_en[k]) en_hits[k]++;
      end
      @(negedge clk);
      ref_cnt++;
    end
    for (int k = 0; k < 5; k++) check("enable rate", en_hits[k], 128 >> (k + 1));
    // sync in the middle of a period
    repeat (7) @(negedge clk);
    sync = 1'b1;
    @(negedge clk);
    sync = 1'b0;
    check("sync restarts count", count, 0);
    @(negedge clk);
    check("count after sync", count, 1);
    check("clk_en[0] after sync", clk_en[0], 1);
    check("clk_en[1] after sync", clk_en[1], 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
