// tb_fc_run_decode: self-checking test of the run-time command decoder.
//
// Presents every op-code 0x00-0x1F in run mode and in non-run mode and checks
// that exactly the expected strobe fires one cycle later (none for non-run
// op-codes, NOP, calibration strobe and the reserved codes), that the L1
// Accept tag is passed on, and that run-time commands are ignored, with the
// ignored strobe, while run mode is off.
module tb_fc_run_decode;
  import fc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic hdr_valid = 1'b0, run_mode = 1'b0;
  logic [4:0] hdr_op = '0, hdr_sub = '0;
  logic clear_readout, sync, l1a, read_event, start_playback, ignored;
  logic [4:0] l1a_tag;
  int checks = 0, failures = 0;

  fc_run_decode dut (.*);
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
    rst_n = 1'b1;
    for (int m = 0; m < 2; m++) begin
      for (int op = 0; op < 32; op++) begin
        logic [5:0] exp;
        @(negedge clk);
        run_mode  = m[0];
        hdr_valid = 1'b1;
        hdr_op    = op[4:0];
        hdr_sub   = 5'(op ^ 5'h0A);
        @(negedge clk);
        hdr_valid = 1'b0;
        // expected {ignored, playback, read_event, l1a, sync, clear}
        exp = '0;
        if (m == 1) begin
          exp[0] = (op == 1);
          exp[1] = (op == 2);
          exp[2] = (op == 3);
          exp[3] = (op == 4);
          exp[4] = (op == 6);
        end else begin
          exp[5] = (op >= 1 && op <= 11);
        end
        check($sformatf("strobes m=%0d op=%0d", m, op),
              {ignored, start_playback, read_event, l1a, sync, clear_readout}, exp);
        if (m == 1 && op == 3) check("tag", l1a_tag, (3 ^ 10));
        @(negedge clk);
        check("strobes are one cycle", {ignored, start_playback, read_event, l1a, sync, clear_readout}, 0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
