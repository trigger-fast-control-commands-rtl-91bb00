// tb_fc_csr: self-checking test of the CSR block.
//
// Writes each CSR with random values and checks the control outputs and the
// read-back map (register summary, LEDs, address registers, algorithm memory
// status with its new-system flag), worked out field by field from the
// written values and the status inputs. Also checks that CSR1 bit 2 cannot be
// written and that unused addresses read 0.
module tb_fc_csr;
  logic clk = 1'b0, rst_n = 1'b0;
  logic csr_we = 1'b0;
  logic [4:0] waddr = '0, raddr = '0;
  logic [15:0] wdata = '0, rdata;
  logic [2:0] board_id = '0;
  logic glink_ready = 1'b0, glink_sync = 1'b0;
  logic [2:0] mem_active = '0;
  logic [15:0] cur_addr = '0, blk_addr = '0;
  logic run_mode, ctrl_spare, single_shot;
  logic [1:0] daq_fmt;
  logic [3:0] mem_en, leds;
  logic [5:0] mem_play;
  logic [15:0] summary;
  int checks = 0, failures = 0;

  fc_csr dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input logic [15:0] got, input logic [15:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h expected %h", what, got, exp); end
  endtask

  task automatic wr(input int a, input logic [15:0] d);
    @(negedge clk);
    csr_we = 1'b1; waddr = 5'(a); wdata = d;
    @(negedge clk);
    csr_we = 1'b0;
  endtask

  logic [15:0] w1, w2, w3, w4, w5, exp1, exp5;

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int it = 0; it < 200; it++) begin
      w1 = 16'($urandom); w2 = 16'($urandom); w3 = 16'($urandom);
      w4 = 16'($urandom); w5 = 16'($urandom);
      board_id = 3'($urandom % 7);
      glink_ready = 1'($urandom); glink_sync = 1'($urandom);
      mem_active = 3'($urandom);
      cur_addr = 16'($urandom); blk_addr = 16'($urandom);
      wr(1, w1); wr(2, w2); wr(3, w3); wr(4, w4); wr(5, w5);
      wr(7, 16'hFFFF);   // unused address: no effect
      check("run_mode", {15'h0, run_mode}, {15'h0, w1[0]});
      check("daq_fmt", {14'h0, daq_fmt}, {14'h0, w2[1:0]});
      check("mem_en", {12'h0, mem_en}, {12'h0, w3[5], w3[4], w3[2], w3[0]});
      check("mem_play", {10'h0, mem_play}, {10'h0, w3[9:6], w3[3], w3[1]});
      check("single_shot", {15'h0, single_shot}, {15'h0, w4[0]});
      check("leds", {12'h0, leds}, {12'h0, w5[3:0]});
      exp1 = {board_id[1], board_id[0], mem_active[1], mem_active[0], glink_sync, glink_ready,
              w4[0], w3[3], w3[2], w3[1], w3[0], w2[1], w2[0], board_id[2], w1[1], w1[0]};
      exp5 = {8'h00, 1'b1, mem_active[2], w3[9:6], w3[5:4]};
      #1;
      raddr = 5'd1; #1 check("read CSR1", rdata, exp1);
      check("summary", summary, exp1);
      raddr = 5'd2; #1 check("read CSR2", rdata, {12'h0, w5[3:0]});
      raddr = 5'd3; #1 check("read CSR3", rdata, cur_addr);
      raddr = 5'd4; #1 check("read CSR4", rdata, blk_addr);
      raddr = 5'd5; #1 check("read CSR5", rdata, exp5);
      raddr = 5'd0; #1 check("read CSR0", rdata, 16'h0);
      raddr = 5'd9; #1 check("read CSR9", rdata, 16'h0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
