// fc_clock_counter: local clock counter and slower-clock enables.
//
// A free-running 5-bit counter advances every clock. Its value is the
// "trigger counter" latched into each DAQ event header at L1 Accept. The
// slower clocks a board needs are derived from it as one-cycle enables:
// clk_en[k] is high once every 2^(k+1) clocks, when the low k+1 counter bits
// are all ones. Sync (run-time op-code 0x02) and TSF Reframing (0x14) both
// realign the counter: it restarts from 0 in the next cycle, so every board
// that receives the same command has its slow clocks in phase. The counter
// width follows the 5-bit trigger-counter field; the enable pattern is this
// design's choice, since the protocol only says the counters are aligned.
//
// Timing: count is registered; clk_en is decoded from it combinationally.
module fc_clock_counter #(
  parameter int unsigned WIDTH = 5
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             sync,
  output logic [WIDTH-1:0] count,
  output logic [WIDTH-1:0] clk_en
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    count <= '0;
    else if (sync) count <= '0;
    else           count <= count + 1'b1;
  end

  always_comb begin
    for (int k = 0; k < int'(WIDTH); k++)
      clk_en[k] = ((count & WIDTH'((1 << (k + 1)) - 1)) == WIDTH'((1 << (k + 1)) - 1));
  end

endmodule
