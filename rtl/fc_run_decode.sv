// fc_run_decode: global (run-time) command decoder.
//
// Turns a CLINK header with a run-time op-code (0x00-0x0B) into one-cycle
// strobes: Clear Readout, Sync, L1 Trigger Accept (with its 5-bit trigger
// tag, carried in the command's data bits), Read Event and Start Playback.
// Calibration Strobe has no meaning on trigger boards and, like No Operation
// and the reserved codes 0x07-0x0B, produces no strobe.
//
// Run-time commands are acted on only while CSR1 bit 0 (run mode) is 1; in
// non-run mode a run-time command other than No Operation pulses ignored.
// The op-code meanings are the protocol's; the gating by run mode is this
// design's reading of the CSR1 "Non-run/Run time commands" bit.
//
// Timing: strobes are registered, one cycle after hdr_valid.
module fc_run_decode
  import fc_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       hdr_valid,
  input  logic [4:0] hdr_op,
  input  logic [4:0] hdr_sub,
  input  logic       run_mode,
  output logic       clear_readout,
  output logic       sync,
  output logic       l1a,
  output logic [4:0] l1a_tag,
  output logic       read_event,
  output logic       start_playback,
  output logic       ignored
);

  logic act;
  assign act = hdr_valid && is_run_op(hdr_op);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      clear_readout  <= 1'b0;
      sync           <= 1'b0;
      l1a            <= 1'b0;
      l1a_tag        <= '0;
      read_event     <= 1'b0;
      start_playback <= 1'b0;
      ignored        <= 1'b0;
    end else begin
      clear_readout  <= act && run_mode && hdr_op == OP_CLR_RD;
      sync           <= act && run_mode && hdr_op == OP_SYNC;
      l1a            <= act && run_mode && hdr_op == OP_L1A;
      read_event     <= act && run_mode && hdr_op == OP_RD_EVENT;
      start_playback <= act && run_mode && hdr_op == OP_PLAYBACK;
      ignored        <= act && !run_mode && hdr_op != OP_NOP;
      if (act && hdr_op == OP_L1A) l1a_tag <= hdr_sub;
    end
  end

endmodule
