// fc_playback_ctrl: play/record sequencing of the diagnostic memories.
//
// The new boards have NMEM diagnostic memories (mem(0) the input memory,
// mem(1) the output memory, mem(2).. algorithm memories) but only NEN enable
// lines: mem(0) and mem(1) have lines 0 and 1, and the algorithm memories
// share the remaining lines in pairs (mem(2), mem(3) on line 2; mem(4),
// mem(5) on line 3). Each memory has its own play(1)/record(0) select.
//
// Start Playback starts every memory whose enable line is set: its active
// flag rises and a common address counter sweeps 0 .. DEPTH-1, one address
// per clock. A memory in record mode gets a write enable at each address, one
// in play mode a read enable. In single-shot mode (CSR4 bit 0 = 1) the sweep
// ends after one pass; otherwise it wraps and continues until the memory's
// enable line is cleared, User Reset arrives, or Start Playback restarts it.
// The enable/play structure and single-shot/cyclic modes are the protocol's;
// the pairing of shared enable lines, DEPTH = 256 and the one-address-per-clock
// sweep are this design's choices, since the memories themselves are board
// specific.
//
// Timing: active and the address change at the clock edge after start.
module fc_playback_ctrl #(
  parameter int unsigned NMEM  = 6,
  parameter int unsigned NEN   = 4,
  parameter int unsigned DEPTH = 256
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     start,
  input  logic                     stop,
  input  logic [NEN-1:0]           mem_en,
  input  logic [NMEM-1:0]          mem_play,
  input  logic                     single_shot,
  output logic [NMEM-1:0]          active,
  output logic [NMEM-1:0]          mem_we,
  output logic [NMEM-1:0]          mem_re,
  output logic [$clog2(DEPTH)-1:0] addr,
  output logic                     sweep_done
);

  localparam int unsigned AW = $clog2(DEPTH);

  // enable line feeding memory k
  function automatic int unsigned en_line(input int unsigned k);
    int unsigned l;
    l = (k < 2) ? k : 2 + (k - 2) / 2;
    return (l < NEN) ? l : NEN - 1;
  endfunction

  logic [NMEM-1:0] en_k;
  always_comb begin
    for (int unsigned k = 0; k < NMEM; k++) en_k[k] = mem_en[en_line(k)];
  end

  logic last;
  assign last = (addr == AW'(DEPTH - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active     <= '0;
      addr       <= '0;
      sweep_done <= 1'b0;
    end else begin
      sweep_done <= 1'b0;
      if (stop) begin
        active <= '0;
        addr   <= '0;
      end else if (start) begin
        active <= en_k;
        addr   <= '0;
      end else if (active != '0) begin
        active <= active & en_k;
        addr   <= last ? '0 : addr + 1'b1;
        if (last) begin
          sweep_done <= 1'b1;
          if (single_shot) active <= '0;
        end
      end
    end
  end

  assign mem_we = active & ~mem_play & en_k;
  assign mem_re = active &  mem_play & en_k;

endmodule
