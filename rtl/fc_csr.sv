// fc_csr: Control and Status Registers of the upgraded (new DCT) front end.
//
// Written with Write CSR (op-code 0x1C), the sub-command being the address:
//   CSR1  bit 0 run mode (1 = run-time commands), bit 1 control spare;
//         bit 2 is not writable (it reads back as board ID bit 2)
//   CSR2  bits 1:0 DAQ format number
//   CSR3  bit 0/2 enable mem(0)/mem(1), bit 1/3 play(1)/record(0) mem(0)/mem(1),
//         bits 5:4 enable lines 2 and 3, bits 9:6 play/record mem(2)..mem(5)
//   CSR4  bit 0 play/record mode, 0 = cycle continuously, 1 = single shot
//   CSR5  bits 3:0 software LEDs
// Read with Read CSR (0x1D), where the addresses mean something else:
//   1  register summary (also the CSR1 word of every event header)
//   2  LEDs   3  current address (low 16 bits)   4  block address (high 16)
//   5  algorithm memory status, bit 7 = 1 marks the new system
// Bit layouts are the protocol's. Unused addresses read 0 and ignore writes,
// and the registers clear only at reset; both are this design's choices.
//
// Timing: writes take effect at the clock edge of csr_we; rdata is
// combinational from raddr.
module fc_csr
  import fc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        csr_we,
  input  logic [4:0]  waddr,
  input  logic [15:0] wdata,
  input  logic [4:0]  raddr,
  output logic [15:0] rdata,
  // status inputs
  input  logic [2:0]  board_id,
  input  logic        glink_ready,
  input  logic        glink_sync,
  input  logic [2:0]  mem_active,      // mem(0), mem(1), mem(2)
  input  logic [15:0] cur_addr,
  input  logic [15:0] blk_addr,
  // control outputs
  output logic        run_mode,
  output logic        ctrl_spare,
  output logic [1:0]  daq_fmt,
  output logic [3:0]  mem_en,          // enable lines 0..3
  output logic [5:0]  mem_play,        // 1 = play, 0 = record, mem(0)..mem(5)
  output logic        single_shot,
  output logic [3:0]  leds,
  output logic [15:0] summary
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run_mode    <= 1'b0;
      ctrl_spare  <= 1'b0;
      daq_fmt     <= '0;
      mem_en      <= '0;
      mem_play    <= '0;
      single_shot <= 1'b0;
      leds        <= '0;
    end else if (csr_we) begin
      case (waddr)
        CSRW_MODE: begin
          run_mode   <= wdata[0];
          ctrl_spare <= wdata[1];
        end
        CSRW_DAQFMT: daq_fmt <= wdata[1:0];
        CSRW_MEMEN: begin
          mem_en   <= {wdata[5:4], wdata[2], wdata[0]};
          mem_play <= {wdata[9:6], wdata[3], wdata[1]};
        end
        CSRW_PBMODE: single_shot <= wdata[0];
        CSRW_LED:    leds        <= wdata[3:0];
        default: ;
      endcase
    end
  end

  always_comb begin
    summary        = '0;
    summary[0]     = run_mode;
    summary[1]     = ctrl_spare;
    summary[2]     = board_id[2];
    summary[4:3]   = daq_fmt;
    summary[5]     = mem_en[0];
    summary[6]     = mem_play[0];
    summary[7]     = mem_en[1];
    summary[8]     = mem_play[1];
    summary[9]     = single_shot;
    summary[10]    = glink_ready;
    summary[11]    = glink_sync;
    summary[12]    = mem_active[0];
    summary[13]    = mem_active[1];
    summary[15:14] = board_id[1:0];
  end

  always_comb begin
    case (raddr)
      CSRR_SUMMARY: rdata = summary;
      CSRR_LED:     rdata = {12'h0, leds};
      CSRR_ADDR:    rdata = cur_addr;
      CSRR_BLOCK:   rdata = blk_addr;
      CSRR_ALGMEM:  rdata = {8'h0, 1'b1, mem_active[2], mem_play[5:2], mem_en[3:2]};
      default:      rdata = '0;
    endcase
  end

endmodule
