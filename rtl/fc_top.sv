// fc_top: Fast Control (FC) section of one trigger board.
//
// The board receives commands on the serial CLINK and answers on the serial
// DLINK. Run-time commands (L1 Accept, Read Event, Clear Readout, Sync, Start
// Playback) drive the DAQ event buffers, the local clock counter and the
// diagnostic-memory play/record sequencer. Non-run-time commands read and
// write the CSRs and the board's memories through a 32-bit address made of a
// block address and a current address, singly or in variable-size blocks.
//
// Data path:
//   clink_in -> fc_clink_rx -> fc_run_decode -> DAQ buffers / clock counter /
//                                               playback sequencer
//                           -> fc_mem_ctrl   -> CSRs, board memory port
//   fc_daq_buffer (event port) and fc_mem_ctrl (register port) -> fc_dlink_tx
//                                               -> dlink_out
// The board memories, the event data source, the GLINK status and the board
// ID pins belong to the board-specific part and are ports here. Sync and TSF
// Reframing both realign the clock counter; TSF Reframing also pulses
// tsf_fifo_clear. User Reset also clears the DAQ buffer pointers and stops the
// play/record sequencer (this design's reading of "local pointers").
//
// Timing: one CLINK and one DLINK bit per clock.
module fc_top
  import fc_pkg::*;
#(
  parameter int unsigned DAQ_NBUF   = 4,
  parameter int unsigned DAQ_NWORDS = 8,
  parameter int unsigned NMEM       = 6,
  parameter int unsigned PB_DEPTH   = 256,
  parameter int unsigned GUARD_BITS = OLD_BWR_WORDS * 32
) (
  input  logic        clk,
  input  logic        rst_n,
  // serial links
  input  logic        clink_in,
  output logic        dlink_out,
  // board side
  input  logic [2:0]  board_id,
  input  logic        glink_ready,
  input  logic        glink_sync,
  input  logic [15:0] event_data [DAQ_NWORDS],
  output logic        mem_req,
  output logic        mem_we,
  output logic        mem_wide,
  output logic [31:0] mem_addr,
  output logic [31:0] mem_wdata,
  input  logic [31:0] mem_rdata,
  output logic [4:0]  clk_count,
  output logic [4:0]  clk_en,
  output logic        tsf_fifo_clear,
  output logic        user_reset,
  output logic [3:0]  leds,
  output logic [1:0]  daq_fmt,
  output logic [NMEM-1:0] pb_active,
  output logic [NMEM-1:0] pb_we,
  output logic [NMEM-1:0] pb_re,
  output logic [$clog2(PB_DEPTH)-1:0] pb_addr,
  // event and error indications
  output logic        l1a_seen,
  output logic        daq_overflow,
  output logic        daq_rd_empty,
  output logic        runcmd_ignored,
  output logic        guard_active,
  output logic        dlink_busy,
  output logic [$clog2(DAQ_NBUF+1)-1:0] daq_count,
  output logic        pb_sweep_done
);

  // CLINK receiver
  logic        hdr_valid, fld_valid, fld_last, rx_busy;
  logic [4:0]  hdr_op, hdr_sub;
  logic [31:0] fld_data;
  logic [16:0] fld_idx;

  fc_clink_rx #(.GUARD_BITS(GUARD_BITS)) u_rx (
    .clk, .rst_n, .clink_in,
    .hdr_valid, .hdr_op, .hdr_sub,
    .fld_valid, .fld_data, .fld_idx, .fld_last,
    .busy(rx_busy), .guard_active
  );

  // run-time decoder
  logic run_mode, clear_rd, sync, l1a, read_event, start_pb;
  logic [4:0] l1a_tag;

  fc_run_decode u_run (
    .clk, .rst_n, .hdr_valid, .hdr_op, .hdr_sub, .run_mode,
    .clear_readout(clear_rd), .sync, .l1a, .l1a_tag, .read_event,
    .start_playback(start_pb), .ignored(runcmd_ignored)
  );
  assign l1a_seen = l1a;

  // non-run-time executor
  logic        csr_we;
  logic [4:0]  csr_waddr, csr_raddr;
  logic [15:0] csr_wdata, csr_rdata, cur_addr, blk_addr;
  logic        reg_req, reg_wide, reg_gnt, reg_rd_req, reframe;
  logic [15:0] reg_hdr, reg_nwords;
  logic [31:0] reg_rd_data;

  fc_mem_ctrl u_mem (
    .clk, .rst_n, .hdr_valid, .hdr_op, .hdr_sub,
    .fld_valid, .fld_data, .fld_idx,
    .csr_we, .csr_waddr, .csr_wdata, .csr_raddr, .csr_rdata,
    .mem_req, .mem_we, .mem_wide, .mem_addr, .mem_wdata, .mem_rdata,
    .cur_addr, .blk_addr,
    .reg_req, .reg_hdr, .reg_nwords, .reg_wide, .reg_gnt, .reg_rd_req, .reg_rd_data,
    .reframe, .user_reset
  );
  assign tsf_fifo_clear = reframe;

  // CSRs
  logic        ctrl_spare, single_shot;
  logic [3:0]  mem_en;
  logic [5:0]  mem_play;
  logic [15:0] summary;
  logic [2:0]  act3;

  fc_csr u_csr (
    .clk, .rst_n, .csr_we, .waddr(csr_waddr), .wdata(csr_wdata),
    .raddr(csr_raddr), .rdata(csr_rdata),
    .board_id, .glink_ready, .glink_sync, .mem_active(act3),
    .cur_addr, .blk_addr,
    .run_mode, .ctrl_spare, .daq_fmt, .mem_en, .mem_play, .single_shot,
    .leds, .summary
  );

  // local clock counter
  fc_clock_counter #(.WIDTH(5)) u_clk (
    .clk, .rst_n, .sync(sync || reframe), .count(clk_count), .clk_en
  );

  // DAQ buffers
  logic        evt_req, evt_gnt, evt_rd_req;
  logic [31:0] evt_hdr, evt_rd_data;
  logic [15:0] evt_nwords;

  fc_daq_buffer #(.NBUF(DAQ_NBUF), .NWORDS(DAQ_NWORDS)) u_daq (
    .clk, .rst_n, .clear(clear_rd || user_reset),
    .l1a, .l1a_tag, .trig_cnt(clk_count), .csr1(summary), .event_data,
    .read_event, .evt_req, .evt_hdr, .evt_nwords, .evt_gnt,
    .rd_req(evt_rd_req), .rd_data(evt_rd_data),
    .overflow(daq_overflow), .rd_empty(daq_rd_empty), .count(daq_count)
  );

  // DLINK serializer
  logic tx_done;
  fc_dlink_tx u_tx (
    .clk, .rst_n,
    .evt_req, .evt_hdr, .evt_nwords, .evt_gnt, .evt_rd_req, .evt_rd_data,
    .reg_req, .reg_hdr, .reg_nwords, .reg_wide, .reg_gnt, .reg_rd_req, .reg_rd_data,
    .dlink_out, .busy(dlink_busy), .done(tx_done)
  );

  // diagnostic memory play/record
  logic [NMEM-1:0] pb_act_full;
  logic [NMEM-1:0] mem_play_n;

  always_comb begin
    mem_play_n = '0;
    for (int k = 0; k < 6 && k < int'(NMEM); k++) mem_play_n[k] = mem_play[k];
  end

  fc_playback_ctrl #(.NMEM(NMEM), .NEN(4), .DEPTH(PB_DEPTH)) u_pb (
    .clk, .rst_n, .start(start_pb), .stop(user_reset),
    .mem_en, .mem_play(mem_play_n), .single_shot,
    .active(pb_act_full), .mem_we(pb_we), .mem_re(pb_re), .addr(pb_addr),
    .sweep_done(pb_sweep_done)
  );
  assign pb_active = pb_act_full;
  assign act3 = {NMEM > 2 ? pb_act_full[2] : 1'b0, pb_act_full[1], pb_act_full[0]};

endmodule
