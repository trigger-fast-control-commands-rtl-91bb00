// fc_pkg: shared definitions of the trigger Fast Control (FC) protocol.
//
// Holds the CLINK op-codes (run-time 0x0-0xB, non-run-time 0x11-0x1E), the CSR
// addresses used for writing and for reading back, the board IDs, and the two
// DLINK header layouts (32-bit event header, 16-bit register header). The
// op-code values, header bit positions and board IDs follow the protocol
// definition; the payload-length helper encodes the command data layouts of
// the non-run-time command table. Bit-numbering convention throughout: field
// bit 0 is sent first on both links.
package fc_pkg;

  // ---------------------------------------------------------------- op-codes
  typedef enum logic [4:0] {
    OP_NOP        = 5'h00,
    OP_CLR_RD     = 5'h01,  // clear readout: reset DAQ buffer pointers
    OP_SYNC       = 5'h02,  // align local clock counters
    OP_L1A        = 5'h03,  // L1 trigger accept, data = trigger tag
    OP_RD_EVENT   = 5'h04,  // send oldest DAQ buffer on DLINK
    OP_CAL        = 5'h05,  // calibration strobe (no action on trigger boards)
    OP_PLAYBACK   = 5'h06,  // start playback/record of diagnostic memories
    OP_BRD_SETUP  = 5'h11,  // block read setup: start address, word count
    OP_BRD_VAR    = 5'h12,  // block read (variable size)
    OP_BWR_VAR    = 5'h13,  // block write (variable size)
    OP_REFRAME    = 5'h14,  // TSF reframing
    OP_BRD_OLD    = 5'h15,  // old fixed 512-word block read (not supported)
    OP_BWR_OLD    = 5'h16,  // old fixed 512-word block write (guarded)
    OP_WR_MEM     = 5'h17,
    OP_RD_MEM_INC = 5'h18,
    OP_RD_MEM     = 5'h19,
    OP_WR_ADDR    = 5'h1A,
    OP_WR_BLK     = 5'h1B,
    OP_WR_CSR     = 5'h1C,
    OP_RD_CSR     = 5'h1D,
    OP_USER_RST   = 5'h1E
  } fc_op_e;

  // Run-time commands occupy op-codes 0x00-0x0B.
  function automatic logic is_run_op(input logic [4:0] op);
    return op <= 5'h0B;
  endfunction

  // Number of payload bits that the old fixed block write carries and that a
  // new front end must ignore: 512 words of 32 bits.
  localparam int unsigned OLD_BWR_WORDS = 512;

  // ------------------------------------------------------------------- CSRs
  typedef enum logic [4:0] {
    CSRW_MODE     = 5'd1,   // run mode, control spare
    CSRW_DAQFMT   = 5'd2,   // DAQ format number
    CSRW_MEMEN    = 5'd3,   // play/record enables
    CSRW_PBMODE   = 5'd4,   // single shot / continuous
    CSRW_LED      = 5'd5    // software LEDs
  } csr_wr_e;

  typedef enum logic [4:0] {
    CSRR_SUMMARY  = 5'd1,
    CSRR_LED      = 5'd2,
    CSRR_ADDR     = 5'd3,
    CSRR_BLOCK    = 5'd4,
    CSRR_ALGMEM   = 5'd5
  } csr_rd_e;

  // -------------------------------------------------------------- board IDs
  typedef enum logic [2:0] {
    BID_OLD_TSF = 3'd0,
    BID_BLT     = 3'd1,
    BID_PTD     = 3'd2,
    BID_GLT     = 3'd3,
    BID_TSF_X   = 3'd4,
    BID_TSF_Y   = 3'd5,
    BID_ZPD     = 3'd6
  } board_id_e;

  // ------------------------------------------------------------ DLINK headers
  function automatic logic [4:0] rev5(input logic [4:0] v);
    for (int i = 0; i < 5; i++) rev5[i] = v[4-i];
  endfunction

  function automatic logic [1:0] rev2(input logic [1:0] v);
    return {v[0], v[1]};
  endfunction

  function automatic logic [15:0] rev16(input logic [15:0] v);
    for (int i = 0; i < 16; i++) rev16[i] = v[15-i];
  endfunction

  // Event header. Bit 0 is sent first. Tag and trigger counter go LSB first;
  // the buffer number and the CSR1 value go MSB first (historic firmware order).
  function automatic logic [31:0] event_header(input logic [4:0]  tag,
                                               input logic [4:0]  trig_cnt,
                                               input logic [1:0]  buf_num,
                                               input logic [15:0] csr1);
    logic [31:0] h;
    h        = '0;
    h[0]     = 1'b1;          // start bit
    h[1]     = 1'b1;          // event data
    h[6:2]   = tag;
    h[12:8]  = trig_cnt;
    h[14:13] = rev2(buf_num);
    h[31:16] = rev16(csr1);
    return h;
  endfunction

  // Register (non-event) header, 16 bits.
  function automatic logic [15:0] reg_header(input logic [4:0] op,
                                             input logic [4:0] sub);
    logic [15:0] h;
    h       = '0;
    h[0]    = 1'b1;           // start bit
    h[1]    = 1'b0;           // register data
    h[6:2]  = op;
    h[12:8] = sub;
    return h;
  endfunction

endpackage
