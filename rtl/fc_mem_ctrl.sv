// fc_mem_ctrl: executor of the subsystem-specific (non-run-time) commands.
//
// Keeps the 32-bit FC address as two 16-bit registers, the block address
// (high half, set by 0x1B) and the current address (low half, set by 0x1A),
// and the word count of a pending block read. From the header and payload
// fields delivered by the CLINK receiver it performs:
//   1C Write CSR         csr_we with the sub-command as CSR address
//   1D Read CSR          one 16-bit word on the DLINK
//   19 Read Memory       one 16/32-bit word (sub bit 0) at the current address
//   18 Read Memory & inc as 19, then the address advances by one
//   17 Write Memory      payload address becomes the current address, the data
//                        word is written there
//   13 Block Write       start address, word count N, N words written at
//                        successive addresses
//   11 Block Read Setup  start address and word count for a later 12
//   12 Block Read        word count words from successive addresses
//   14 TSF Reframing     reframe pulse (clock realignment, TSF FIFO clear)
//   1E User Reset        clears the address registers, the block-read count and
//                        any readout not yet started; user_reset pulses
// Readouts go to the DLINK serializer through its register port with the
// 16-bit register header (op-code and sub-command echoed). Old block
// transfers 15 and 16 are not executed (16's payload is skipped upstream).
//
// What follows the protocol: the command set, payload meanings, 16/32-bit
// selection by sub-command bit 0, the address staying at start + N after a
// block transfer. This design's choices: the memory port (single cycle, read
// data valid the cycle after mem_req), addresses that count in memory words,
// the increment carrying from the current into the block address, and that a
// new read command replaces one whose readout has not yet started.
module fc_mem_ctrl
  import fc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // from the CLINK receiver
  input  logic        hdr_valid,
  input  logic [4:0]  hdr_op,
  input  logic [4:0]  hdr_sub,
  input  logic        fld_valid,
  input  logic [31:0] fld_data,
  input  logic [16:0] fld_idx,
  // CSR access
  output logic        csr_we,
  output logic [4:0]  csr_waddr,
  output logic [15:0] csr_wdata,
  output logic [4:0]  csr_raddr,
  input  logic [15:0] csr_rdata,
  // board memory port
  output logic        mem_req,
  output logic        mem_we,
  output logic        mem_wide,
  output logic [31:0] mem_addr,
  output logic [31:0] mem_wdata,
  input  logic [31:0] mem_rdata,
  // address registers (for CSR3/CSR4 readback)
  output logic [15:0] cur_addr,
  output logic [15:0] blk_addr,
  // DLINK register port
  output logic        reg_req,
  output logic [15:0] reg_hdr,
  output logic [15:0] reg_nwords,
  output logic        reg_wide,
  input  logic        reg_gnt,
  input  logic        reg_rd_req,
  output logic [31:0] reg_rd_data,
  // strobes
  output logic        reframe,
  output logic        user_reset
);

  typedef enum logic [1:0] {R_CSR, R_MEM, R_MEMINC, R_BLK} rsp_e;

  logic [4:0]  op_q;
  logic        wide_q;
  logic [15:0] bcount;
  logic        pend, active;
  rsp_e        rkind;
  logic [4:0]  rop, rsub;
  logic        rwide;
  logic [15:0] rn, rleft;
  logic [15:0] csr_q;

  logic [31:0] full_addr;
  assign full_addr = {blk_addr, cur_addr};

  // payload word writes to memory
  logic wr_fire;
  assign wr_fire = fld_valid && ((op_q == OP_WR_MEM && fld_idx == 17'd1) ||
                                 (op_q == OP_BWR_VAR && fld_idx >= 17'd2));
  // memory reads for the DLINK
  logic rd_fire;
  assign rd_fire = reg_rd_req && active && rkind != R_CSR;

  always_comb begin
    mem_req   = wr_fire || rd_fire;
    mem_we    = wr_fire;
    mem_wide  = wr_fire ? wide_q : rwide;
    mem_addr  = full_addr;
    mem_wdata = wide_q ? fld_data : {16'h0, fld_data[15:0]};
  end

  assign csr_we      = fld_valid && op_q == OP_WR_CSR;
  assign csr_wdata   = fld_data[15:0];
  assign csr_raddr   = rsub;
  assign reg_req     = pend && !active;
  assign reg_hdr     = reg_header(rop, rsub);
  assign reg_nwords  = rn;
  assign reg_wide    = rwide;
  assign reg_rd_data = (rkind == R_CSR) ? {16'h0, csr_q} : mem_rdata;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      op_q       <= '0;
      wide_q     <= 1'b0;
      csr_waddr  <= '0;
      cur_addr   <= '0;
      blk_addr   <= '0;
      bcount     <= '0;
      pend       <= 1'b0;
      active     <= 1'b0;
      rkind      <= R_CSR;
      rop        <= '0;
      rsub       <= '0;
      rwide      <= 1'b0;
      rn         <= '0;
      rleft      <= '0;
      csr_q      <= '0;
      reframe    <= 1'b0;
      user_reset <= 1'b0;
    end else begin
      reframe    <= 1'b0;
      user_reset <= 1'b0;

      // ---------------------------------------------------------- headers
      if (hdr_valid && !is_run_op(hdr_op)) begin
        op_q      <= hdr_op;
        wide_q    <= hdr_sub[0];
        csr_waddr <= hdr_sub;
        case (hdr_op)
          OP_RD_CSR, OP_RD_MEM, OP_RD_MEM_INC, OP_BRD_VAR: begin
            if (!active) begin
              pend  <= 1'b1;
              rop   <= hdr_op;
              rsub  <= hdr_sub;
              rwide <= (hdr_op == OP_RD_CSR) ? 1'b0 : hdr_sub[0];
              rn    <= (hdr_op == OP_BRD_VAR) ? bcount : 16'd1;
              rkind <= (hdr_op == OP_RD_CSR)     ? R_CSR :
                       (hdr_op == OP_RD_MEM)     ? R_MEM :
                       (hdr_op == OP_RD_MEM_INC) ? R_MEMINC : R_BLK;
            end
          end
          OP_REFRAME:  reframe <= 1'b1;
          OP_USER_RST: begin
            user_reset <= 1'b1;
            cur_addr   <= '0;
            blk_addr   <= '0;
            bcount     <= '0;
            if (!active) pend <= 1'b0;
          end
          default: ;
        endcase
      end

      // ---------------------------------------------------------- payload
      if (fld_valid) begin
        case (op_q)
          OP_WR_ADDR: cur_addr <= fld_data[15:0];
          OP_WR_BLK:  blk_addr <= fld_data[15:0];
          OP_WR_MEM:  if (fld_idx == 17'd0) cur_addr <= fld_data[15:0];
          OP_BRD_SETUP: begin
            if (fld_idx == 17'd0) cur_addr <= fld_data[15:0];
            else                  bcount   <= fld_data[15:0];
          end
          OP_BWR_VAR: begin
            if (fld_idx == 17'd0) cur_addr <= fld_data[15:0];
            else if (fld_idx >= 17'd2) {blk_addr, cur_addr} <= full_addr + 32'd1;
          end
          default: ;
        endcase
      end

      // ---------------------------------------------------------- readout
      if (reg_gnt) begin
        active <= (rn != 16'd0);
        pend   <= 1'b0;
        rleft  <= rn;
      end
      if (active && reg_rd_req) begin
        if (rkind == R_CSR) csr_q <= csr_rdata;
        if (rkind == R_MEMINC || rkind == R_BLK) {blk_addr, cur_addr} <= full_addr + 32'd1;
        rleft <= rleft - 16'd1;
        if (rleft == 16'd1) active <= 1'b0;
      end
    end
  end

  // the host does not send a payload-carrying write while a memory readout runs
  a_no_mem_clash: assert property (@(posedge clk) disable iff (!rst_n) !(wr_fire && rd_fire));

endmodule
