// fc_clink_rx: CLINK command deserializer.
//
// The CLINK is a one-bit serial line sampled once per clock. A command starts
// with a leading 0 followed by a start bit 1, then five op-code bits and five
// data / sub-command bits, all LSB first (12 bits in total). When the 10 bits
// after the start bit are in, hdr_valid pulses for one cycle with op and sub.
//
// Non-run-time commands carry a payload right after the header, whose layout
// depends on the op-code. This block knows those layouts and delivers the
// payload as fields, one fld_valid pulse per field, LSB-first bits assembled
// into fld_data (16-bit fields are zero-extended):
//   1A, 1B, 1C   one 16-bit field
//   17           16-bit address, then 16 or 32-bit data (sub bit 0)
//   11           16-bit start address, 16-bit word count
//   13           16-bit start address, 16-bit word count N, then N data
//                fields of 16 or 32 bits (sub bit 0)
//   16           the old fixed block write; the front end does not implement it
//                and blanks command interpretation for 512 32-bit words
//                (16384 bit times), flagging this on guard_active
// All other op-codes have no payload. The layouts are the protocol's; that the
// line needs a 0 before every start bit, and the exact length of the blanking
// window, are this design's reading of it.
//
// Timing: hdr_valid is high in the cycle after the last header bit is sampled;
// fld_valid likewise one cycle after the last bit of a field.
module fc_clink_rx
  import fc_pkg::*;
#(
  parameter int unsigned GUARD_BITS = OLD_BWR_WORDS * 32
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clink_in,
  output logic        hdr_valid,
  output logic [4:0]  hdr_op,
  output logic [4:0]  hdr_sub,
  output logic        fld_valid,
  output logic [31:0] fld_data,
  output logic [16:0] fld_idx,
  output logic        fld_last,
  output logic        busy,
  output logic        guard_active
);

  typedef enum logic [1:0] {S_IDLE, S_HDR, S_FIELD, S_GUARD} state_e;
  state_e st;

  logic        last_bit;
  logic [5:0]  bitcnt;
  logic [9:0]  hdr_sr;
  logic [31:0] fsr;
  logic [16:0] fidx;
  logic [16:0] ftotal;
  logic [4:0]  op_q;
  logic        wide_q;
  logic [$clog2(GUARD_BITS+1)-1:0] gcnt;

  // number of payload fields known from the op-code alone
  function automatic logic [16:0] base_fields(input logic [4:0] op);
    case (op)
      OP_WR_ADDR, OP_WR_BLK, OP_WR_CSR: return 17'd1;
      OP_WR_MEM, OP_BRD_SETUP, OP_BWR_VAR: return 17'd2;
      default: return 17'd0;
    endcase
  endfunction

  // width in bits of field number idx
  function automatic logic [5:0] field_bits(input logic [4:0] op, input logic wide,
                                            input logic [16:0] idx);
    if ((op == OP_WR_MEM && idx == 17'd1) || (op == OP_BWR_VAR && idx >= 17'd2))
      return wide ? 6'd32 : 6'd16;
    return 6'd16;
  endfunction

  logic [5:0]  cur_bits;
  logic [31:0] fsr_next;
  assign cur_bits = field_bits(op_q, wide_q, fidx);

  always_comb begin
    fsr_next = fsr;
    fsr_next[bitcnt[4:0]] = clink_in;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st        <= S_IDLE;
      last_bit  <= 1'b1;
      bitcnt    <= '0;
      hdr_sr    <= '0;
      fsr       <= '0;
      fidx      <= '0;
      ftotal    <= '0;
      op_q      <= '0;
      wide_q    <= 1'b0;
      gcnt      <= '0;
      hdr_valid <= 1'b0;
      hdr_op    <= '0;
      hdr_sub   <= '0;
      fld_valid <= 1'b0;
      fld_data  <= '0;
      fld_idx   <= '0;
      fld_last  <= 1'b0;
    end else begin
      hdr_valid <= 1'b0;
      fld_valid <= 1'b0;
      fld_last  <= 1'b0;
      last_bit  <= clink_in;
      unique case (st)
        S_IDLE: begin
          if (clink_in && !last_bit) begin
            st     <= S_HDR;
            bitcnt <= '0;
          end
        end
        S_HDR: begin
          hdr_sr <= {clink_in, hdr_sr[9:1]};
          bitcnt <= bitcnt + 6'd1;
          if (bitcnt == 6'd9) begin
            hdr_valid <= 1'b1;
            hdr_op    <= hdr_sr[5:1];
            hdr_sub   <= {clink_in, hdr_sr[9:6]};
            op_q      <= hdr_sr[5:1];
            wide_q    <= hdr_sr[6];
            fidx      <= '0;
            bitcnt    <= '0;
            fsr       <= '0;
            ftotal    <= base_fields(hdr_sr[5:1]);
            gcnt      <= '0;
            if (hdr_sr[5:1] == OP_BWR_OLD)                st <= S_GUARD;
            else if (base_fields(hdr_sr[5:1]) != 17'd0)   st <= S_FIELD;
            else                                          st <= S_IDLE;
          end
        end
        S_FIELD: begin
          fsr    <= fsr_next;
          bitcnt <= bitcnt + 6'd1;
          if (bitcnt == cur_bits - 6'd1) begin
            fld_valid <= 1'b1;
            fld_data  <= fsr_next;
            fld_idx   <= fidx;
            bitcnt    <= '0;
            fsr       <= '0;
            fidx      <= fidx + 17'd1;
            if (op_q == OP_BWR_VAR && fidx == 17'd1) begin
              // word count just received: total = 2 + N
              ftotal <= 17'd2 + {1'b0, fsr_next[15:0]};
              if (fsr_next[15:0] == 16'd0) begin
                fld_last <= 1'b1;
                st       <= S_IDLE;
              end
            end else if (fidx + 17'd1 == ftotal) begin
              fld_last <= 1'b1;
              st       <= S_IDLE;
            end
          end
        end
        S_GUARD: begin
          gcnt <= gcnt + 1'b1;
          if (gcnt == $bits(gcnt)'(GUARD_BITS - 1)) st <= S_IDLE;
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  assign busy         = (st != S_IDLE);
  assign guard_active = (st == S_GUARD);

endmodule
