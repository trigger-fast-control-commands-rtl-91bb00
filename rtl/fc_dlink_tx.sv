// fc_dlink_tx: DLINK serializer for event and register readouts.
//
// The DLINK is a one-bit serial line that idles at 0. A transfer is a header
// followed by a number of data words, every field sent LSB first, one bit per
// clock. Two sources compete for the line:
//   evt port  DAQ event readout: 32-bit event header, 16-bit data words
//   reg port  register / memory readout: 16-bit register header, 16-bit or
//             32-bit data words (reg_wide)
// The event port wins when both request in the same cycle; a transfer, once
// granted (one-cycle *_gnt pulse), always runs to its end. The header and the
// word count are taken from the requester in the grant cycle. Data words are
// pulled one at a time: *_rd_req pulses once per word and the source must
// present the word on *_rd_data in the following cycle. Each word is fetched
// while the previous field is still being shifted out, so the line carries no
// gaps between the header and the words.
//
// Header formats and bit order are the protocol's; the priority, the pull
// interface and the idle level are this design's choices.
//
// Timing: the first header bit appears on dlink_out two cycles after the
// grant; a transfer of H header bits and N words of W bits occupies the line
// for H + N*W cycles; done pulses in the cycle after the last bit.
module fc_dlink_tx (
  input  logic        clk,
  input  logic        rst_n,
  // event port
  input  logic        evt_req,
  input  logic [31:0] evt_hdr,
  input  logic [15:0] evt_nwords,
  output logic        evt_gnt,
  output logic        evt_rd_req,
  input  logic [31:0] evt_rd_data,
  // register port
  input  logic        reg_req,
  input  logic [15:0] reg_hdr,
  input  logic [15:0] reg_nwords,
  input  logic        reg_wide,
  output logic        reg_gnt,
  output logic        reg_rd_req,
  input  logic [31:0] reg_rd_data,
  // serial line
  output logic        dlink_out,
  output logic        busy,
  output logic        done
);

  typedef enum logic [1:0] {T_IDLE, T_START, T_SEND} state_e;
  state_e st;

  logic        sel_evt;          // 1: current transfer belongs to the event port
  logic        wide_q;
  logic [31:0] sreg;
  logic [5:0]  ulen, bitcnt;
  logic [16:0] nwords_q, fetched, sent;
  logic        rdq, cap;
  logic [31:0] nxt;
  logic [31:0] rd_data_sel;

  assign evt_gnt    = (st == T_IDLE) && evt_req;
  assign reg_gnt    = (st == T_IDLE) && !evt_req && reg_req;
  assign evt_rd_req = rdq && sel_evt;
  assign reg_rd_req = rdq && !sel_evt;
  assign rd_data_sel = sel_evt ? evt_rd_data : reg_rd_data;
  assign busy       = (st != T_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st        <= T_IDLE;
      sel_evt   <= 1'b0;
      wide_q    <= 1'b0;
      sreg      <= '0;
      ulen      <= '0;
      bitcnt    <= '0;
      nwords_q  <= '0;
      fetched   <= '0;
      sent      <= '0;
      rdq       <= 1'b0;
      cap       <= 1'b0;
      nxt       <= '0;
      dlink_out <= 1'b0;
      done      <= 1'b0;
    end else begin
      rdq  <= 1'b0;
      cap  <= rdq;
      done <= 1'b0;
      if (cap) nxt <= rd_data_sel;
      unique case (st)
        T_IDLE: begin
          dlink_out <= 1'b0;
          if (evt_gnt || reg_gnt) begin
            sel_evt  <= evt_gnt;
            wide_q   <= evt_gnt ? 1'b0 : reg_wide;
            sreg     <= evt_gnt ? evt_hdr : {16'h0, reg_hdr};
            ulen     <= evt_gnt ? 6'd32 : 6'd16;
            nwords_q <= {1'b0, evt_gnt ? evt_nwords : reg_nwords};
            fetched  <= '0;
            sent     <= '0;
            bitcnt   <= '0;
            st       <= T_START;
          end
        end
        T_START: begin
          // first fetch goes out while the header starts
          if (nwords_q != '0) begin
            rdq     <= 1'b1;
            fetched <= 17'd1;
          end
          st <= T_SEND;
          dlink_out <= sreg[0];
          sreg      <= sreg >> 1;
          bitcnt    <= 6'd1;
        end
        T_SEND: begin
          if (bitcnt == ulen) begin
            // field finished: next word or end of transfer
            if (sent != nwords_q) begin
              dlink_out <= nxt[0];
              sreg      <= nxt >> 1;
              ulen      <= wide_q ? 6'd32 : 6'd16;
              bitcnt    <= 6'd1;
              sent      <= sent + 17'd1;
              if (fetched != nwords_q) begin
                rdq     <= 1'b1;
                fetched <= fetched + 17'd1;
              end
            end else begin
              dlink_out <= 1'b0;
              done      <= 1'b1;
              st        <= T_IDLE;
            end
          end else begin
            dlink_out <= sreg[0];
            sreg      <= sreg >> 1;
            bitcnt    <= bitcnt + 6'd1;
          end
        end
        default: st <= T_IDLE;
      endcase
    end
  end

  // a word must have arrived before the field it belongs to starts
  a_word_ready: assert property (@(posedge clk) disable iff (!rst_n)
    (st == T_SEND && bitcnt == ulen && sent != nwords_q) |-> !cap && !rdq);

endmodule
