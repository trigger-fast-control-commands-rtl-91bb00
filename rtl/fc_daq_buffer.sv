// fc_daq_buffer: DAQ event buffers between L1 Accept and Read Event.
//
// NBUF event buffers (four, addressed by the 2-bit buffer number of the
// event header) form a ring. On L1 Trigger Accept the board's event data,
// NWORDS 16-bit words presented in parallel on event_data, are copied into
// the next free buffer together with the trigger tag, the local clock counter
// value and the CSR1 status word of that moment. Read Event asks for the
// oldest stored event to be sent on the DLINK: the block raises evt_req with
// the 32-bit event header (start bit, event flag, tag, counter, buffer number
// and CSR1; buffer number and CSR1 in reversed bit order) and, once the
// serializer grants it, hands out one data word per rd_req. The buffer is
// freed when its last word has been handed out. Read Events that arrive while
// an earlier event is still going out are counted and served in order.
// Clear Readout resets the buffer pointers.
//
// What the protocol fixes: the header, four buffers, oldest-first readout, a
// fixed word count per event, and Clear Readout. This design's choices: the
// parallel event_data snapshot, NWORDS = 8, an L1 Accept with all buffers full
// is dropped (overflow pulses), a Read Event with no unclaimed event is
// ignored (rd_empty pulses), and a Clear Readout lets a transfer in progress
// finish without freeing its buffer a second time.
//
// Timing: rd_data is valid the cycle after rd_req.
module fc_daq_buffer #(
  parameter int unsigned NBUF   = 4,
  parameter int unsigned NWORDS = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clear,
  input  logic              l1a,
  input  logic [4:0]        l1a_tag,
  input  logic [4:0]        trig_cnt,
  input  logic [15:0]       csr1,
  input  logic [15:0]       event_data [NWORDS],
  input  logic              read_event,
  output logic              evt_req,
  output logic [31:0]       evt_hdr,
  output logic [15:0]       evt_nwords,
  input  logic              evt_gnt,
  input  logic              rd_req,
  output logic [31:0]       rd_data,
  output logic              overflow,
  output logic              rd_empty,
  output logic [$clog2(NBUF+1)-1:0] count
);

  localparam int unsigned PW = (NBUF > 1) ? $clog2(NBUF) : 1;
  localparam int unsigned CW = $clog2(NBUF+1);
  localparam int unsigned WW = (NWORDS > 1) ? $clog2(NWORDS) : 1;

  logic [15:0] data_q [NBUF][NWORDS];
  logic [4:0]  tag_q  [NBUF];
  logic [4:0]  cnt_q  [NBUF];
  logic [15:0] csr_q  [NBUF];

  logic [PW-1:0] wr_ptr, rd_ptr, cur;
  logic [CW-1:0] pend;
  logic          sending, stale;
  logic [WW-1:0] widx;

  logic store, claim, release_buf;
  assign store       = l1a && (count < CW'(NBUF));
  assign claim       = read_event && (pend < count);
  assign release_buf = sending && rd_req && (widx == WW'(NWORDS - 1)) && !stale;

  function automatic logic [PW-1:0] inc_ptr(input logic [PW-1:0] p);
    return (p == PW'(NBUF - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (store) begin
      for (int w = 0; w < int'(NWORDS); w++) data_q[wr_ptr][w] <= event_data[w];
      tag_q[wr_ptr] <= l1a_tag;
      cnt_q[wr_ptr] <= trig_cnt;
      csr_q[wr_ptr] <= csr1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr   <= '0;
      rd_ptr   <= '0;
      cur      <= '0;
      count    <= '0;
      pend     <= '0;
      sending  <= 1'b0;
      stale    <= 1'b0;
      widx     <= '0;
      rd_data  <= '0;
      overflow <= 1'b0;
      rd_empty <= 1'b0;
    end else begin
      overflow <= l1a && !store;
      rd_empty <= read_event && !claim;
      if (clear) begin
        wr_ptr <= '0;
        rd_ptr <= '0;
        count  <= '0;
        pend   <= '0;
        if (sending) stale <= 1'b1;
      end else begin
        if (store) wr_ptr <= inc_ptr(wr_ptr);
        if (release_buf) rd_ptr <= inc_ptr(rd_ptr);
        count <= count + CW'(store) - CW'(release_buf);
        pend  <= pend + CW'(claim) - CW'(release_buf);
      end
      if (evt_req && evt_gnt) begin
        sending <= 1'b1;
        stale   <= 1'b0;
        cur     <= rd_ptr;
        widx    <= '0;
      end
      if (sending && rd_req) begin
        rd_data <= {16'h0, data_q[cur][widx]};
        widx    <= widx + 1'b1;
        if (widx == WW'(NWORDS - 1)) sending <= 1'b0;
      end
    end
  end

  assign evt_req    = !sending && (pend != '0);
  assign evt_hdr    = fc_pkg::event_header(tag_q[rd_ptr], cnt_q[rd_ptr], 2'(rd_ptr), csr_q[rd_ptr]);
  assign evt_nwords = 16'(NWORDS);

endmodule
