// tb_fc_daq_buffer: self-checking test of the DAQ event buffers.
//
// A reference queue in the testbench holds every accepted event (tag, clock
// count, CSR1 word, data words). The testbench plays the DLINK serializer:
// it grants evt_req, pulls the words and compares the header, built here bit
// by bit from the header definition (buffer number and CSR1 reversed), and
// the data with the oldest reference event. Covered: oldest-first order,
// wrap of the buffer number, Read Events queued while an event is going out,
// L1 Accept with all buffers full (overflow, event dropped), Read Event with
// nothing stored (rd_empty), and Clear Readout.
module tb_fc_daq_buffer;
  localparam int NB = 4, NW = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  logic clear = 1'b0, l1a = 1'b0, read_event = 1'b0, evt_gnt = 1'b0, rd_req = 1'b0;
  logic [4:0] l1a_tag = '0, trig_cnt = '0;
  logic [15:0] csr1 = '0;
  logic [15:0] event_data [NW];
  logic evt_req, overflow, rd_empty;
  logic [31:0] evt_hdr, rd_data;
  logic [15:0] evt_nwords;
  logic [2:0] count;
  int checks = 0, failures = 0, n_overflow = 0, n_empty = 0;

  fc_daq_buffer #(.NBUF(NB), .NWORDS(NW)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (overflow) n_overflow++;
    if (rd_empty) n_empty++;
  end

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h expected %h", what, got, exp); end
  endtask

  typedef struct { logic [4:0] tag; logic [4:0] tc; logic [15:0] csr; logic [15:0] d [NW]; } ev_t;
  ev_t refq[$];
  int buf_no = 0;

  task automatic do_l1a(input bit expect_store);
    ev_t e;
    @(negedge clk);
    e.tag = 5'($urandom); e.tc = 5'($urandom); e.csr = 16'($urandom);
    for (int w = 0; w < NW; w++) e.d[w] = 16'($urandom);
    l1a = 1'b1; l1a_tag = e.tag; trig_cnt = e.tc; csr1 = e.csr;
    for (int w = 0; w < NW; w++) event_data[w] = e.d[w];
    if (expect_store) refq.push_back(e);
    @(negedge clk) l1a = 1'b0;
  endtask

  task automatic do_read();
    @(negedge clk) read_event = 1'b1;
    @(negedge clk) read_event = 1'b0;
  endtask

  // serve one event the way the serializer does
  task automatic serve();
    ev_t e;
    logic [31:0] h;
    int waitc = 0;
    while (!evt_req && waitc < 20) begin @(negedge clk); waitc++; end
    check("evt_req", {31'h0, evt_req}, 1);
    if (refq.size() == 0) begin failures++; $display("FAIL nothing expected"); return; end
    e = refq.pop_front();
    h = '0;
    h[0] = 1; h[1] = 1;
    for (int i = 0; i < 5; i++) begin h[2 + i] = e.tag[i]; h[8 + i] = e.tc[i]; end
    h[13] = buf_no[1]; h[14] = buf_no[0];
    for (int i = 0; i < 16; i++) h[16 + i] = e.csr[15 - i];
    check("header", evt_hdr, h);
    check("nwords", {16'h0, evt_nwords}, NW);
    evt_gnt = 1'b1;
    @(negedge clk) evt_gnt = 1'b0;
    for (int w = 0; w < NW; w++) begin
      repeat (3) @(negedge clk);
      rd_req = 1'b1;
      @(negedge clk) rd_req = 1'b0;
      check("data", rd_data, {16'h0, e.d[w]});
    end
    buf_no = (buf_no + 1) % NB;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // three events, read back in order
    do_l1a(1); do_l1a(1); do_l1a(1);
    check("count 3", count, 3);
    do_read(); serve();
    do_read(); do_read();           // second read queued while idle
    serve(); serve();
    check("count 0", count, 0);
    // read with nothing stored
    do_read();
    repeat (3) @(negedge clk);
    check("rd_empty seen", n_empty, 1);
    check("no request", evt_req, 0);
    // fill and overflow, buffer number wraps
    do_l1a(1); do_l1a(1); do_l1a(1); do_l1a(1);
    do_l1a(0);
    repeat (2) @(negedge clk);
    check("overflow seen", n_overflow, 1);
    check("count full", count, 4);
    do_read(); do_read(); do_read(); do_read();
    do_read();                      // one more than stored
    repeat (2) @(negedge clk);
    check("rd_empty on extra read", n_empty, 2);
    serve(); serve(); serve(); serve();
    // clear readout drops stored events
    do_l1a(1); do_l1a(1);
    @(negedge clk) clear = 1'b1;
    @(negedge clk) clear = 1'b0;
    refq.delete();
    buf_no = 0;
    check("count after clear", count, 0);
    do_l1a(1);
    do_read(); serve();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
