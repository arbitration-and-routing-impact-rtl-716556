// tb_hermes_sr_routing_unit -- self-checking test of the per-input routing unit.
//
// The testbench plays the input buffer (a queue whose flits become visible
// at random moments) and the granted output port (random acknowledges).
// Packets have 1..6 route flits, the terminator, a size flit and 0..6 payload
// flits. For each packet it checks that the unit requests the output named
// by the first route flit, consumes that flit without forwarding it, then
// forwards exactly the remaining flits in order, pulses release with the
// last one and takes the next packet's route flit. A directed packet with
// the buffer full and the output always ready checks the timing: request in
// the cycle the route flit is at the head, then one flit per cycle.
module tb_hermes_sr_routing_unit;
  import hermes_sr_pkg::*;
  localparam int unsigned FLIT_W = 16;

  logic              clk = 1'b0;
  logic              rst_n = 1'b0;
  logic              empty;
  logic [FLIT_W-1:0] head;
  logic              pop, req, rel, valid;
  port_e             req_port;
  logic              ack = 1'b0;

  int checks = 0, failures = 0;
  logic [FLIT_W-1:0] inq [$];      // flits in the emulated buffer
  int                avail = 0;    // how many of them are visible
  logic [FLIT_W-1:0] expq [$];     // flits expected on the output
  bit                busy = 0;
  int                packets_done = 0;

  hermes_sr_routing_unit #(.FLIT_W(FLIT_W)) dut (
    .clk_i(clk), .rst_ni(rst_n), .empty_i(empty), .head_i(head), .pop_o(pop),
    .req_o(req), .req_port_o(req_port), .release_o(rel), .valid_o(valid), .ack_i(ack)
  );

  // drive the emulated buffer outputs from the model
  task automatic present();
    empty = (avail == 0);
    head  = (inq.size() != 0) ? inq[0] : '0;
  endtask

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  task automatic add_packet(input int nroute, input int size);
    for (int k = 0; k < nroute; k++)
      inq.push_back((k == nroute - 1) ? FLIT_W'(PORT_LOCAL) : FLIT_W'($urandom_range(0, 4)));
    inq.push_back(FLIT_W'(ROUTE_END));
    inq.push_back(FLIT_W'(size));
    for (int k = 0; k < size; k++) inq.push_back(FLIT_W'($urandom));
  endtask

  // Expected output of the packet whose route flit is at the head: every
  // flit after the route flit up to the end of the payload.
  task automatic expect_packet();
    int k;
    k = 1;
    while (k < inq.size() - 2 && inq[k][PORT_W-1:0] != ROUTE_END) begin expq.push_back(inq[k]); k++; end
    expq.push_back(inq[k]);       // terminator
    expq.push_back(inq[k+1]);     // size
    for (int j = 0; j < int'(inq[k+1]) && k + 2 + j < inq.size(); j++) expq.push_back(inq[k+2+j]);
  endtask

  // Check the outputs against the model for this cycle and advance it.
  // Called after the inputs of the cycle are stable.
  task automatic check_and_advance();
    bit xfer, took_route;
    took_route = req;
    check(valid == (busy && avail != 0), "valid");
    check(req == (!busy && avail != 0), "request when idle with a flit");
    if (req) begin
      check(req_port == port_e'(inq[0][PORT_W-1:0]), "requested port is the route flit");
      check(pop, "route flit consumed");
      expect_packet();
    end
    xfer = valid && ack;
    if (xfer) begin
      check(pop, "pop on transfer");
      check(head == expq[0], "forwarded flit");
      check(rel == (expq.size() == 1), "release with last flit only");
    end else if (!req) begin
      check(!pop, "no pop");
      check(!rel, "no release");
    end
    @(posedge clk);
    #1;
    if (took_route) begin
      void'(inq.pop_front()); avail--; busy = 1;
    end
    if (xfer) begin
      void'(inq.pop_front()); avail--; void'(expq.pop_front());
      if (expq.size() == 0) begin busy = 0; packets_done++; end
    end
    present();
  endtask

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t_req, t_last;
    present();
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;

    // directed timing: 2 route flits, 4 payload flits, all visible, ack always
    add_packet(2, 4);   // route, route, end, size, 4 payload = 8 flits
    t_req = -1; t_last = -1;
    for (int c = 0; c < 12; c++) begin
      @(negedge clk);
      if (c == 0) begin
        avail = inq.size();
        present();
      end
      #1;
      ack = valid;
      #1;
      if (req) t_req = c;
      if (rel) t_last = c;
      check_and_advance();
    end
    check(t_req == 0, "request in the first cycle");
    check(t_last - t_req == 7, "seven flits forwarded in seven cycles");

    // random packets, random arrival and random acknowledges
    for (int p = 0; p < 300; p++) add_packet($urandom_range(1, 6), $urandom_range(0, 6));
    while (packets_done < 301) begin
      @(negedge clk);
      if (avail < inq.size() && $urandom_range(0, 99) < 60) avail++;
      present();
      #1;
      ack = valid && ($urandom_range(0, 99) < 60);
      #1 check_and_advance();
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
