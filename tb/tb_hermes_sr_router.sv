// tb_hermes_sr_router -- self-checking test of one five-port Hermes-SR router.
//
// Emulated neighbours drive all five inputs and absorb all five outputs.
// Every packet carries a tag (source input and sequence number) in its first
// payload flit; the receiver on each output rebuilds packets and compares
// them flit by flit with what was sent, minus the route flit the router must
// consume. Checked as well:
//   * timing in an idle router: the flit after the route flit is taken by the
//     next router two clock edges after the route flit entered, and the rest
//     of the packet follows at one flit per cycle (full link rate);
//   * FCFS order: three inputs asking for the east output are served in the
//     order of their requests (ties in port order);
//   * parallel service: packets from different inputs to different outputs
//     cross the router in the same cycles;
//   * back-pressure: receivers withhold credit at random and input buffers
//     fill up, stopping the senders.
module tb_hermes_sr_router;
  import hermes_sr_pkg::*;
  localparam int unsigned FLIT_W = 16;
  localparam int unsigned NP     = NPORTS;

  logic                       clk = 1'b0;
  logic                       rst_n = 1'b0;
  logic [NP-1:0]              rx = '0;
  logic [NP-1:0][FLIT_W-1:0]  din = '0;
  logic [NP-1:0]              credit_o;
  logic [NP-1:0]              tx;
  logic [NP-1:0][FLIT_W-1:0]  dout;
  logic [NP-1:0]              credit_i = '0;

  hermes_sr_router #(.FLIT_W(FLIT_W), .BUF_DEPTH(4)) dut (
    .clk_i(clk), .rst_ni(rst_n), .rx_i(rx), .data_i(din), .credit_o(credit_o),
    .tx_o(tx), .data_o(dout), .credit_i(credit_i)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  // senders: flits waiting at each input, and their sequence counters
  logic [FLIT_W-1:0] srcq [NP][$];
  int                seq  [NP];
  // expected packets per (output, tag) and receiver state per output
  logic [FLIT_W-1:0] expect_pkt [int][$];       // key: tag
  int                exp_out    [int];          // key: tag -> output port
  logic [FLIT_W-1:0] rxbuf [NP][$];
  int                rx_remaining [NP];          // -1: header, else payload left
  bit                rx_seen_end [NP];
  int                packets_sent = 0, packets_got = 0;
  int                cycle = 0;
  // logs for the directed checks
  int                out_xfer_cycle [NP][$];
  int                in_xfer_cycle  [NP][$];
  int                order_east [$];
  int                parallel_cycles = 0, stall_cycles = 0;
  int                send_pct = 100, credit_pct = 100;

  // Queue a packet at input `src` for output `out`, with `extra` further
  // route flits and `size` payload flits (size >= 1, first payload = tag).
  task automatic send(input int src, input port_e out, input int extra, input int size);
    int tag;
    logic [FLIT_W-1:0] f;
    tag = src * 4096 + seq[src];
    seq[src]++;
    srcq[src].push_back(FLIT_W'(out));
    for (int k = 0; k < extra; k++) begin
      f = FLIT_W'($urandom_range(0, 4));
      srcq[src].push_back(f); expect_pkt[tag].push_back(f);
    end
    srcq[src].push_back(FLIT_W'(ROUTE_END)); expect_pkt[tag].push_back(FLIT_W'(ROUTE_END));
    srcq[src].push_back(FLIT_W'(size));      expect_pkt[tag].push_back(FLIT_W'(size));
    srcq[src].push_back(FLIT_W'(tag));       expect_pkt[tag].push_back(FLIT_W'(tag));
    for (int k = 1; k < size; k++) begin
      f = FLIT_W'($urandom);
      srcq[src].push_back(f); expect_pkt[tag].push_back(f);
    end
    exp_out[tag] = int'(out);
    packets_sent++;
  endtask

  // receiver: rebuild one packet at output o from its flits
  task automatic receive(input int o, input logic [FLIT_W-1:0] f);
    rxbuf[o].push_back(f);
    if (rx_remaining[o] < 0) begin
      if (rx_seen_end[o]) begin
        rx_remaining[o] = int'(f);   // size flit
        rx_seen_end[o]  = 1'b0;
      end else if (f[PORT_W-1:0] == ROUTE_END) begin
        rx_seen_end[o] = 1'b1;
      end
    end else begin
      rx_remaining[o]--;
    end
    if (rx_remaining[o] == 0) begin
      int tag, nroute;
      nroute = rxbuf[o].size();
      // first payload flit is the tag; it follows the size flit
      tag = -1;
      for (int k = 1; k < rxbuf[o].size(); k++)
        if (rxbuf[o][k-1][PORT_W-1:0] == ROUTE_END && tag < 0) tag = int'(rxbuf[o][k+1]);
      check(tag >= 0 && expect_pkt.exists(tag), "received tag known");
      if (tag >= 0 && expect_pkt.exists(tag)) begin
        check(exp_out[tag] == o, "packet left on the requested output");
        check(rxbuf[o] == expect_pkt[tag], "packet contents, route flit consumed");
        if (o == int'(PORT_EAST)) order_east.push_back(tag);
        expect_pkt.delete(tag);
      end
      packets_got++;
      rxbuf[o].delete();
      rx_remaining[o] = -1;
    end
  endtask

  // one clock cycle of all senders and receivers
  task automatic step();
    bit in_x [NP];
    int active_out;
    @(negedge clk);
    for (int p = 0; p < NP; p++) begin
      rx[p]       = (srcq[p].size() != 0) && ($urandom_range(0, 99) < send_pct);
      din[p]      = (srcq[p].size() != 0) ? srcq[p][0] : '0;
      credit_i[p] = ($urandom_range(0, 99) < credit_pct);
    end
    #1;
    active_out = 0;
    for (int p = 0; p < NP; p++) begin
      in_x[p] = rx[p] && credit_o[p];
      if (rx[p] && !credit_o[p]) stall_cycles++;
      if (in_x[p]) in_xfer_cycle[p].push_back(cycle);
      if (tx[p] && credit_i[p]) begin
        out_xfer_cycle[p].push_back(cycle);
        receive(p, dout[p]);
        active_out++;
      end
    end
    if (active_out >= 2) parallel_cycles++;
    @(posedge clk);
    #1;
    for (int p = 0; p < NP; p++) if (in_x[p]) void'(srcq[p].pop_front());
    cycle++;
  endtask

  task automatic run_until_drained(input int limit);
    int n;
    n = 0;
    while ((packets_got < packets_sent) && n < limit) begin
      step();
      n++;
    end
    check(packets_got == packets_sent, "all packets delivered");
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t_in, t_out;
    for (int p = 0; p < NP; p++) begin
      seq[p] = 0; rx_remaining[p] = -1; rx_seen_end[p] = 0;
    end
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;

    // 1. latency and rate: local -> east, 1 extra route flit, 20 payload flits
    send(int'(PORT_LOCAL), PORT_EAST, 1, 20);
    run_until_drained(200);
    t_in  = in_xfer_cycle[PORT_LOCAL][0];
    t_out = out_xfer_cycle[PORT_EAST][0];
    check(t_out - t_in == 2, "first forwarded flit two edges after the route flit");
    check(out_xfer_cycle[PORT_EAST].size() == 23, "23 flits forwarded (route flit removed)");
    check(out_xfer_cycle[PORT_EAST][22] - out_xfer_cycle[PORT_EAST][0] == 22,
          "one flit per cycle through the router");

    // 2. FCFS: west asks for east first, north and south one cycle later
    send(int'(PORT_WEST), PORT_EAST, 0, 6);
    step();
    send(int'(PORT_NORTH), PORT_EAST, 0, 6);
    send(int'(PORT_SOUTH), PORT_EAST, 0, 6);
    order_east.delete();
    run_until_drained(300);
    check(order_east.size() == 3, "three packets on east");
    if (order_east.size() == 3) begin
      check(order_east[0] / 4096 == int'(PORT_WEST),  "first come served first");
      check(order_east[1] / 4096 == int'(PORT_NORTH), "then north (same cycle as south, lower index)");
      check(order_east[2] / 4096 == int'(PORT_SOUTH), "then south");
    end

    // 3. parallel: four inputs to four distinct outputs at the same time
    parallel_cycles = 0;
    send(int'(PORT_EAST),  PORT_WEST,  0, 10);
    send(int'(PORT_WEST),  PORT_EAST,  0, 10);
    send(int'(PORT_NORTH), PORT_SOUTH, 0, 10);
    send(int'(PORT_SOUTH), PORT_LOCAL, 0, 10);
    run_until_drained(300);
    check(parallel_cycles >= 10, "distinct outputs served in parallel");

    // 4. random traffic with random credit (back-pressure)
    send_pct = 80; credit_pct = 50; stall_cycles = 0;
    for (int n = 0; n < 400; n++)
      send($urandom_range(0, 4), port_e'($urandom_range(0, 4)), $urandom_range(0, 3),
           $urandom_range(1, 12));
    run_until_drained(100000);
    check(stall_cycles > 0, "input buffers filled and stopped senders");
    check(expect_pkt.num() == 0, "no packet left undelivered");

    $display("router: parallel cycles=%0d stalled sender cycles=%0d", parallel_cycles, stall_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
