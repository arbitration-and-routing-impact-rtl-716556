// tb_hermes_sr_noc -- end-to-end test of the 5x5 Hermes-SR mesh at its default size.
//
// Emulated processing elements at all 25 local ports inject and absorb
// packets. Paths are source routes chosen once per communicating pair (a
// fixed route mapping) among the minimal west-first paths, which are free of
// deadlock; the destination router's LOCAL port ends every route. Each
// packet has an 18-flit payload: a tag (source, sequence), the destination
// index and 16 flits computed from the tag, so every packet is checked flit
// by flit at its destination, where the route flits must all be gone.
//
// Phases:
//   1. a single packet from router 0 to router 24 in an empty network: the
//      last flit must arrive L-1+R cycles after the first flit entered
//      (L flits injected, R routers on the path, each router adds one cycle);
//   2. all-to-all traffic: every element sends one packet to each of the 24
//      others, at injection rates of 10, 20, 30, 40 and 50 % of the link
//      bandwidth, packets spaced uniformly in time;
//   3. hotspot traffic: every element sends to two hotspot elements at
//      100 Mbit/s (12.5 % of an 800 Mbit/s link).
// Application latency is measured as in the evaluation: from the planned
// (ideal) injection moment to the arrival of the last flit.
//
// Mechanisms counted (each must happen): route flit consumed at every hop
// (checked per packet), FCFS queueing behind an earlier request, same-cycle
// requests to one output, full input buffers withholding credit, several
// outputs of one router busy in the same cycle, and sources injecting later
// than planned because the network pushed back.
module tb_hermes_sr_noc;
  import hermes_sr_pkg::*;
  localparam int unsigned XS      = 5;
  localparam int unsigned YS      = 5;
  localparam int unsigned NR      = XS * YS;
  localparam int unsigned FLIT_W  = 16;
  localparam int unsigned PAYLOAD = 18;

  logic                      clk = 1'b0;
  logic                      rst_n = 1'b0;
  logic [NR-1:0]             lrx = '0;
  logic [NR-1:0][FLIT_W-1:0] ldin = '0;
  logic [NR-1:0]             lcredit_o;
  logic [NR-1:0]             ltx;
  logic [NR-1:0][FLIT_W-1:0] ldout;
  logic [NR-1:0]             lcredit_i = '1;

  hermes_sr_noc dut (
    .clk_i(clk), .rst_ni(rst_n),
    .local_rx_i(lrx), .local_data_i(ldin), .local_credit_o(lcredit_o),
    .local_tx_o(ltx), .local_data_o(ldout), .local_credit_i(lcredit_i)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  // ---------------------------------------------------------------- probes
  // internal events, read from the routers' arbiters, buffers and outputs
  logic [NR-1:0] ev_queued, ev_tie, ev_full, ev_parallel;
  for (genvar y = 0; y < YS; y++) begin : g_py
    for (genvar x = 0; x < XS; x++) begin : g_px
      localparam int N = y * XS + x;
      logic [NPORTS-1:0] q2, tie, full, busy;
      for (genvar o = 0; o < NPORTS; o++) begin : g_po
        assign q2[o]   = (dut.g_y[y].g_x[x].u_router.g_out[o].u_out.u_arb.count >= 2);
        assign tie[o]  = ($countones(dut.g_y[y].g_x[x].u_router.g_out[o].u_out.my_req) >= 2);
        assign full[o] = dut.g_y[y].g_x[x].u_router.rx_i[o] && !dut.g_y[y].g_x[x].u_router.credit_o[o];
        assign busy[o] = dut.g_y[y].g_x[x].u_router.tx_o[o] && dut.g_y[y].g_x[x].u_router.credit_i[o];
      end
      assign ev_queued[N]   = |q2;
      assign ev_tie[N]      = |tie;
      assign ev_full[N]     = |full;
      assign ev_parallel[N] = ($countones(busy) >= 2);
    end
  end
  int n_queued = 0, n_tie = 0, n_full = 0, n_parallel = 0, n_late = 0;

  // ---------------------------------------------------------------- routes
  port_e route_tab [NR][NR][$];    // route mapping: output port per hop

  // a random minimal west-first path from s to d, ending with LOCAL
  task automatic make_route(input int s, input int d);
    int sx, sy, dx, dy, ne, nv;
    port_e vdir;
    sx = s % XS; sy = s / XS; dx = d % XS; dy = d / XS;
    route_tab[s][d].delete();
    for (int k = 0; k < sx - dx; k++) route_tab[s][d].push_back(PORT_WEST);   // west first
    ne   = (dx > sx) ? dx - sx : 0;
    nv   = (dy > sy) ? dy - sy : sy - dy;
    vdir = (dy > sy) ? PORT_NORTH : PORT_SOUTH;
    while (ne + nv > 0) begin
      if (ne > 0 && (nv == 0 || $urandom_range(0, ne + nv - 1) < ne)) begin
        route_tab[s][d].push_back(PORT_EAST); ne--;
      end else begin
        route_tab[s][d].push_back(vdir); nv--;
      end
    end
    route_tab[s][d].push_back(PORT_LOCAL);
  endtask

  // ---------------------------------------------------------------- traffic
  typedef struct {
    int src, dst, seq;
    int ideal;        // planned injection cycle
    int injected;     // cycle the first flit entered the network
  } pkt_t;

  pkt_t             pkts [int];          // key: tag
  int               plan [NR][$];        // tags per source in injection order
  logic [FLIT_W-1:0] txq [NR][$];        // flits of the packet being injected
  int               cur  [NR];           // tag being injected, -1 if none
  int               seqn [NR];
  // receivers
  logic [FLIT_W-1:0] rxbuf [NR][$];
  int               outstanding = 0;
  int           cycle = 0;
  int           lat_sum = 0;
  int               lat_n = 0;
  int           last_arrival = 0;

  function automatic logic [FLIT_W-1:0] pay(int tag, int k);
    return FLIT_W'((tag * 40503 + k * 2654435761) >> 7);
  endfunction

  function automatic int packet_flits(int s, int d);
    return route_tab[s][d].size() + 2 + PAYLOAD;
  endfunction

  task automatic plan_packet(input int s, input int d, input int ideal);
    int tag;
    tag = s * 1024 + seqn[s];
    seqn[s]++;
    pkts[tag] = '{src: s, dst: d, seq: seqn[s] - 1, ideal: ideal, injected: -1};
    plan[s].push_back(tag);
    outstanding++;
  endtask

  task automatic load_flits(input int s, input int tag);
    int d;
    d = pkts[tag].dst;
    foreach (route_tab[s][d][k]) txq[s].push_back(FLIT_W'(route_tab[s][d][k]));
    txq[s].push_back(FLIT_W'(ROUTE_END));
    txq[s].push_back(FLIT_W'(PAYLOAD));
    txq[s].push_back(FLIT_W'(tag));
    txq[s].push_back(FLIT_W'(d));
    for (int k = 2; k < PAYLOAD; k++) txq[s].push_back(pay(tag, k));
  endtask

  // a packet arrived complete at destination d
  task automatic deliver(input int d);
    int tag;
    bit ok;
    // terminator, size, payload: all route flits must have been consumed
    check(rxbuf[d].size() == 2 + PAYLOAD, "packet length at destination");
    check(rxbuf[d][0][PORT_W-1:0] == ROUTE_END, "route flits all consumed");
    check(rxbuf[d][1] == FLIT_W'(PAYLOAD), "size flit");
    tag = int'(rxbuf[d][2]);
    ok  = pkts.exists(tag);
    check(ok, "known packet tag");
    if (ok) begin
      check(pkts[tag].dst == d && int'(rxbuf[d][3]) == d, "right destination");
      for (int k = 2; k < PAYLOAD; k++)
        if (rxbuf[d][2 + k] != pay(tag, k)) begin
          check(1'b0, "payload flit");
          break;
        end
      checks++;
      lat_sum += cycle - pkts[tag].ideal;
      lat_n++;
      last_arrival = cycle;
      pkts.delete(tag);
      outstanding--;
    end
    rxbuf[d].delete();
  endtask

  // one clock cycle of all 25 elements
  task automatic step();
    bit acc [NR];
    @(negedge clk);
    for (int s = 0; s < NR; s++) begin
      if (cur[s] < 0 && plan[s].size() != 0 && pkts[plan[s][0]].ideal <= cycle) begin
        cur[s] = plan[s].pop_front();
        load_flits(s, cur[s]);
      end
      lrx[s]  = (txq[s].size() != 0);
      ldin[s] = (txq[s].size() != 0) ? txq[s][0] : '0;
    end
    #1;
    n_queued   += $countones(ev_queued);
    n_tie      += $countones(ev_tie);
    n_full     += $countones(ev_full);
    n_parallel += $countones(ev_parallel);
    for (int s = 0; s < NR; s++) begin
      acc[s] = lrx[s] && lcredit_o[s];
      if (acc[s] && pkts[cur[s]].injected < 0) begin
        pkts[cur[s]].injected = cycle;
        if (cycle > pkts[cur[s]].ideal) n_late++;
      end
    end
    for (int d = 0; d < NR; d++)
      if (ltx[d]) begin
        rxbuf[d].push_back(ldout[d]);
        if (rxbuf[d].size() == 2 + PAYLOAD) deliver(d);
      end
    @(posedge clk);
    #1;
    for (int s = 0; s < NR; s++)
      if (acc[s]) begin
        void'(txq[s].pop_front());
        if (txq[s].size() == 0) cur[s] = -1;
      end
    cycle++;
  endtask

  task automatic drain(input int limit, input string name);
    int start;
    start = cycle;
    lat_sum = 0; lat_n = 0;
    while (outstanding > 0 && cycle - start < limit) step();
    check(outstanding == 0, {name, ": all packets delivered"});
    $display("%-22s packets=%0d  average application latency=%0d cycles  finished after %0d cycles",
             name, lat_n, (lat_n != 0) ? lat_sum / lat_n : 0, cycle - start);
  endtask

  // all-to-all at rate_pct % of the link bandwidth, uniform spacing
  task automatic all_to_all(input int rate_pct);
    int order [$];
    int t;
    for (int s = 0; s < NR; s++) begin
      order.delete();
      for (int d = 0; d < NR; d++) if (d != s) order.push_back(d);
      order.shuffle();
      t = cycle + $urandom_range(0, 50);
      foreach (order[k]) begin
        plan_packet(s, order[k], t);
        t += (packet_flits(s, order[k]) * 100 + rate_pct - 1) / rate_pct;
      end
    end
  endtask

  initial begin : watchdog
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0;
    int hot [2];
    for (int s = 0; s < NR; s++) begin
      cur[s] = -1; seqn[s] = 0;
      for (int d = 0; d < NR; d++) if (d != s) make_route(s, d);
    end
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    repeat (2) step();

    // 1. one packet corner to corner in an empty network
    plan_packet(0, NR - 1, cycle);
    t0 = cycle;
    drain(1000, "single packet");
    check(route_tab[0][NR-1].size() == 9, "nine routers on the corner-to-corner path");
    check(last_arrival - t0 == int'(packet_flits(0, NR - 1) - 1 + 9),
          "unloaded latency L-1+R cycles");

    // 2. all-to-all, 10..50 %
    for (int r = 10; r <= 50; r += 10) begin
      all_to_all(r);
      drain(500000, $sformatf("all-to-all %0d%%", r));
    end

    // 3. hotspot: two destinations, 12.5 % per source, 10 packets each
    hot[0] = 1 * XS + 1;      // router (1,1)
    hot[1] = 3 * XS + 3;      // router (3,3)
    for (int s = 0; s < NR; s++) begin
      int t;
      t = cycle + $urandom_range(0, 50);
      for (int k = 0; k < 10; k++) begin
        int d;
        d = hot[k % 2];
        if (d == s) d = hot[(k + 1) % 2];
        plan_packet(s, d, t);
        t += packet_flits(s, d) * 8;     // 1/8 of the link bandwidth
      end
    end
    drain(500000, "hotspot 100 Mbit/s");

    $display("events: fcfs-queued=%0d same-cycle-requests=%0d buffer-full=%0d parallel-outputs=%0d late-injections=%0d",
             n_queued, n_tie, n_full, n_parallel, n_late);
    check(n_queued > 0,   "a request waited in an FCFS queue");
    check(n_tie > 0,      "two requests reached one output in the same cycle");
    check(n_full > 0,     "a full input buffer withheld credit");
    check(n_parallel > 0, "a router served several outputs at once");
    check(n_late > 0,     "a source was held back by the network");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
