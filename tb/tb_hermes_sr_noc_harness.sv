// tb_hermes_sr_noc_harness -- traffic harness around one 5x5 Hermes-SR mesh.
//
// Not a testbench by itself: tb_hermes_sr_noc_buffers instantiates one per
// buffer size. It attaches a packet source and a checking sink to each of
// the 25 local ports, gives each pair a fixed random minimal west-first path,
// and runs all-to-all traffic (each element sends one 18-flit-payload packet
// to each of the other 24) at 10, 20, 30, 40 and 50 % of the link bandwidth,
// one rate after the other. All random choices come from a private xorshift
// generator with a fixed seed, so every instance sees exactly the same
// traffic. Outputs: the average application latency per rate (planned
// injection moment to last flit), and the harness's check and failure
// counts; done_o rises when all rates have drained.
module tb_hermes_sr_noc_harness
  import hermes_sr_pkg::*;
#(
  parameter int unsigned BUF_DEPTH = 4
) (
  input  logic   clk,
  output logic   done_o,
  output int     checks_o,
  output int     failures_o,
  output int lat_o [5]
);
  localparam int unsigned XS      = 5;
  localparam int unsigned YS      = 5;
  localparam int unsigned NR      = XS * YS;
  localparam int unsigned FLIT_W  = 16;
  localparam int unsigned PAYLOAD = 18;

  logic                      rst_n = 1'b0;
  logic [NR-1:0]             lrx = '0;
  logic [NR-1:0][FLIT_W-1:0] ldin = '0;
  logic [NR-1:0]             lcredit_o;
  logic [NR-1:0]             ltx;
  logic [NR-1:0][FLIT_W-1:0] ldout;
  logic [NR-1:0]             lcredit_i = '1;

  hermes_sr_noc #(.BUF_DEPTH(BUF_DEPTH)) dut (
    .clk_i(clk), .rst_ni(rst_n),
    .local_rx_i(lrx), .local_data_i(ldin), .local_credit_o(lcredit_o),
    .local_tx_o(ltx), .local_data_o(ldout), .local_credit_i(lcredit_i)
  );

  int checks = 0, failures = 0;
  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL buffer %0d: %s (t=%0t)", BUF_DEPTH, what, $time);
    end
  endtask

  // private random generator (xorshift32), identical in every instance
  logic [31:0] rng_state = 32'h1234_5678;
  function automatic int rnd_range(int lo, int hi);
    rng_state ^= rng_state << 13;
    rng_state ^= rng_state >> 17;
    rng_state ^= rng_state << 5;
    return lo + int'(rng_state % 32'(hi - lo + 1));
  endfunction

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
      if (ne > 0 && (nv == 0 || rnd_range(0, ne + nv - 1) < ne)) begin
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
  int           last_avg = 0;

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
    for (int s = 0; s < NR; s++) begin
      acc[s] = lrx[s] && lcredit_o[s];
      if (acc[s] && pkts[cur[s]].injected < 0) pkts[cur[s]].injected = cycle;
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
    last_avg = (lat_n != 0) ? lat_sum / lat_n : 0;
  endtask

  // all-to-all at rate_pct % of the link bandwidth, uniform spacing
  task automatic all_to_all(input int rate_pct);
    int order [$];
    int t;
    for (int s = 0; s < NR; s++) begin
      order.delete();
      for (int d = 0; d < NR; d++) if (d != s) order.push_back(d);
      for (int k = order.size() - 1; k > 0; k--) begin
        int j, tmp;
        j = rnd_range(0, k); tmp = order[k]; order[k] = order[j]; order[j] = tmp;
      end
      t = cycle + rnd_range(0, 50);
      foreach (order[k]) begin
        plan_packet(s, order[k], t);
        t += (packet_flits(s, order[k]) * 100 + rate_pct - 1) / rate_pct;
      end
    end
  endtask

  assign checks_o   = checks;
  assign failures_o = failures;

  initial begin
    done_o = 1'b0;
    foreach (lat_o[i]) lat_o[i] = 0;
    for (int s = 0; s < NR; s++) begin
      cur[s] = -1; seqn[s] = 0;
      for (int d = 0; d < NR; d++) if (d != s) make_route(s, d);
    end
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    repeat (2) step();
    for (int r = 1; r <= 5; r++) begin
      all_to_all(10 * r);
      drain(500000, $sformatf("all-to-all %0d%%", 10 * r));
      lat_o[r-1] = last_avg;
    end
    done_o = 1'b1;
  end
endmodule
