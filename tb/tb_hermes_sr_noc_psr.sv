// tb_hermes_sr_noc_psr -- workloads on the 5x5 Hermes-SR mesh with planned source routes.
//
// Before traffic starts, a route planner picks one path per communicating
// pair. For each pair it lists the paths one routing algorithm allows:
// XY, or one of the deadlock-free turn models negative-first (NF),
// west-first (WF) and north-last (NL), each in a minimal variant (NFM, WFM,
// NLM) and a non-minimal one that may take up to two extra hops (never
// visiting a router twice). It estimates the load every mesh link would
// carry and improves a random first choice one pair at a time, the other
// pairs fixed: a path is replaced by one with lower average link occupancy
// and no higher peak, or equal average and lower peak, or equal average and
// peak and fewer hops. Planning stops after a pass without change or after
// 20 passes.
//
// Two workloads are run with the mapping of each of the seven algorithms:
//   * hotspot: every element sends to two hotspot elements, (1,1) and (3,3),
//     at 100 Mbit/s in all (12.5 % of the link bandwidth), 10 packets each;
//   * all-to-all at 30 % of the link bandwidth, one packet per pair.
// Every packet is checked flit by flit at its destination, and the average
// application latency (planned injection to last flit) is reported.
// Also checked: the number of minimal paths the planner finds is 1 or
// (dx+dy)!/(dx!dy!) as the algorithm dictates, and the non-minimal variants
// offer at least those; for the hotspot workload the planned turn-model
// mappings put no more load on the busiest mesh link than XY does, and their
// average latency is not above that of XY.
module tb_hermes_sr_noc_psr;
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

  // ---------------------------------------------------------------- routes
  port_e route_tab [NR][NR][$];    // route mapping in use: output port per hop

  // A path as a list of moves (without the final LOCAL).
  localparam int MAXL = 12;
  localparam int DETOUR = 2;       // extra hops allowed to non-minimal paths
  typedef struct packed {
    logic [3:0]           len;
    logic [MAXL-1:0][2:0] mv;
  } path_t;

  typedef enum int {ALG_XY, ALG_NF, ALG_NFM, ALG_WF, ALG_WFM, ALG_NL, ALG_NLM} alg_e;
  localparam int NALG = 7;

  function automatic bit minimal_alg(alg_e alg);
    return alg inside {ALG_XY, ALG_NFM, ALG_WFM, ALG_NLM};
  endfunction

  // Turn rules of the routing algorithms (turns a path may not make).
  function automatic bit turn_ok(alg_e alg, port_e from, port_e to);
    if (from == to) return 1'b1;
    case (alg)
      ALG_XY:           return !((from == PORT_NORTH || from == PORT_SOUTH) &&
                                 (to == PORT_EAST || to == PORT_WEST));
      ALG_WF, ALG_WFM:  return !(to == PORT_WEST);                        // west only first
      ALG_NL, ALG_NLM:  return !(from == PORT_NORTH);                     // north only last
      default:          return !((from == PORT_NORTH && to == PORT_WEST) ||
                                 (from == PORT_EAST && to == PORT_SOUTH)); // negative first
    endcase
  endfunction

  function automatic int hops(int a, int b);
    int ddx, ddy;
    ddx = a % XS - b % XS; ddy = a / XS - b / XS;
    return (ddx < 0 ? -ddx : ddx) + (ddy < 0 ? -ddy : ddy);
  endfunction

  // Every path from s to d that the algorithm allows: minimal paths for the
  // minimal variants, paths up to DETOUR hops longer (never visiting a router
  // twice) for the non-minimal ones. Depth-first search with its own stack.
  task automatic alternatives(input alg_e alg, input int s, input int d, ref path_t out [$]);
    int    maxlen, depth, nb, sx, sy;
    int    pos  [MAXL+1];
    int    nxt  [MAXL+1];
    bit    seen [NR];
    path_t p;
    out.delete();
    maxlen = hops(s, d) + (minimal_alg(alg) ? 0 : DETOUR);
    foreach (seen[r]) seen[r] = 1'b0;
    p = '0;
    depth = 0; pos[0] = s; nxt[0] = 0; seen[s] = 1'b1;
    while (depth >= 0) begin
      if (pos[depth] == d || nxt[depth] >= 4) begin
        if (pos[depth] == d) begin
          p.len = 4'(depth);
          out.push_back(p);
        end
        seen[pos[depth]] = 1'b0;
        depth--;
      end else begin
        port_e dir;
        dir = port_e'(nxt[depth]);
        nxt[depth]++;
        sx = pos[depth] % XS; sy = pos[depth] / XS;
        nb = -1;
        case (dir)
          PORT_EAST:  if (sx + 1 < XS) nb = pos[depth] + 1;
          PORT_WEST:  if (sx > 0)      nb = pos[depth] - 1;
          PORT_NORTH: if (sy + 1 < YS) nb = pos[depth] + XS;
          default:    if (sy > 0)      nb = pos[depth] - XS;
        endcase
        if (nb >= 0 && !seen[nb] && depth + 1 + hops(nb, d) <= maxlen &&
            (depth == 0 || turn_ok(alg, port_e'(p.mv[depth-1]), dir))) begin
          p.mv[depth] = 3'(dir);
          depth++;
          pos[depth] = nb; nxt[depth] = 0; seen[nb] = 1'b1;
        end
      end
    end
  endtask

  function automatic int binom(int n, int k);
    int r;
    r = 1;
    for (int i = 1; i <= k; i++) r = r * (n - k + i) / i;
    return int'(r);
  endfunction

  // link load estimate, in Mbit/s, per router and mesh output port
  int load [NR][4];

  task automatic add_load(input int s, input path_t p, input int rate);
    int cur;
    cur = s;
    for (int k = 0; k < int'(p.len); k++) begin
      load[cur][2'(p.mv[k])] += rate;
      case (port_e'(p.mv[k]))
        PORT_EAST:  cur = cur + 1;
        PORT_WEST:  cur = cur - 1;
        PORT_NORTH: cur = cur + XS;
        default:    cur = cur - XS;
      endcase
    end
  endtask

  // occupancy figures of a path with its own rate added
  task automatic path_cost(input int s, input path_t p, input int rate,
                           output int sum, output int peak);
    int cur, v;
    cur = s; sum = 0; peak = 0;
    for (int k = 0; k < int'(p.len); k++) begin
      v = load[cur][2'(p.mv[k])] + rate;
      sum += v;
      if (v > peak) peak = v;
      case (port_e'(p.mv[k]))
        PORT_EAST:  cur = cur + 1;
        PORT_WEST:  cur = cur - 1;
        PORT_NORTH: cur = cur + XS;
        default:    cur = cur - XS;
      endcase
    end
  endtask

  // Planned source routing: start from random alternatives, then revisit
  // one pair at a time (others fixed) and take an alternative that has
  // (i) lower average occupancy and no higher peak, or (ii) equal average
  // and lower peak, or (iii) equal average and peak on a shorter path.
  // Stops when a whole pass changes nothing or after max_passes.
  int pair_src [$], pair_dst [$], pair_rate [$];
  string names [NALG] = '{"XY", "NF", "NFM", "WF", "WFM", "NL", "NLM"};

  task automatic plan_routes(input alg_e alg, input int max_passes, output int passes);
    path_t cand [$];
    path_t chosen [$];
    bit changed;
    foreach (load[r, o]) load[r][o] = 0;
    chosen.delete();
    foreach (pair_src[i]) begin
      alternatives(alg, pair_src[i], pair_dst[i], cand);
      chosen.push_back(cand[$urandom_range(0, cand.size() - 1)]);
      add_load(pair_src[i], chosen[i], pair_rate[i]);
    end
    passes = 0;
    do begin
      changed = 1'b0;
      passes++;
      foreach (pair_src[i]) begin
        int cs, cp, ns, np;
        add_load(pair_src[i], chosen[i], -pair_rate[i]);
        alternatives(alg, pair_src[i], pair_dst[i], cand);
        foreach (cand[c]) begin
          int lhs, rhs;
          path_cost(pair_src[i], chosen[i], pair_rate[i], cs, cp);
          path_cost(pair_src[i], cand[c], pair_rate[i], ns, np);
          // averages compared as ns/len_n against cs/len_c
          lhs = int'(ns) * int'(chosen[i].len);
          rhs = int'(cs) * int'(cand[c].len);
          if ((lhs < rhs && np <= cp) || (lhs == rhs && np < cp) ||
              (lhs == rhs && np == cp && cand[c].len < chosen[i].len)) begin
            chosen[i] = cand[c];
            changed = 1'b1;
          end
        end
        add_load(pair_src[i], chosen[i], pair_rate[i]);
      end
    end while (changed && passes < max_passes);
    // turn the mapping into route flits
    foreach (pair_src[i]) begin
      int s, d;
      s = pair_src[i]; d = pair_dst[i];
      route_tab[s][d].delete();
      for (int k = 0; k < int'(chosen[i].len); k++) route_tab[s][d].push_back(port_e'(chosen[i].mv[k]));
      route_tab[s][d].push_back(PORT_LOCAL);
    end
  endtask

  function automatic int peak_load();
    int m;
    m = 0;
    foreach (load[r, o]) if (load[r][o] > m) m = load[r][o];
    return m;
  endfunction

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
    $display("%-22s packets=%0d  average application latency=%0d cycles  finished after %0d cycles",
             name, lat_n, (lat_n != 0) ? lat_sum / lat_n : 0, cycle - start);
  endtask

  initial begin : watchdog
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int hot [2];
    int passes, xy_peak, pk;
    int hot_lat [NALG];
    int t;
    for (int s = 0; s < NR; s++) begin
      cur[s] = -1; seqn[s] = 0;
    end
    hot[0] = 1 * XS + 1;
    hot[1] = 3 * XS + 3;

    // path counts: one path, or (dx+dy)!/(dx!dy!) when the algorithm leaves
    // both directions free
    for (int s = 0; s < NR; s++)
      for (int d = 0; d < NR; d++)
        if (d != s) begin
          path_t cand [$];
          int ex, ey, expect_n;
          bit free_n;
          ex = d % XS - s % XS; ey = d / XS - s / XS;
          for (int a = 0; a < NALG; a++) begin
            case (alg_e'(a))
              ALG_XY:          free_n = 1'b0;
              ALG_WF, ALG_WFM: free_n = (ex >= 0);
              ALG_NL, ALG_NLM: free_n = (ey <= 0);
              default:         free_n = (ex >= 0 && ey >= 0) || (ex <= 0 && ey <= 0);
            endcase
            expect_n = free_n ? binom((ex < 0 ? -ex : ex) + (ey < 0 ? -ey : ey), ex < 0 ? -ex : ex) : 1;
            alternatives(alg_e'(a), s, d, cand);
            if (minimal_alg(alg_e'(a))) check(cand.size() == expect_n, "number of minimal alternative paths");
            else check(cand.size() >= expect_n, "non-minimal variant offers at least the minimal paths");
          end
        end
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    repeat (2) step();

    // hotspot
    xy_peak = 0;
    for (int a = 0; a < NALG; a++) begin
      pair_src.delete(); pair_dst.delete(); pair_rate.delete();
      for (int s = 0; s < NR; s++)
        for (int h = 0; h < 2; h++)
          if (hot[h] != s) begin
            pair_src.push_back(s); pair_dst.push_back(hot[h]);
            pair_rate.push_back((s == hot[0] || s == hot[1]) ? 100 : 50);
          end
      plan_routes(alg_e'(a), 20, passes);
      pk = peak_load();
      if (a == 0) xy_peak = pk;
      else check(pk <= xy_peak, "planned turn-model mapping does not raise the busiest link load");
      for (int s = 0; s < NR; s++) begin
        t = cycle + $urandom_range(0, 50);
        for (int k = 0; k < 10; k++) begin
          int d;
          d = hot[k % 2];
          if (d == s) d = hot[(k + 1) % 2];
          plan_packet(s, d, t);
          t += packet_flits(s, d) * 8;
        end
      end
      $display("%s mapping: %0d planning passes, busiest mesh link %0d Mbit/s", names[a], passes, pk);
      drain(500000, {"hotspot ", names[a]});
      hot_lat[a] = last_avg;
    end

    for (int a = 1; a < NALG; a++)
      check(hot_lat[a] <= hot_lat[0], "planned turn-model routes beat XY under hotspot traffic");

    // all-to-all at 30 %
    for (int a = 0; a < NALG; a++) begin
      int order [$];
      pair_src.delete(); pair_dst.delete(); pair_rate.delete();
      for (int s = 0; s < NR; s++)
        for (int d = 0; d < NR; d++)
          if (d != s) begin
            pair_src.push_back(s); pair_dst.push_back(d); pair_rate.push_back(10);
          end
      plan_routes(alg_e'(a), 20, passes);
      pk = peak_load();
      for (int s = 0; s < NR; s++) begin
        order.delete();
        for (int d = 0; d < NR; d++) if (d != s) order.push_back(d);
        order.shuffle();
        t = cycle + $urandom_range(0, 50);
        foreach (order[k]) begin
          plan_packet(s, order[k], t);
          t += (packet_flits(s, order[k]) * 100 + 29) / 30;
        end
      end
      $display("%s mapping: %0d planning passes, busiest mesh link %0d Mbit/s", names[a], passes, pk);
      drain(500000, {"all-to-all 30% ", names[a]});
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
