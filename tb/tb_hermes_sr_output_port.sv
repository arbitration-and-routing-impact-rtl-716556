// tb_hermes_sr_output_port -- self-checking test of one router output port.
//
// The output port under test is the north output. Five emulated input ports
// request random outputs; only requests for north may enter this port's
// FCFS queue. The testbench keeps its own queue of north requesters and
// checks every cycle: the one-hot grant, that the link carries the granted
// input's flit exactly when that input offers one, that the acknowledge goes
// to the granted input only and only when the receiver has credit, and that a
// release hands the output to the next requester in arrival order.
module tb_hermes_sr_output_port;
  import hermes_sr_pkg::*;
  localparam int unsigned FLIT_W = 16;
  localparam int unsigned N      = NPORTS;

  logic              clk = 1'b0;
  logic              rst_n = 1'b0;
  logic [N-1:0]      req = '0, rel = '0, valid = '0;
  port_e             req_port [N];
  logic [FLIT_W-1:0] data [N];
  logic [N-1:0]      ack, gnt;
  logic              tx;
  logic [FLIT_W-1:0] dout;
  logic              credit = 1'b0;

  int checks = 0, failures = 0;
  int q [$];              // model: inputs queued at the north output
  int elsewhere [N];      // cycles an input stays busy with another output
  int xfers = 0, handovers = 0;

  hermes_sr_output_port #(.FLIT_W(FLIT_W), .N(N), .MY_PORT(PORT_NORTH)) dut (
    .clk_i(clk), .rst_ni(rst_n), .req_i(req), .req_port_i(req_port), .rel_i(rel),
    .valid_i(valid), .data_i(data), .ack_o(ack), .gnt_o(gnt),
    .tx_o(tx), .data_o(dout), .credit_i(credit)
  );

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  function automatic bit queued(int i);
    foreach (q[k]) if (q[k] == i) return 1'b1;
    return 1'b0;
  endfunction

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < N; i++) begin
      req_port[i] = PORT_EAST; data[i] = '0; elsewhere[i] = 0;
    end
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;

    for (int n = 0; n < 5000; n++) begin
      logic [N-1:0] exp_gnt, exp_ack;
      bit exp_tx;
      int head;
      @(negedge clk);
      req = '0; rel = '0;
      for (int i = 0; i < N; i++) begin
        data[i]  = FLIT_W'($urandom);
        valid[i] = ($urandom_range(0, 99) < 70);
        if (!queued(i) && elsewhere[i] == 0 && $urandom_range(0, 99) < 15) begin
          req[i]      = 1'b1;
          req_port[i] = port_e'($urandom_range(0, 4));
        end else begin
          req_port[i] = port_e'($urandom_range(0, 4));   // ignored without req
        end
      end
      if (q.size() != 0 && $urandom_range(0, 99) < 25) rel[q[0]] = 1'b1;
      credit = ($urandom_range(0, 99) < 75);
      #1;
      head    = (q.size() != 0) ? q[0] : -1;
      exp_gnt = '0;
      if (head >= 0) exp_gnt[head] = 1'b1;
      exp_tx  = (head >= 0) && valid[head];
      exp_ack = '0;
      if (exp_tx && credit) exp_ack[head] = 1'b1;
      check(gnt == exp_gnt, "grant");
      check(tx == exp_tx, "tx");
      if (exp_tx) check(dout == data[head], "link data from granted input");
      check(ack == exp_ack, "acknowledge");
      if (exp_tx && credit) xfers++;
      @(posedge clk);
      #1;
      for (int i = 0; i < N; i++) if (elsewhere[i] > 0) elsewhere[i]--;
      if (head >= 0 && rel[head]) begin
        void'(q.pop_front());
        if (q.size() != 0) handovers++;
      end
      for (int i = 0; i < N; i++)
        if (req[i]) begin
          if (req_port[i] == PORT_NORTH) q.push_back(i);
          else elsewhere[i] = $urandom_range(1, 8);
        end
    end
    check(xfers > 100 && handovers > 50, "enough traffic exercised");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
