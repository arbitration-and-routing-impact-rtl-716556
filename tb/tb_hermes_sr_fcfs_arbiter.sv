// tb_hermes_sr_fcfs_arbiter -- self-checking test of the FCFS output arbiter.
//
// A reference queue of input indices models first-come first-served service:
// requests are appended in arrival order (ascending index within a cycle)
// and the head is removed when it releases. Directed cases check that a
// request into an empty queue is granted in the next cycle, that a later
// request waits for an earlier one to release although it has a lower
// index, and that a release and a new request in the same cycle are both
// taken. A random phase follows, where every input requests only while it is
// not already waiting (as a routing unit does).
module tb_hermes_sr_fcfs_arbiter;
  localparam int unsigned N = 5;

  logic         clk = 1'b0;
  logic         rst_n = 1'b0;
  logic [N-1:0] req = '0, rel = '0;
  logic [N-1:0] gnt;
  logic         gnt_valid;
  logic [2:0]   gnt_idx;

  int checks = 0, failures = 0;
  int model [$];

  hermes_sr_fcfs_arbiter #(.N(N)) dut (
    .clk_i(clk), .rst_ni(rst_n), .req_i(req), .rel_i(rel),
    .gnt_o(gnt), .gnt_valid_o(gnt_valid), .gnt_idx_o(gnt_idx)
  );

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s (t=%0t) model head=%0d gnt=%b", what, $time,
               (model.size() != 0) ? model[0] : -1, gnt);
    end
  endtask

  task automatic compare();
    logic [N-1:0] exp_gnt;
    exp_gnt = '0;
    if (model.size() != 0) exp_gnt[model[0]] = 1'b1;
    check(gnt == exp_gnt, "one-hot grant");
    check(gnt_valid == (model.size() != 0), "grant valid");
    if (model.size() != 0) check(int'(gnt_idx) == model[0], "grant index");
  endtask

  // apply one cycle of requests/releases, check, then advance the model
  task automatic step(input logic [N-1:0] r, input logic [N-1:0] l);
    @(negedge clk);
    req = r; rel = l;
    #1 compare();
    @(posedge clk);
    if (model.size() != 0 && l[model[0]]) void'(model.pop_front());
    for (int i = 0; i < N; i++) if (r[i]) model.push_back(i);
    #1 req = '0; rel = '0;
  endtask

  function automatic bit waiting(int i);
    foreach (model[k]) if (model[k] == i) return 1'b1;
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
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;

    // request into an empty queue: granted in the next cycle
    step(5'b01000, '0);
    @(negedge clk); #1 check(gnt == 5'b01000, "grant one cycle after request");
    // input 1 arrives later, input 4 later still: 3 must keep the output
    step(5'b00010, '0);
    step(5'b10000, '0);
    step('0, '0);
    check(gnt == 5'b01000, "earlier requester keeps the grant");
    // 3 releases while 0 and 2 request together: 1, then 4, then 0, then 2
    step(5'b00101, 5'b01000);
    @(negedge clk); #1 check(gnt == 5'b00010, "second arrival served next");
    step('0, 5'b00010);
    @(negedge clk); #1 check(gnt == 5'b10000, "third arrival served next");
    step('0, 5'b10000);
    @(negedge clk); #1 check(gnt == 5'b00001, "same-cycle requests in index order");
    step('0, 5'b00001);
    step('0, 5'b00100);
    check(model.size() == 0, "model drained");
    step('0, '0);

    // random traffic
    for (int n = 0; n < 4000; n++) begin
      logic [N-1:0] r, l;
      r = '0; l = '0;
      for (int i = 0; i < N; i++)
        if (!waiting(i) && $urandom_range(0, 99) < 20) r[i] = 1'b1;
      if (model.size() != 0 && $urandom_range(0, 99) < 40) l[model[0]] = 1'b1;
      step(r, l);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
