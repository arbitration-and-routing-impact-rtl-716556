// tb_hermes_sr_input_buffer -- self-checking test of the router input FIFO.
//
// Drives random writes (rx) and pops against a reference queue and checks,
// every cycle, the credit (room for a flit), the empty flag and the head
// flit. A directed phase fills the 4-flit buffer to check that the credit
// drops exactly when DEPTH flits are stored, that a write without credit is
// ignored, and that a flit written into an empty buffer is at the head one
// cycle later. Inputs change on the falling edge, checks run before the
// rising edge.
module tb_hermes_sr_input_buffer;
  localparam int unsigned FLIT_W = 16;
  localparam int unsigned DEPTH  = 4;

  logic              clk = 1'b0;
  logic              rst_n = 1'b0;
  logic              rx = 1'b0, pop = 1'b0;
  logic [FLIT_W-1:0] din = '0;
  logic              credit, empty;
  logic [FLIT_W-1:0] head;

  int checks = 0, failures = 0;
  logic [FLIT_W-1:0] model [$];

  hermes_sr_input_buffer #(.FLIT_W(FLIT_W), .DEPTH(DEPTH)) dut (
    .clk_i(clk), .rst_ni(rst_n), .rx_i(rx), .data_i(din), .credit_o(credit),
    .empty_o(empty), .head_o(head), .pop_i(pop)
  );

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  // compare outputs with the model (called with inputs stable, before the edge)
  task automatic compare();
    check(credit == (model.size() < DEPTH), "credit");
    check(empty == (model.size() == 0), "empty");
    if (model.size() != 0) check(head == model[0], "head flit");
  endtask

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

    // directed: fill to DEPTH, one extra write must be refused
    for (int k = 0; k < DEPTH + 1; k++) begin
      @(negedge clk);
      rx = 1'b1; din = FLIT_W'(16'hA000 + k); pop = 1'b0;
      #1 compare();
      if (k == DEPTH) check(!credit, "no credit when full");
      @(posedge clk);
      if (model.size() < DEPTH) model.push_back(din);
    end
    // drain completely
    while (model.size() != 0) begin
      @(negedge clk);
      rx = 1'b0; pop = 1'b1;
      #1 compare();
      @(posedge clk);
      void'(model.pop_front());
    end
    // write into empty: head valid in the following cycle
    @(negedge clk);
    rx = 1'b1; din = 16'h5A5A; pop = 1'b0;
    #1 check(empty, "empty before write");
    @(posedge clk) model.push_back(din);
    @(negedge clk);
    rx = 1'b0;
    #1 check(!empty && head == 16'h5A5A, "head one cycle after write");
    @(posedge clk);

    // random traffic
    for (int n = 0; n < 3000; n++) begin
      bit w, p, room;
      @(negedge clk);
      w   = ($urandom_range(0, 99) < 55);
      p   = ($urandom_range(0, 99) < 50) && (model.size() != 0);
      rx  = w; din = FLIT_W'($urandom); pop = p;
      #1 compare();
      room = (model.size() < DEPTH);
      @(posedge clk);
      if (p) void'(model.pop_front());
      if (w && room) model.push_back(din);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
