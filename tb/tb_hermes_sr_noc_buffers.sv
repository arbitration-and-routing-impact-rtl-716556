// tb_hermes_sr_noc_buffers -- the 5x5 mesh with 4-, 8-, 16- and 32-flit input buffers.
//
// Four meshes, one per buffer size, run side by side from the same clock,
// each inside a tb_hermes_sr_noc_harness that applies identical all-to-all
// traffic at 10 to 50 % of the link bandwidth and checks every packet. The
// testbench prints the average application latency of each buffer size at
// each rate and checks the expected trend: at every rate, a mesh with larger
// buffers is not slower than the one with 4-flit buffers, and at 40 % and
// 50 % (where the network is congested) latency does not rise from one
// buffer size to the next.
module tb_hermes_sr_noc_buffers;
  localparam int NB = 4;
  localparam int DEPTHS [NB] = '{4, 8, 16, 32};

  logic   clk = 1'b0;
  logic   done [NB];
  int     hchecks [NB], hfail [NB];
  int lat [NB][5];

  always #5 clk = ~clk;

  for (genvar b = 0; b < NB; b++) begin : g_b
    tb_hermes_sr_noc_harness #(.BUF_DEPTH(DEPTHS[b])) u_h (
      .clk(clk), .done_o(done[b]), .checks_o(hchecks[b]), .failures_o(hfail[b]), .lat_o(lat[b])
    );
  end

  int checks = 0, failures = 0;
  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (3000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit all_done;
    do begin
      @(posedge clk);
      all_done = 1'b1;
      for (int b = 0; b < NB; b++) if (!done[b]) all_done = 1'b0;
    end while (!all_done);

    $display("average application latency (cycles)");
    $display("  rate   buf 4   buf 8  buf 16  buf 32");
    for (int r = 0; r < 5; r++)
      $display("  %2d%%  %6d  %6d  %6d  %6d", 10 * (r + 1), lat[0][r], lat[1][r], lat[2][r], lat[3][r]);

    for (int b = 0; b < NB; b++) begin
      checks   += hchecks[b];
      failures += hfail[b];
    end
    for (int r = 0; r < 5; r++)
      for (int b = 1; b < NB; b++)
        check(lat[b][r] <= lat[0][r], $sformatf("rate %0d%%: %0d-flit buffers not slower than 4", 10 * (r + 1), DEPTHS[b]));
    for (int r = 3; r < 5; r++)
      for (int b = 1; b < NB; b++)
        check(lat[b][r] <= lat[b-1][r], $sformatf("rate %0d%%: latency falls from %0d to %0d flits",
                                                  10 * (r + 1), DEPTHS[b-1], DEPTHS[b]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
