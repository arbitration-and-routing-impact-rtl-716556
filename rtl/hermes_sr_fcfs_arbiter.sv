// hermes_sr_fcfs_arbiter -- first-come first-served arbiter of one output port.
//
// Hermes-SR arbitrates at each output port separately: every input port
// notifies the output it wants, the requests are stored, and the output
// serves them in arrival order. This module is that request store: a queue of
// input-port indices, N entries deep (an input port waits for one output at a
// time, so N entries never overflow).
//
//   req_i[i]   one-cycle pulse: input i asks for this output. The index is
//              appended to the queue at the clock edge.
//   rel_i[i]   one-cycle pulse: input i has sent the last flit of its packet.
//              Only the input at the head of the queue can release; its entry
//              is removed at the clock edge.
//   gnt_o      one-hot grant, the input at the head of the queue;
//              gnt_valid_o/gnt_idx_o carry the same as a valid flag and index.
//
// A request made while the queue is empty is granted in the next cycle. When
// several inputs request in the same cycle they are queued in ascending port
// index, a tie-break this design chose. A release and new requests can happen
// in the same cycle. Reset (synchronous, active low) empties the queue.
module hermes_sr_fcfs_arbiter #(
  parameter int unsigned N = 5
) (
  input  logic                 clk_i,
  input  logic                 rst_ni,
  input  logic [N-1:0]         req_i,
  input  logic [N-1:0]         rel_i,
  output logic [N-1:0]         gnt_o,
  output logic                 gnt_valid_o,
  output logic [$clog2(N)-1:0] gnt_idx_o
);
  localparam int unsigned IDX_W = $clog2(N);
  localparam int unsigned CNT_W = $clog2(N + 1);

  logic [IDX_W-1:0] queue   [N];
  logic [IDX_W-1:0] queue_n [N];
  logic [CNT_W-1:0] count, count_n;
  logic             head_rel;

  assign gnt_valid_o = (count != '0);
  assign gnt_idx_o   = queue[0];
  assign head_rel    = gnt_valid_o && rel_i[queue[0]];

  always_comb begin
    gnt_o = '0;
    if (gnt_valid_o) gnt_o[queue[0]] = 1'b1;
  end

  always_comb begin
    // remove the head on release
    count_n = count;
    for (int k = 0; k < N; k++) queue_n[k] = queue[k];
    if (head_rel) begin
      for (int k = 0; k < N - 1; k++) queue_n[k] = queue[k+1];
      queue_n[N-1] = '0;
      count_n      = count - 1'b1;
    end
    // append this cycle's requests in ascending index order
    for (int i = 0; i < N; i++) begin
      if (req_i[i] && count_n < CNT_W'(N)) begin
        queue_n[count_n[IDX_W-1:0]] = IDX_W'(i);
        count_n = count_n + 1'b1;
      end
    end
  end

  always_ff @(posedge clk_i) begin
    if (!rst_ni) begin
      count <= '0;
      for (int k = 0; k < N; k++) queue[k] <= '0;
    end else begin
      count <= count_n;
      for (int k = 0; k < N; k++) queue[k] <= queue_n[k];
    end
  end

  // Only the granted input may release the output.
  a_rel_granted: assert property (@(posedge clk_i) disable iff (!rst_ni) (rel_i & ~gnt_o) == '0);
  // The queue never has to drop a request.
  a_no_overflow: assert property (@(posedge clk_i) disable iff (!rst_ni)
                                  (int'(count) - int'(head_rel) + $countones(req_i)) <= int'(N));

endmodule
