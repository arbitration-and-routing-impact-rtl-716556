// hermes_sr_router -- five-port Hermes-SR router with distributed arbitration.
//
// The router connects four mesh neighbours (east, west, north, south) and a
// local processing element. Packets are switched wormhole style: once an
// input holds an output, the whole packet streams through before the output
// is given to anyone else. Following the distributed-arbitration organisation
// of Hermes-SR, nothing is shared between inputs except the outputs
// themselves:
//
//   * each input port has an input buffer (hermes_sr_input_buffer) and its
//     own routing unit (hermes_sr_routing_unit), which reads the source-route
//     flit at the head of each packet and asks the named output for service;
//   * each output port has its own first-come first-served arbiter and
//     multiplexer (hermes_sr_output_port), so packets that go to different
//     outputs cross the router at the same time.
//
// Links (per port p, index = hermes_sr_pkg::port_e):
//   rx_i[p], data_i[p], credit_o[p]  incoming link; a flit is taken when
//                                    rx_i and credit_o are high at the edge
//   tx_o[p], data_o[p], credit_i[p]  outgoing link, same rule
//
// Timing without contention: a route flit written into an empty input buffer
// at edge 0 is consumed at edge 1, the output is granted after edge 1, and
// the next flit of the packet leaves on the output link in the cycle after
// edge 1, i.e. it enters the next router's buffer at edge 2. After that, one
// flit per clock cycle moves through, which is the link bandwidth of the
// design (16 bits per cycle; 800 Mbit/s at 50 MHz). These cycle counts are
// this design's, the document gives no router latency.
module hermes_sr_router
  import hermes_sr_pkg::*;
#(
  parameter int unsigned FLIT_W    = 16,
  parameter int unsigned BUF_DEPTH = 4
) (
  input  logic                           clk_i,
  input  logic                           rst_ni,
  input  logic [NPORTS-1:0]              rx_i,
  input  logic [NPORTS-1:0][FLIT_W-1:0]  data_i,
  output logic [NPORTS-1:0]              credit_o,
  output logic [NPORTS-1:0]              tx_o,
  output logic [NPORTS-1:0][FLIT_W-1:0]  data_o,
  input  logic [NPORTS-1:0]              credit_i
);
  logic              buf_empty [NPORTS];
  logic [FLIT_W-1:0] buf_head  [NPORTS];
  logic [NPORTS-1:0] buf_pop;
  logic [NPORTS-1:0] req, rel, valid;
  port_e             req_port  [NPORTS];
  logic [NPORTS-1:0] ack_by_out  [NPORTS];   // [output] -> per input
  logic [NPORTS-1:0] gnt_by_out  [NPORTS];
  logic [NPORTS-1:0] ack;

  for (genvar p = 0; p < NPORTS; p++) begin : g_in
    hermes_sr_input_buffer #(.FLIT_W(FLIT_W), .DEPTH(BUF_DEPTH)) u_buf (
      .clk_i    (clk_i),
      .rst_ni   (rst_ni),
      .rx_i     (rx_i[p]),
      .data_i   (data_i[p]),
      .credit_o (credit_o[p]),
      .empty_o  (buf_empty[p]),
      .head_o   (buf_head[p]),
      .pop_i    (buf_pop[p])
    );

    hermes_sr_routing_unit #(.FLIT_W(FLIT_W)) u_route (
      .clk_i      (clk_i),
      .rst_ni     (rst_ni),
      .empty_i    (buf_empty[p]),
      .head_i     (buf_head[p]),
      .pop_o      (buf_pop[p]),
      .req_o      (req[p]),
      .req_port_o (req_port[p]),
      .release_o  (rel[p]),
      .valid_o    (valid[p]),
      .ack_i      (ack[p])
    );
  end

  for (genvar o = 0; o < NPORTS; o++) begin : g_out
    hermes_sr_output_port #(.FLIT_W(FLIT_W), .N(NPORTS), .MY_PORT(port_e'(o))) u_out (
      .clk_i      (clk_i),
      .rst_ni     (rst_ni),
      .req_i      (req),
      .req_port_i (req_port),
      .rel_i      (rel),
      .valid_i    (valid),
      .data_i     (buf_head),
      .ack_o      (ack_by_out[o]),
      .gnt_o      (gnt_by_out[o]),
      .tx_o       (tx_o[o]),
      .data_o     (data_o[o]),
      .credit_i   (credit_i[o])
    );
  end

  // An input is served by at most one output, so the acknowledges can be ORed.
  always_comb begin
    ack = '0;
    for (int o = 0; o < NPORTS; o++) ack |= ack_by_out[o];
  end

  // No input is granted by two outputs at once.
  for (genvar i = 0; i < NPORTS; i++) begin : g_chk
    logic [NPORTS-1:0] held_by;
    always_comb for (int o = 0; o < NPORTS; o++) held_by[o] = gnt_by_out[o][i];
    a_one_output: assert property (@(posedge clk_i) disable iff (!rst_ni) $onehot0(held_by));
  end

endmodule
