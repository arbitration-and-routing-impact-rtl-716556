// hermes_sr_output_port -- arbitration and switching of one router output.
//
// One of these sits at each of the five outputs of a Hermes-SR router. It
// holds the output's own FCFS arbiter and the multiplexer that connects the
// granted input port to the outgoing link, which together form one column of
// the router's crossbar.
//
// Requests: req_i[i] pulses with req_port_i[i] naming the wanted output; only
// the requests naming MY_PORT reach this arbiter. rel_i[i] pulses when input
// i sends its last flit.
// Link: tx_o is high when the granted input offers a flit (valid_i) and
// data_o carries it. credit_i is the receiver's credit (room for one flit);
// a flit moves when tx_o and credit_i are both high, and ack_o tells the
// granted input that its flit was taken. Everything here is combinational
// apart from the arbiter queue.
module hermes_sr_output_port
  import hermes_sr_pkg::*;
#(
  parameter int unsigned FLIT_W  = 16,
  parameter int unsigned N       = NPORTS,
  parameter port_e       MY_PORT = PORT_LOCAL
) (
  input  logic              clk_i,
  input  logic              rst_ni,
  // from the input ports' routing units
  input  logic [N-1:0]      req_i,
  input  port_e             req_port_i [N],
  input  logic [N-1:0]      rel_i,
  input  logic [N-1:0]      valid_i,
  input  logic [FLIT_W-1:0] data_i     [N],
  output logic [N-1:0]      ack_o,
  output logic [N-1:0]      gnt_o,
  // outgoing link
  output logic              tx_o,
  output logic [FLIT_W-1:0] data_o,
  input  logic              credit_i
);
  logic [N-1:0]         my_req;
  logic                 gnt_valid;
  logic [$clog2(N)-1:0] gnt_idx;

  always_comb begin
    for (int i = 0; i < N; i++) my_req[i] = req_i[i] && (req_port_i[i] == MY_PORT);
  end

  hermes_sr_fcfs_arbiter #(.N(N)) u_arb (
    .clk_i       (clk_i),
    .rst_ni      (rst_ni),
    .req_i       (my_req),
    .rel_i       (rel_i & gnt_o),
    .gnt_o       (gnt_o),
    .gnt_valid_o (gnt_valid),
    .gnt_idx_o   (gnt_idx)
  );

  assign tx_o   = gnt_valid && valid_i[gnt_idx];
  assign data_o = data_i[gnt_idx];

  always_comb begin
    ack_o = '0;
    if (tx_o && credit_i) ack_o[gnt_idx] = 1'b1;
  end

endmodule
