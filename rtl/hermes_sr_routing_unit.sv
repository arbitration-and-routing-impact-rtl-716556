// hermes_sr_routing_unit -- source-route reader and packet tracker of one input port.
//
// In Hermes-SR each input port has its own routing unit, so that requests
// for different outputs are made and served in parallel. Routing is source
// routing: the packet header lists, in order, the output port every router on
// the path must use, followed by a route terminator flit and a payload-size
// flit (see hermes_sr_pkg). This unit does, for every packet:
//
//   S_IDLE    the head flit of the input buffer is this router's route flit.
//             It is removed from the buffer and, in the same cycle, req_o
//             pulses with req_port_o naming the wanted output port. That output
//             port's arbiter queues the request.
//   S_ROUTE   remaining route flits are forwarded until the terminator flit
//             has been forwarded,
//   S_SIZE    the size flit is forwarded and loaded into a flit counter,
//   S_PAYLOAD the payload is forwarded, counting down.
//
// While forwarding, valid_o is high whenever the buffer holds a flit; the
// flit itself is the buffer head. A flit moves when the output port that has
// granted this input returns ack_i (grant and downstream credit). release_o
// pulses together with the transfer of the last flit of the packet (the size
// flit for an empty payload), which frees the output for the next queued
// input. The next packet's route flit can be taken in the following cycle.
// req_port_o is the port field of the buffer head, passed straight through;
// it is meaningful only while req_o is high.
//
// The packet layout comes from the description of Hermes-SR; removing the
// consumed route flit, the state machine and the flit codes are this design's
// own choices. Reset is synchronous, active low.
module hermes_sr_routing_unit
  import hermes_sr_pkg::*;
#(
  parameter int unsigned FLIT_W = 16
) (
  input  logic              clk_i,
  input  logic              rst_ni,
  // input buffer
  input  logic              empty_i,
  input  logic [FLIT_W-1:0] head_i,
  output logic              pop_o,
  // request / release towards the output ports
  output logic              req_o,
  output port_e             req_port_o,
  output logic              release_o,
  // flit transfer through the granted output
  output logic              valid_o,
  input  logic              ack_i
);
  typedef enum logic [1:0] {S_IDLE, S_ROUTE, S_SIZE, S_PAYLOAD} state_e;

  state_e            state, state_n;
  logic [FLIT_W-1:0] remaining, remaining_n;
  logic              xfer, last;

  assign req_o      = (state == S_IDLE) && !empty_i;
  assign req_port_o = port_e'(head_i[PORT_W-1:0]);
  assign valid_o    = (state != S_IDLE) && !empty_i;
  assign xfer       = valid_o && ack_i;
  assign pop_o      = req_o || xfer;

  always_comb begin
    state_n     = state;
    remaining_n = remaining;
    last        = 1'b0;
    case (state)
      S_IDLE:  if (req_o) state_n = S_ROUTE;
      S_ROUTE: if (xfer && head_i[PORT_W-1:0] == ROUTE_END) state_n = S_SIZE;
      S_SIZE:
        if (xfer) begin
          remaining_n = head_i;
          if (head_i == '0) begin
            last    = 1'b1;
            state_n = S_IDLE;
          end else begin
            state_n = S_PAYLOAD;
          end
        end
      S_PAYLOAD:
        if (xfer) begin
          remaining_n = remaining - 1'b1;
          if (remaining == FLIT_W'(1)) begin
            last    = 1'b1;
            state_n = S_IDLE;
          end
        end
      default: state_n = S_IDLE;
    endcase
  end

  assign release_o = last;

  always_ff @(posedge clk_i) begin
    if (!rst_ni) begin
      state     <= S_IDLE;
      remaining <= '0;
    end else begin
      state     <= state_n;
      remaining <= remaining_n;
    end
  end

  // A route flit taken in S_IDLE must name one of the five ports.
  a_valid_route: assert property (@(posedge clk_i) disable iff (!rst_ni)
                                  req_o |-> head_i[PORT_W-1:0] <= PORT_W'(PORT_LOCAL));
  // A flit is only acknowledged when one is offered.
  a_ack_valid:   assert property (@(posedge clk_i) disable iff (!rst_ni) ack_i |-> valid_o);

endmodule
