// hermes_sr_noc -- X_SIZE x Y_SIZE mesh of Hermes-SR routers (5x5 by default).
//
// Routers are placed on a 2D mesh; router (x, y) has index n = y*X_SIZE + x.
// East is +x, north is +y. The east output of router (x, y) drives the west
// input of router (x+1, y), the north output drives the south input of
// router (x, y+1), and the reverse links likewise. The local port of every
// router is brought out on the local_* arrays, indexed by n, for the
// processing element (or its network interface) attached there.
//
// Local link protocol (both directions): a flit moves at a clock edge where
// the sender's tx/rx is high and the receiver's credit is high.
//   local_rx_i/local_data_i/local_credit_o  element -> network
//   local_tx_o/local_data_o/local_credit_i  network -> element
//
// Packets are source routed (see hermes_sr_pkg for the layout): the sender
// lists the output port for every router on the path, ending with LOCAL at
// the destination router. Paths are planned at design time; for freedom
// from deadlock they must all follow one deadlock-free routing algorithm
// (XY or a turn-model algorithm). The network checks none of this. Ports on
// the mesh border have no neighbour: their inputs are tied idle and their
// outputs see no credit, so a route that leaves the mesh stalls.
//
// Mesh size, flit width and the 4-flit buffer default follow the evaluated
// configuration; the border handling is this design's choice.
module hermes_sr_noc
  import hermes_sr_pkg::*;
#(
  parameter int unsigned X_SIZE    = 5,
  parameter int unsigned Y_SIZE    = 5,
  parameter int unsigned FLIT_W    = 16,
  parameter int unsigned BUF_DEPTH = 4,
  localparam int unsigned NR       = X_SIZE * Y_SIZE
) (
  input  logic                      clk_i,
  input  logic                      rst_ni,
  input  logic [NR-1:0]             local_rx_i,
  input  logic [NR-1:0][FLIT_W-1:0] local_data_i,
  output logic [NR-1:0]             local_credit_o,
  output logic [NR-1:0]             local_tx_o,
  output logic [NR-1:0][FLIT_W-1:0] local_data_o,
  input  logic [NR-1:0]             local_credit_i
);
  logic [NPORTS-1:0]             rx       [NR];
  logic [NPORTS-1:0][FLIT_W-1:0] din      [NR];
  logic [NPORTS-1:0]             credit_o [NR];
  logic [NPORTS-1:0]             tx       [NR];
  logic [NPORTS-1:0][FLIT_W-1:0] dout     [NR];
  logic [NPORTS-1:0]             credit_i [NR];

  for (genvar y = 0; y < Y_SIZE; y++) begin : g_y
    for (genvar x = 0; x < X_SIZE; x++) begin : g_x
      localparam int unsigned N = y * X_SIZE + x;

      hermes_sr_router #(.FLIT_W(FLIT_W), .BUF_DEPTH(BUF_DEPTH)) u_router (
        .clk_i    (clk_i),
        .rst_ni   (rst_ni),
        .rx_i     (rx[N]),
        .data_i   (din[N]),
        .credit_o (credit_o[N]),
        .tx_o     (tx[N]),
        .data_o   (dout[N]),
        .credit_i (credit_i[N])
      );

      // local port
      assign rx[N][PORT_LOCAL]       = local_rx_i[N];
      assign din[N][PORT_LOCAL]      = local_data_i[N];
      assign local_credit_o[N]       = credit_o[N][PORT_LOCAL];
      assign local_tx_o[N]           = tx[N][PORT_LOCAL];
      assign local_data_o[N]         = dout[N][PORT_LOCAL];
      assign credit_i[N][PORT_LOCAL] = local_credit_i[N];

      // east side: neighbour (x+1, y) west port
      if (x + 1 < X_SIZE) begin : g_e
        assign rx[N][PORT_EAST]       = tx[N+1][PORT_WEST];
        assign din[N][PORT_EAST]      = dout[N+1][PORT_WEST];
        assign credit_i[N][PORT_EAST] = credit_o[N+1][PORT_WEST];
      end else begin : g_e_edge
        assign rx[N][PORT_EAST]       = 1'b0;
        assign din[N][PORT_EAST]      = '0;
        assign credit_i[N][PORT_EAST] = 1'b0;
      end
      // west side: neighbour (x-1, y) east port
      if (x > 0) begin : g_w
        assign rx[N][PORT_WEST]       = tx[N-1][PORT_EAST];
        assign din[N][PORT_WEST]      = dout[N-1][PORT_EAST];
        assign credit_i[N][PORT_WEST] = credit_o[N-1][PORT_EAST];
      end else begin : g_w_edge
        assign rx[N][PORT_WEST]       = 1'b0;
        assign din[N][PORT_WEST]      = '0;
        assign credit_i[N][PORT_WEST] = 1'b0;
      end
      // north side: neighbour (x, y+1) south port
      if (y + 1 < Y_SIZE) begin : g_n
        assign rx[N][PORT_NORTH]       = tx[N+X_SIZE][PORT_SOUTH];
        assign din[N][PORT_NORTH]      = dout[N+X_SIZE][PORT_SOUTH];
        assign credit_i[N][PORT_NORTH] = credit_o[N+X_SIZE][PORT_SOUTH];
      end else begin : g_n_edge
        assign rx[N][PORT_NORTH]       = 1'b0;
        assign din[N][PORT_NORTH]      = '0;
        assign credit_i[N][PORT_NORTH] = 1'b0;
      end
      // south side: neighbour (x, y-1) north port
      if (y > 0) begin : g_s
        assign rx[N][PORT_SOUTH]       = tx[N-X_SIZE][PORT_NORTH];
        assign din[N][PORT_SOUTH]      = dout[N-X_SIZE][PORT_NORTH];
        assign credit_i[N][PORT_SOUTH] = credit_o[N-X_SIZE][PORT_NORTH];
      end else begin : g_s_edge
        assign rx[N][PORT_SOUTH]       = 1'b0;
        assign din[N][PORT_SOUTH]      = '0;
        assign credit_i[N][PORT_SOUTH] = 1'b0;
      end
    end
  end

endmodule
