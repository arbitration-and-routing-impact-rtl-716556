// hermes_sr_input_buffer -- flit FIFO at one router input, with credit output.
//
// Hermes-SR routers buffer flits at their inputs and use credit based flow
// control. Here the credit is a level: credit_o is high while the buffer has
// room for one more flit, and the upstream sender may present a flit (rx_i
// high) in any cycle; the flit is stored at the clock edge when rx_i and
// credit_o are both high. The buffer depth (DEPTH) is the parameter the
// evaluation varies (4, 8, 16, 32 flits); 4 is the default, the size used for
// the highlighted Hermes-SR configuration.
//
// The buffer is a circular array with read and write pointers and an
// occupancy counter. The oldest flit is always visible on head_o; pop_i
// removes it at the next edge. A flit written into an empty buffer is visible
// on head_o one cycle after it was written (no fall-through). Reset is
// synchronous and active low (rst_ni), an assumption of this design.
module hermes_sr_input_buffer #(
  parameter int unsigned FLIT_W = 16,
  parameter int unsigned DEPTH  = 4
) (
  input  logic              clk_i,
  input  logic              rst_ni,
  // upstream link
  input  logic              rx_i,
  input  logic [FLIT_W-1:0] data_i,
  output logic              credit_o,
  // router side
  output logic              empty_o,
  output logic [FLIT_W-1:0] head_o,
  input  logic              pop_i
);
  localparam int unsigned PTR_W = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CNT_W = $clog2(DEPTH + 1);

  logic [FLIT_W-1:0] mem [DEPTH];
  logic [PTR_W-1:0]  wr_ptr, rd_ptr;
  logic [CNT_W-1:0]  count;
  logic              push, pop;

  assign credit_o = (count != CNT_W'(DEPTH));
  assign empty_o  = (count == '0);
  assign head_o   = mem[rd_ptr];
  assign push     = rx_i && credit_o;
  assign pop      = pop_i && !empty_o;

  function automatic logic [PTR_W-1:0] next_ptr(logic [PTR_W-1:0] p);
    return (p == PTR_W'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk_i) begin
    if (!rst_ni) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (push) wr_ptr <= next_ptr(wr_ptr);
      if (pop)  rd_ptr <= next_ptr(rd_ptr);
      case ({push, pop})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: count <= count;
      endcase
    end
  end

  always_ff @(posedge clk_i) begin
    if (push) mem[wr_ptr] <= data_i;
  end

  // The router never pops an empty buffer.
  a_no_underflow: assert property (@(posedge clk_i) disable iff (!rst_ni) pop_i |-> !empty_o);

endmodule
