// se: one crosspoint switching element (SE) of the contention-tolerant fabric.
//
// An SE sits where row i (driven by input port i) crosses output column j.
// It has three inputs (state, row_in, col_in) and three outputs (row_out,
// col_out, rcv_out) and is purely combinational: a whole time slot's path
// through the fabric settles within one clock cycle.
//
//   CR (cross)               row_in -> row_out, col_in -> col_out, rcv_out empty
//   RT (receive-and-transmit) row_in -> col_out, col_in -> rcv_out, row_out empty
//
// In RT the port's own cell is put onto the column bus and whatever cell was
// coming down the bus from an upstream port is intercepted and handed to this
// row's input port, which buffers it. That interception is how the fabric
// tolerates several ports sending to one output in the same slot. The two
// states and their behaviour follow the switch architecture; emptying row_out
// in RT (nothing travels past the selected crosspoint) is this design's choice.
module se
  import diactc_pkg::*;
(
  input  se_state_e state,
  input  cell_t     row_in,
  input  cell_t     col_in,
  output cell_t     row_out,
  output cell_t     col_out,
  output cell_t     rcv_out
);

  always_comb begin
    if (state == SE_RT) begin
      row_out = NO_CELL;
      col_out = row_in;
      rcv_out = col_in;
    end else begin
      row_out = row_in;
      col_out = col_in;
      rcv_out = NO_CELL;
    end
  end

endmodule
