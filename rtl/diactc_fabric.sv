// diactc_fabric: the N x N diagonalized contention-tolerant crossbar.
//
// Row i of SEs is driven by input port i; column j ends at output port j.
// What makes the fabric "diagonalized" is the order of the SEs along each
// column bus. Column j starts at its head SE, row j, and runs down through
// rows j+1, j+2, ... wrapping modulo N, to its tail SE, row (j-1) mod N,
// whose column output is output port j. So every row holds exactly one head
// SE and exactly one tail SE, and no port is the bottom of every column.
// The head SE's column input is tied to "no cell", which also cuts the ring:
// there is no combinational loop.
//
// Each slot, input port i raises tx_en[i] and names the column tx_col[i] it
// sends on; that SE is put in RT state and every other SE of the row stays in
// CR. A cell put on column j travels down the bus until it meets the next SE
// in RT state, which intercepts it for its own port (rcv_cell of that row),
// or, if none is below it, reaches output j. Since only one SE per row can
// be in RT, each port intercepts at most one cell per slot, and that cell is
// always for the column the port is itself sending on.
//
// Timing: combinational, one slot settles in one cycle. The column ordering
// and the SE behaviour follow the architecture; the interface is this
// design's own.
module diactc_fabric
  import diactc_pkg::*;
#(
  parameter int unsigned N = 32
) (
  input  logic [N-1:0] tx_en,      // port i sends this slot
  input  port_t        tx_col  [N],// column (output) port i sends to
  input  cell_t        tx_cell [N],// the cell port i sends
  output cell_t        rcv_cell[N],// cell intercepted by port i's RT SE
  output cell_t        out_cell[N] // cell leaving the tail of column j
);

  initial begin
    assert (N >= 2 && N <= (1 << PORT_W))
      else $error("diactc_fabric: N=%0d out of range", N);
  end

  for (genvar i = 0; i < N; i++) begin : g_row
    for (genvar j = 0; j < N; j++) begin : g_col
      // Row of the SE directly upstream of SE(i,j) on column j's bus.
      localparam int unsigned UP = (i + N - 1) % N;

      se_state_e state;
      cell_t     row_i, col_i, row_o, col_o, rcv_o;
      cell_t     rcv_acc;   // OR of rcv outputs of SE(i,0..j)

      assign state = (tx_en[i] && tx_col[i] == port_t'(j)) ? SE_RT : SE_CR;

      if (j == 0) begin : g_row_first
        assign row_i = tx_cell[i];
      end else begin : g_row_chain
        assign row_i = g_col[j-1].row_o;
      end

      if (i == j) begin : g_head
        assign col_i = NO_CELL;
      end else begin : g_body
        assign col_i = g_row[UP].g_col[j].col_o;
      end

      se u_se (
        .state  (state),
        .row_in (row_i),
        .col_in (col_i),
        .row_out(row_o),
        .col_out(col_o),
        .rcv_out(rcv_o)
      );

      // At most one SE of a row is in RT, the rest give NO_CELL, so OR merges.
      if (j == 0) begin : g_rcv_first
        assign rcv_acc = rcv_o;
      end else begin : g_rcv_chain
        assign rcv_acc = g_col[j-1].rcv_acc | rcv_o;
      end
    end

    assign rcv_cell[i] = g_col[N-1].rcv_acc;
  end

  for (genvar j = 0; j < N; j++) begin : g_out
    assign out_cell[j] = g_row[(j + N - 1) % N].g_col[j].col_o;
  end

endmodule
