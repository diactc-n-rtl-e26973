// diactc_switch: DiaCTC(N), the diagonalized contention-tolerant crossbar
// switch, top level.
//
// N input ports, each with N VOQs and its own staggered-polling scheduler,
// drive an N x N fabric of crosspoint SEs. Nothing is arbitrated centrally:
// each port picks a cell on its own and sends it down the chosen output
// column. When two ports pick the same output, the downstream one intercepts
// the upstream one's cell and buffers it in its own VOQ for that output, to
// send it on later. Column j's bus starts at row j and wraps round to end at
// row j-1, so the load of intercepted cells is spread evenly over the ports
// instead of piling onto the last row as in an ordinary column order.
//
// Interface: one slot per clock. in_cell[i] is the cell arriving at input i
// (valid bit, dst in 0..N-1, src and payload carried through unchanged);
// in_drop[i] flags one that was lost because its VOQ was full. out_cell[j]
// is the cell delivered to output j, registered, so a cell entering in slot t
// leaves in slot t+1 at the earliest and appears on out_cell one cycle after
// that. The per-port event flags (tx, intercept, primary/secondary choice)
// are brought out for monitoring. Reset is asynchronous, active low, and
// empties every VOQ. Cells of one flow may leave out of order, as in the
// architecture; reassembly of packets from cells is outside this block.
module diactc_switch
  import diactc_pkg::*;
#(
  parameter int unsigned N     = 32,
  parameter int unsigned DEPTH = 64
) (
  input  logic         clk,
  input  logic         rst_n,
  input  cell_t        in_cell  [N],
  output logic [N-1:0] in_drop,
  output cell_t        out_cell [N],
  output logic [N-1:0] tx_valid,      // port i sent a cell this slot
  output logic [N-1:0] intercepted,   // port i intercepted a cell this slot
  output logic [N-1:0] sel_primary,   // port i served its PS choice
  output logic [N-1:0] sel_secondary  // port i served its SS choice
);

  logic  [N-1:0] tx_en;
  port_t         tx_col   [N];
  cell_t         tx_cell  [N];
  cell_t         rcv_cell [N];
  cell_t         fab_out  [N];

  for (genvar i = 0; i < N; i++) begin : g_port
    input_port #(
      .N    (N),
      .DEPTH(DEPTH),
      .PORT (i),
      .SEED (32'h9E37_79B9 ^ (32'(i + 1) * 32'h0101_0101))
    ) u_port (
      .clk, .rst_n,
      .ext_cell     (in_cell[i]),
      .ext_drop     (in_drop[i]),
      .tx_en        (tx_en[i]),
      .tx_col       (tx_col[i]),
      .tx_cell      (tx_cell[i]),
      .rcv_cell     (rcv_cell[i]),
      .sel_primary  (sel_primary[i]),
      .sel_secondary(sel_secondary[i])
    );
    assign intercepted[i] = rcv_cell[i].valid;
  end

  assign tx_valid = tx_en;

  diactc_fabric #(.N(N)) u_fabric (
    .tx_en, .tx_col, .tx_cell, .rcv_cell,
    .out_cell(fab_out)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int j = 0; j < N; j++) out_cell[j] <= NO_CELL;
    end else begin
      for (int j = 0; j < N; j++) out_cell[j] <= fab_out[j];
    end
  end

  // Every cell reaching the tail of column j is for output j.
  always_ff @(posedge clk) begin
    if (rst_n) begin
      for (int j = 0; j < N; j++) begin
        a_right_output: assert (!fab_out[j].valid || fab_out[j].dst == port_t'(j))
          else $error("diactc_switch: cell for %0d left on output %0d", fab_out[j].dst, j);
      end
    end
  end

endmodule
