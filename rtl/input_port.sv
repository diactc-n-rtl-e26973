// input_port: input port i of the DiaCTC(N) switch.
//
// It holds the port's N VOQs (voq_buffer) and its distributed scheduler S_i
// (sp_scheduler). Every slot the scheduler looks only at this port's own
// non-empty flags, with no knowledge of other ports, and picks the VOQ to
// serve. The port then drives the fabric: tx_en/tx_col set the SE of column
// tx_col in its row to RT state, and tx_cell is that VOQ's HOL cell. In the
// same slot the fabric may hand back rcv_cell, a cell intercepted from an
// upstream port on that column, which is stored in the served VOQ. External
// arrivals come in on ext_cell, at most one per slot; ext_drop flags one
// that found its VOQ full.
// Timing: one slot per clock. The choice and tx_* are combinational from
// registered state; VOQ contents update on the clock edge, so a cell that
// arrives in slot t can be sent in slot t+1 at the earliest.
module input_port
  import diactc_pkg::*;
#(
  parameter int unsigned N     = 32,
  parameter int unsigned DEPTH = 64,
  parameter int unsigned PORT  = 0,
  parameter logic [31:0] SEED  = 32'h1
) (
  input  logic  clk,
  input  logic  rst_n,
  input  cell_t ext_cell,
  output logic  ext_drop,
  output logic  tx_en,
  output port_t tx_col,
  output cell_t tx_cell,
  input  cell_t rcv_cell,
  output logic  sel_primary,
  output logic  sel_secondary
);

  logic [N-1:0] nonempty;
  logic         sel_valid;
  port_t        sel_voq;
  cell_t        hol_cell;

  sp_scheduler #(.N(N), .PORT(PORT), .SEED(SEED)) u_sched (
    .clk, .rst_n, .nonempty,
    .sel_valid, .sel_voq, .sel_primary, .sel_secondary
  );

  voq_buffer #(.N(N), .DEPTH(DEPTH)) u_voq (
    .clk, .rst_n,
    .ext_cell, .ext_drop,
    .rcv_cell,
    .deq     (sel_valid),
    .deq_voq (sel_voq),
    .hol_cell,
    .nonempty
  );

  assign tx_en   = sel_valid;
  assign tx_col  = sel_voq;
  assign tx_cell = sel_valid ? hol_cell : NO_CELL;

endmodule
