// sp_scheduler: scheduler S_i of input port PORT, staggered polling (SP)
// with a random secondary pattern.
//
// It runs the primary sub-scheduler PS_i and the secondary sub-scheduler
// SS_i in parallel on the same non-empty flags and combines them:
// the primary result wins when the VOQ it polls holds a cell; otherwise the
// secondary result is used; when both are null no VOQ is served this slot.
// sel_valid/sel_voq name the VOQ served and therefore the column whose SE
// is put in RT state; sel_primary/sel_secondary report which sub-scheduler
// decided. This priority rule follows the SP scheme. Timing: the selection
// is combinational within the slot; both sub-schedulers step every clock.
module sp_scheduler
  import diactc_pkg::*;
#(
  parameter int unsigned N    = 32,
  parameter int unsigned PORT = 0,
  parameter logic [31:0] SEED = 32'h1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] nonempty,
  output logic         sel_valid,
  output port_t        sel_voq,
  output logic         sel_primary,
  output logic         sel_secondary
);

  port_t c, q;
  logic  ps_valid, ss_valid;

  ps_staggered #(.N(N), .PORT(PORT)) u_ps (
    .clk, .rst_n, .nonempty, .c, .ps_valid
  );

  ss_random #(.N(N), .SEED(SEED)) u_ss (
    .clk, .rst_n, .nonempty, .q, .ss_valid
  );

  always_comb begin
    sel_primary   = ps_valid;
    sel_secondary = !ps_valid && ss_valid;
    sel_valid     = ps_valid || ss_valid;
    sel_voq       = ps_valid ? c : q;
  end

endmodule
