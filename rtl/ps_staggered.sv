// ps_staggered: primary sub-scheduler PS_i of the staggered polling (SP)
// scheme for input port PORT.
//
// Each time slot it names one VOQ index c_i(t) to poll. The indices of the N
// ports are all different in every slot, so the cells the primary
// sub-schedulers pick form a conflict-free input/output matching and are
// never intercepted by one another. This design uses the rotation
// c_i(t) = (i + t) mod N, kept by a counter that starts at PORT when reset
// is released; all ports leave reset together, which keeps them staggered.
// ps_valid tells whether the polled VOQ holds a cell (PS_i(t) is not null).
// The uniqueness requirement follows the SP scheme; the rotation formula is
// this design's choice. Timing: c updates on every clock edge; ps_valid is
// combinational from nonempty.
module ps_staggered
  import diactc_pkg::*;
#(
  parameter int unsigned N    = 32,
  parameter int unsigned PORT = 0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] nonempty,
  output port_t        c,
  output logic         ps_valid
);

  localparam int unsigned IDX_W = $clog2(N);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                   c <= port_t'(PORT % N);
    else if (c == port_t'(N - 1)) c <= '0;
    else                          c <= c + port_t'(1);
  end

  assign ps_valid = nonempty[c[IDX_W-1:0]];

endmodule
