// ss_random: secondary sub-scheduler SS_i of the SP scheme, random pattern.
//
// It picks one VOQ index q out of the set of non-empty VOQs. A 32-bit
// Galois LFSR (polynomial x^32+x^22+x^2+x+1), seeded per port with SEED,
// advances every slot and gives a pseudo-random start index r = lfsr mod N;
// the first non-empty VOQ at or after r, wrapping round, is chosen. When no
// VOQ is non-empty, ss_valid is low (SS_i(t) is null).
// The random choice over the non-empty set follows the SP random pattern;
// the LFSR and the random-start search are this design's choice, picked
// because they need only one N-input search per port. They favour a VOQ
// that follows a run of empty ones, so the choice is not exactly uniform.
// Timing: q and ss_valid are combinational from nonempty and the LFSR state.
module ss_random
  import diactc_pkg::*;
#(
  parameter int unsigned N    = 32,
  parameter logic [31:0] SEED = 32'h1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] nonempty,
  output port_t        q,
  output logic         ss_valid
);

  logic [31:0] lfsr;
  port_t       start;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      lfsr <= (SEED == '0) ? 32'h1 : SEED;
    else if (lfsr[0]) lfsr <= (lfsr >> 1) ^ 32'h8020_0003;
    else              lfsr <= lfsr >> 1;
  end

  assign start = port_t'(lfsr[30:0] % 31'(N));

  always_comb begin
    int unsigned idx;
    q        = '0;
    ss_valid = 1'b0;
    for (int unsigned k = 0; k < N; k++) begin
      idx = (int'(start) + k) % N;
      if (!ss_valid && nonempty[idx]) begin
        q        = port_t'(idx);
        ss_valid = 1'b1;
      end
    end
  end

endmodule
