// tb_sp_scheduler: self-checking test of the SP scheduler of port 3 in an
// 8-port switch. Each slot it applies a random non-empty set and checks the
// rule: serve the primary VOQ (3 + t) mod 8 if it holds a cell, otherwise a
// non-empty VOQ chosen by the secondary, otherwise nothing. It counts slots
// of each outcome and fails if one never happened.
module tb_sp_scheduler;
  import diactc_pkg::*;

  localparam int N = 8;
  localparam int PORT = 3;

  logic         clk = 0, rst_n = 0;
  logic [N-1:0] nonempty;
  logic         sel_valid, sel_primary, sel_secondary;
  port_t        sel_voq;

  sp_scheduler #(.N(N), .PORT(PORT), .SEED(32'hCAFE_0001)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_prim = 0, n_sec = 0, n_null = 0;

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t nonempty=%b sel=%0d v=%b p=%b s=%b", what, $time,
               nonempty, sel_voq, sel_valid, sel_primary, sel_secondary);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    nonempty = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      int c;
      c = (PORT + t) % N;
      nonempty = ($urandom % 6 == 0) ? '0 : N'($urandom);
      #1;
      if (nonempty[c]) begin
        check(sel_valid && sel_primary && !sel_secondary && sel_voq == port_t'(c), "primary");
        n_prim++;
      end else if (nonempty != '0) begin
        check(sel_valid && !sel_primary && sel_secondary && sel_voq < N
              && nonempty[sel_voq[2:0]], "secondary");
        n_sec++;
      end else begin
        check(!sel_valid && !sel_primary && !sel_secondary, "null");
        n_null++;
      end
      @(negedge clk);
    end
    check(n_prim > 0 && n_sec > 0 && n_null > 0, "all outcomes seen");
    $display("primary=%0d secondary=%0d null=%0d", n_prim, n_sec, n_null);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
