// tb_ps_staggered: self-checking test of the primary sub-scheduler.
// Five instances (ports 0..4 of a 5-port switch) run side by side. Each slot
// the test checks c_i(t) = (i + t) mod N against its own slot counter, that
// the five indices are all different, and that ps_valid reflects whether the
// polled VOQ is non-empty.
module tb_ps_staggered;
  import diactc_pkg::*;

  localparam int N = 5;

  logic         clk = 0, rst_n = 0;
  logic [N-1:0] nonempty;
  port_t        c   [N];
  logic         psv [N];

  for (genvar i = 0; i < N; i++) begin : g_ps
    ps_staggered #(.N(N), .PORT(i)) dut (
      .clk, .rst_n, .nonempty, .c(c[i]), .ps_valid(psv[i])
    );
  end

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    nonempty = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int t = 0; t < 200; t++) begin
      logic [N-1:0] seen;
      nonempty = N'($urandom);
      #1;
      seen = '0;
      for (int i = 0; i < N; i++) begin
        check(c[i] == port_t'((i + t) % N), "c_i(t)");
        check(psv[i] == nonempty[(i + t) % N], "ps_valid");
        seen[c[i]] = 1'b1;
      end
      check(seen == '1, "indices unique");
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
