// tb_ss_random: self-checking test of the random secondary sub-scheduler
// (N=8). With random non-empty sets it checks that the chosen index is in
// the set and that the result is null exactly when the set is empty. With a
// single non-empty VOQ it must pick that VOQ. With all VOQs non-empty every
// index must be picked, and none more than twice as often as its fair share.
module tb_ss_random;
  import diactc_pkg::*;

  localparam int N = 8;

  logic         clk = 0, rst_n = 0;
  logic [N-1:0] nonempty;
  port_t        q;
  logic         ss_valid;

  ss_random #(.N(N), .SEED(32'h1234_5678)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int hits [N];

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t nonempty=%b q=%0d v=%b", what, $time, nonempty, q, ss_valid);
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
    for (int k = 0; k < N; k++) hits[k] = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      nonempty = ($urandom % 8 == 0) ? '0 : N'($urandom);
      #1;
      check(ss_valid == (nonempty != '0), "null iff empty");
      if (ss_valid) check(nonempty[q[2:0]] && q < N, "choice in set");
      @(negedge clk);
    end
    for (int t = 0; t < 200; t++) begin
      int k;
      k = $urandom % N;
      nonempty = N'(1) << k;
      #1;
      check(ss_valid && q == port_t'(k), "single non-empty");
      @(negedge clk);
    end
    for (int t = 0; t < 4000; t++) begin
      nonempty = '1;
      #1;
      hits[q[2:0]]++;
      @(negedge clk);
    end
    for (int k = 0; k < N; k++) begin
      check(hits[k] > 0 && hits[k] < 2 * 4000 / N, "spread over all VOQs");
      $display("VOQ %0d picked %0d times", k, hits[k]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
