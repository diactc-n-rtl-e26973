// tb_voq_buffer: self-checking test of the VOQ buffer (N=4, DEPTH=4 so the
// queues fill often). Each cycle it offers a random external cell (some for
// an out-of-range port, which must be ignored), serves a random non-empty
// VOQ and, in some of those slots, hands in an intercepted cell for the
// served VOQ. A queue-per-VOQ model predicts the HOL cell, the non-empty
// flags and the drop decision. It counts full-VOQ drops, intercept-plus-
// external slots for one VOQ, and full-VOQ slots rescued by a dequeue.
module tb_voq_buffer;
  import diactc_pkg::*;

  localparam int N = 4;
  localparam int DEPTH = 4;

  logic         clk = 0, rst_n = 0;
  cell_t        ext_cell, rcv_cell, hol_cell;
  logic         ext_drop, deq;
  port_t        deq_voq;
  logic [N-1:0] nonempty;

  voq_buffer #(.N(N), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_drop = 0, n_both = 0, n_full_ok = 0;
  cell_t q[N][$];
  int unsigned seq = 0;

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ext_cell = NO_CELL; rcv_cell = NO_CELL; deq = 0; deq_voq = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 5000; cyc++) begin
      int  ne[$];
      int  ev, after;
      bit  exp_drop;
      @(negedge clk);
      ext_cell = NO_CELL;
      rcv_cell = NO_CELL;
      if ($urandom % 4 != 0) begin
        ext_cell.valid = 1'b1;
        ext_cell.src   = port_t'($urandom % N);
        ext_cell.dst   = port_t'(($urandom % 16 == 0) ? N + 1 : $urandom % N);
        ext_cell.data  = 64'(seq++);
      end
      ne.delete();
      for (int k = 0; k < N; k++) if (q[k].size() > 0) ne.push_back(k);
      deq = (ne.size() > 0) && ($urandom % 3 != 0);
      deq_voq = deq ? port_t'(ne[$urandom % ne.size()]) : port_t'($urandom % N);
      if (deq && ($urandom % 2 == 1)) begin
        rcv_cell.valid = 1'b1;
        rcv_cell.src   = port_t'($urandom % N);
        rcv_cell.dst   = deq_voq;
        rcv_cell.data  = 64'(seq++) | 64'h8000_0000_0000_0000;
      end
      #1;
      for (int k = 0; k < N; k++) check(nonempty[k] == (q[k].size() > 0), "nonempty");
      if (q[deq_voq].size() > 0) check(hol_cell == q[deq_voq][0], "hol_cell");
      else                       check(!hol_cell.valid, "hol_cell empty");
      ev = ext_cell.valid && ext_cell.dst < N;
      exp_drop = 0;
      if (ev) begin
        after = q[ext_cell.dst].size() - ((deq && deq_voq == ext_cell.dst) ? 1 : 0)
                + ((rcv_cell.valid && rcv_cell.dst == ext_cell.dst) ? 1 : 0);
        exp_drop = after >= DEPTH;
        if (q[ext_cell.dst].size() == DEPTH && !exp_drop) n_full_ok++;
      end
      check(ext_drop == exp_drop, "ext_drop");
      if (exp_drop) n_drop++;
      if (ev && rcv_cell.valid && rcv_cell.dst == ext_cell.dst) n_both++;
      @(posedge clk);
      if (deq) void'(q[deq_voq].pop_front());
      if (rcv_cell.valid) q[rcv_cell.dst].push_back(rcv_cell);
      if (ev && !exp_drop) q[ext_cell.dst].push_back(ext_cell);
    end
    check(n_drop > 0 && n_both > 0 && n_full_ok > 0, "coverage");
    $display("drops=%0d rcv+ext same VOQ=%0d full VOQ accepted=%0d", n_drop, n_both, n_full_ok);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
