// tb_input_port: self-checking test of one input port (port 1 of a 4-port
// switch, VOQ depth 4). Each slot it offers a random external cell and,
// when the port sends, sometimes hands back an intercepted cell for the
// column being sent on, as the fabric would. A per-VOQ queue model checks
// that the port sends exactly when it holds a cell, sends the HOL cell of
// the VOQ it names, honours the primary poll (1 + t) mod 4 first, and drops
// an external cell only when its VOQ would overflow.
module tb_input_port;
  import diactc_pkg::*;

  localparam int N = 4;
  localparam int DEPTH = 4;
  localparam int PORT = 1;

  logic  clk = 0, rst_n = 0;
  cell_t ext_cell, tx_cell, rcv_cell;
  logic  ext_drop, tx_en, sel_primary, sel_secondary;
  port_t tx_col;

  input_port #(.N(N), .DEPTH(DEPTH), .PORT(PORT), .SEED(32'h0BAD_F00D)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_prim = 0, n_sec = 0, n_rcv = 0, n_drop = 0;
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
    ext_cell = NO_CELL; rcv_cell = NO_CELL;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int t = 0; t < 4000; t++) begin
      int  c, any, after;
      bit  exp_drop;
      c = (PORT + t) % N;
      any = 0;
      for (int k = 0; k < N; k++) if (q[k].size() > 0) any = 1;
      ext_cell = NO_CELL;
      if ($urandom % 3 != 0) begin
        ext_cell.valid = 1'b1;
        ext_cell.src   = port_t'(PORT);
        ext_cell.dst   = port_t'($urandom % N);
        ext_cell.data  = 64'(seq++);
      end
      rcv_cell = NO_CELL;
      #1;
      check(tx_en == (any != 0), "tx_en");
      if (tx_en) begin
        check(tx_col < N && q[tx_col].size() > 0, "tx_col non-empty");
        if (tx_col < N && q[tx_col].size() > 0) check(tx_cell == q[tx_col][0], "HOL cell sent");
        if (q[c].size() > 0) begin
          check(sel_primary && tx_col == port_t'(c), "primary first");
          n_prim++;
        end else begin
          check(sel_secondary, "secondary otherwise");
          n_sec++;
        end
        if ($urandom % 3 == 0) begin
          rcv_cell.valid = 1'b1;
          rcv_cell.src   = port_t'($urandom % N);
          rcv_cell.dst   = tx_col;
          rcv_cell.data  = 64'(seq++) | 64'h4000_0000_0000_0000;
        end
      end else begin
        check(!tx_cell.valid, "idle sends nothing");
      end
      #1;
      exp_drop = 0;
      if (ext_cell.valid) begin
        after = q[ext_cell.dst].size() - ((tx_en && tx_col == ext_cell.dst) ? 1 : 0)
                + ((rcv_cell.valid && rcv_cell.dst == ext_cell.dst) ? 1 : 0);
        exp_drop = after >= DEPTH;
      end
      check(ext_drop == exp_drop, "ext_drop");
      @(posedge clk);
      if (tx_en) void'(q[tx_col].pop_front());
      if (rcv_cell.valid) begin q[rcv_cell.dst].push_back(rcv_cell); n_rcv++; end
      if (ext_cell.valid && !exp_drop) q[ext_cell.dst].push_back(ext_cell);
      if (exp_drop) n_drop++;
      @(negedge clk);
    end
    check(n_prim > 0 && n_sec > 0 && n_rcv > 0 && n_drop > 0, "coverage");
    $display("primary=%0d secondary=%0d intercepted=%0d drops=%0d", n_prim, n_sec, n_rcv, n_drop);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
