// tb_diactc_fabric: self-checking test of the diagonalized fabric.
// Two sizes are tested: N=4 (the 4-port example) and N=7 (odd, not a power
// of two). Each slot every port sends with random probability to a random
// column; the expected intercepted and delivered cells are computed by
// walking each column from its head row j down to its tail row j-1 mod N,
// carrying the last cell put on the bus. Head SEs never intercept and every
// output cell must carry its own column as dst.
module tb_diactc_fabric;
  import diactc_pkg::*;

  int checks = 0, failures = 0;
  int n_icpt = 0, n_wrap = 0;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int N1 = 4;
  localparam int N2 = 7;

  logic [N1-1:0] en1;  port_t col1[N1];  cell_t tx1[N1], rcv1[N1], out1[N1];
  logic [N2-1:0] en2;  port_t col2[N2];  cell_t tx2[N2], rcv2[N2], out2[N2];

  diactc_fabric #(.N(N1)) dut1 (.tx_en(en1), .tx_col(col1), .tx_cell(tx1),
                                .rcv_cell(rcv1), .out_cell(out1));
  diactc_fabric #(.N(N2)) dut2 (.tx_en(en2), .tx_col(col2), .tx_cell(tx2),
                                .rcv_cell(rcv2), .out_cell(out2));

  task automatic check(cell_t got, cell_t exp, string what, int idx);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s[%0d] got=%h exp=%h", what, idx, got, exp);
    end
  endtask

  // Reference: walk column j from its head row j round to its tail.
  task automatic model(input int n, input logic en[], input int col[], input cell_t tx[],
                       output cell_t rcv[], output cell_t out[]);
    rcv = new[n];
    out = new[n];
    for (int i = 0; i < n; i++) rcv[i] = NO_CELL;
    for (int j = 0; j < n; j++) begin
      cell_t bus;
      int    from;
      bus  = NO_CELL;
      from = -1;
      for (int k = 0; k < n; k++) begin
        int r;
        r = (j + k) % n;
        if (en[r] && col[r] == j) begin
          rcv[r] = bus;
          if (bus.valid) begin
            n_icpt++;
            if (r < from) n_wrap++;   // interception across the wrap-around
          end
          bus  = tx[r];
          from = r;
        end
      end
      out[j] = bus;
    end
  endtask

  initial begin
    logic  en[];
    int    col[];
    cell_t tx[], rcv[], out[];
    for (int slot = 0; slot < 3000; slot++) begin
      int n;
      n   = (slot % 2) ? N2 : N1;
      en  = new[n];
      col = new[n];
      tx  = new[n];
      for (int i = 0; i < n; i++) begin
        en[i]  = ($urandom % 4) != 0;
        col[i] = $urandom % n;
        tx[i]  = NO_CELL;
        if (en[i]) begin
          tx[i].valid = 1'b1;
          tx[i].src   = port_t'(i);
          tx[i].dst   = port_t'(col[i]);
          tx[i].data  = {$urandom, $urandom};
        end
      end
      if (n == N1) begin
        for (int i = 0; i < N1; i++) begin
          en1[i] = en[i]; col1[i] = port_t'(col[i]); tx1[i] = tx[i];
        end
      end else begin
        for (int i = 0; i < N2; i++) begin
          en2[i] = en[i]; col2[i] = port_t'(col[i]); tx2[i] = tx[i];
        end
      end
      #1;
      model(n, en, col, tx, rcv, out);
      for (int i = 0; i < n; i++) begin
        check(n == N1 ? rcv1[i] : rcv2[i], rcv[i], "rcv", i);
        check(n == N1 ? out1[i] : out2[i], out[i], "out", i);
      end
    end
    // A fixed case on N=4: ports 1,2,3 all send to column 1 (head row 1).
    // Port 2 intercepts port 1's cell, port 3 intercepts port 2's, and the
    // tail (row 0) is idle, so output 1 gets port 3's cell.
    for (int i = 0; i < N1; i++) begin
      en1[i] = (i != 0); col1[i] = port_t'(1);
      tx1[i] = '{valid: 1'b1, src: port_t'(i), dst: port_t'(1), data: 64'(i)};
    end
    #1;
    check(rcv1[1], NO_CELL, "fixed_rcv", 1);
    check(rcv1[2], tx1[1],  "fixed_rcv", 2);
    check(rcv1[3], tx1[2],  "fixed_rcv", 3);
    check(out1[1], tx1[3],  "fixed_out", 1);
    // Same with port 0 also on column 1: row 0 is the tail, so it
    // intercepts port 3's cell and its own cell reaches output 1.
    en1[0] = 1'b1;
    #1;
    check(rcv1[0], tx1[3], "fixed_tail_rcv", 0);
    check(out1[1], tx1[0], "fixed_tail_out", 1);

    checks++;
    if (n_icpt == 0 || n_wrap == 0) begin
      failures++;
      $display("FAIL interceptions=%0d across wrap=%0d", n_icpt, n_wrap);
    end
    $display("interceptions=%0d across wrap-around=%0d", n_icpt, n_wrap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
