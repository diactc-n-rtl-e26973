// tb_se: self-checking test of one crosspoint SE. Both states are applied
// with random row and column cells, and all three outputs are compared with
// the CR/RT routing rules worked out here.
module tb_se;
  import diactc_pkg::*;

  se_state_e state;
  cell_t     row_in, col_in, row_out, col_out, rcv_out;
  int        checks = 0, failures = 0;

  se dut (.*);

  function automatic cell_t rand_cell();
    cell_t c;
    c.valid = 1'($urandom);
    c.src   = port_t'($urandom);
    c.dst   = port_t'($urandom);
    c.data  = {$urandom, $urandom};
    return c;
  endfunction

  task automatic check(cell_t got, cell_t exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s state=%s got=%h exp=%h", what, state.name(), got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 200; n++) begin
      state  = (n % 2) ? SE_RT : SE_CR;
      row_in = rand_cell();
      col_in = rand_cell();
      #1;
      if (state == SE_RT) begin
        check(col_out, row_in,  "col_out");
        check(rcv_out, col_in,  "rcv_out");
        check(row_out, NO_CELL, "row_out");
      end else begin
        check(row_out, row_in,  "row_out");
        check(col_out, col_in,  "col_out");
        check(rcv_out, NO_CELL, "rcv_out");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
