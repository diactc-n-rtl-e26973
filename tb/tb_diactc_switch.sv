// tb_diactc_switch: end-to-end test of the DiaCTC switch at N=8, VOQ depth 4.
//
// Every cell gets a unique id in its payload; a scoreboard records src, dst
// and entry slot, and each delivered cell must be known, leave on its own
// dst, carry its src and leave at most once. Dropped cells (in_drop) are
// removed from the scoreboard; after a drain nothing may be left.
// Phases:
//   1. one cell through an empty switch: latency must be exactly 2 slots;
//   2. a saturating permutation (input i -> output i+3): after warm-up every
//      output must deliver a cell every slot, with no interception;
//   3. uniform Bernoulli traffic at load 0.9;
//   4. every input sending to output 0: heavy interception and drops;
//   5. drain.
// Mechanisms counted, each must occur: primary choice, secondary choice,
// interception (each intercepted cell must come from a port upstream of
// the interceptor on its column), interception on the wrapped part of a column (a row below
// the column's head index), external drop, idle port, cell reordering
// within one flow is reported only.
module tb_diactc_switch;
  import diactc_pkg::*;

  localparam int N = 8;
  localparam int DEPTH = 4;

  logic         clk = 0, rst_n = 0;
  cell_t        in_cell [N];
  cell_t        out_cell[N];
  logic [N-1:0] in_drop, tx_valid, intercepted, sel_primary, sel_secondary;

  diactc_switch #(.N(N), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  typedef struct { int src; int dst; int t_in; } rec_t;
  rec_t        sb [int];
  int          last_id [N][N];
  int unsigned next_id = 1;
  int          slot = 0;

  int checks = 0, failures = 0;
  int n_in = 0, n_out = 0, n_drop = 0, n_prim = 0, n_sec = 0, n_icpt = 0;
  int n_icpt_wrap = 0, n_idle = 0, n_reorder = 0;
  longint sum_delay = 0;
  int min_delay = 1 << 30;
  int perm_full = 1, perm_icpt = 0, perm_window = 0;

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at slot %0d", what, slot);
    end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic cell_t make_cell(int src, int dst);
    cell_t c;
    c.valid = 1'b1;
    c.src   = port_t'(src);
    c.dst   = port_t'(dst);
    c.data  = 64'(next_id);
    sb[next_id] = '{src: src, dst: dst, t_in: slot};
    next_id++;
    n_in++;
    return c;
  endfunction

  // Monitor: sample everything just before each clock edge ends the slot.
  always @(posedge clk) if (rst_n) begin
    for (int i = 0; i < N; i++) begin
      if (in_drop[i]) begin
        check(sb.exists(int'(in_cell[i].data)), "dropped cell known");
        sb.delete(int'(in_cell[i].data));
        n_drop++;
      end
      if (sel_primary[i])   n_prim++;
      if (sel_secondary[i]) n_sec++;
      if (!tx_valid[i])     n_idle++;
      if (intercepted[i]) begin
        n_icpt++;
        if (int'(dut.tx_col[i]) > i) n_icpt_wrap++;
        // A cell for output d held by port i came from a port upstream of
        // i on column d: (i - s) mod N <= (i - d) mod N, and d != i.
        begin
          int s, d;
          s = int'(dut.rcv_cell[i].src);
          d = int'(dut.rcv_cell[i].dst);
          check(d != i && (i - s + N) % N <= (i - d + N) % N, "intercepted cell from upstream");
        end
      end
      if (out_cell[i].valid) begin
        int id;
        id = int'(out_cell[i].data);
        check(sb.exists(id), "delivered cell known");
        if (sb.exists(id)) begin
          check(sb[id].dst == i, "cell on its own output");
          check(sb[id].src == int'(out_cell[i].src), "src carried");
          if (id < last_id[sb[id].src][i]) n_reorder++;
          last_id[sb[id].src][i] = id;
          sum_delay += slot - sb[id].t_in;
          if (slot - sb[id].t_in < min_delay) min_delay = slot - sb[id].t_in;
          sb.delete(id);
        end
        n_out++;
      end
    end
    if (perm_window) begin
      for (int j = 0; j < N; j++) if (!out_cell[j].valid) perm_full = 0;
      if (intercepted != '0) perm_icpt++;
    end
    slot++;
  end

  task automatic idle_inputs();
    for (int i = 0; i < N; i++) in_cell[i] = NO_CELL;
  endtask

  initial begin
    for (int s = 0; s < N; s++) for (int d = 0; d < N; d++) last_id[s][d] = 0;
    idle_inputs();
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;

    // 1. single-cell latency
    @(negedge clk);
    in_cell[2] = make_cell(2, 5);
    begin
      int t0;
      t0 = slot;
      @(negedge clk) idle_inputs();
      while (!out_cell[5].valid && slot < t0 + 20) @(negedge clk);
      checks++;
      if (slot - t0 != 2) begin
        failures++;
        $display("FAIL latency %0d slots, expected 2", slot - t0);
      end
    end
    repeat (5) @(negedge clk);

    // 2. saturating permutation
    for (int t = 0; t < 300; t++) begin
      for (int i = 0; i < N; i++) in_cell[i] = make_cell(i, (i + 3) % N);
      perm_window = (t >= 20);
      @(negedge clk);
    end
    perm_window = 0;
    idle_inputs();
    check(perm_full == 1, "permutation: every output busy every slot");
    check(perm_icpt == 0, "permutation: no interception");
    repeat (50) @(negedge clk);

    // 3. uniform Bernoulli, load 0.9
    for (int t = 0; t < 3000; t++) begin
      for (int i = 0; i < N; i++)
        in_cell[i] = ($urandom % 100 < 90) ? make_cell(i, $urandom % N) : NO_CELL;
      @(negedge clk);
    end

    // 4. all inputs to output 0
    for (int t = 0; t < 200; t++) begin
      for (int i = 0; i < N; i++) in_cell[i] = make_cell(i, 0);
      @(negedge clk);
    end

    // 5. drain
    idle_inputs();
    repeat (600) @(negedge clk);

    check(sb.size() == 0, "all cells delivered or dropped");
    check(n_in == n_out + n_drop, "cell count conserved");
    check(min_delay == 2, "minimum latency 2 slots");
    check(n_prim > 0, "primary choices");
    check(n_sec > 0, "secondary choices");
    check(n_icpt > 0, "interceptions");
    check(n_icpt_wrap > 0, "interceptions on wrapped column part");
    check(n_drop > 0, "drops");
    check(n_idle > 0, "idle ports");
    $display("cells in=%0d out=%0d dropped=%0d left=%0d mean delay=%0.2f slots",
             n_in, n_out, n_drop, sb.size(), real'(sum_delay) / real'(n_out));
    $display("primary=%0d secondary=%0d intercepts=%0d (wrapped part %0d) idle=%0d reordered=%0d",
             n_prim, n_sec, n_icpt, n_icpt_wrap, n_idle, n_reorder);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
