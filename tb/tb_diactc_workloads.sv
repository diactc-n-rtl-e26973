// tb_diactc_workloads: the DiaCTC switch at its default size (32 ports, VOQ
// depth 64) under the traffic patterns used to evaluate the architecture.
// Each pattern is offered at load LOAD_P percent (uniform also at 50% and
// 95%) for SLOTS slots, then the switch is drained and the mean cell delay,
// the delivered fraction and the drop count are printed. Patterns (lambda(i,j) is the load from input i to output j):
//   uniform Bernoulli   each slot a cell with probability lambda, dst uniform;
//   bursty 16/32/64     on/off sources: bursts of geometric length (mean B)
//                       to one uniform dst, idle gaps sized for load lambda;
//   asymmetric          lambda(i,(i+j) mod N) = lambda*a_j, a_0 = 0 and a_j
//                       geometric in j with a_{N-1}/a_1 = 1/10 (ratio assumed);
//   Chang's             lambda/(N-1) to every output except j = i;
//   diagonal            2*lambda/3 to j = i, lambda/3 to j = i+1.
// Every delivered cell is checked against a scoreboard (own output, known,
// delivered once), cell counts must balance after each drain, and for the
// uniform pattern at load LOAD_P at most 1% of the cells may be dropped and
// the busiest port may intercept at most 1.5 times as many cells as the least busy.
module tb_diactc_workloads;
  import diactc_pkg::*;

  localparam int N      = 32;
  localparam int SLOTS  = 1500;
  localparam int DRAIN  = 1500;
  localparam int LOAD_P = 80;     // offered load in percent

  logic         clk = 0, rst_n = 0;
  cell_t        in_cell [N];
  cell_t        out_cell[N];
  logic [N-1:0] in_drop, tx_valid, intercepted, sel_primary, sel_secondary;

  diactc_switch dut (.*);

  always #5 clk = ~clk;

  typedef struct { int dst; int t_in; } rec_t;
  rec_t        sb [int];
  int unsigned next_id = 1;
  int          slot = 0;

  int checks = 0, failures = 0;
  int n_in, n_out, n_drop, n_icpt;
  int icpt_port [N];
  longint sum_delay;

  // bursty source state
  int  burst_left [N];
  int  burst_dst  [N];
  bit  in_burst   [N];
  real asym_cdf   [N];

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at slot %0d", what, slot);
    end
  endtask

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real urand();
    return real'($urandom) / 4294967296.0;
  endfunction

  // Geometric length >= 1 with the given mean.
  function automatic int geom(real mean);
    int n;
    n = 1;
    while (urand() >= 1.0 / mean && n < 100000) n++;
    return n;
  endfunction

  function automatic cell_t make_cell(int src, int dst);
    cell_t c;
    c.valid = 1'b1;
    c.src   = port_t'(src);
    c.dst   = port_t'(dst);
    c.data  = 64'(next_id);
    sb[next_id] = '{dst: dst, t_in: slot};
    next_id++;
    n_in++;
    return c;
  endfunction

  always @(posedge clk) if (rst_n) begin
    for (int i = 0; i < N; i++) begin
      if (in_drop[i]) begin
        sb.delete(int'(in_cell[i].data));
        n_drop++;
      end
      if (intercepted[i]) begin
        n_icpt++;
        icpt_port[i]++;
      end
      if (out_cell[i].valid) begin
        int id;
        id = int'(out_cell[i].data);
        check(sb.exists(id), "delivered cell known");
        if (sb.exists(id)) begin
          check(sb[id].dst == i, "cell on its own output");
          sum_delay += slot - sb[id].t_in;
          sb.delete(id);
        end
        n_out++;
      end
    end
    slot++;
  end

  // One arrival decision for input i under pattern w; returns dst or -1.
  function automatic int arrival(string w, int i, real lam, int blen);
    real u;
    if (w == "bursty") begin
      if (!in_burst[i] && burst_left[i] == 0) begin
        in_burst[i]   = 1;
        burst_left[i] = geom(real'(blen));
        burst_dst[i]  = $urandom % N;
      end
      if (in_burst[i]) begin
        burst_left[i]--;
        if (burst_left[i] == 0) begin
          in_burst[i]   = 0;
          burst_left[i] = geom(1.0 + real'(blen) * (1.0 - lam) / lam) - 1;
        end
        return burst_dst[i];
      end
      burst_left[i]--;
      return -1;
    end
    if (urand() >= lam) return -1;
    case (w)
      "uniform":  return $urandom % N;
      "chang":    return (i + 1 + $urandom % (N - 1)) % N;
      "diagonal": return (urand() < 2.0 / 3.0) ? i : (i + 1) % N;
      "asymmetric": begin
        u = urand();
        for (int j = 1; j < N; j++) if (u < asym_cdf[j]) return (i + j) % N;
        return (i + N - 1) % N;
      end
      default: return -1;
    endcase
  endfunction

  task automatic run(string w, int blen, int load_p = LOAD_P);
    real lam, offered, mean;
    n_in = 0; n_out = 0; n_drop = 0; n_icpt = 0; sum_delay = 0;
    for (int i = 0; i < N; i++) icpt_port[i] = 0;
    lam = real'(load_p) / 100.0;
    for (int i = 0; i < N; i++) begin
      burst_left[i] = 0;
      in_burst[i]   = 0;
    end
    for (int t = 0; t < SLOTS; t++) begin
      for (int i = 0; i < N; i++) begin
        int d;
        d = arrival(w, i, lam, blen);
        in_cell[i] = (d >= 0) ? make_cell(i, d) : NO_CELL;
      end
      @(negedge clk);
    end
    for (int i = 0; i < N; i++) in_cell[i] = NO_CELL;
    repeat (DRAIN) @(negedge clk);
    offered = real'(n_in) / real'(N * SLOTS);
    mean = (n_out > 0) ? real'(sum_delay) / real'(n_out) : 0.0;
    $display("%-10s B=%0d load=%0.3f cells=%0d delivered=%0d dropped=%0d intercepts=%0d mean delay=%0.2f slots",
             w, blen, offered, n_in, n_out, n_drop, n_icpt, mean);
    check(sb.size() == 0, {w, ": all cells delivered or dropped"});
    check(n_in == n_out + n_drop, {w, ": cell count conserved"});
    if (w == "uniform" && load_p == LOAD_P) begin
      int mn, mx;
      mn = icpt_port[0]; mx = icpt_port[0];
      for (int i = 1; i < N; i++) begin
        if (icpt_port[i] < mn) mn = icpt_port[i];
        if (icpt_port[i] > mx) mx = icpt_port[i];
      end
      $display("uniform: intercepts per port min=%0d max=%0d", mn, mx);
      check(n_drop * 100 <= n_in, "uniform: under 1% dropped");
      check(mx * 2 <= mn * 3, "uniform: intercepted load balanced over ports");
    end
    sb.delete();
  endtask

  initial begin
    real r, acc, tot;
    // a_j = r^(j-1), j = 1..N-1, with r^(N-2) = 1/10, normalised to sum 1
    r = 0.1 ** (1.0 / real'(N - 2));
    tot = 0.0;
    for (int j = 1; j < N; j++) tot += r ** real'(j - 1);
    acc = 0.0;
    asym_cdf[0] = 0.0;
    for (int j = 1; j < N; j++) begin
      acc += (r ** real'(j - 1)) / tot;
      asym_cdf[j] = acc;
    end
    for (int i = 0; i < N; i++) in_cell[i] = NO_CELL;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    run("uniform", 0, 50);
    run("uniform", 0);
    run("uniform", 0, 95);
    run("bursty", 16);
    run("bursty", 32);
    run("bursty", 64);
    run("asymmetric", 0);
    run("chang", 0);
    run("diagonal", 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
