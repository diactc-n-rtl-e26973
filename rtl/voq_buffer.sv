// voq_buffer: the cell buffer of one input port, organised as N virtual
// output queues (VOQ i,0 .. VOQ i,N-1), one FIFO per output port.
//
// Per time slot (clock cycle) it can take up to two cells and give one:
//   - ext_cell: a cell arriving from outside the switch, queued by its dst;
//   - rcv_cell: a cell intercepted from an upstream port on the column bus;
//   - deq/deq_voq: the port sends the head-of-line (HOL) cell of VOQ deq_voq.
// hol_cell shows the HOL cell of VOQ deq_voq combinationally so the port can
// put it on the fabric in the same slot. nonempty[k] is set while VOQ k holds
// a cell; it is the set L_i(t) the scheduler chooses from.
//
// An intercepted cell is for the column the port sends on in that slot, so it
// always lands in the VOQ that is dequeued in the same slot and can never
// overflow it. It is written ahead of an external cell for the same VOQ in
// that slot. An external cell that would not fit is dropped and ext_drop is
// raised for that cycle. The VOQ organisation follows the architecture; the
// depth, the drop policy and the ordering of simultaneous writes are this
// design's choices. Storage is one array of N*DEPTH cells; DEPTH must be a
// power of two.
module voq_buffer
  import diactc_pkg::*;
#(
  parameter int unsigned N     = 32,
  parameter int unsigned DEPTH = 64
) (
  input  logic         clk,
  input  logic         rst_n,
  input  cell_t        ext_cell,
  output logic         ext_drop,
  input  cell_t        rcv_cell,
  input  logic         deq,
  input  port_t        deq_voq,
  output cell_t        hol_cell,
  output logic [N-1:0] nonempty
);

  localparam int unsigned PTR_W = $clog2(DEPTH);
  localparam int unsigned CNT_W = PTR_W + 1;
  localparam int unsigned VOQ_W = (N > 1) ? $clog2(N) : 1;

  typedef logic [PTR_W-1:0] ptr_t;
  typedef logic [CNT_W-1:0] cnt_t;

  cell_t mem [N*DEPTH];
  ptr_t  wr_ptr [N];
  ptr_t  rd_ptr [N];
  cnt_t  count  [N];

  initial begin
    assert (DEPTH >= 2 && (1 << PTR_W) == DEPTH)
      else $error("voq_buffer: DEPTH=%0d must be a power of two", DEPTH);
    assert (N >= 2 && N <= (1 << PORT_W))
      else $error("voq_buffer: N=%0d out of range", N);
  end

  logic               ext_v, rcv_v, ext_acc, same_voq;
  logic [VOQ_W-1:0]   ext_q, rcv_q, deq_q;

  assign ext_q = ext_cell.dst[VOQ_W-1:0];
  assign rcv_q = rcv_cell.dst[VOQ_W-1:0];
  assign deq_q = deq_voq[VOQ_W-1:0];

  assign ext_v    = ext_cell.valid && (ext_cell.dst < port_t'(N));
  assign rcv_v    = rcv_cell.valid;
  assign same_voq = rcv_v && (rcv_q == ext_q);

  // External cell fits if the VOQ has room after this slot's other traffic.
  always_comb begin
    int unsigned after;
    after = int'(count[ext_q]);
    if (deq && deq_q == ext_q) after = after - 1;
    if (same_voq)              after = after + 1;
    ext_acc  = ext_v && (after < DEPTH);
    ext_drop = ext_v && !ext_acc;
  end

  always_comb begin
    for (int k = 0; k < N; k++) nonempty[k] = (count[k] != '0);
  end

  always_comb begin
    hol_cell       = mem[int'(deq_q) * DEPTH + int'(rd_ptr[deq_q])];
    hol_cell.valid = nonempty[deq_q];
  end

  // Storage writes: the intercepted cell first, then the external one.
  always_ff @(posedge clk) begin
    if (rcv_v)
      mem[int'(rcv_q) * DEPTH + int'(wr_ptr[rcv_q])] <= rcv_cell;
    if (ext_acc)
      mem[int'(ext_q) * DEPTH + int'(ptr_t'(wr_ptr[ext_q] + ptr_t'(same_voq)))] <= ext_cell;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < N; k++) begin
        wr_ptr[k] <= '0;
        rd_ptr[k] <= '0;
        count[k]  <= '0;
      end
    end else begin
      for (int k = 0; k < N; k++) begin
        logic d, r, e;
        d = deq     && (deq_q == VOQ_W'(k));
        r = rcv_v   && (rcv_q == VOQ_W'(k));
        e = ext_acc && (ext_q == VOQ_W'(k));
        wr_ptr[k] <= wr_ptr[k] + ptr_t'(r) + ptr_t'(e);
        rd_ptr[k] <= rd_ptr[k] + ptr_t'(d);
        count[k]  <= count[k] + cnt_t'(r) + cnt_t'(e) - cnt_t'(d);
      end
    end
  end

  // An intercepted cell only arrives for the VOQ being served in that slot,
  // and a cell is only sent from a VOQ that holds one.
  always_ff @(posedge clk) begin
    if (rst_n) begin
      a_rcv_into_served_voq: assert (!rcv_v || (deq && deq_q == rcv_q))
        else $error("voq_buffer: intercepted cell for VOQ %0d not being served", rcv_q);
      a_deq_nonempty: assert (!deq || nonempty[deq_q])
        else $error("voq_buffer: dequeue from empty VOQ %0d", deq_q);
    end
  end

endmodule
