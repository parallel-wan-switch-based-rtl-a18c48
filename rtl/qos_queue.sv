// qos_queue: the QoS queue of one output port inside the input-queue block.
//
// The queue of an output port is split into one independent sub-queue per
// precedence P (1..N_PREC), each QDEPTH packets deep. Packets that collided on
// this output are written into the sub-queue of their precedence; several may
// arrive in the same cycle (one per input lane) and are stored in lane order. A
// packet that finds its sub-queue full is discarded ("tail drop"); drop_n counts
// the packets discarded in the cycle. The head is the oldest packet of the
// highest non-empty precedence (strict priority: lower precedences are not
// protected from starvation, as in the simplified LLQ of the design). pop
// removes the head; a slot freed by a pop can be refilled in the same cycle.
// Reset (active low, synchronous) empties all sub-queues.
module qos_queue
  import sw_pkg::*;
#(
  parameter int unsigned N      = N_PORTS,
  parameter int unsigned NPREC  = N_PREC,
  parameter int unsigned QDEPTH = 8
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        push_valid [N],
  input  packet_t                     push_pkt   [N],
  input  logic                        pop,
  output logic                        head_valid,
  output packet_t                     head_pkt,
  output logic [$clog2(N+1)-1:0]      drop_n,
  output logic [$clog2(QDEPTH+1)-1:0] occupancy [NPREC]
);

  localparam int unsigned PW = (QDEPTH > 1) ? $clog2(QDEPTH) : 1;
  localparam int unsigned CW = $clog2(QDEPTH+1);
  localparam int unsigned SW = $clog2(NPREC > 1 ? NPREC : 2);

  packet_t       mem [NPREC][QDEPTH];
  logic [PW-1:0] rd  [NPREC];
  logic [PW-1:0] wr  [NPREC];
  logic [CW-1:0] cnt [NPREC];

  logic [SW-1:0] sel;
  logic          do_pop;
  logic          acc  [N];
  logic [SW-1:0] lp   [N];
  logic [PW-1:0] slot [N];
  logic [CW-1:0] used [NPREC];

  function automatic logic [PW-1:0] wrap(int unsigned v);
    return PW'(v % QDEPTH);
  endfunction

  // Head: highest precedence with a packet waiting.
  always_comb begin
    sel        = '0;
    head_valid = 1'b0;
    for (int unsigned p = 0; p < NPREC; p++) begin
      if (cnt[p] != 0) begin
        sel        = SW'(p);
        head_valid = 1'b1;
      end
    end
  end
  assign head_pkt = mem[sel][rd[sel]];
  assign do_pop   = pop && head_valid;

  // Slot allocation for the packets arriving this cycle.
  always_comb begin
    int unsigned space;
    int unsigned p;
    drop_n = '0;
    space  = 0;
    for (int unsigned q = 0; q < NPREC; q++) used[q] = '0;
    for (int unsigned i = 0; i < N; i++) begin
      p       = int'(prec_of(push_pkt[i].prio)) - 1;
      if (p >= NPREC) p = NPREC - 1;
      lp[i]   = SW'(p);
      acc[i]  = 1'b0;
      slot[i] = '0;
      if (push_valid[i]) begin
        space = QDEPTH - int'(cnt[p]) + ((do_pop && int'(sel) == p) ? 1 : 0);
        if (int'(used[p]) < space) begin
          acc[i]  = 1'b1;
          slot[i] = wrap(int'(wr[p]) + int'(used[p]));
          used[p] = used[p] + 1'b1;
        end else begin
          drop_n = drop_n + 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int unsigned q = 0; q < NPREC; q++) begin
        rd[q]  <= '0;
        wr[q]  <= '0;
        cnt[q] <= '0;
      end
    end else begin
      for (int unsigned i = 0; i < N; i++)
        if (acc[i]) mem[lp[i]][slot[i]] <= push_pkt[i];
      for (int unsigned q = 0; q < NPREC; q++) begin
        wr[q]  <= wrap(int'(wr[q]) + int'(used[q]));
        cnt[q] <= cnt[q] + used[q] - CW'((do_pop && int'(sel) == q) ? 1 : 0);
        if (do_pop && int'(sel) == q) rd[q] <= wrap(int'(rd[q]) + 1);
      end
    end
  end

  always_comb
    for (int unsigned q = 0; q < NPREC; q++) occupancy[q] = cnt[q];

endmodule
