// input_queue: the input-queue block, which schedules the packets arriving from
// the N input ports onto the N lanes of the switch fabric.
//
// Lane i carries packets whose source is port i+1, and the block guarantees that
// in any cycle no two lanes carry packets for the same output, so the fabric
// never sees a destination collision. A collision detector compares the packets
// arriving in the cycle. The mode input selects between the two behaviours the
// design describes:
//   IQ_DROP  the highest-priority packet of each colliding group goes on, the
//            others are dropped (no buffering).
//   IQ_QOS   colliding packets go to the QoS queue of their output port, which
//            holds one sub-queue per precedence (qos_queue). When the fabric can
//            take a packet for an output, the highest precedence is read first.
// A packet that collides with nothing and whose output queue is empty passes
// straight to its lane in both modes. An output is offered a packet only while
// out_ready[k] is high (room left in its output FIFO); in IQ_DROP mode a packet
// for a busy output is dropped, in IQ_QOS mode it is queued. A queued packet
// needs its own source lane; when several queue heads need the same lane, a
// rotating pointer over the outputs decides, so no output is locked out.
// Queues that still hold packets after a switch to IQ_DROP keep draining; while
// they do, IQ_DROP treats their output as busy, so no flow is reordered.
// Packets with a destination outside 1..N are dropped. The lanes are registered:
// a packet arriving in cycle t is on its lane in cycle t+1 at the earliest. The
// *_n outputs count the events of the current cycle.
module input_queue
  import sw_pkg::*;
#(
  parameter int unsigned N      = N_PORTS,
  parameter int unsigned QDEPTH = 8
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  iq_mode_e               mode,
  input  logic                   in_valid   [N],
  input  packet_t                in_pkt     [N],
  input  logic                   out_ready  [N],
  output logic                   lane_valid [N],
  output packet_t                lane_pkt   [N],
  output logic [$clog2(N+1)-1:0] collide_n,     // arriving packets that collide
  output logic [$clog2(N+1)-1:0] coll_drop_n,   // IQ_DROP: lost a collision
  output logic [$clog2(N+1)-1:0] busy_drop_n,   // IQ_DROP: output FIFO busy
  output logic [$clog2(N+1)-1:0] bad_drop_n,    // destination out of range
  output logic [$clog2(N+1)-1:0] queued_n,      // IQ_QOS: written to a QoS queue
  output logic [$clog2(N*N+1)-1:0] tail_drop_n, // IQ_QOS: QoS queue full
  output logic [$clog2(N+1)-1:0] dequeued_n,    // IQ_QOS: read from a QoS queue
  output logic [$clog2(QDEPTH+1)-1:0] qos_occupancy [N][N_PREC]  // packets waiting, per output and precedence
);

  localparam int unsigned CNW = $clog2(N+1);
  localparam int unsigned KW  = $clog2(N > 1 ? N : 2);

  logic    collide [N];
  logic    win     [N];
  logic    dst_ok  [N];
  logic [KW-1:0] dk [N];

  collision_detector #(.N(N)) u_cd (
    .valid  (in_valid),
    .pkt    (in_pkt),
    .collide(collide),
    .win    (win)
  );

  // QoS queues, one per output port.
  logic    q_push  [N][N];
  logic    q_pop   [N];
  logic    q_hv    [N];
  packet_t q_hp    [N];
  logic [CNW-1:0]             q_drop [N];

  for (genvar k = 0; k < N; k++) begin : g_q
    qos_queue #(.N(N), .NPREC(N_PREC), .QDEPTH(QDEPTH)) u_q (
      .clk       (clk),
      .rst_n     (rst_n),
      .push_valid(q_push[k]),
      .push_pkt  (in_pkt),
      .pop       (q_pop[k]),
      .head_valid(q_hv[k]),
      .head_pkt  (q_hp[k]),
      .drop_n    (q_drop[k]),
      .occupancy (qos_occupancy[k])
    );
  end

  logic [KW-1:0] rr;          // first output considered for queued packets
  logic          nxt_v [N];
  packet_t       nxt_p [N];
  logic          out_used [N];  // output already given a packet this cycle

  always_comb begin
    int unsigned k;
    int unsigned ln;
    collide_n   = '0;
    coll_drop_n = '0;
    busy_drop_n = '0;
    bad_drop_n  = '0;
    queued_n    = '0;
    dequeued_n  = '0;
    tail_drop_n = '0;
    for (int unsigned i = 0; i < N; i++) begin
      nxt_v[i]  = 1'b0;
      nxt_p[i]  = in_pkt[i];
      dst_ok[i] = (in_pkt[i].dst >= 1) && (int'(in_pkt[i].dst) <= N);
      dk[i]     = dst_ok[i] ? KW'(int'(in_pkt[i].dst) - 1) : '0;
      q_pop[i]  = 1'b0;
      out_used[i] = 1'b0;
      for (int unsigned j = 0; j < N; j++) q_push[j][i] = 1'b0;
    end
    // Arriving packets.
    for (int unsigned i = 0; i < N; i++) begin
      if (in_valid[i]) begin
        if (collide[i]) collide_n = collide_n + 1'b1;
        if (!dst_ok[i]) begin
          bad_drop_n = bad_drop_n + 1'b1;
        end else if (!collide[i] && !q_hv[dk[i]] && out_ready[dk[i]]) begin
          nxt_v[i] = 1'b1;                         // straight through
          out_used[dk[i]] = 1'b1;
        end else if (mode == IQ_QOS) begin
          q_push[dk[i]][i] = 1'b1;
          queued_n = queued_n + 1'b1;
        end else if (win[i] && out_ready[dk[i]] && !q_hv[dk[i]]) begin
          nxt_v[i] = 1'b1;                         // collision winner
          out_used[dk[i]] = 1'b1;
        end else if (!win[i]) begin
          coll_drop_n = coll_drop_n + 1'b1;
        end else begin
          busy_drop_n = busy_drop_n + 1'b1;
        end
      end
    end
    // Queued packets, highest precedence first within each output queue.
    for (int unsigned m = 0; m < N; m++) begin
      k  = (int'(rr) + m) % N;
      ln = int'(q_hp[k].src) - 1;
      if (q_hv[k] && out_ready[k] && !out_used[k] && q_hp[k].src >= 1 && int'(q_hp[k].src) <= N) begin
        if (!nxt_v[ln]) begin
          nxt_v[ln] = 1'b1;
          nxt_p[ln] = q_hp[k];
          q_pop[k]  = 1'b1;
          dequeued_n = dequeued_n + 1'b1;
        end
      end
    end
    for (int unsigned k2 = 0; k2 < N; k2++) tail_drop_n = tail_drop_n + ($clog2(N*N+1))'(q_drop[k2]);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rr <= '0;
      for (int unsigned i = 0; i < N; i++) begin
        lane_valid[i] <= 1'b0;
        lane_pkt[i]   <= '0;
      end
    end else begin
      rr <= (int'(rr) == N - 1) ? '0 : rr + 1'b1;
      for (int unsigned i = 0; i < N; i++) begin
        lane_valid[i] <= nxt_v[i];
        lane_pkt[i]   <= nxt_p[i];
      end
    end
  end

  // No two lanes may carry packets for the same output.
  for (genvar a = 0; a < N; a++) begin : g_chk_a
    for (genvar b = a + 1; b < N; b++) begin : g_chk_b
      a_unique_dst: assert property (@(posedge clk) disable iff (!rst_n)
          !(lane_valid[a] && lane_valid[b] && lane_pkt[a].dst == lane_pkt[b].dst))
        else $error("input_queue: lanes %0d and %0d share a destination", a, b);
    end
  end

endmodule
