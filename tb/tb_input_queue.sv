// tb_input_queue: self-checking testbench of the input-queue block.
//
// Random arrivals on the four inputs, random output readiness and phases of
// both modes are applied. A model of the block (per-output, per-precedence
// queues, collision rule, straight-through rule, rotating pointer) predicts the
// lanes of the next cycle and every event count of the current one. The test
// counts each mechanism (straight-through, collision winner, collision drop,
// busy drop, bad destination, queueing, tail drop, dequeue, lane conflict,
// draining after a switch to drop mode) and fails if one never happened.
module tb_input_queue;
  import sw_pkg::*;

  localparam int N = N_PORTS, QDEPTH = 8;
  logic clk = 0, rst_n = 0;
  iq_mode_e mode = IQ_DROP;
  logic    in_valid [N];
  packet_t in_pkt   [N];
  logic    out_ready [N];
  logic    lane_valid [N];
  packet_t lane_pkt   [N];
  logic [$clog2(N+1)-1:0] collide_n, coll_drop_n, busy_drop_n, bad_drop_n, queued_n, dequeued_n;
  logic [$clog2(N*N+1)-1:0] tail_drop_n;
  logic [$clog2(QDEPTH+1)-1:0] qos_occupancy [N][N_PREC];
  int checks = 0, failures = 0;

  input_queue dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("%t %s", $time, what); end
  endtask

  packet_t mq [N][N_PREC][$];
  int rr = 1;  // the pointer has advanced once when the first stimulus is applied
  int ev_straight = 0, ev_winner = 0, ev_colldrop = 0, ev_busy = 0, ev_bad = 0,
      ev_queued = 0, ev_tail = 0, ev_deq = 0, ev_laneconf = 0, ev_drain = 0;

  function automatic int key(packet_t p, int lane);
    return (p.prio / 10) * 100 + (3 - p.prio % 10) * 10 + (3 - lane);
  endfunction

  initial begin
    bit      nv [N], ev [N];
    packet_t np [N], ep [N];
    bit      col [N], win [N], used [N], pop [N], hv [N], qd [N], qacc [N];
    packet_t hp [N];
    int      hprec [N];
    int e_col, e_cd, e_busy, e_bad, e_q, e_tail, e_deq;
    int vp, rp;
    for (int i = 0; i < N; i++) begin in_valid[i] = 0; in_pkt[i] = '0; out_ready[i] = 1; ev[i] = 0; ep[i] = '0; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 12000; n++) begin
      @(negedge clk);
      // lanes registered at the last edge
      for (int i = 0; i < N; i++) begin
        check(lane_valid[i] == ev[i], $sformatf("lane %0d valid", i));
        if (ev[i]) check(lane_pkt[i] == ep[i], $sformatf("lane %0d packet", i));
      end
      for (int k = 0; k < N; k++)
        for (int p = 0; p < N_PREC; p++)
          check(int'(qos_occupancy[k][p]) == mq[k][p].size(), $sformatf("occupancy %0d/%0d", k, p));
      // stimulus
      case ((n / 1000) % 4)
        0: begin mode = IQ_DROP; vp = 50; rp = 70; end
        1: begin mode = IQ_QOS;  vp = 60; rp = 30; end
        2: begin mode = IQ_DROP; vp = 20; rp = 80; end   // queues drain in drop mode
        default: begin mode = IQ_QOS; vp = 30; rp = 90; end
      endcase
      for (int i = 0; i < N; i++) begin
        in_valid[i]    = $urandom_range(0, 99) < vp;
        in_pkt[i].src  = PORT_W'(i + 1);
        in_pkt[i].dst  = ($urandom_range(0, 99) == 0) ? PORT_W'(5) : PORT_W'($urandom_range(1, N));
        in_pkt[i].prio = PRIO_W'(10 * $urandom_range(1, 4) + $urandom_range(1, 3));
        in_pkt[i].data = DATA_W'($urandom_range(1, 10000));
        out_ready[i]   = $urandom_range(0, 99) < rp;
      end
      // model
      e_col = 0; e_cd = 0; e_busy = 0; e_bad = 0; e_q = 0; e_tail = 0; e_deq = 0;
      for (int k = 0; k < N; k++) begin
        used[k] = 0; pop[k] = 0; hv[k] = 0; hprec[k] = 0; hp[k] = '0;
        for (int p = N_PREC - 1; p >= 0; p--)
          if (!hv[k] && mq[k][p].size() > 0) begin hv[k] = 1; hp[k] = mq[k][p][0]; hprec[k] = p; end
      end
      for (int i = 0; i < N; i++) begin
        nv[i] = 0; np[i] = in_pkt[i]; col[i] = 0; qd[i] = 0; qacc[i] = 0; win[i] = in_valid[i];
        for (int j = 0; j < N; j++)
          if (j != i && in_valid[i] && in_valid[j] && in_pkt[i].dst == in_pkt[j].dst) begin
            col[i] = 1;
            if (key(in_pkt[j], j) > key(in_pkt[i], i)) win[i] = 0;
          end
      end
      for (int i = 0; i < N; i++) if (in_valid[i]) begin
        int k;
        k = int'(in_pkt[i].dst) - 1;
        if (col[i]) e_col++;
        if (k < 0 || k >= N) begin e_bad++; ev_bad++; end
        else if (!col[i] && !hv[k] && out_ready[k]) begin nv[i] = 1; used[k] = 1; ev_straight++; end
        else if (mode == IQ_QOS) begin e_q++; qd[i] = 1; end
        else if (win[i] && out_ready[k] && !hv[k]) begin nv[i] = 1; used[k] = 1; ev_winner++; end
        else if (!win[i]) e_cd++;
        else e_busy++;
      end
      for (int m = 0; m < N; m++) begin
        int k, ln;
        k = (rr + m) % N;
        if (hv[k] && out_ready[k] && !used[k]) begin
          ln = int'(hp[k].src) - 1;
          if (!nv[ln]) begin
            nv[ln] = 1; np[ln] = hp[k]; pop[k] = 1; e_deq++;
            if (mode == IQ_DROP) ev_drain++;
          end else ev_laneconf++;
        end
      end
      // tail drops: room left in each sub-queue after this cycle's pop
      for (int k = 0; k < N; k++) begin
        int room [N_PREC];
        for (int p = 0; p < N_PREC; p++)
          room[p] = QDEPTH - mq[k][p].size() + ((pop[k] && hprec[k] == p) ? 1 : 0);
        for (int i = 0; i < N; i++)
          if (qd[i] && int'(in_pkt[i].dst) == k + 1) begin
            int p;
            p = in_pkt[i].prio / 10 - 1;
            if (room[p] > 0) begin room[p]--; qacc[i] = 1; end
            else e_tail++;
          end
      end
      #1;
      check(int'(collide_n) == e_col, "collide_n");
      check(int'(coll_drop_n) == e_cd, "coll_drop_n");
      check(int'(busy_drop_n) == e_busy, "busy_drop_n");
      check(int'(bad_drop_n) == e_bad, "bad_drop_n");
      check(int'(queued_n) == e_q, "queued_n");
      check(int'(dequeued_n) == e_deq, "dequeued_n");
      check(int'(tail_drop_n) == e_tail, "tail_drop_n");
      ev_colldrop += e_cd; ev_busy += e_busy; ev_queued += e_q; ev_deq += e_deq; ev_tail += e_tail;
      @(posedge clk);
      for (int k = 0; k < N; k++) if (pop[k]) void'(mq[k][hprec[k]].pop_front());
      for (int i = 0; i < N; i++)
        if (qacc[i]) mq[int'(in_pkt[i].dst) - 1][in_pkt[i].prio / 10 - 1].push_back(in_pkt[i]);
      rr = (rr + 1) % N;
      ev = nv; ep = np;
    end
    check(ev_straight > 0, "no straight-through packet");
    check(ev_winner > 0, "no collision winner passed");
    check(ev_colldrop > 0, "no collision drop");
    check(ev_busy > 0, "no busy drop");
    check(ev_bad > 0, "no bad destination");
    check(ev_queued > 0, "nothing queued");
    check(ev_tail > 0, "no tail drop");
    check(ev_deq > 0, "nothing dequeued");
    check(ev_laneconf > 0, "no lane conflict");
    check(ev_drain > 0, "no draining in drop mode");
    $display("straight %0d winner %0d colldrop %0d busy %0d bad %0d queued %0d tail %0d deq %0d laneconf %0d drain %0d",
             ev_straight, ev_winner, ev_colldrop, ev_busy, ev_bad, ev_queued, ev_tail, ev_deq, ev_laneconf, ev_drain);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
