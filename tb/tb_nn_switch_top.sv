// tb_nn_switch_top: end-to-end testbench of the switch at its default sizes.
//
// The routing weight set is loaded into the network, then traffic runs through
// generators, input-queue block, fabric and output FIFOs:
//   phase 1  user packets, drop mode, light load: latency of a lone packet
//   phase 2  user packets, drop mode, heavy load: collisions and drops
//   phase 3  user packets, QoS mode, heavy load and a slow far side: queueing,
//            tail drop, strict-priority reordering
//   phase 4  switch back to drop mode while queues are full: they drain
//   phase 5  random packets (uniform fields, bell-shaped data), QoS mode,
//            jittered generator reads, and a phase of rare reads that makes
//            the generator FIFOs overflow
// Every delivered user packet must be one that was sent, delivered once, on the
// port of its destination, unchanged, and in order within its flow (source,
// destination, precedence). At the end, after draining, every
// packet made must be either delivered or counted by exactly one drop counter.
// Each mechanism is counted and must have happened at least once.
module tb_nn_switch_top;
  import sw_pkg::*;
  import tb_nn_weights::*;

  localparam int N = N_PORTS, N_HID = 100;
  localparam int NW = N_HID * 3 * N + N_HID + N * N_HID + N;
  localparam int AW = $clog2(NW);
  localparam int CNW = $clog2(N + 1);

  logic clk = 0, rst_n = 0;
  gen_cfg_t gen_cfg [N];
  logic     user_valid [N];
  packet_t  user_pkt [N];
  logic     gen_made [N], gen_overflow [N];
  iq_mode_e iq_mode = IQ_DROP;
  logic [CNW-1:0] collide_n, coll_drop_n, busy_drop_n, bad_drop_n, queued_n, dequeued_n, nn_lost_n;
  logic [$clog2(N*N+1)-1:0] tail_drop_n;
  logic [3:0] qos_occupancy [N][N_PREC];
  int max_occ = 0;
  logic nn_wr_en = 0;
  logic [AW-1:0] nn_wr_addr = '0;
  logic signed [NN_W-1:0] nn_wr_data = '0;
  logic cfg [N][N];
  logic nn_conflict [N], misroute [N];
  logic tx_valid [N], tx_ready [N], out_drop [N];
  packet_t tx_pkt [N];

  int checks = 0, failures = 0;

  nn_switch_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("%t %s", $time, what); end
  endtask

  // ---------------------------------------------------------------- bookkeeping
  int cyc = 0;
  longint made = 0, delivered = 0, c_gen_ovf = 0, c_coll = 0, c_colldrop = 0, c_busy = 0,
          c_bad = 0, c_queued = 0, c_tail = 0, c_deq = 0, c_lost = 0, c_outdrop = 0,
          c_misroute = 0, c_conflict = 0, c_backpressure = 0, c_reorder = 0, c_nonid_cfg = 0,
          c_drain = 0;
  bit      sent_v [int];       // user packets by id
  packet_t sent_p [int];
  bit      got    [int];
  int      last_flow [int];    // last id delivered per flow
  int      max_id_port [N];
  bit      check_ids = 0;
  int      t_push = -1, t_tx = -1;

  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    for (int i = 0; i < N; i++) begin
      if (gen_made[i]) made++;
      if (gen_overflow[i]) c_gen_ovf++;
      if (out_drop[i]) c_outdrop++;
      if (misroute[i]) c_misroute++;
      if (nn_conflict[i]) c_conflict++;
    end
    c_coll += collide_n; c_colldrop += coll_drop_n; c_busy += busy_drop_n; c_bad += bad_drop_n;
    c_queued += queued_n; c_tail += tail_drop_n; c_deq += dequeued_n; c_lost += nn_lost_n;
    if (iq_mode == IQ_DROP) c_drain += dequeued_n;
    for (int k = 0; k < N; k++)
      for (int p = 0; p < N_PREC; p++)
        if (int'(qos_occupancy[k][p]) > max_occ) max_occ = qos_occupancy[k][p];
    begin
      bit ident;
      bit any;
      ident = 1; any = 0;
      for (int i = 0; i < N; i++) for (int k = 0; k < N; k++) begin
        if (cfg[i][k]) any = 1;
        if (cfg[i][k] && i != k) ident = 0;
      end
      if (any && !ident) c_nonid_cfg++;
    end
    for (int k = 0; k < N; k++) begin
      if (tx_valid[k] && !tx_ready[k]) c_backpressure++;
      if (tx_valid[k] && tx_ready[k]) begin
        delivered++;
        if (t_tx < 0 && t_push >= 0) t_tx = cyc;
        checks++;
        if (int'(tx_pkt[k].dst) != k + 1) begin failures++; $display("port %0d got a packet for %0d", k + 1, tx_pkt[k].dst); end
        if (check_ids) begin
          int id, flow;
          id = tx_pkt[k].data;
          checks++;
          if (!sent_v.exists(id) || got.exists(id) || sent_p[id] != tx_pkt[k]) begin
            failures++; $display("packet %0d unknown, duplicated or altered", id);
          end else begin
            got[id] = 1;
            flow = tx_pkt[k].src * 100 + tx_pkt[k].dst * 10 + prec_of(tx_pkt[k].prio);
            if (last_flow.exists(flow)) begin
              checks++;
              if (last_flow[flow] > id) begin failures++; $display("flow %0d out of order", flow); end
            end
            last_flow[flow] = id;
            if (id < max_id_port[k]) c_reorder++;
            if (id > max_id_port[k]) max_id_port[k] = id;
          end
        end
      end
    end
  end

  // ---------------------------------------------------------------- stimulus
  function automatic field_cfg_t fc(field_mode_e m, int lo, int hi);
    fc.mode = m; fc.lo = FIELD_W'(lo); fc.hi = FIELD_W'(hi);
  endfunction

  int next_id = 1;

  task automatic user_traffic(int cycles, int pct, int ready_pct);
    for (int n = 0; n < cycles; n++) begin
      @(negedge clk);
      for (int i = 0; i < N; i++) begin
        tx_ready[i]   = $urandom_range(0, 99) < ready_pct;
        user_valid[i] = $urandom_range(0, 99) < pct;
        if (user_valid[i]) begin
          user_pkt[i].src  = PORT_W'(i + 1);
          user_pkt[i].dst  = ($urandom_range(0, 199) == 0) ? PORT_W'(0) : PORT_W'($urandom_range(1, N));
          user_pkt[i].prio = PRIO_W'(10 * $urandom_range(1, 4) + $urandom_range(1, 3));
          user_pkt[i].data = DATA_W'(next_id);
          sent_v[next_id] = 1;
          sent_p[next_id] = user_pkt[i];
          next_id++;
        end
      end
    end
    @(negedge clk);
    for (int i = 0; i < N; i++) user_valid[i] = 0;
  endtask

  task automatic drain(int cycles);
    for (int n = 0; n < cycles; n++) begin
      @(negedge clk);
      for (int i = 0; i < N; i++) tx_ready[i] = 1;
    end
  endtask

  initial begin
    for (int i = 0; i < N; i++) begin
      gen_cfg[i] = '0;
      gen_cfg[i].en = 1; gen_cfg[i].mode = GEN_USER; gen_cfg[i].jitter = 8'd255; gen_cfg[i].rate = 8'd0;
      gen_cfg[i].dst = fc(FIELD_UNIFORM, 1, N); gen_cfg[i].prec = fc(FIELD_UNIFORM, 1, 4);
      gen_cfg[i].dropp = fc(FIELD_UNIFORM, 1, 3); gen_cfg[i].data = fc(FIELD_GAUSS, 1, 10000);
      user_valid[i] = 0; user_pkt[i] = '0; tx_ready[i] = 1; max_id_port[i] = 0;
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int a = 0; a < NW; a++) begin
      @(negedge clk);
      nn_wr_en = 1; nn_wr_addr = AW'(a); nn_wr_data = NN_W'(route_weight(a, N_HID, N, NN_FRAC));
    end
    @(negedge clk);
    nn_wr_en = 0;
    check_ids = 1;

    // phase 1: one lone packet, latency
    @(negedge clk);
    user_valid[2] = 1;
    user_pkt[2] = {PORT_W'(3), PORT_W'(1), PRIO_W'(42), DATA_W'(next_id)};
    sent_v[next_id] = 1; sent_p[next_id] = user_pkt[2]; next_id++;
    t_push = cyc;
    @(negedge clk);
    user_valid[2] = 0;
    drain(20);
    check(t_tx - t_push == 7, $sformatf("lone packet latency %0d cycles, expected 7", t_tx - t_push));
    user_traffic(300, 10, 100);
    drain(30);

    // phase 2: drop mode, heavy load
    user_traffic(1500, 60, 60);
    drain(40);

    // phase 3: QoS mode, heavy load, slow far side
    iq_mode = IQ_QOS;
    user_traffic(1500, 55, 35);

    // phase 4: switch to drop mode with full queues
    iq_mode = IQ_DROP;
    user_traffic(300, 20, 90);
    drain(100);
    check_ids = 0;

    // phase 5: random packets, QoS mode, jitter, then rare reads
    iq_mode = IQ_QOS;
    for (int i = 0; i < N; i++) begin
      gen_cfg[i].mode = GEN_RANDOM; gen_cfg[i].rate = 8'd160; gen_cfg[i].jitter = 8'd191;
    end
    drain(2000);
    for (int i = 0; i < N; i++) gen_cfg[i].jitter = 8'd20;
    drain(1000);
    for (int i = 0; i < N; i++) gen_cfg[i].rate = 8'd0;
    for (int i = 0; i < N; i++) gen_cfg[i].jitter = 8'd255;
    drain(200);

    // every packet accounted for
    check(made == delivered + c_gen_ovf + c_colldrop + c_busy + c_bad + c_tail + c_lost + c_outdrop,
          $sformatf("made %0d, delivered %0d, dropped %0d", made, delivered,
                    c_gen_ovf + c_colldrop + c_busy + c_bad + c_tail + c_lost + c_outdrop));
    check(c_misroute == 0, "misrouted packets");
    check(c_lost == 0, "packets lost in the fabric");
    check(c_conflict == 0, "fabric column conflicts");
    check(c_outdrop == 0, "output FIFO overflow despite flow control");
    // mechanisms
    check(c_coll > 0, "no collision");
    check(c_colldrop > 0, "no collision drop");
    check(c_busy > 0, "no busy drop");
    check(c_bad > 0, "no bad destination");
    check(c_queued > 0, "nothing queued");
    check(c_tail > 0, "no tail drop");
    check(max_occ == 8, $sformatf("fullest QoS sub-queue held %0d packets, expected 8", max_occ));
    check(c_deq > 0, "nothing dequeued");
    check(c_reorder > 0, "no strict-priority reordering");
    check(c_drain > 0, "no drain after the mode switch");
    check(c_gen_ovf > 0, "no generator overflow");
    check(c_backpressure > 0, "far side never stalled");
    check(c_nonid_cfg > 0, "network never produced a crossing configuration");
    $display("made %0d delivered %0d | collisions %0d colldrop %0d busy %0d bad %0d queued %0d tail %0d deq %0d drain %0d | gen ovf %0d reorder %0d stall %0d crossing cfgs %0d",
             made, delivered, c_coll, c_colldrop, c_busy, c_bad, c_queued, c_tail, c_deq, c_drain, c_gen_ovf, c_reorder, c_backpressure, c_nonid_cfg);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
