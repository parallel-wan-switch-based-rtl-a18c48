// tb_qos_queue: self-checking testbench of the per-output QoS queue.
//
// Up to four packets per cycle with random precedence are written while the
// head is popped at random. A model with one queue per precedence checks the
// head (oldest packet of the highest non-empty precedence), the number of tail
// drops in each cycle and the occupancy of every sub-queue. A phase with heavy
// traffic and few pops fills the sub-queues so tail drop happens.
module tb_qos_queue;
  import sw_pkg::*;

  localparam int N = N_PORTS, NPREC = N_PREC, QDEPTH = 8;
  logic clk = 0, rst_n = 0;
  logic    push_valid [N];
  packet_t push_pkt   [N];
  logic    pop = 0;
  logic    head_valid;
  packet_t head_pkt;
  logic [$clog2(N+1)-1:0] drop_n;
  logic [$clog2(QDEPTH+1)-1:0] occupancy [NPREC];
  int checks = 0, failures = 0, drops_seen = 0, overtakes = 0;
  packet_t mq [NPREC][$];

  qos_queue dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("%t %s", $time, what); end
  endtask

  initial begin
    int hp, exp_drop, space, used [NPREC], pct, pop_pct;
    bit acc [N];
    for (int i = 0; i < N; i++) begin push_valid[i] = 0; push_pkt[i] = '0; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 5000; n++) begin
      pct     = ((n / 400) % 2 == 0) ? 40 : 10;
      pop_pct = ((n / 400) % 2 == 0) ? 40 : 90;
      @(negedge clk);
      hp = -1;
      for (int p = 0; p < NPREC; p++) if (mq[p].size() > 0) hp = p;
      check(head_valid == (hp >= 0), "head_valid");
      if (hp >= 0) check(head_pkt == mq[hp][0], "head packet");
      for (int p = 0; p < NPREC; p++) check(int'(occupancy[p]) == mq[p].size(), "occupancy");
      pop = $urandom_range(0, 99) < pop_pct;
      for (int i = 0; i < N; i++) begin
        push_valid[i]    = $urandom_range(0, 99) < pct;
        push_pkt[i]      = packet_t'($urandom);
        push_pkt[i].prio = PRIO_W'(10 * $urandom_range(1, NPREC) + $urandom_range(1, 3));
      end
      exp_drop = 0;
      for (int p = 0; p < NPREC; p++) used[p] = 0;
      for (int i = 0; i < N; i++) begin
        int p;
        p = push_pkt[i].prio / 10 - 1;
        acc[i] = 0;
        if (push_valid[i]) begin
          space = QDEPTH - mq[p].size() + ((pop && hp == p) ? 1 : 0);
          if (used[p] < space) begin acc[i] = 1; used[p]++; end
          else exp_drop++;
        end
      end
      #1;
      check(int'(drop_n) == exp_drop, "drop count");
      drops_seen += exp_drop;
      @(posedge clk);
      if (pop && hp >= 0) begin
        for (int p = 0; p < hp; p++) if (mq[p].size() > 0) overtakes++;
        void'(mq[hp].pop_front());
      end
      for (int i = 0; i < N; i++) if (acc[i]) mq[push_pkt[i].prio / 10 - 1].push_back(push_pkt[i]);
    end
    check(drops_seen > 0, "tail drop never happened");
    check(overtakes > 0, "higher precedence never read before a waiting lower one");
    $display("tail drops %0d, precedence overtakes %0d", drops_seen, overtakes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
