// tb_collision_detector: self-checking testbench of the collision detector.
//
// Random sets of four packets with destinations drawn from a small range (so
// collisions are frequent). For every destination the expected winner is found
// by ranking the packets on the key (P, 3 - d, 3 - lane), largest wins.
module tb_collision_detector;
  import sw_pkg::*;

  localparam int N = N_PORTS;
  logic    valid [N];
  packet_t pkt   [N];
  logic    collide [N];
  logic    win     [N];
  int checks = 0, failures = 0, n_coll = 0;

  collision_detector dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 5000; n++) begin
      int key [N];
      for (int i = 0; i < N; i++) begin
        int p, d;
        p = $urandom_range(1, 4);
        d = $urandom_range(1, 3);
        valid[i]    = $urandom_range(0, 4) != 0;
        pkt[i].src  = PORT_W'(i + 1);
        pkt[i].dst  = PORT_W'($urandom_range(1, 3));
        pkt[i].prio = PRIO_W'(10 * p + d);
        pkt[i].data = DATA_W'($urandom_range(1, 10000));
        key[i] = p * 100 + (3 - d) * 10 + (3 - i);
      end
      #1;
      for (int i = 0; i < N; i++) begin
        bit ec, ew;
        ec = 0;
        ew = valid[i];
        for (int j = 0; j < N; j++)
          if (j != i && valid[i] && valid[j] && pkt[i].dst == pkt[j].dst) begin
            ec = 1;
            if (key[j] > key[i]) ew = 0;
          end
        checks += 2;
        if (collide[i] != ec) begin failures++; $display("collide lane %0d", i); end
        if (win[i] != ew) begin failures++; $display("win lane %0d", i); end
        if (ec) n_coll++;
      end
      #9;
    end
    checks++;
    if (n_coll == 0) begin failures++; $display("no collision seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
