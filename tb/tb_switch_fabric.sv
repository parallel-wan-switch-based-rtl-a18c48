// tb_switch_fabric: self-checking testbench of the network-controlled fabric.
//
// The routing weight set (tb_nn_weights) is loaded through the weight port.
// Random collision-free lane sets are then applied every cycle; each packet
// must leave on the port named by its destination exactly three cycles later,
// and the configuration matrix must be the matching permutation. With all
// weights cleared the network connects nothing, and every packet must be
// reported lost.
module tb_switch_fabric;
  import sw_pkg::*;
  import tb_nn_weights::*;

  localparam int N = N_PORTS, N_HID = 100;
  localparam int NW = N_HID * 3 * N + N_HID + N * N_HID + N;
  localparam int AW = $clog2(NW);
  logic clk = 0, rst_n = 0;
  logic wr_en = 0;
  logic [AW-1:0] wr_addr = '0;
  logic signed [NN_W-1:0] wr_data = '0;
  logic    lane_valid [N];
  packet_t lane_pkt   [N];
  logic    out_valid  [N];
  packet_t out_pkt    [N];
  logic    cfg        [N][N];
  logic    conflict   [N];
  logic [$clog2(N+1)-1:0] lost_n;
  int checks = 0, failures = 0;

  switch_fabric dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("%t %s", $time, what); end
  endtask

  task automatic load(bit zero);
    for (int a = 0; a < NW; a++) begin
      @(negedge clk);
      wr_en = 1; wr_addr = AW'(a);
      wr_data = zero ? '0 : NN_W'(route_weight(a, N_HID, N, NN_FRAC));
    end
    @(negedge clk);
    wr_en = 0;
  endtask

  // history of the applied lanes, indexed by cycle modulo 8
  bit      hv [8][N];
  packet_t hp [8][N];
  int cyc = 0;

  task automatic run(int cycles, bit expect_routed);
    int perm [N];
    int lost_total, sent_total;
    lost_total = 0; sent_total = 0;
    for (int n = 0; n < cycles + 3; n++) begin
      @(negedge clk);
      cyc++;
      // outputs for the lanes applied three cycles ago
      if (n >= 3) begin
        int s;
        s = (cyc - 3) % 8;
        for (int k = 0; k < N; k++) begin
          bit ev;
          packet_t ep;
          ev = 0; ep = '0;
          for (int i = 0; i < N; i++) if (hv[s][i] && int'(hp[s][i].dst) == k + 1) begin ev = 1; ep = hp[s][i]; end
          if (expect_routed) begin
            check(out_valid[k] == ev, $sformatf("port %0d valid", k));
            if (ev) check(out_pkt[k] == ep, $sformatf("port %0d packet", k));
          end else check(!out_valid[k], "packet routed with zero weights");
        end
      end
      // configuration matrix for the lanes applied two cycles ago
      if (n >= 2) begin
        int s;
        s = (cyc - 2) % 8;
        for (int i = 0; i < N; i++)
          for (int k = 0; k < N; k++)
            if (expect_routed)
              check(cfg[i][k] == (hv[s][i] && int'(hp[s][i].dst) == k + 1), "configuration matrix");
        for (int i = 0; i < N; i++) if (hv[s][i]) sent_total++;
        lost_total += lost_n;
      end
      for (int i = 0; i < N; i++) perm[i] = i + 1;
      perm.shuffle();
      for (int i = 0; i < N; i++) begin
        lane_valid[i]    = (n < cycles) && ($urandom_range(0, 3) != 0);
        lane_pkt[i].src  = PORT_W'(i + 1);
        lane_pkt[i].dst  = PORT_W'(perm[i]);
        lane_pkt[i].prio = PRIO_W'(10 * $urandom_range(1, 4) + $urandom_range(1, 3));
        lane_pkt[i].data = DATA_W'($urandom_range(1, 10000));
        hv[cyc % 8][i] = lane_valid[i];
        hp[cyc % 8][i] = lane_pkt[i];
      end
    end
    if (expect_routed) check(lost_total == 0, "packets lost with routing weights");
    else check(lost_total == sent_total && sent_total > 0, $sformatf("lost %0d of %0d", lost_total, sent_total));
  endtask

  initial begin
    for (int i = 0; i < N; i++) begin lane_valid[i] = 0; lane_pkt[i] = '0; end
    for (int s = 0; s < 8; s++) for (int i = 0; i < N; i++) begin hv[s][i] = 0; hp[s][i] = '0; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    load(0);
    run(2000, 1);
    load(1);
    run(200, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
