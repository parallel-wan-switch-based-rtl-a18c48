// tb_pkt_gen: self-checking testbench of the packet generator.
//
// User mode: a numbered packet sequence is pushed; what comes out must be that
// sequence in order (with the generator's source port), minus exactly the
// packets reported as overflow while the FIFO is read only rarely. Random mode:
// fixed fields must be exact, uniform fields must stay in range and hit every
// value, the bell-shaped field must be centred and narrower than the uniform
// one, and the production and read rates must match rate/256 and
// (jitter+1)/256. A disabled generator must stay silent.
module tb_pkt_gen;
  import sw_pkg::*;

  localparam int PORT = 3;
  logic clk = 0, rst_n = 0;
  gen_cfg_t cfg;
  logic user_valid = 0;
  packet_t user_pkt = '0;
  logic out_valid, made, overflow;
  packet_t out_pkt;
  int checks = 0, failures = 0;

  pkt_gen #(.PORT_ID(PORT)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("%t %s", $time, what); end
  endtask

  function automatic field_cfg_t fc(field_mode_e m, int lo, int hi);
    fc.mode = m; fc.lo = FIELD_W'(lo); fc.hi = FIELD_W'(hi);
  endfunction

  // Output monitor
  int n_out = 0, n_made = 0, n_ovf = 0;
  packet_t outs [$];
  always @(posedge clk) if (rst_n) begin
    if (out_valid) begin n_out++; outs.push_back(out_pkt); end
    if (made) n_made++;
    if (overflow) n_ovf++;
  end

  task automatic reset_counts();
    @(negedge clk);
    n_out = 0; n_made = 0; n_ovf = 0; outs.delete();
  endtask

  initial begin
    int sent, idx;
    real sum, sq, mean, sd_u, sd_g;
    int seen_dst [5], seen_p [5], seen_d [4];
    cfg = '0;
    cfg.dst = fc(FIELD_FIXED, 1, 1); cfg.prec = fc(FIELD_FIXED, 1, 1);
    cfg.dropp = fc(FIELD_FIXED, 1, 1); cfg.data = fc(FIELD_FIXED, 1, 1);
    repeat (3) @(negedge clk);
    rst_n = 1;

    // --- user mode, rare reads: overflow
    cfg.en = 1; cfg.mode = GEN_USER; cfg.jitter = 8'd3;
    reset_counts();
    sent = 0;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      user_valid = $urandom_range(0, 9) < 3;
      if (user_valid) begin
        sent++;
        user_pkt.src = 3'd7; user_pkt.dst = PORT_W'(1 + sent % 4);
        user_pkt.prio = 6'd32; user_pkt.data = DATA_W'(sent);
      end
    end
    @(negedge clk); user_valid = 0;
    cfg.jitter = 8'd255;
    repeat (40) @(negedge clk);
    check(n_ovf > 0, "no overflow with rare reads");
    check(n_out + n_ovf == sent, $sformatf("user mode: %0d out + %0d overflow != %0d sent", n_out, n_ovf, sent));
    idx = 0;
    foreach (outs[k]) begin
      check(outs[k].src == PORT_W'(PORT), "source port not forced");
      check(int'(outs[k].data) > idx, "user sequence out of order");
      check(int'(outs[k].dst) == 1 + int'(outs[k].data) % 4, "user packet altered");
      idx = outs[k].data;
    end

    // --- random mode, fixed fields, full rate
    cfg.mode = GEN_RANDOM; cfg.rate = 8'd255; cfg.jitter = 8'd255;
    cfg.dst = fc(FIELD_FIXED, 3, 3); cfg.prec = fc(FIELD_FIXED, 2, 2);
    cfg.dropp = fc(FIELD_FIXED, 1, 1); cfg.data = fc(FIELD_FIXED, 77, 77);
    reset_counts();
    repeat (500) @(negedge clk);
    check(n_out > 400, "fixed mode: too few packets");
    foreach (outs[k]) check(outs[k] == {PORT_W'(PORT), PORT_W'(3), PRIO_W'(21), DATA_W'(77)}, "fixed fields");

    // --- uniform fields, rate 64/256
    cfg.rate = 8'd64;
    cfg.dst = fc(FIELD_UNIFORM, 1, 4); cfg.prec = fc(FIELD_UNIFORM, 1, 4);
    cfg.dropp = fc(FIELD_UNIFORM, 1, 3); cfg.data = fc(FIELD_UNIFORM, 1, 10000);
    reset_counts();
    repeat (16000) @(negedge clk);
    check(n_made > 16000 * 0.22 && n_made < 16000 * 0.28, $sformatf("rate: %0d made", n_made));
    foreach (seen_dst[v]) seen_dst[v] = 0;
    foreach (seen_p[v]) seen_p[v] = 0;
    foreach (seen_d[v]) seen_d[v] = 0;
    sum = 0; sq = 0;
    foreach (outs[k]) begin
      int p, d;
      p = outs[k].prio / 10; d = outs[k].prio % 10;
      check(outs[k].dst >= 1 && outs[k].dst <= 4 && p >= 1 && p <= 4 && d >= 1 && d <= 3
            && outs[k].data >= 1 && outs[k].data <= 10000, "uniform field out of range");
      seen_dst[outs[k].dst]++; seen_p[p]++; seen_d[d]++;
      sum += outs[k].data; sq += real'(outs[k].data) * outs[k].data;
    end
    for (int v = 1; v <= 4; v++) check(seen_dst[v] > 0 && seen_p[v] > 0, "uniform value never drawn");
    for (int v = 1; v <= 3; v++) check(seen_d[v] > 0, "drop precedence never drawn");
    mean = sum / outs.size();
    sd_u = $sqrt(sq / outs.size() - mean * mean);
    check(mean > 4500 && mean < 5500, $sformatf("uniform mean %f", mean));

    // --- bell-shaped data field
    cfg.data = fc(FIELD_GAUSS, 1, 10000);
    reset_counts();
    repeat (16000) @(negedge clk);
    sum = 0; sq = 0;
    foreach (outs[k]) begin
      check(outs[k].data >= 1 && outs[k].data <= 10000, "gauss field out of range");
      sum += outs[k].data; sq += real'(outs[k].data) * outs[k].data;
    end
    mean = sum / outs.size();
    sd_g = $sqrt(sq / outs.size() - mean * mean);
    check(mean > 4500 && mean < 5500, $sformatf("gauss mean %f", mean));
    check(sd_g < 0.65 * sd_u && sd_g > 0.35 * sd_u, $sformatf("gauss sd %f vs uniform %f", sd_g, sd_u));

    // --- jitter: reads with probability 64/256 while the FIFO is kept full
    cfg.rate = 8'd255; cfg.jitter = 8'd63;
    reset_counts();
    repeat (16000) @(negedge clk);
    check(n_out > 16000 * 0.22 && n_out < 16000 * 0.28, $sformatf("jitter: %0d read", n_out));

    // --- disabled
    cfg.en = 0;
    repeat (5) @(negedge clk);
    reset_counts();
    repeat (500) @(negedge clk);
    check(n_made == 0 && n_out == 0, "disabled generator produced packets");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
