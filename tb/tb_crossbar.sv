// tb_crossbar: self-checking testbench of the crossbar switch array.
//
// Random permutation matrices (some rows empty) must carry each valid input to
// its column; matrices with two closed switches in a column must flag conflict.
module tb_crossbar;
  import sw_pkg::*;

  localparam int N = N_PORTS;
  logic    in_valid [N];
  packet_t in_pkt   [N];
  logic    c        [N][N];
  logic    out_valid [N];
  packet_t out_pkt   [N];
  logic    conflict  [N];
  int checks = 0, failures = 0;

  crossbar dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int perm [N];
    for (int n = 0; n < 3000; n++) begin
      bit dup;
      for (int i = 0; i < N; i++) perm[i] = i;
      perm.shuffle();
      dup = (n % 5 == 4);
      for (int i = 0; i < N; i++) begin
        in_valid[i] = $urandom_range(0, 3) != 0;
        in_pkt[i]   = packet_t'($urandom);
        for (int k = 0; k < N; k++) c[i][k] = (perm[i] == k);
      end
      if (dup) begin
        // lanes 0 and 1 both closed on the column of lane 0
        for (int k = 0; k < N; k++) c[1][k] = (perm[0] == k);
        in_valid[0] = 1; in_valid[1] = 1;
      end
      #1;
      for (int k = 0; k < N; k++) begin
        bit ev;
        packet_t ep;
        int cnt;
        ev = 0; ep = '0; cnt = 0;
        for (int i = 0; i < N; i++) if (c[i][k] && in_valid[i]) begin ev = 1; ep |= in_pkt[i]; cnt++; end
        checks += 3;
        if (out_valid[k] != ev) begin failures++; $display("valid %0d", k); end
        if (ev && out_pkt[k] != ep) begin failures++; $display("packet %0d", k); end
        if (conflict[k] != (cnt > 1)) begin failures++; $display("conflict %0d", k); end
      end
      if (!dup) begin
        // each valid input appears on exactly its output
        for (int i = 0; i < N; i++) if (in_valid[i]) begin
          checks++;
          if (out_pkt[perm[i]] != in_pkt[i]) begin failures++; $display("route %0d", i); end
        end
      end
      #9;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
