// tb_ffnn: self-checking testbench of the neural network.
//
// Loads random weights, drives random input vectors every cycle and compares
// the outputs, two cycles later, with a fixed-point model of the network
// (saturating hidden activation, rounded linear output). Then loads the routing
// weight set and checks that the outputs are exactly the lane numbers.
module tb_ffnn;
  import sw_pkg::*;
  import tb_nn_weights::*;

  localparam int N_IN = NN_IN, N_HID = 100, N_OUT = N_PORTS, FRAC = NN_FRAC;
  localparam int NW = N_HID * N_IN + N_HID + N_OUT * N_HID + N_OUT;
  localparam int AW = $clog2(NW);

  logic clk = 0, rst_n = 0;
  logic wr_en = 0;
  logic [AW-1:0] wr_addr = '0;
  logic signed [NN_W-1:0] wr_data = '0;
  logic in_valid = 0;
  logic [NN_X_W-1:0] x [N_IN];
  logic out_valid;
  logic signed [NN_W-1:0] y [N_OUT];

  int checks = 0, failures = 0;
  int wmem [NW];

  ffnn dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_out(int o, int xv []);
    longint acc, hv [N_HID], a2;
    for (int h = 0; h < N_HID; h++) begin
      acc = wmem[N_HID*N_IN + h];
      for (int j = 0; j < N_IN; j++) acc += longint'(wmem[h*N_IN + j]) * xv[j];
      if (acc > (1 << FRAC)) acc = 1 << FRAC;
      if (acc < -(1 << FRAC)) acc = -(1 << FRAC);
      hv[h] = acc;
    end
    a2 = longint'(wmem[N_HID*N_IN + N_HID + N_OUT*N_HID + o]) * (1 << FRAC);
    for (int h = 0; h < N_HID; h++) a2 += longint'(wmem[N_HID*N_IN + N_HID + o*N_HID + h]) * hv[h];
    a2 = (a2 + (1 << (FRAC-1))) >>> FRAC;
    if (a2 > 32767) a2 = 32767;
    if (a2 < -32768) a2 = -32768;
    return int'(a2);
  endfunction

  task automatic load(bit routing);
    for (int a = 0; a < NW; a++) begin
      if (routing) wmem[a] = route_weight(a, N_HID, N_OUT, FRAC);
      else wmem[a] = int'($urandom_range(0, 511)) - 256;  // about -1..+1
      @(negedge clk);
      wr_en = 1; wr_addr = AW'(a); wr_data = NN_W'(wmem[a]);
    end
    @(negedge clk);
    wr_en = 0;
  endtask

  int exp_q [$];
  int cyc_in [$];
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // Compare outputs with the queued expectations.
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      int e [N_OUT];
      int c0;
      checks++;
      if (exp_q.size() == 0) begin
        failures++; $display("unexpected output");
      end else begin
        for (int o = 0; o < N_OUT; o++) e[o] = exp_q.pop_front();
        c0 = cyc_in.pop_front();
        if (cyc - c0 != 2) begin failures++; $display("latency %0d, expected 2", cyc - c0); end
        for (int o = 0; o < N_OUT; o++) begin
          checks++;
          if (int'(y[o]) != e[o]) begin
            failures++;
            $display("output %0d: got %0d expected %0d", o, y[o], e[o]);
          end
        end
      end
    end
  end

  task automatic drive(int n, bit routing);
    int xv [];
    int e [N_OUT];
    xv = new[N_IN];
    for (int v = 0; v < n; v++) begin
      @(negedge clk);
      for (int j = 0; j < N_IN; j++) begin
        if (routing) begin
          // lanes with a random permutation of destinations, some empty
          xv[j] = 0;
        end else xv[j] = $urandom_range(0, 255);
      end
      if (routing) begin
        int perm [N_OUT];
        for (int i = 0; i < N_OUT; i++) perm[i] = i + 1;
        perm.shuffle();
        for (int i = 0; i < N_OUT; i++) begin
          if ($urandom_range(0, 3) != 0) begin
            xv[3*i] = i + 1; xv[3*i+1] = perm[i]; xv[3*i+2] = 10 * $urandom_range(1, 4) + $urandom_range(1, 3);
          end
        end
        for (int o = 0; o < N_OUT; o++) begin
          e[o] = 0;
          for (int i = 0; i < N_OUT; i++) if (xv[3*i+1] == o + 1) e[o] = (i + 1) << FRAC;
        end
      end else begin
        for (int o = 0; o < N_OUT; o++) e[o] = ref_out(o, xv);
      end
      for (int j = 0; j < N_IN; j++) x[j] = NN_X_W'(xv[j]);
      in_valid = 1;
      for (int o = 0; o < N_OUT; o++) exp_q.push_back(e[o]);
      cyc_in.push_back(cyc);
    end
    @(negedge clk);
    in_valid = 0;
    repeat (4) @(negedge clk);
  endtask

  initial begin
    for (int j = 0; j < N_IN; j++) x[j] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    load(0);
    drive(200, 0);
    load(1);
    drive(200, 1);
    if (exp_q.size() != 0) begin failures++; $display("%0d outputs missing", exp_q.size() / N_OUT); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
