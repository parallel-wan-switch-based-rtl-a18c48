// ffnn: the feedforward neural network that controls the switch fabric
// (inference only; the network is trained offline and its weights are loaded).
//
// Structure as in the design: an input vector made from the packets, one hidden
// layer of N_HID = 100 neurons and an output layer of N_OUT = 4 neurons. The
// network is evaluated fully in parallel: every neuron of a layer has its own
// multipliers, and each layer is one pipeline stage, so a new input vector can
// be taken every cycle and its outputs appear two cycles later (out_valid).
//
// Arithmetic (this implementation's choice): inputs x are unsigned integers of
// X_W bits; weights and biases are signed fixed point with FRAC fraction bits.
// The hidden activation is the saturating linear function clamp(v, -1, +1), a
// hardware stand-in for the tan-sigmoid of the toolbox network; the output layer
// is linear, as a fitting network's is. Hidden activations keep FRAC fraction
// bits; outputs are rounded to FRAC fraction bits and saturated to W bits.
//
// Weight load port: one W-bit word per cycle at wr_addr, in this order:
//   [0, N_HID*N_IN)           hidden weight of neuron h, input j at h*N_IN + j
//   next N_HID words          hidden biases
//   next N_OUT*N_HID words    output weight of neuron o, hidden h at o*N_HID + h
//   next N_OUT words          output biases
// Reset (active low, synchronous) clears all weights and the pipeline.
module ffnn
  import sw_pkg::*;
#(
  parameter int unsigned N_IN  = NN_IN,
  parameter int unsigned N_HID = 100,
  parameter int unsigned N_OUT = N_PORTS,
  parameter int unsigned W     = NN_W,
  parameter int unsigned FRAC  = NN_FRAC,
  parameter int unsigned X_W   = NN_X_W,
  localparam int unsigned N_WORDS = N_HID * N_IN + N_HID + N_OUT * N_HID + N_OUT,
  localparam int unsigned AW      = $clog2(N_WORDS)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                wr_en,
  input  logic [AW-1:0]       wr_addr,
  input  logic signed [W-1:0] wr_data,
  input  logic                in_valid,
  input  logic [X_W-1:0]      x [N_IN],
  output logic                out_valid,
  output logic signed [W-1:0] y [N_OUT]
);

  localparam int unsigned HW   = FRAC + 2;           // hidden activation width
  localparam int unsigned B1_A = N_HID * N_IN;
  localparam int unsigned W2_A = B1_A + N_HID;
  localparam int unsigned B2_A = W2_A + N_OUT * N_HID;
  localparam int unsigned ACCW = 48;

  logic signed [W-1:0] w1 [N_HID][N_IN];
  logic signed [W-1:0] b1 [N_HID];
  logic signed [W-1:0] w2 [N_OUT][N_HID];
  logic signed [W-1:0] b2 [N_OUT];

  // Weight memory.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int unsigned h = 0; h < N_HID; h++) begin
        b1[h] <= '0;
        for (int unsigned j = 0; j < N_IN; j++) w1[h][j] <= '0;
      end
      for (int unsigned o = 0; o < N_OUT; o++) begin
        b2[o] <= '0;
        for (int unsigned h = 0; h < N_HID; h++) w2[o][h] <= '0;
      end
    end else if (wr_en) begin
      if (int'(wr_addr) < B1_A)
        w1[int'(wr_addr) / N_IN][int'(wr_addr) % N_IN] <= wr_data;
      else if (int'(wr_addr) < W2_A)
        b1[int'(wr_addr) - B1_A] <= wr_data;
      else if (int'(wr_addr) < B2_A)
        w2[(int'(wr_addr) - W2_A) / N_HID][(int'(wr_addr) - W2_A) % N_HID] <= wr_data;
      else if (int'(wr_addr) < N_WORDS)
        b2[int'(wr_addr) - B2_A] <= wr_data;
    end
  end

  // Hidden layer: weighted sum, bias, saturating activation.
  logic signed [HW-1:0] h_d [N_HID];
  logic signed [HW-1:0] h_q [N_HID];
  logic                 v1_q;

  always_comb begin
    logic signed [ACCW-1:0] acc;
    for (int unsigned h = 0; h < N_HID; h++) begin
      acc = ACCW'(b1[h]);
      for (int unsigned j = 0; j < N_IN; j++)
        acc = acc + ACCW'(w1[h][j]) * ACCW'($signed({1'b0, x[j]}));
      if (acc > ACCW'(signed'(1 << FRAC)))        h_d[h] = HW'(1 << FRAC);
      else if (acc < -ACCW'(signed'(1 << FRAC)))  h_d[h] = -HW'(1 << FRAC);
      else                                        h_d[h] = HW'(acc);
    end
  end

  // Output layer: weighted sum of the hidden activations plus bias, linear.
  logic signed [W-1:0] y_d [N_OUT];

  always_comb begin
    logic signed [ACCW-1:0] acc;
    for (int unsigned o = 0; o < N_OUT; o++) begin
      acc = ACCW'(b2[o]) <<< FRAC;
      for (int unsigned h = 0; h < N_HID; h++)
        acc = acc + ACCW'(w2[o][h]) * ACCW'(h_q[h]);
      acc = (acc + ACCW'(signed'(1 << (FRAC - 1)))) >>> FRAC;
      if (acc > ACCW'(signed'((1 << (W - 1)) - 1)))  y_d[o] = W'((1 << (W - 1)) - 1);
      else if (acc < -ACCW'(signed'(1 << (W - 1))))  y_d[o] = W'(1 << (W - 1));
      else                                           y_d[o] = W'(acc);
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v1_q      <= 1'b0;
      out_valid <= 1'b0;
      for (int unsigned h = 0; h < N_HID; h++) h_q[h] <= '0;
      for (int unsigned o = 0; o < N_OUT; o++) y[o] <= '0;
    end else begin
      v1_q      <= in_valid;
      out_valid <= v1_q;
      h_q       <= h_d;
      y         <= y_d;
    end
  end

endmodule
