// switch_fabric: the neural-network controlled switch fabric.
//
// The packets on the N lanes are turned into the network's input vector
// (source, destination and priority field of every lane, zeros for an empty
// lane). The network (ffnn) answers with one output per output port; output k,
// rounded to the nearest integer, is the number (1..N) of the lane to connect to
// port k, and 0 or any other value leaves port k unconnected. That gives the
// configuration matrix c, c[i][k] = 1 when lane i goes to port k, which closes
// the switches of the crossbar. The lane packets wait in a two-stage delay line
// while the network computes, so packet and matrix meet at the crossbar.
//
// Timing: a packet on a lane in cycle t leaves on its output port in cycle t+3
// (two network stages, one output register); a new set of lanes is taken every
// cycle. The fabric routes by the network's matrix alone; lost_n counts valid
// lane packets that the matrix connected to no port (they are discarded), and
// conflict flags a port to which it connected more than one packet.
// The output encoding and the input vector are this implementation's choice.
module switch_fabric
  import sw_pkg::*;
#(
  parameter int unsigned N     = N_PORTS,
  parameter int unsigned N_HID = 100,
  localparam int unsigned N_IN    = 3 * N,
  localparam int unsigned N_WORDS = N_HID * N_IN + N_HID + N * N_HID + N,
  localparam int unsigned AW      = $clog2(N_WORDS)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     wr_en,
  input  logic [AW-1:0]            wr_addr,
  input  logic signed [NN_W-1:0]   wr_data,
  input  logic                     lane_valid [N],
  input  packet_t                  lane_pkt   [N],
  output logic                     out_valid  [N],
  output packet_t                  out_pkt    [N],
  output logic                     cfg        [N][N],
  output logic                     conflict   [N],
  output logic [$clog2(N+1)-1:0]   lost_n
);

  logic [NN_X_W-1:0]      x [N_IN];
  logic                   any_valid;
  logic                   y_valid;
  logic signed [NN_W-1:0] y [N];

  always_comb begin
    any_valid = 1'b0;
    for (int unsigned i = 0; i < N; i++) begin
      any_valid    = any_valid | lane_valid[i];
      x[3*i]       = lane_valid[i] ? NN_X_W'(lane_pkt[i].src)  : '0;
      x[3*i + 1]   = lane_valid[i] ? NN_X_W'(lane_pkt[i].dst)  : '0;
      x[3*i + 2]   = lane_valid[i] ? NN_X_W'(lane_pkt[i].prio) : '0;
    end
  end

  ffnn #(
    .N_IN (N_IN),
    .N_HID(N_HID),
    .N_OUT(N),
    .W    (NN_W),
    .FRAC (NN_FRAC),
    .X_W  (NN_X_W)
  ) u_nn (
    .clk      (clk),
    .rst_n    (rst_n),
    .wr_en    (wr_en),
    .wr_addr  (wr_addr),
    .wr_data  (wr_data),
    .in_valid (any_valid),
    .x        (x),
    .out_valid(y_valid),
    .y        (y)
  );

  // Delay line that keeps the packets in step with the network.
  logic    d_valid [2][N];
  packet_t d_pkt   [2][N];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int unsigned s = 0; s < 2; s++)
        for (int unsigned i = 0; i < N; i++) begin
          d_valid[s][i] <= 1'b0;
          d_pkt[s][i]   <= '0;
        end
    end else begin
      for (int unsigned i = 0; i < N; i++) begin
        d_valid[0][i] <= lane_valid[i];
        d_pkt[0][i]   <= lane_pkt[i];
        d_valid[1][i] <= d_valid[0][i];
        d_pkt[1][i]   <= d_pkt[0][i];
      end
    end
  end

  // Network outputs to configuration matrix.
  always_comb begin
    logic signed [NN_W-1:0] r;
    for (int unsigned k = 0; k < N; k++) begin
      r = (y[k] + NN_W'(1 << (NN_FRAC - 1))) >>> NN_FRAC;
      for (int unsigned i = 0; i < N; i++)
        cfg[i][k] = y_valid && (r == NN_W'(i + 1));
    end
  end

  logic    xb_valid [N];
  packet_t xb_pkt   [N];
  logic    routed   [N];

  crossbar #(.N(N)) u_xb (
    .in_valid (d_valid[1]),
    .in_pkt   (d_pkt[1]),
    .c        (cfg),
    .out_valid(xb_valid),
    .out_pkt  (xb_pkt),
    .conflict (conflict)
  );

  always_comb begin
    lost_n = '0;
    for (int unsigned i = 0; i < N; i++) begin
      routed[i] = 1'b0;
      for (int unsigned k = 0; k < N; k++) routed[i] = routed[i] | cfg[i][k];
      if (d_valid[1][i] && !routed[i]) lost_n = lost_n + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int unsigned k = 0; k < N; k++) begin
        out_valid[k] <= 1'b0;
        out_pkt[k]   <= '0;
      end
    end else begin
      out_valid <= xb_valid;
      out_pkt   <= xb_pkt;
    end
  end

endmodule
