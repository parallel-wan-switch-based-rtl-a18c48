// nn_switch_top: a four-port packet switch whose fabric is controlled by a
// feedforward neural network.
//
// Data path, as in the switch model of the design: N packet generators (pkt_gen)
// -> input-queue block (input_queue: collision detector, drop or QoS mode) ->
// switch fabric (switch_fabric: the network ffnn produces the configuration
// matrix, the crossbar switches the packets) -> one output FIFO of OUT_DEPTH
// packets per port (pkt_fifo). An output FIFO sends its head packet whenever the
// device on the far side is ready (tx_valid/tx_ready handshake).
//
// The input-queue block offers a packet to output k only while the FIFO of k
// can still hold it: out_ready[k] compares the FIFO count plus the packets
// already on their way through the fabric (at most four: the lane register, two
// network stages and the fabric output register) with OUT_DEPTH. The packets in
// flight are counted by destination field, so the accounting assumes the
// network routes every packet to its destination; misroute[k] flags a packet
// that arrived at port k with another destination, and the fabric's lost_n
// counts packets it connected nowhere.
//
// Latency of a packet that meets no collision and no queue: one cycle from the
// generator output to the lane register, three through the fabric, then it is
// at the head of an empty output FIFO one cycle later. The network weights are
// loaded through the nn_wr_* port (see ffnn for the address map) before
// traffic starts; after reset they are zero and no packet is routed.
// The *_n, made, overflow and drop outputs report events of the current cycle.
module nn_switch_top
  import sw_pkg::*;
#(
  parameter int unsigned N_HID     = 100,
  parameter int unsigned QDEPTH    = 8,
  parameter int unsigned OUT_DEPTH = 8,
  parameter int unsigned GEN_DEPTH = 8,
  localparam int unsigned N       = N_PORTS,
  localparam int unsigned N_WORDS = N_HID * 3 * N + N_HID + N * N_HID + N,
  localparam int unsigned AW      = $clog2(N_WORDS),
  localparam int unsigned CNW     = $clog2(N + 1)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // generators
  input  gen_cfg_t               gen_cfg      [N],
  input  logic                   user_valid   [N],
  input  packet_t                user_pkt     [N],
  output logic                   gen_made     [N],
  output logic                   gen_overflow [N],
  // input-queue block
  input  iq_mode_e               iq_mode,
  output logic [CNW-1:0]         collide_n,
  output logic [CNW-1:0]         coll_drop_n,
  output logic [CNW-1:0]         busy_drop_n,
  output logic [CNW-1:0]         bad_drop_n,
  output logic [CNW-1:0]         queued_n,
  output logic [$clog2(N*N+1)-1:0] tail_drop_n,
  output logic [CNW-1:0]         dequeued_n,
  output logic [$clog2(QDEPTH+1)-1:0] qos_occupancy [N][N_PREC],
  // neural network weight load
  input  logic                   nn_wr_en,
  input  logic [AW-1:0]          nn_wr_addr,
  input  logic signed [NN_W-1:0] nn_wr_data,
  // fabric observation
  output logic                   cfg          [N][N],
  output logic                   nn_conflict  [N],
  output logic [CNW-1:0]         nn_lost_n,
  output logic                   misroute     [N],
  // output ports
  output logic                   tx_valid     [N],
  output packet_t                tx_pkt       [N],
  input  logic                   tx_ready     [N],
  output logic                   out_drop     [N]
);

  localparam int unsigned OCW = $clog2(OUT_DEPTH + 1);
  localparam int unsigned IFW = 3;  // counts up to 4 packets in flight

  logic    g_valid [N];
  packet_t g_pkt   [N];

  for (genvar i = 0; i < N; i++) begin : g_gen
    pkt_gen #(
      .PORT_ID(i + 1),
      .DEPTH  (GEN_DEPTH),
      .SEED   (64'h9E37_79B9_7F4A_7C15 + 64'(i) * 64'h1234_5678_9ABC_DEF1)
    ) u_gen (
      .clk       (clk),
      .rst_n     (rst_n),
      .cfg       (gen_cfg[i]),
      .user_valid(user_valid[i]),
      .user_pkt  (user_pkt[i]),
      .out_valid (g_valid[i]),
      .out_pkt   (g_pkt[i]),
      .made      (gen_made[i]),
      .overflow  (gen_overflow[i])
    );
  end

  logic    out_ready  [N];
  logic    lane_valid [N];
  packet_t lane_pkt   [N];

  input_queue #(.N(N), .QDEPTH(QDEPTH)) u_iq (
    .clk        (clk),
    .rst_n      (rst_n),
    .mode       (iq_mode),
    .in_valid   (g_valid),
    .in_pkt     (g_pkt),
    .out_ready  (out_ready),
    .lane_valid (lane_valid),
    .lane_pkt   (lane_pkt),
    .collide_n  (collide_n),
    .coll_drop_n(coll_drop_n),
    .busy_drop_n(busy_drop_n),
    .bad_drop_n (bad_drop_n),
    .queued_n   (queued_n),
    .tail_drop_n(tail_drop_n),
    .dequeued_n (dequeued_n),
    .qos_occupancy(qos_occupancy)
  );

  logic    f_valid [N];
  packet_t f_pkt   [N];

  switch_fabric #(.N(N), .N_HID(N_HID)) u_fabric (
    .clk       (clk),
    .rst_n     (rst_n),
    .wr_en     (nn_wr_en),
    .wr_addr   (nn_wr_addr),
    .wr_data   (nn_wr_data),
    .lane_valid(lane_valid),
    .lane_pkt  (lane_pkt),
    .out_valid (f_valid),
    .out_pkt   (f_pkt),
    .cfg       (cfg),
    .conflict  (nn_conflict),
    .lost_n    (nn_lost_n)
  );

  logic           of_empty [N];
  logic           of_full  [N];
  logic [OCW-1:0] of_count [N];
  logic           of_pop   [N];

  for (genvar k = 0; k < N; k++) begin : g_out
    pkt_fifo #(.DEPTH(OUT_DEPTH)) u_ofifo (
      .clk  (clk),
      .rst_n(rst_n),
      .push (f_valid[k]),
      .din  (f_pkt[k]),
      .pop  (of_pop[k]),
      .dout (tx_pkt[k]),
      .empty(of_empty[k]),
      .full (of_full[k]),
      .count(of_count[k]),
      .drop (out_drop[k])
    );
    assign tx_valid[k] = !of_empty[k];
    assign of_pop[k]   = tx_ready[k] && !of_empty[k];
    assign misroute[k] = f_valid[k] && (int'(f_pkt[k].dst) != k + 1);
  end

  // Packets in flight towards each output FIFO.
  logic [IFW-1:0] inflight [N];
  logic           lane_hit [N];
  logic           arrive   [N];

  always_comb begin
    for (int unsigned k = 0; k < N; k++) begin
      lane_hit[k] = 1'b0;
      arrive[k]   = 1'b0;
      for (int unsigned i = 0; i < N; i++) begin
        if (lane_valid[i] && int'(lane_pkt[i].dst) == k + 1) lane_hit[k] = 1'b1;
        if (f_valid[i] && int'(f_pkt[i].dst) == k + 1)       arrive[k]   = 1'b1;
      end
      out_ready[k] = (int'(of_count[k]) + int'(inflight[k]) + (lane_hit[k] ? 1 : 0)) < OUT_DEPTH;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int unsigned k = 0; k < N; k++) inflight[k] <= '0;
    end else begin
      for (int unsigned k = 0; k < N; k++) begin
        if (lane_hit[k] && !arrive[k])                  inflight[k] <= inflight[k] + 1'b1;
        else if (!lane_hit[k] && arrive[k] && inflight[k] != 0) inflight[k] <= inflight[k] - 1'b1;
      end
    end
  end

endmodule
