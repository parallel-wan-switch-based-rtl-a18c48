// pkt_gen: packet generator of one switch port.
//
// In user mode (cfg.mode = GEN_USER) the generator takes the packets presented
// on user_pkt while user_valid is high: a user-defined sequence. In random mode
// it makes a packet with probability cfg.rate/256 in each cycle, and every field
// of the packet is configured on its own (cfg.dst, cfg.prec, cfg.dropp,
// cfg.data): fixed at lo, uniform over lo..hi, or bell-shaped over lo..hi. The
// bell shape is the mean of four uniform 16-bit numbers (an Irwin-Hall
// approximation of a Gaussian) scaled onto the range. The priority field is
// formed as P*10 + d; the source field is always this generator's PORT_ID.
//
// Packets pass through a FIFO of DEPTH packets (tail drop; overflow pulses when
// a packet is lost) that is read at random times, with probability
// (cfg.jitter+1)/256 per cycle, to give the arrivals the jitter of a network.
// Random numbers come from xorshift64 generators seeded from SEED and PORT_ID.
// A packet read from the FIFO is on out_pkt, with out_valid high, for one cycle;
// the receiver must take it (there is no back-pressure). made pulses for every
// packet produced. Reset is active low and synchronous; cfg.en = 0 stops both
// production and reading.
module pkt_gen
  import sw_pkg::*;
#(
  parameter int unsigned PORT_ID = 1,
  parameter int unsigned DEPTH   = 8,
  parameter logic [63:0] SEED    = 64'h9E37_79B9_7F4A_7C15
) (
  input  logic     clk,
  input  logic     rst_n,
  input  gen_cfg_t cfg,
  input  logic     user_valid,
  input  packet_t  user_pkt,
  output logic     out_valid,
  output packet_t  out_pkt,
  output logic     made,
  output logic     overflow
);

  typedef enum int unsigned {R_CTL = 0, R_DST = 1, R_PREC = 2, R_DROP = 3, R_DATA = 4} rsrc_e;
  localparam int unsigned NR = 5;

  logic [63:0] rs [NR];

  function automatic logic [63:0] xorshift64(logic [63:0] s);
    logic [63:0] t;
    t = s ^ (s << 13);
    t = t ^ (t >> 7);
    t = t ^ (t << 17);
    return t;
  endfunction

  function automatic logic [FIELD_W-1:0] field_val(field_cfg_t f, logic [63:0] r);
    logic [16:0] span;
    logic [17:0] u;
    logic [33:0] scaled;
    span = (f.hi >= f.lo) ? 17'(f.hi) - 17'(f.lo) + 17'd1 : 17'd1;
    if (f.mode == FIELD_GAUSS)
      u = (18'(r[15:0]) + 18'(r[31:16]) + 18'(r[47:32]) + 18'(r[63:48])) >> 2;
    else
      u = 18'(r[15:0]);
    scaled = 34'(u) * 34'(span);
    if (f.mode == FIELD_FIXED) return f.lo;
    return f.lo + FIELD_W'(scaled >> 16);
  endfunction

  packet_t    gen_pkt;
  logic       push;
  logic       fifo_empty, fifo_full, pop;
  packet_t    fifo_dout;
  logic [$clog2(DEPTH+1)-1:0] fifo_count;
  logic [FIELD_W-1:0] p_val, d_val;

  always_comb begin
    p_val = field_val(cfg.prec, rs[R_PREC]);
    d_val = field_val(cfg.dropp, rs[R_DROP]);
    if (cfg.mode == GEN_USER) begin
      gen_pkt     = user_pkt;
      push        = cfg.en && user_valid;
    end else begin
      gen_pkt.dst  = PORT_W'(field_val(cfg.dst, rs[R_DST]));
      gen_pkt.prio = PRIO_W'(p_val * 10 + d_val);
      gen_pkt.data = DATA_W'(field_val(cfg.data, rs[R_DATA]));
      gen_pkt.src  = '0;
      push         = cfg.en && (rs[R_CTL][7:0] < cfg.rate);
    end
    gen_pkt.src = PORT_W'(PORT_ID);
  end

  assign pop  = cfg.en && !fifo_empty && (rs[R_CTL][15:8] <= cfg.jitter);
  assign made = push;

  pkt_fifo #(.DEPTH(DEPTH)) u_fifo (
    .clk  (clk),
    .rst_n(rst_n),
    .push (push),
    .din  (gen_pkt),
    .pop  (pop),
    .dout (fifo_dout),
    .empty(fifo_empty),
    .full (fifo_full),
    .count(fifo_count),
    .drop (overflow)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int unsigned i = 0; i < NR; i++)
        rs[i] <= SEED ^ (64'(PORT_ID) << 40) ^ (64'(i + 1) * 64'h2545_F491_4F6C_DD1D);
      out_valid <= 1'b0;
      out_pkt   <= '0;
    end else begin
      for (int unsigned i = 0; i < NR; i++) rs[i] <= xorshift64(rs[i]);
      out_valid <= pop;
      out_pkt   <= fifo_dout;
    end
  end

endmodule
