// sw_pkg: types and constants shared by the neural-network controlled switch.
//
// The test packet has four fields: source port (1..4), destination port (1..4),
// priority and data (1..10000). The priority field carries P*10+d, where P (1..4)
// is the precedence (higher is more urgent) and d (1..3) the drop precedence
// (higher is dropped first); this encoding follows the packet definition of the
// design. Field widths are the smallest that hold those ranges. The helper
// functions split the priority field, and the generator configuration types
// describe how each packet field is produced.
package sw_pkg;

  localparam int unsigned N_PORTS = 4;   // switch ports
  localparam int unsigned PORT_W  = 3;   // holds 0..4 (0 = no port)
  localparam int unsigned PRIO_W  = 6;   // holds P*10+d up to 43
  localparam int unsigned DATA_W  = 14;  // holds 1..10000
  localparam int unsigned N_PREC  = 4;   // precedence levels P = 1..4
  localparam int unsigned FIELD_W = 14;  // width of a generator field bound

  typedef struct packed {
    logic [PORT_W-1:0] src;
    logic [PORT_W-1:0] dst;
    logic [PRIO_W-1:0] prio;
    logic [DATA_W-1:0] data;
  } packet_t;

  // Precedence P = prio / 10, clamped to 1..N_PREC.
  function automatic logic [2:0] prec_of(logic [PRIO_W-1:0] prio);
    int unsigned p;
    p = int'(prio) / 10;
    if (p < 1) p = 1;
    if (p > N_PREC) p = N_PREC;
    return 3'(p);
  endfunction

  // Drop precedence d = prio mod 10.
  function automatic logic [3:0] drop_of(logic [PRIO_W-1:0] prio);
    return 4'(int'(prio) % 10);
  endfunction

  // Input-queue behaviour on a destination collision.
  typedef enum logic {
    IQ_DROP = 1'b0,   // keep the highest-priority packet, drop the others
    IQ_QOS  = 1'b1    // queue colliding packets per output and precedence
  } iq_mode_e;

  // Packet generator: packets come from the user port or are made at random.
  typedef enum logic {
    GEN_USER   = 1'b0,
    GEN_RANDOM = 1'b1
  } gen_mode_e;

  // How one packet field is produced in random mode.
  typedef enum logic [1:0] {
    FIELD_FIXED   = 2'd0,  // always lo
    FIELD_UNIFORM = 2'd1,  // uniform over lo..hi
    FIELD_GAUSS   = 2'd2   // bell-shaped over lo..hi, centred between them
  } field_mode_e;

  typedef struct packed {
    field_mode_e        mode;
    logic [FIELD_W-1:0] lo;
    logic [FIELD_W-1:0] hi;
  } field_cfg_t;

  typedef struct packed {
    logic       en;       // generator running
    gen_mode_e  mode;     // user or random
    logic [7:0] rate;     // random mode: a packet is made with probability rate/256 per cycle
    logic [7:0] jitter;   // the generator FIFO is read with probability (jitter+1)/256 per cycle
    field_cfg_t dst;      // destination port
    field_cfg_t prec;     // precedence P
    field_cfg_t dropp;    // drop precedence d
    field_cfg_t data;     // data / packet identifier
  } gen_cfg_t;

  // Neural-network fixed point: weights and biases are signed Q(16-FRAC).FRAC.
  localparam int unsigned NN_W    = 16;
  localparam int unsigned NN_FRAC = 8;
  localparam int unsigned NN_X_W  = 8;             // unsigned integer inputs
  localparam int unsigned NN_IN   = 3 * N_PORTS;   // src, dst, prio of each lane

endpackage
