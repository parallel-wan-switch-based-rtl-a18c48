// collision_detector: the collision detector of the input-queue block.
//
// Up to N_PORTS packets arrive in one cycle, one per input lane. Two packets
// collide when they are valid and have the same destination port. For every lane
// the detector reports whether it collides with any other lane, and whether it
// wins its destination. The winner is the packet of highest precedence P, as the
// design specifies; among equal P this implementation prefers the lower drop
// precedence d, then the lower lane number. A valid packet that collides with
// nothing also wins. Purely combinational.
module collision_detector
  import sw_pkg::*;
#(
  parameter int unsigned N = N_PORTS
) (
  input  logic    valid   [N],
  input  packet_t pkt     [N],
  output logic    collide [N],
  output logic    win     [N]
);

  // True when lane a beats lane b for the same destination.
  function automatic logic beats(packet_t a, int unsigned ia, packet_t b, int unsigned ib);
    logic [2:0] pa, pb;
    logic [3:0] da, db;
    pa = prec_of(a.prio);
    pb = prec_of(b.prio);
    da = drop_of(a.prio);
    db = drop_of(b.prio);
    if (pa != pb) return pa > pb;
    if (da != db) return da < db;
    return ia < ib;
  endfunction

  always_comb begin
    for (int unsigned i = 0; i < N; i++) begin
      collide[i] = 1'b0;
      win[i]     = valid[i];
      for (int unsigned j = 0; j < N; j++) begin
        if (j != i && valid[i] && valid[j] && pkt[j].dst == pkt[i].dst) begin
          collide[i] = 1'b1;
          if (!beats(pkt[i], i, pkt[j], j)) win[i] = 1'b0;
        end
      end
    end
  end

endmodule
