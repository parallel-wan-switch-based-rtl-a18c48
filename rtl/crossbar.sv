// crossbar: the N x N switch array of the fabric.
//
// Every crossing of input lane i and output port k holds a simple controlled
// switch, closed when c[i][k] is 1; c is the configuration matrix (rows are
// inputs, columns outputs; a permutation matrix connects every input to one
// output). Each output is the OR of the packets whose switch in its column is
// closed. A column with more than one closed switch carrying valid packets is a
// configuration error: conflict[k] flags it and the output then carries the
// OR of those packets. Purely combinational.
module crossbar
  import sw_pkg::*;
#(
  parameter int unsigned N = N_PORTS
) (
  input  logic    in_valid  [N],
  input  packet_t in_pkt    [N],
  input  logic    c         [N][N],
  output logic    out_valid [N],
  output packet_t out_pkt   [N],
  output logic    conflict  [N]
);

  always_comb begin
    int unsigned n;
    for (int unsigned k = 0; k < N; k++) begin
      out_valid[k] = 1'b0;
      out_pkt[k]   = '0;
      n            = 0;
      for (int unsigned i = 0; i < N; i++) begin
        if (c[i][k] && in_valid[i]) begin
          out_valid[k] = 1'b1;
          out_pkt[k]   = out_pkt[k] | in_pkt[i];
          n++;
        end
      end
      conflict[k] = (n > 1);
    end
  end

endmodule
