// pkt_fifo: synchronous packet FIFO with tail drop. It is the output FIFO of
// each switch port (eight packets deep, as the design specifies) and also the
// FIFO at the output of each packet generator.
//
// The head packet is shown on dout whenever empty is low (show-ahead); pop
// removes it. A push is stored if the FIFO has room, counting a pop in the same
// cycle; otherwise the packet is discarded and drop is high for that cycle
// ("tail drop"). Storage is a circular buffer indexed modulo DEPTH, so DEPTH
// need not be a power of two. Reset (active low, synchronous to clk) empties
// the FIFO. One push and one pop per cycle; no latency beyond the register.
module pkt_fifo
  import sw_pkg::*;
#(
  parameter int unsigned DEPTH = 8
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       push,
  input  packet_t                    din,
  input  logic                       pop,
  output packet_t                    dout,
  output logic                       empty,
  output logic                       full,
  output logic [$clog2(DEPTH+1)-1:0] count,
  output logic                       drop
);

  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CW = $clog2(DEPTH+1);

  packet_t         mem [DEPTH];
  logic [PW-1:0]   rd_ptr, wr_ptr;
  logic            do_pop, do_push;

  function automatic logic [PW-1:0] incr(logic [PW-1:0] p);
    return (int'(p) == DEPTH - 1) ? '0 : p + 1'b1;
  endfunction

  assign empty   = (count == 0);
  assign full    = (count == ($clog2(DEPTH+1))'(DEPTH));
  assign do_pop  = pop && !empty;
  assign do_push = push && (!full || do_pop);
  assign drop    = push && !do_push;
  assign dout    = mem[rd_ptr];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_push) begin
        mem[wr_ptr] <= din;
        wr_ptr      <= incr(wr_ptr);
      end
      if (do_pop) rd_ptr <= incr(rd_ptr);
      count <= count + CW'(do_push ? 1 : 0) - CW'(do_pop ? 1 : 0);
    end
  end

  // A pop is only meaningful when there is a packet to take.
  a_no_pop_empty: assert property (@(posedge clk) disable iff (!rst_n) !(pop && empty))
    else $error("pkt_fifo: pop while empty");

endmodule
