// tb_pkt_fifo: self-checking testbench of the packet FIFO (eight packets).
//
// Random pushes and pops are compared with a queue model: head packet, empty,
// full and count every cycle, and tail drop when a packet arrives at a full
// FIFO. Phases with many pushes make the FIFO fill and drop.
module tb_pkt_fifo;
  import sw_pkg::*;

  localparam int DEPTH = 8;
  logic clk = 0, rst_n = 0;
  logic push = 0, pop = 0;
  packet_t din = '0, dout;
  logic empty, full, drop;
  logic [$clog2(DEPTH+1)-1:0] count;
  int checks = 0, failures = 0, drops_seen = 0, fulls_seen = 0;
  packet_t model [$];

  pkt_fifo dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("%t %s", $time, what); end
  endtask

  initial begin
    int push_pct;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 4000; n++) begin
      push_pct = ((n / 500) % 2 == 0) ? 80 : 30;
      @(negedge clk);
      // state before the clock edge
      check(empty == (model.size() == 0), "empty");
      check(full == (model.size() == DEPTH), "full");
      check(int'(count) == model.size(), "count");
      if (model.size() > 0) check(dout == model[0], "head packet");
      push = ($urandom_range(0, 99) < push_pct);
      pop  = (model.size() > 0) && ($urandom_range(0, 99) < 50);
      din  = packet_t'($urandom);
      #1;
      check(drop == (push && model.size() == DEPTH && !pop), "drop");
      if (drop) drops_seen++;
      if (full) fulls_seen++;
      @(posedge clk);
      if (pop) void'(model.pop_front());
      if (push && (model.size() < DEPTH)) model.push_back(din);
    end
    check(drops_seen > 0, "tail drop never happened");
    check(fulls_seen > 0, "FIFO never full");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
