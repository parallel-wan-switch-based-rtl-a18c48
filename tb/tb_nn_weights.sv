// tb_nn_weights: a weight set for the switch-control network, shared by the
// testbenches.
//
// The network has to map the lane packets to, for each output port k, the
// number of the lane whose destination is k+1. With the saturating hidden
// activation this has an exact solution. Hidden neuron 5*i+t (lane i,
// threshold t = 0..4) sees only the destination d of lane i:
//   s(i,t) = clamp(2*d - (2*t + 1), -1, +1)  which is +1 when d > t, else -1.
// For d integer, [d == j] = (s(i,j-1) - s(i,j)) / 2, so output neuron k
// (j = k+1) gets weight +(i+1)/2 from neuron 5*i+k and -(i+1)/2 from neuron
// 5*i+k+1, bias 0, and its value is the lane number i+1, or 0 when no lane
// goes to port k. The other hidden neurons get zero weights. Values are in the
// network's fixed point (FRAC fraction bits); addresses follow the load order
// of ffnn.
package tb_nn_weights;

  function automatic int route_weight(int addr, int n_hid, int n_ports, int frac);
    int n_in, b1_a, w2_a, b2_a, h, j, o, i, t;
    n_in = 3 * n_ports;
    b1_a = n_hid * n_in;
    w2_a = b1_a + n_hid;
    b2_a = w2_a + n_ports * n_hid;
    if (addr < b1_a) begin
      h = addr / n_in;
      j = addr % n_in;
      i = h / 5;
      if (h < 5 * n_ports && j == 3 * i + 1) return 2 << frac;
      return 0;
    end else if (addr < w2_a) begin
      h = addr - b1_a;
      t = h % 5;
      if (h < 5 * n_ports) return -((2 * t + 1) << frac);
      return 0;
    end else if (addr < b2_a) begin
      o = (addr - w2_a) / n_hid;
      h = (addr - w2_a) % n_hid;
      i = h / 5;
      t = h % 5;
      if (h >= 5 * n_ports) return 0;
      if (t == o)     return  ((i + 1) << frac) / 2;
      if (t == o + 1) return -(((i + 1) << frac) / 2);
      return 0;
    end
    return 0;
  endfunction

  function automatic int n_words(int n_hid, int n_ports);
    return n_hid * 3 * n_ports + n_hid + n_ports * n_hid + n_ports;
  endfunction

endpackage
