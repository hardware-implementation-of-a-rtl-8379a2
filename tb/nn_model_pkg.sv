// nn_model_pkg: reference model of the three-neuron network for testbenches.
//
// Weights are W[neuron][k], k = 0,1 for the two inputs and 2 for the bias
// (input +1). Hidden neurons 0 and 1 see x and y as unsigned 0..255; the
// output neuron 2 sees the two hidden outputs. A neuron outputs +1 when its
// weighted sum is >= 0, else -1.
package nn_model_pkg;
  typedef byte signed wmat_t [3][3];

  function automatic int neuron_sum(int i0, int i1, byte signed w0, byte signed w1, byte signed w2);
    return i0 * int'(w0) + i1 * int'(w1) + int'(w2);
  endfunction

  function automatic int sgn(int s);
    return (s >= 0) ? 1 : -1;
  endfunction

  function automatic int net_eval(wmat_t w, int x, int y);
    int h0, h1;
    h0 = sgn(neuron_sum(x, y, w[0][0], w[0][1], w[0][2]));
    h1 = sgn(neuron_sum(x, y, w[1][0], w[1][1], w[1][2]));
    return sgn(neuron_sum(h0, h1, w[2][0], w[2][1], w[2][2]));
  endfunction
endpackage
