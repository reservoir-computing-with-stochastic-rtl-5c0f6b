// Shared constants and helper functions of the stochastic reservoir computer.
//
// Address-line probabilities: the LUT-RAM multipliers and encoders read one of
// their stored bits through address bitstreams A_i with P[A_i = 1] = a_i. The
// values of a_i are the weighted least-squares solutions that make address k
// appear with probability close to 2^-(L-k), L = 8 (synapse) or 16 (encoder),
// so that the stored binary word is read out as a probability. They are held
// here as 16-bit thresholds round(a_i * 65536) for comparison with a uniform
// 16-bit random number.
//
// The small-world wiring function is this design's own choice: a ring lattice
// in which neuron n listens to n-2, n-1, n+1 and n+2, with roughly one
// connection in five rewired by a fixed hash to a far neuron.
package rc_pkg;

  // Synapse (three address lines): a2 = 0.9385, a1 = 0.7993, a0 = 0.6665
  localparam logic [15:0] A3_THR [3] = '{16'd43680, 16'd52383, 16'd61506}; // index = line
  // Encoder (four address lines): a3 = 0.9907, a2 = 0.9468, a1 = 0.7998, a0 = 0.6665
  localparam logic [15:0] A4_THR [4] = '{16'd43680, 16'd52416, 16'd62049, 16'd64927};

  // One step of a 32-bit xorshift generator (13, 17, 5).
  function automatic logic [31:0] xorshift32(input logic [31:0] x);
    logic [31:0] t;
    t = x ^ (x << 13);
    t = t ^ (t >> 17);
    t = t ^ (t << 5);
    return t;
  endfunction

  // A nonzero seed derived from an integer, so that instances differ.
  function automatic logic [31:0] seed_of(input int unsigned s);
    logic [31:0] h;
    h = 32'h9E37_79B9 * (s + 1) ^ 32'h5851_F42D;
    if (h == 32'd0) h = 32'h1;
    return h;
  endfunction

  // Source neuron of recurrent connection k (0 .. k_rec-1) of neuron n in a
  // network of n_tot neurons: ring lattice offsets -k_rec/2 .. +k_rec/2
  // (without 0); a connection whose hash falls in the lowest fifth is moved
  // to the neuron diametrically opposite its lattice source.
  function automatic int unsigned sw_src(input int unsigned n, input int unsigned k,
                                         input int unsigned n_tot, input int unsigned k_rec);
    int signed off;
    int unsigned src;
    logic [31:0] h;
    off = (k < k_rec / 2) ? -(int'(k) + 1) : (int'(k - k_rec / 2) + 1);
    src = int'((int'(n) + off + int'(n_tot)) % int'(n_tot));
    h = (32'(n * 31 + k * 17 + 11) * 32'd2654435761) >> 7;
    if ((h % 5) == 0) src = (src + n_tot / 2) % n_tot;
    if (src == n) src = (n + 1) % n_tot;
    return src;
  endfunction

endpackage
