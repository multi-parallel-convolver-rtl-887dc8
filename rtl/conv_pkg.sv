// conv_pkg: shared index arithmetic of the multi-parallel convolver.
//
// A p-parallel convolver receives the tuple x[q] = X(p*t+q), q = 0..p-1, in
// time step t and produces Y(p*t+q) in phase q.  Splitting the weight index
// j = p*s + r gives
//     Y(p*t+q) = sum_r sum_s W(p*s+r) * X(p*(t-s) + q - r)
// so phase q needs one standard sub-convolver per residue r.  Sub-convolver
// (q,r) holds the weights W(r), W(p+r), W(2p+r), ... and is fed by input lane
// (q-r) mod p; when r > q the index q-r is negative and the lane belongs to
// the previous tuple, so that input passes through a one-step delay first.
// The functions below give these numbers, and the order in which the
// fault-tolerant variants chain their sub-convolvers ("slots"): slot 0 is
// phase p-1 residue 0, slot 1 phase p-1 residue 1, ..., the last slot is
// phase 0 residue p-1.
package conv_pkg;

  // Number of cells of each sub-convolver: ceil(N/P).  When N is not a
  // multiple of P the missing weights of the last group read as zero.
  function automatic int taps_of(int n, int p);
    return (n + p - 1) / p;
  endfunction

  // Input lane feeding sub-convolver (q,r).
  function automatic int lane_of(int p, int q, int r);
    return (q - r + p) % p;
  endfunction

  // Whether sub-convolver (q,r) needs the one-step input delay.
  function automatic bit delayed_of(int q, int r);
    return r > q;
  endfunction

  // Phase and residue of a chain slot (fault-tolerant variants).
  function automatic int slot_phase(int p, int slot);
    return p - 1 - slot / p;
  endfunction

  function automatic int slot_residue(int p, int slot);
    return slot % p;
  endfunction

  // Width of a full-precision result of an n-term convolution.
  function automatic int result_width(int sw, int ww, int n);
    return sw + ww + $clog2(n);
  endfunction

endpackage
