// ledadec_pkg: code parameters and shared definitions of the LEDAkem Q-decoder.
//
// The defaults describe the 128-bit-security LEDAkem instance with n0 = 2
// circulant blocks (p = 14939, column weight d_H = 11, Q-block weights
// w_Q = [4, 3]; the code corrects t = 136 errors, a number the decoder
// itself does not use) and a machine word of n_b = 32 elements.
// Code parameters are those of the LEDAkem second-round specification; the
// word size, iteration limit, flip-list depth and LUT size are choices of
// this implementation.
//
// Dense vectors are stored as h = ceil(p / n_b) words of n_b elements; entry
// k of a vector sits in word k / n_b, element k % n_b, and the unused
// elements of the last word are always zero. Sparse circulants are stored as
// lists of positions in one key memory whose layout is given by the
// functions below.
//
// The *_DEF constants are only read by the modules that take the code
// parameters as defaults; a lint run on a leaf unit that imports nothing
// from them reports them as unused, which is expected.
package ledadec_pkg;

  // Code parameters (LEDAkem, 128-bit security, n0 = 2).
  localparam int unsigned P_DEF     = 14939;
  localparam int unsigned N0_DEF    = 2;
  localparam int unsigned DH_DEF    = 11;
  // Weights of the first row of the Q weight matrix, w_0 .. w_{n0-1}; up to
  // four blocks are supported, unused entries are zero.
  localparam int unsigned WQ_DEF [4] = '{4, 3, 0, 0};

  // Implementation parameters.
  localparam int unsigned NB_DEF    = 32;   // parallelism (word size)
  localparam int unsigned ITMAX_DEF = 10;   // maximum decoder iterations
  localparam int unsigned VMAX_DEF  = 256;  // flip positions kept per block and iteration
  localparam int unsigned NLUT_DEF  = 8;    // threshold look-up table entries
  localparam int unsigned VER_DEF   = 2;    // decoder version (1: SVbSC update only)

  // Version 2 updates the syndrome with the dense VbSC in the first
  // iterations when the word size is large.
  localparam int unsigned V2_MIN_NB = 64;   // smallest word size that uses it
  localparam int unsigned V2_ITERS  = 2;    // iterations 0 .. V2_ITERS-1 use it

  // Kinds of work the control unit hands to the data path.
  typedef enum logic [3:0] {
    PH_IDLE,
    PH_SYN_QX,    // t_i = Q_{i,n0-1} x            (syndrome VbSC, binary)
    PH_SYN_HT,    // s  ^= H_i t_i                  (syndrome VbSC, binary)
    PH_SYNW,      // w(s)                           (ones counter)
    PH_TH,        // b = f(w(s))                    (threshold LUT)
    PH_CORR_SIG,  // sigma_i = s * H_i^T            (correlation VbSC, integer)
    PH_CORR_RHO,  // rho_j  += sigma_i * Q_{i,j}^T  (correlation VbSC, integer)
    PH_ERRPOS,    // flip positions with rho > b    (error position search)
    PH_SYNUPD,    // s ^= L_j de_j                  (SVbSC)
    PH_UPD_QE,    // t (+)= Q_{i,j} e_j             (syndrome VbSC, version 2)
    PH_UPD_HT,    // s ^= H_i t, s restored to s0   (syndrome VbSC, version 2)
    PH_DONE
  } phase_e;

  function automatic int unsigned clog2i(input int unsigned v);
    return (v <= 1) ? 1 : $clog2(v);
  endfunction

  // Sum of the Q-row weights (m).
  function automatic int unsigned wq_sum(input int unsigned wq [4], input int unsigned n0);
    int unsigned s = 0;
    for (int unsigned i = 0; i < n0; i++) s += wq[i];
    return s;
  endfunction

  function automatic int unsigned wq_max(input int unsigned wq [4], input int unsigned n0);
    int unsigned s = 0;
    for (int unsigned i = 0; i < n0; i++) if (wq[i] > s) s = wq[i];
    return s;
  endfunction

  // Weight of circulant Q_{i,j}: the weight matrix is circulant with first
  // row w_Q, so entry (i, j) is w_{(j - i) mod n0}.
  function automatic int unsigned wq_block(input int unsigned wq [4], input int unsigned n0,
                                           input int unsigned i, input int unsigned j);
    return wq[(j + n0 - i) % n0];
  endfunction

  // Key memory layout. Each list holds positions in [0, p).
  //   HS : n0 lists of d_H  - H_i, syndrome orientation
  //   QS : n0*n0 lists      - Q_{i,j}, syndrome orientation, WQMAX slots each
  //   HC : n0 lists of d_H  - H_i, correlation orientation
  //   QC : n0*n0 lists      - Q_{i,j}, correlation orientation
  //   L  : n0 lists of m*d_H - L_j = sum_i H_i Q_{i,j}
  function automatic int unsigned key_hs(input int unsigned dh, input int unsigned i);
    return i * dh;
  endfunction
  function automatic int unsigned key_qs(input int unsigned n0, input int unsigned dh,
                                         input int unsigned wqm, input int unsigned i,
                                         input int unsigned j);
    return n0 * dh + (i * n0 + j) * wqm;
  endfunction
  function automatic int unsigned key_hc(input int unsigned n0, input int unsigned dh,
                                         input int unsigned wqm, input int unsigned i);
    return n0 * dh + n0 * n0 * wqm + i * dh;
  endfunction
  function automatic int unsigned key_qc(input int unsigned n0, input int unsigned dh,
                                         input int unsigned wqm, input int unsigned i,
                                         input int unsigned j);
    return 2 * n0 * dh + n0 * n0 * wqm + (i * n0 + j) * wqm;
  endfunction
  function automatic int unsigned key_l(input int unsigned n0, input int unsigned dh,
                                        input int unsigned wqm, input int unsigned m,
                                        input int unsigned j);
    return 2 * n0 * dh + 2 * n0 * n0 * wqm + j * m * dh;
  endfunction
  function automatic int unsigned key_depth(input int unsigned n0, input int unsigned dh,
                                            input int unsigned wqm, input int unsigned m);
    return 2 * n0 * dh + 2 * n0 * n0 * wqm + n0 * m * dh;
  endfunction

endpackage
