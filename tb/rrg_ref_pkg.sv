// rrg_ref_pkg: reference model of the reconfigurable reversible gate and of
// the cipher cascades, written from the gate's function rather than from its
// gate list, for the testbenches.
//
// Configuration k (bit j = Kj): {K1,K0} selects the target data bit
// (00 -> X3, 01 -> X2, 10 -> X1, 11 -> X0). K2, K3 and K4 each enable one of
// the other three data bits as a positive control, in the order given by
// CTL below. The target is inverted when all enabled controls are 1.
package rrg_ref_pkg;

  // CTL[{K1,K0}][j] is the data bit enabled as control by K(j+2).
  localparam int CTL [4][3] = '{
    '{0, 1, 2},   // target X3
    '{1, 0, 3},   // target X2
    '{0, 3, 2},   // target X1
    '{1, 2, 3}    // target X0
  };

  function automatic int ref_target(input logic [4:0] k);
    return 3 - int'(k[1:0]);
  endfunction

  function automatic logic [3:0] ref_rrg(input logic [4:0] k, input logic [3:0] x);
    logic fire;
    logic [3:0] y;
    fire = 1'b1;
    for (int j = 0; j < 3; j++)
      if (k[j+2] && !x[CTL[k[1:0]][j]]) fire = 1'b0;
    y = x;
    y[ref_target(k)] = x[ref_target(k)] ^ fire;
    return y;
  endfunction

  // Number of controls of the gate that configuration k selects.
  function automatic int ref_n_controls(input logic [4:0] k);
    return int'(k[2]) + int'(k[3]) + int'(k[4]);
  endfunction

  function automatic logic [3:0] ref_encrypt(input logic [79:0] key, input logic [3:0] x);
    logic [3:0] v = x;
    for (int s = 0; s < 16; s++) v = ref_rrg(key[5*s +: 5], v);
    return v;
  endfunction

  function automatic logic [3:0] ref_decrypt(input logic [79:0] key, input logic [3:0] x);
    logic [3:0] v = x;
    for (int s = 15; s >= 0; s--) v = ref_rrg(key[5*s +: 5], v);
    return v;
  endfunction

  function automatic logic [79:0] rand_key();
    return 80'({$urandom, $urandom, $urandom});
  endfunction

endpackage
