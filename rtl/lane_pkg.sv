// lane_pkg: constants and helper functions shared by the Lane hash datapath.
//
// The Lane state is held as a flat vector of 32-bit column words, column 0 in
// the most significant bits, and each column word holds its AES-state bytes
// with row 0 in the most significant byte (big-endian, as the algorithm
// specifies). The functions below are used at elaboration time (S-box table,
// LFSR seeds) and inside combinational logic (GF(2^8) arithmetic, LFSR step).
// The S-box follows the AES definition; the LFSR polynomial and its start
// value k0 = 07fc703d follow the Lane constant generator.
package lane_pkg;

  // First round constant and LFSR feedback mask of the constant generator.
  localparam logic [31:0] K0       = 32'h07fc703d;
  localparam logic [31:0] K_FEED   = 32'hd0000001;

  // Number of 32-bit columns in a state of the given width (8 or 16).
  function automatic int unsigned ncol(int unsigned state_w);
    return state_w / 32;
  endfunction

  // Full (non-last) rounds of a first-layer lane P_j and a second-layer lane Q_j.
  // Lane-224/256: P has 6 rounds, Q has 3; Lane-384/512: 8 and 4.
  function automatic int unsigned p_full(int unsigned state_w);
    return (state_w > 256) ? 7 : 5;
  endfunction

  function automatic int unsigned q_full(int unsigned state_w);
    return (state_w > 256) ? 3 : 2;
  endfunction

  // Multiplication by x in GF(2^8) modulo x^8 + x^4 + x^3 + x + 1.
  function automatic logic [7:0] xtime(logic [7:0] a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  // General GF(2^8) product, shift-and-add.
  function automatic logic [7:0] gf_mul(logic [7:0] a, logic [7:0] b);
    logic [7:0] p;
    logic [7:0] t;
    p = '0;
    t = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p ^= t;
      t = xtime(t);
    end
    return p;
  endfunction

  // Squaring in GF(2^8).
  function automatic logic [7:0] gf_sq(logic [7:0] a);
    return gf_mul(a, a);
  endfunction

  // AES S-box: inverse a^254 (0 maps to 0, which a^254 does by itself), then
  // the affine map s = b ^ rotl(b,1) ^ rotl(b,2) ^ rotl(b,3) ^ rotl(b,4) ^ 63.
  // a^254 = (a^127)^2 with a^127 = a^120 * a^7 (four general multiplications).
  function automatic logic [7:0] sbox_calc(logic [7:0] a);
    logic [7:0] a2, a3, a6, a7, a12, a15, a120, a127, b;
    a2   = gf_sq(a);
    a3   = gf_mul(a2, a);
    a6   = gf_sq(a3);
    a7   = gf_mul(a6, a);
    a12  = gf_sq(a6);
    a15  = gf_mul(a12, a3);
    a120 = gf_sq(gf_sq(gf_sq(a15)));
    a127 = gf_mul(a120, a7);
    b    = gf_sq(a127);
    return b ^ {b[6:0], b[7]} ^ {b[5:0], b[7:6]} ^ {b[4:0], b[7:5]} ^ {b[3:0], b[7:4]} ^ 8'h63;
  endfunction

  // One step of the constant LFSR: shift right, feed back when the lsb was set.
  function automatic logic [31:0] lfsr_step(logic [31:0] k);
    return (k >> 1) ^ (k[0] ? K_FEED : 32'h0);
  endfunction

  // Constant k_idx, by stepping the LFSR idx times from k0 (elaboration only).
  function automatic logic [31:0] lane_k(int unsigned idx);
    logic [31:0] k;
    k = K0;
    for (int unsigned i = 0; i < idx; i++) k = lfsr_step(k);
    return k;
  endfunction

endpackage
