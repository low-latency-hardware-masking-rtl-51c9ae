// lmdpl_pkg: types, constants and small linear helpers shared by the masked
// AES built from LUT-based masked dual-rail pre-charge logic (LMDPL).
//
// Every secret value v is split into two Boolean shares, v = m ^ o.
//   m : the mask share, handled by the mask-table generator layer in plain
//       single-rail logic.
//   o : the operation share, handled by the operation layer in dual rail:
//       a pair (t, f) with f = ~t while evaluating, and t = f = 0 while
//       pre-charged. The operation layer only uses monotonic AND/OR logic, so
//       an all-zero (pre-charged) input always gives an all-zero output.
//
// The S-box inversion is computed in the tower field GF(((2^2)^2)^2):
//   GF(4)   = GF(2)[z]/(z^2+z+1),      element {a1,a0}
//   GF(16)  = GF(4)[w]/(w^2+w+z),      element {A1,A0}, A1 the w coefficient
//   GF(256) = GF(16)[v]/(v^2+v+M), M = 4'h8, element {G1,G0}
// The basis-change matrices below map the AES polynomial basis into this
// tower field (PHI) and back, combined with the linear part of the AES
// affine map (OUT_AFF). Row j of a matrix is the mask of input bits whose
// XOR gives output bit j. The tower field and its constants are this
// design's choice; the document only names the "Change Basis" and
// "Change Basis + Affine" steps.
package lmdpl_pkg;

  // dual-rail byte and word
  typedef struct packed {
    logic [7:0] t;  // true rail
    logic [7:0] f;  // false rail
  } dr8_t;

  typedef struct packed {
    logic [3:0] t;
    logic [3:0] f;
  } dr4_t;

  typedef struct packed {
    logic [1:0] t;
    logic [1:0] f;
  } dr2_t;

  typedef dr8_t [15:0] dr_state_t;  // element i is AES state byte i

  // Gadget bookkeeping: one AND gadget uses 1 random bit and 8 table bits.
  localparam int unsigned GADGET_TBL_W  = 8;
  localparam int unsigned GF4_GADGETS   = 3;
  localparam int unsigned GF16_GADGETS  = 3 * GF4_GADGETS;   // 9
  localparam int unsigned SBOX_GADGETS  = 4 * GF16_GADGETS;  // 36
  localparam int unsigned SBOX_RND_W    = SBOX_GADGETS;
  localparam int unsigned SBOX_TBL_W    = SBOX_GADGETS * GADGET_TBL_W;  // 288
  localparam int unsigned DATA_SBOXES   = 16;
  localparam int unsigned KEY_SBOXES    = 4;
  localparam int unsigned DATA_TBL_W    = DATA_SBOXES * SBOX_TBL_W;
  localparam int unsigned KEY_TBL_W     = KEY_SBOXES * SBOX_TBL_W;
  localparam int unsigned DATA_RND_W    = DATA_SBOXES * SBOX_RND_W;
  localparam int unsigned KEY_RND_W     = KEY_SBOXES * SBOX_RND_W;
  localparam int unsigned RND_W         = DATA_RND_W + KEY_RND_W;  // 720

  // Tower-field constants (verified to reproduce the AES S-box).
  localparam logic [7:0][7:0] PHI     = '{8'ha0, 8'hde, 8'h0c, 8'h70, 8'h68, 8'h9c, 8'h34, 8'h03};
  localparam logic [7:0][7:0] OUT_AFF = '{8'h2c, 8'h30, 8'h74, 8'hbf, 8'h9b, 8'ha9, 8'h35, 8'h5b};
  localparam logic [7:0]      AFF_C   = 8'h63;
  // inverse S-box: input map PHI * (affine linear part)^-1 after adding
  // 0x63, output map PHI^-1
  localparam logic [7:0][7:0] INV_IN  = '{8'hc6, 8'hcf, 8'hb7, 8'hf7, 8'h98, 8'haf, 8'h4c, 8'hed};
  localparam logic [7:0][7:0] PHI_INV = '{8'hba, 8'hb4, 8'h3a, 8'h9e, 8'h86, 8'ha6, 8'hf0, 8'hf1};
  // GF(16): x -> x^2 and x -> M*x^2
  localparam logic [3:0][3:0] SQ16    = '{4'h8, 4'hc, 4'h6, 4'hb};
  localparam logic [3:0][3:0] SQM16   = '{4'h9, 4'he, 4'hc, 4'h4};
  // AES xtime (multiplication by x modulo x^8+x^4+x^3+x+1)
  localparam logic [7:0][7:0] XTIME   = '{8'h40, 8'h20, 8'h10, 8'h88, 8'h84, 8'h02, 8'h81, 8'h80};
  // multiplication by x^2
  localparam logic [7:0][7:0] X4      = '{8'h20, 8'h10, 8'h88, 8'hc4, 8'h42, 8'h81, 8'hc0, 8'h40};

  // ---------------------------------------------------------------- plain
  function automatic logic [7:0] lin8(logic [7:0][7:0] mat, logic [7:0] x);
    logic [7:0] y;
    for (int j = 0; j < 8; j++) y[j] = ^(mat[j] & x);
    return y;
  endfunction

  function automatic logic [3:0] lin4(logic [3:0][3:0] mat, logic [3:0] x);
    logic [3:0] y;
    for (int j = 0; j < 4; j++) y[j] = ^(mat[j] & x);
    return y;
  endfunction

  // GF(4) squaring (= inversion) and the map x -> z*x^2 (a swap of the bits)
  function automatic logic [1:0] gf4_sq(logic [1:0] a);
    return {a[1], a[1] ^ a[0]};
  endfunction

  function automatic logic [1:0] gf4_sqz(logic [1:0] a);
    return {a[0], a[1]};
  endfunction

  // ----------------------------------------------------------- dual rail
  // Monotonic dual-rail XOR: pre-charged inputs give a pre-charged output.
  function automatic logic [1:0] dr_xor1(logic at, logic af, logic bt, logic bf);
    return {(at & bf) | (af & bt), (at & bt) | (af & bf)};
  endfunction

  function automatic dr8_t dr_xor8(dr8_t a, dr8_t b);
    dr8_t y;
    for (int i = 0; i < 8; i++) {y.t[i], y.f[i]} = dr_xor1(a.t[i], a.f[i], b.t[i], b.f[i]);
    return y;
  endfunction

  function automatic dr4_t dr_xor4(dr4_t a, dr4_t b);
    dr4_t y;
    for (int i = 0; i < 4; i++) {y.t[i], y.f[i]} = dr_xor1(a.t[i], a.f[i], b.t[i], b.f[i]);
    return y;
  endfunction

  function automatic dr2_t dr_xor2(dr2_t a, dr2_t b);
    dr2_t y;
    for (int i = 0; i < 2; i++) {y.t[i], y.f[i]} = dr_xor1(a.t[i], a.f[i], b.t[i], b.f[i]);
    return y;
  endfunction

  // XOR with a public constant: swap the rails of the bits that are set.
  function automatic dr8_t dr_const8(dr8_t a, logic [7:0] c);
    dr8_t y;
    y.t = (a.t & ~c) | (a.f & c);
    y.f = (a.f & ~c) | (a.t & c);
    return y;
  endfunction

  // Linear map in dual rail as a tree of dual-rail XORs. Each row has at
  // least one bit set, so no constant rail is needed and pre-charge passes.
  function automatic dr8_t dr_lin8(logic [7:0][7:0] mat, dr8_t x);
    dr8_t y;
    logic [1:0] acc;
    logic first;
    for (int j = 0; j < 8; j++) begin
      acc = 2'b00;
      first = 1'b1;
      for (int i = 0; i < 8; i++) begin
        if (mat[j][i]) begin
          acc = first ? {x.t[i], x.f[i]} : dr_xor1(acc[1], acc[0], x.t[i], x.f[i]);
          first = 1'b0;
        end
      end
      {y.t[j], y.f[j]} = acc;
    end
    return y;
  endfunction

  function automatic dr4_t dr_lin4(logic [3:0][3:0] mat, dr4_t x);
    dr4_t y;
    logic [1:0] acc;
    logic first;
    for (int j = 0; j < 4; j++) begin
      acc = 2'b00;
      first = 1'b1;
      for (int i = 0; i < 4; i++) begin
        if (mat[j][i]) begin
          acc = first ? {x.t[i], x.f[i]} : dr_xor1(acc[1], acc[0], x.t[i], x.f[i]);
          first = 1'b0;
        end
      end
      {y.t[j], y.f[j]} = acc;
    end
    return y;
  endfunction

  function automatic dr2_t dr_gf4_sq(dr2_t a);
    dr2_t y;
    y.t[1] = a.t[1];
    y.f[1] = a.f[1];
    {y.t[0], y.f[0]} = dr_xor1(a.t[1], a.f[1], a.t[0], a.f[0]);
    return y;
  endfunction

  function automatic dr2_t dr_gf4_sqz(dr2_t a);
    return '{t: {a.t[0], a.t[1]}, f: {a.f[0], a.f[1]}};
  endfunction

  // Single-rail to dual-rail conversion and back.
  function automatic dr8_t to_dr8(logic [7:0] v);
    return '{t: v, f: ~v};
  endfunction

  // ------------------------------------------------------ AES byte helpers
  // AES state byte i sits at bits [127-8i -: 8]; row = i%4, column = i/4.
  function automatic int unsigned sr_src(int unsigned i);
    // ShiftRows: output byte (r,c) takes input byte (r, c+r mod 4)
    return (i % 4) + 4 * (((i / 4) + (i % 4)) % 4);
  endfunction

  // InvShiftRows: output byte (r,c) takes input byte (r, c-r mod 4)
  function automatic int unsigned isr_src(int unsigned i);
    return (i % 4) + 4 * (((i / 4) + 4 - (i % 4)) % 4);
  endfunction

  function automatic logic [7:0] xtime(logic [7:0] a);
    return lin8(XTIME, a);
  endfunction

  function automatic logic [31:0] mixcol(logic [31:0] c);
    logic [7:0] a0, a1, a2, a3;
    {a0, a1, a2, a3} = c;
    return {xtime(a0) ^ xtime(a1) ^ a1 ^ a2 ^ a3,
            a0 ^ xtime(a1) ^ xtime(a2) ^ a2 ^ a3,
            a0 ^ a1 ^ xtime(a2) ^ xtime(a3) ^ a3,
            xtime(a0) ^ a0 ^ a1 ^ a2 ^ xtime(a3)};
  endfunction

  // InvMixColumns as a pre-step followed by MixColumns:
  // u = 4*(a0^a2), v = 4*(a1^a3); a0^=u, a1^=v, a2^=u, a3^=v
  function automatic logic [31:0] inv_mixcol(logic [31:0] c);
    logic [7:0] a0, a1, a2, a3, u, v;
    {a0, a1, a2, a3} = c;
    u = lin8(X4, a0 ^ a2);
    v = lin8(X4, a1 ^ a3);
    return mixcol({a0 ^ u, a1 ^ v, a2 ^ u, a3 ^ v});
  endfunction

  function automatic dr8_t dr_xtime(dr8_t a);
    return dr_lin8(XTIME, a);
  endfunction

  // dual-rail MixColumns of one column; a[0] is the top byte (row 0)
  function automatic void dr_mixcol(input dr8_t a [4], output dr8_t y [4]);
    dr8_t x2 [4];
    for (int i = 0; i < 4; i++) x2[i] = dr_xtime(a[i]);
    for (int r = 0; r < 4; r++) begin
      // y_r = 2*a_r ^ 3*a_{r+1} ^ a_{r+2} ^ a_{r+3}
      y[r] = dr_xor8(dr_xor8(x2[r], x2[(r+1)%4]),
                     dr_xor8(a[(r+1)%4], dr_xor8(a[(r+2)%4], a[(r+3)%4])));
    end
  endfunction

  // dual-rail InvMixColumns of one column (same pre-step as inv_mixcol)
  function automatic void dr_inv_mixcol(input dr8_t a [4], output dr8_t y [4]);
    dr8_t u, v;
    dr8_t b [4];
    u = dr_lin8(X4, dr_xor8(a[0], a[2]));
    v = dr_lin8(X4, dr_xor8(a[1], a[3]));
    b[0] = dr_xor8(a[0], u);
    b[1] = dr_xor8(a[1], v);
    b[2] = dr_xor8(a[2], u);
    b[3] = dr_xor8(a[3], v);
    dr_mixcol(b, y);
  endfunction

  // Round constants of AES-128, index 1..10
  function automatic logic [7:0] aes_rcon(int unsigned round);
    logic [7:0] r;
    r = 8'h01;
    for (int i = 1; i < 16; i++) if (i < round) r = xtime(r);
    return r;
  endfunction

endpackage
