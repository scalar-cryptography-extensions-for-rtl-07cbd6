// aes_sbox: AES forward and inverse S-box built as a Boyar-Peralta circuit.
//
// The S-box is the multiplicative inverse in GF(2^8) (modulus
// x^8 + x^4 + x^3 + x + 1) combined with an affine map: after the inversion
// for the forward box, before it for the inverse box. Instead of a 256-entry
// table it is computed by the Boyar-Peralta depth-16 circuit:
//   * a top linear layer (XOR/XNOR) expands the byte to the 22 signals the
//     middle layer needs; there is one for each direction,
//   * the shared non-linear middle layer (bp_sbox_middle) does the inversion,
//   * a bottom linear layer (XOR/XNOR) compresses its 18 products back to a
//     byte, again one per direction; the affine maps are folded into the two
//     linear layers.
// inv selects the inverse top layer into the middle layer and the inverse
// bottom layer onto y, so one middle layer serves both directions. That
// sharing is this design's choice for the combined encrypt/decrypt AES path.
// Bit naming: U0 is the most significant input bit, S0/W0 the most
// significant output bit. Combinational.
module aes_sbox
  import cx_pkg::*;
(
  input  logic [7:0] x,
  input  logic       inv,   // 0 = SubBytes, 1 = InvSubBytes
  output logic [7:0] y
);

  logic u0, u1, u2, u3, u4, u5, u6, u7;
  assign {u0, u1, u2, u3, u4, u5, u6, u7} = x;

  bp_mid_in_t  fwd_t, inv_t, mid_t;
  logic [17:0] mm;

  // ---------------- forward top linear layer ----------------
  always_comb begin
    logic t1, t2, t3, t4, t5, t6, t7, t8, t9, t10, t11, t12, t13, t14;
    logic t15, t16, t17, t18, t19, t20, t21, t22, t23, t24, t25, t26, t27;
    t1  = u0 ^ u3;   t2  = u0 ^ u5;   t3  = u0 ^ u6;   t4  = u3 ^ u5;
    t5  = u4 ^ u6;   t6  = t1 ^ t5;   t7  = u1 ^ u2;   t8  = u7 ^ t6;
    t9  = u7 ^ t7;   t10 = t6 ^ t7;   t11 = u1 ^ u5;   t12 = u2 ^ u5;
    t13 = t3 ^ t4;   t14 = t6 ^ t11;  t15 = t5 ^ t11;  t16 = t5 ^ t12;
    t17 = t9 ^ t16;  t18 = u3 ^ u7;   t19 = t7 ^ t18;  t20 = t1 ^ t19;
    t21 = u6 ^ u7;   t22 = t7 ^ t21;  t23 = t2 ^ t22;  t24 = t2 ^ t10;
    t25 = t20 ^ t17; t26 = t3 ^ t16;  t27 = t1 ^ t12;
    fwd_t = '{t1: t1, t2: t2, t3: t3, t4: t4, t6: t6, t8: t8, t9: t9, t10: t10,
              t13: t13, t14: t14, t15: t15, t16: t16, t17: t17, t19: t19,
              t20: t20, t22: t22, t23: t23, t24: t24, t25: t25, t26: t26,
              t27: t27, d: u7};
  end

  // ---------------- inverse top linear layer ----------------
  always_comb begin
    logic t1, t2, t3, t4, t6, t8, t9, t10, t13, t14, t15, t16, t17, t19;
    logic t20, t22, t23, t24, t25, t26, t27, r5, r13, r17, r18, r19, y5;
    t23 = u0 ^ u3;     t22 = ~(u1 ^ u3);  t2  = ~(u0 ^ u1);  t1  = u3 ^ u4;
    t24 = ~(u4 ^ u7);  r5  = u6 ^ u7;     t8  = ~(u1 ^ t23); t19 = t22 ^ r5;
    t9  = ~(u7 ^ t1);  t10 = t2 ^ t24;    t13 = t2 ^ r5;     t3  = t1 ^ r5;
    t25 = ~(u2 ^ t1);  r13 = u1 ^ u6;     t17 = ~(u2 ^ t19); t20 = t24 ^ r13;
    t4  = u4 ^ t8;     r17 = ~(u2 ^ u5);  r18 = ~(u5 ^ u6);  r19 = ~(u2 ^ u4);
    y5  = u0 ^ r17;    t6  = t22 ^ r17;   t16 = r13 ^ r19;   t27 = t1 ^ r18;
    t15 = t10 ^ t27;   t14 = t10 ^ r18;   t26 = t3 ^ t16;
    inv_t = '{t1: t1, t2: t2, t3: t3, t4: t4, t6: t6, t8: t8, t9: t9, t10: t10,
              t13: t13, t14: t14, t15: t15, t16: t16, t17: t17, t19: t19,
              t20: t20, t22: t22, t23: t23, t24: t24, t25: t25, t26: t26,
              t27: t27, d: y5};
  end

  assign mid_t = inv ? inv_t : fwd_t;

  bp_sbox_middle u_mid (.t(mid_t), .m(mm));

  // M46..M63 by their published names
  logic m46, m47, m48, m49, m50, m51, m52, m53, m54;
  logic m55, m56, m57, m58, m59, m60, m61, m62, m63;
  assign {m63, m62, m61, m60, m59, m58, m57, m56, m55,
          m54, m53, m52, m51, m50, m49, m48, m47, m46} = mm;

  logic [7:0] y_fwd, y_inv;

  // ---------------- forward bottom linear layer ----------------
  always_comb begin
    logic l0, l1, l2, l3, l4, l5, l6, l7, l8, l9, l10, l11, l12, l13, l14;
    logic l15, l16, l17, l18, l19, l20, l21, l22, l23, l24, l25, l26, l27;
    logic l28, l29;
    l0  = m61 ^ m62;  l1  = m50 ^ m56;  l2  = m46 ^ m48;  l3  = m47 ^ m55;
    l4  = m54 ^ m58;  l5  = m49 ^ m61;  l6  = m62 ^ l5;   l7  = m46 ^ l3;
    l8  = m51 ^ m59;  l9  = m52 ^ m53;  l10 = m53 ^ l4;   l11 = m60 ^ l2;
    l12 = m48 ^ m51;  l13 = m50 ^ l0;   l14 = m52 ^ m61;  l15 = m55 ^ l1;
    l16 = m56 ^ l0;   l17 = m57 ^ l1;   l18 = m58 ^ l8;   l19 = m63 ^ l4;
    l20 = l0 ^ l1;    l21 = l1 ^ l7;    l22 = l3 ^ l12;   l23 = l18 ^ l2;
    l24 = l15 ^ l9;   l25 = l6 ^ l10;   l26 = l7 ^ l9;    l27 = l8 ^ l10;
    l28 = l11 ^ l14;  l29 = l11 ^ l17;
    y_fwd[7] = l6 ^ l24;
    y_fwd[6] = ~(l16 ^ l26);
    y_fwd[5] = ~(l19 ^ l28);
    y_fwd[4] = l6 ^ l21;
    y_fwd[3] = l20 ^ l22;
    y_fwd[2] = l25 ^ l29;
    y_fwd[1] = ~(l13 ^ l27);
    y_fwd[0] = ~(l6 ^ l23);
  end

  // ---------------- inverse bottom linear layer ----------------
  always_comb begin
    logic p0, p1, p2, p3, p4, p5, p6, p7, p8, p9, p10, p11, p12, p13, p14;
    logic p15, p16, p17, p18, p19, p20, p22, p23, p24, p25, p26, p27, p28;
    logic p29;
    p0  = m52 ^ m61;  p1  = m58 ^ m59;  p2  = m54 ^ m62;  p3  = m47 ^ m50;
    p4  = m48 ^ m56;  p5  = m46 ^ m51;  p6  = m49 ^ m60;  p7  = p0 ^ p1;
    p8  = m50 ^ m53;  p9  = m55 ^ m63;  p10 = m57 ^ p4;   p11 = p0 ^ p3;
    p12 = m46 ^ m48;  p13 = m49 ^ m51;  p14 = m49 ^ m62;  p15 = m54 ^ m59;
    p16 = m57 ^ m61;  p17 = m58 ^ p2;   p18 = m63 ^ p5;   p19 = p2 ^ p3;
    p20 = p4 ^ p6;    p22 = p2 ^ p7;    p23 = p7 ^ p8;    p24 = p5 ^ p7;
    p25 = p6 ^ p10;   p26 = p9 ^ p11;   p27 = p10 ^ p18;  p28 = p11 ^ p25;
    p29 = p15 ^ p20;
    y_inv[7] = p13 ^ p22;
    y_inv[6] = p26 ^ p29;
    y_inv[5] = p17 ^ p28;
    y_inv[4] = p12 ^ p22;
    y_inv[3] = p23 ^ p27;
    y_inv[2] = p19 ^ p24;
    y_inv[1] = p14 ^ p23;
    y_inv[0] = p9 ^ p16;
  end

  assign y = inv ? y_inv : y_fwd;

endmodule
