// bp_sbox_middle: shared non-linear middle layer of the Boyar-Peralta AES S-box.
//
// The Boyar-Peralta depth-16 S-box circuit splits the S-box in three layers:
// a top linear layer (8 bits in, XOR/XNOR only), this middle layer (XOR and
// AND only) and a bottom linear layer (18 bits in, 8 bits out). The middle
// layer computes the GF(2^8) inversion in a tower-field basis and is the same
// for the forward and the inverse S-box; only the linear layers around it
// differ. It takes the 21 top-layer signals plus d (U7 for the forward box, Y5
// for the inverse) and returns the 18 products M46..M63 that the bottom layer
// combines. Signal names follow the published circuit. Combinational.
module bp_sbox_middle
  import cx_pkg::*;
(
  input  bp_mid_in_t  t,
  output logic [17:0] m      // m[k] = M(46+k)
);

  logic m1, m2, m3, m4, m5, m6, m7, m8, m9, m10, m11, m12, m13, m14, m15;
  logic m16, m17, m18, m19, m20, m21, m22, m23, m24, m25, m26, m27, m28, m29;
  logic m30, m31, m32, m33, m34, m35, m36, m37, m38, m39, m40, m41, m42, m43;
  logic m44, m45;

  always_comb begin
    m1  = t.t13 & t.t6;
    m2  = t.t23 & t.t8;
    m3  = t.t14 ^ m1;
    m4  = t.t19 & t.d;
    m5  = m4 ^ m1;
    m6  = t.t3 & t.t16;
    m7  = t.t22 & t.t9;
    m8  = t.t26 ^ m6;
    m9  = t.t20 & t.t17;
    m10 = m9 ^ m6;
    m11 = t.t1 & t.t15;
    m12 = t.t4 & t.t27;
    m13 = m12 ^ m11;
    m14 = t.t2 & t.t10;
    m15 = m14 ^ m11;
    m16 = m3 ^ m2;
    m17 = m5 ^ t.t24;
    m18 = m8 ^ m7;
    m19 = m10 ^ m15;
    m20 = m16 ^ m13;
    m21 = m17 ^ m15;
    m22 = m18 ^ m13;
    m23 = m19 ^ t.t25;
    m24 = m22 ^ m23;
    m25 = m22 & m20;
    m26 = m21 ^ m25;
    m27 = m20 ^ m21;
    m28 = m23 ^ m25;
    m29 = m28 & m27;
    m30 = m26 & m24;
    m31 = m20 & m23;
    m32 = m27 & m31;
    m33 = m27 ^ m25;
    m34 = m21 & m22;
    m35 = m24 & m34;
    m36 = m24 ^ m25;
    m37 = m21 ^ m29;
    m38 = m32 ^ m33;
    m39 = m23 ^ m30;
    m40 = m35 ^ m36;
    m41 = m38 ^ m40;
    m42 = m37 ^ m39;
    m43 = m37 ^ m38;
    m44 = m39 ^ m40;
    m45 = m42 ^ m41;
    m[0]  = m44 & t.t6;   // M46
    m[1]  = m40 & t.t8;   // M47
    m[2]  = m39 & t.d;    // M48
    m[3]  = m43 & t.t16;  // M49
    m[4]  = m38 & t.t9;   // M50
    m[5]  = m37 & t.t17;  // M51
    m[6]  = m42 & t.t15;  // M52
    m[7]  = m45 & t.t27;  // M53
    m[8]  = m41 & t.t10;  // M54
    m[9]  = m44 & t.t13;  // M55
    m[10] = m40 & t.t23;  // M56
    m[11] = m39 & t.t19;  // M57
    m[12] = m43 & t.t3;   // M58
    m[13] = m38 & t.t22;  // M59
    m[14] = m37 & t.t20;  // M60
    m[15] = m42 & t.t1;   // M61
    m[16] = m45 & t.t4;   // M62
    m[17] = m41 & t.t2;   // M63
  end

endmodule
