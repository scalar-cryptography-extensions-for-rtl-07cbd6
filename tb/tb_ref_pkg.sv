// tb_ref_pkg: reference models used by the testbenches.
//
// Everything here is written from the algorithm definitions, independently of
// the RTL: GF(2^8) arithmetic by shift-and-add, the AES S-box as the
// multiplicative inverse (found by search) followed by the affine map, the
// inverse S-box by searching the forward one, SHA-2 functions on full 64-bit
// words, and the RISC-V instruction encodings assembled from their fields.
package tb_ref_pkg;

  // ---------------------------------------------------------------- GF(2^8)
  function automatic logic [7:0] gmul(input logic [7:0] a, input logic [7:0] b);
    logic [7:0] p = 0, aa = a, bb = b;
    for (int i = 0; i < 8; i++) begin
      if (bb[0]) p ^= aa;
      aa = aa[7] ? ((aa << 1) ^ 8'h1b) : (aa << 1);
      bb >>= 1;
    end
    return p;
  endfunction

  function automatic logic [7:0] ginv(input logic [7:0] a);
    if (a == 0) return 0;
    for (int c = 1; c < 256; c++) if (gmul(a, 8'(c)) == 8'h01) return 8'(c);
    return 0;
  endfunction

  // affine map s_i = b_i ^ b_(i+4) ^ b_(i+5) ^ b_(i+6) ^ b_(i+7) ^ c_i, c = 0x63
  function automatic logic [7:0] ref_sbox(input logic [7:0] x);
    logic [7:0] b = ginv(x), s;
    for (int i = 0; i < 8; i++)
      s[i] = b[i] ^ b[(i+4)%8] ^ b[(i+5)%8] ^ b[(i+6)%8] ^ b[(i+7)%8];
    return s ^ 8'h63;
  endfunction

  // inverse S-box: the forward one searched once, then kept in a table
  logic [7:0] inv_tab [256];
  bit         inv_tab_ok = 0;

  function automatic logic [7:0] ref_inv_sbox(input logic [7:0] y);
    if (!inv_tab_ok) begin
      for (int c = 0; c < 256; c++) inv_tab[ref_sbox(8'(c))] = 8'(c);
      inv_tab_ok = 1;
    end
    return inv_tab[y];
  endfunction

  // ------------------------------------------------------------- bit utils
  function automatic logic [31:0] rotr32(input logic [31:0] x, input int s);
    return (x >> s) | (x << (32 - s));
  endfunction
  function automatic logic [31:0] rotl32(input logic [31:0] x, input int s);
    return (s == 0) ? x : ((x << s) | (x >> (32 - s)));
  endfunction
  function automatic logic [63:0] rotr64(input logic [63:0] x, input int s);
    return (x >> s) | (x << (64 - s));
  endfunction

  // SHA-256 functions (FIPS 180-4)
  function automatic logic [31:0] s256_sig0(input logic [31:0] x); return rotr32(x,7)  ^ rotr32(x,18) ^ (x >> 3);  endfunction
  function automatic logic [31:0] s256_sig1(input logic [31:0] x); return rotr32(x,17) ^ rotr32(x,19) ^ (x >> 10); endfunction
  function automatic logic [31:0] s256_sum0(input logic [31:0] x); return rotr32(x,2)  ^ rotr32(x,13) ^ rotr32(x,22); endfunction
  function automatic logic [31:0] s256_sum1(input logic [31:0] x); return rotr32(x,6)  ^ rotr32(x,11) ^ rotr32(x,25); endfunction

  // SHA-512 functions on whole 64-bit words
  function automatic logic [63:0] s512_sig0(input logic [63:0] x); return rotr64(x,1)  ^ rotr64(x,8)  ^ (x >> 7); endfunction
  function automatic logic [63:0] s512_sig1(input logic [63:0] x); return rotr64(x,19) ^ rotr64(x,61) ^ (x >> 6); endfunction
  function automatic logic [63:0] s512_sum0(input logic [63:0] x); return rotr64(x,28) ^ rotr64(x,34) ^ rotr64(x,39); endfunction
  function automatic logic [63:0] s512_sum1(input logic [63:0] x); return rotr64(x,14) ^ rotr64(x,18) ^ rotr64(x,41); endfunction

  // AES single instructions as the ISA defines them
  function automatic logic [31:0] ref_aes32(input logic [31:0] rs1, input logic [31:0] rs2,
                                            input int bs, input bit dec, input bit mid);
    logic [7:0]  x = rs2[8*bs +: 8];
    logic [7:0]  s = dec ? ref_inv_sbox(x) : ref_sbox(x);
    logic [31:0] w;
    if (!mid)      w = {24'b0, s};
    else if (!dec) w = {gmul(s,3), s, s, gmul(s,2)};
    else           w = {gmul(s,11), gmul(s,13), gmul(s,9), gmul(s,14)};
    return rs1 ^ rotl32(w, 8*bs);
  endfunction

  // ------------------------------------------------------------ encodings
  function automatic logic [31:0] enc_r(input logic [6:0] f7, input int rs2, input int rs1,
                                        input logic [2:0] f3, input int rd, input logic [6:0] opc);
    return {f7, 5'(rs2), 5'(rs1), f3, 5'(rd), opc};
  endfunction

  typedef enum int {
    I_BREV8, I_PACK, I_PACKH, I_ZIP, I_UNZIP, I_XPERM8, I_XPERM4,
    I_S256SIG0, I_S256SIG1, I_S256SUM0, I_S256SUM1,
    I_S512SIG0H, I_S512SIG0L, I_S512SIG1H, I_S512SIG1L, I_S512SUM0R, I_S512SUM1R,
    I_AESESI, I_AESESMI, I_AESDSI, I_AESDSMI, I_COUNT
  } instr_e;

  // Assemble one instruction; bs is used by the AES group only.
  function automatic logic [31:0] asm(input instr_e i, input int rd, input int rs1,
                                      input int rs2 = 0, input int bs = 0);
    localparam logic [6:0] OPI = 7'b0010011, OP = 7'b0110011;
    case (i)
      I_BREV8:     return enc_r(7'b0110100, 7,  rs1, 3'b101, rd, OPI);
      I_ZIP:       return enc_r(7'b0000100, 15, rs1, 3'b001, rd, OPI);
      I_UNZIP:     return enc_r(7'b0000100, 15, rs1, 3'b101, rd, OPI);
      I_PACK:      return enc_r(7'b0000100, rs2, rs1, 3'b100, rd, OP);
      I_PACKH:     return enc_r(7'b0000100, rs2, rs1, 3'b111, rd, OP);
      I_XPERM8:    return enc_r(7'b0010100, rs2, rs1, 3'b100, rd, OP);
      I_XPERM4:    return enc_r(7'b0010100, rs2, rs1, 3'b010, rd, OP);
      I_S256SIG0:  return enc_r(7'b0001000, 2, rs1, 3'b001, rd, OPI);
      I_S256SIG1:  return enc_r(7'b0001000, 3, rs1, 3'b001, rd, OPI);
      I_S256SUM0:  return enc_r(7'b0001000, 0, rs1, 3'b001, rd, OPI);
      I_S256SUM1:  return enc_r(7'b0001000, 1, rs1, 3'b001, rd, OPI);
      I_S512SIG0H: return enc_r(7'b0101110, rs2, rs1, 3'b000, rd, OP);
      I_S512SIG0L: return enc_r(7'b0101010, rs2, rs1, 3'b000, rd, OP);
      I_S512SIG1H: return enc_r(7'b0101111, rs2, rs1, 3'b000, rd, OP);
      I_S512SIG1L: return enc_r(7'b0101011, rs2, rs1, 3'b000, rd, OP);
      I_S512SUM0R: return enc_r(7'b0101000, rs2, rs1, 3'b000, rd, OP);
      I_S512SUM1R: return enc_r(7'b0101001, rs2, rs1, 3'b000, rd, OP);
      I_AESESI:    return enc_r({2'(bs), 5'b10001}, rs2, rs1, 3'b000, rd, OP);
      I_AESESMI:   return enc_r({2'(bs), 5'b10011}, rs2, rs1, 3'b000, rd, OP);
      I_AESDSI:    return enc_r({2'(bs), 5'b10101}, rs2, rs1, 3'b000, rd, OP);
      I_AESDSMI:   return enc_r({2'(bs), 5'b10111}, rs2, rs1, 3'b000, rd, OP);
      default:     return 32'h0000_0013;  // addi x0, x0, 0
    endcase
  endfunction

  // Reference result of one instruction.
  function automatic logic [31:0] ref_exec(input instr_e i, input logic [31:0] a,
                                           input logic [31:0] b, input int bs = 0);
    logic [31:0] r = 0;
    case (i)
      I_BREV8:  for (int k = 0; k < 32; k++) r[k] = a[(k/8)*8 + 7 - (k%8)];
      I_PACK:   r = {b[15:0], a[15:0]};
      I_PACKH:  r = {16'b0, b[7:0], a[7:0]};
      I_ZIP:    for (int k = 0; k < 32; k++) r[k] = a[(k%2 == 1) ? (k/2 + 16) : (k/2)];
      I_UNZIP:  for (int k = 0; k < 32; k++) r[k] = a[(k < 16) ? 2*k : 2*(k-16) + 1];
      I_XPERM8: for (int k = 0; k < 4; k++) r[8*k +: 8] = (b[8*k +: 8] < 4) ? a[8*b[8*k +: 2] +: 8] : 8'h0;
      I_XPERM4: for (int k = 0; k < 8; k++) r[4*k +: 4] = (b[4*k +: 4] < 8) ? a[4*b[4*k +: 3] +: 4] : 4'h0;
      I_S256SIG0: r = s256_sig0(a);
      I_S256SIG1: r = s256_sig1(a);
      I_S256SUM0: r = s256_sum0(a);
      I_S256SUM1: r = s256_sum1(a);
      // halves: rs1 = the half produced, rs2 = the other half
      I_S512SIG0H: r = 32'(s512_sig0({a, b}) >> 32);
      I_S512SIG0L: r = 32'(s512_sig0({b, a}));
      I_S512SIG1H: r = 32'(s512_sig1({a, b}) >> 32);
      I_S512SIG1L: r = 32'(s512_sig1({b, a}));
      // sum*r with rs1 = low half, rs2 = high half gives the low half
      I_S512SUM0R: r = 32'(s512_sum0({b, a}));
      I_S512SUM1R: r = 32'(s512_sum1({b, a}));
      I_AESESI:  r = ref_aes32(a, b, bs, 0, 0);
      I_AESESMI: r = ref_aes32(a, b, bs, 0, 1);
      I_AESDSI:  r = ref_aes32(a, b, bs, 1, 0);
      I_AESDSMI: r = ref_aes32(a, b, bs, 1, 1);
      default: r = 0;
    endcase
    return r;
  endfunction

endpackage
