// cx_pkg: types and constants shared by the scalar-cryptography ALU extension.
//
// The extension adds 21 RV32 instructions in five groups: Zbkb (brev8, pack,
// packh, zip, unzip), Zbkx (xperm8, xperm4), Zknh (four SHA-256 and six
// SHA-512 instructions) and Zkne/Zknd (aes32esi, aes32esmi, aes32dsi,
// aes32dsmi). The opcode, funct3 and funct7 values below are the ratified
// RISC-V encodings. The op enumeration, the decoded-instruction struct and the
// unit-select field are this design's own choice of internal encoding.
package cx_pkg;

  localparam int unsigned XLEN = 32;

  // Major opcodes (instr[6:0]).
  localparam logic [6:0] OPC_OP_IMM = 7'b0010011;
  localparam logic [6:0] OPC_OP     = 7'b0110011;

  // One value per crypto instruction; CX_NONE for anything else.
  typedef enum logic [4:0] {
    CX_NONE        = 5'd0,
    CX_BREV8       = 5'd1,
    CX_PACK        = 5'd2,
    CX_PACKH       = 5'd3,
    CX_ZIP         = 5'd4,
    CX_UNZIP       = 5'd5,
    CX_XPERM8      = 5'd6,
    CX_XPERM4      = 5'd7,
    CX_SHA256SIG0  = 5'd8,
    CX_SHA256SIG1  = 5'd9,
    CX_SHA256SUM0  = 5'd10,
    CX_SHA256SUM1  = 5'd11,
    CX_SHA512SIG0H = 5'd12,
    CX_SHA512SIG0L = 5'd13,
    CX_SHA512SIG1H = 5'd14,
    CX_SHA512SIG1L = 5'd15,
    CX_SHA512SUM0R = 5'd16,
    CX_SHA512SUM1R = 5'd17,
    CX_AES32ESI    = 5'd18,
    CX_AES32ESMI   = 5'd19,
    CX_AES32DSI    = 5'd20,
    CX_AES32DSMI   = 5'd21
  } cx_op_e;

  // Operation inside the Zbkb unit.
  typedef enum logic [2:0] {
    ZBKB_BREV8 = 3'd0,
    ZBKB_PACK  = 3'd1,
    ZBKB_PACKH = 3'd2,
    ZBKB_ZIP   = 3'd3,
    ZBKB_UNZIP = 3'd4
  } zbkb_op_e;

  // Encoding of the SHA-512 unit's 2-bit l signal.
  localparam logic [1:0] SHA512_L_HIGH = 2'b00;  // sig*h
  localparam logic [1:0] SHA512_L_LOW  = 2'b01;  // sig*l
  localparam logic [1:0] SHA512_L_SUM  = 2'b10;  // sum*r

  // Which unit produces the result in EX.
  typedef enum logic [2:0] {
    U_NONE   = 3'd0,
    U_ZBKB   = 3'd1,
    U_ZBKX   = 3'd2,
    U_SHA256 = 3'd3,
    U_SHA512 = 3'd4,
    U_AES32  = 3'd5
  } cx_unit_e;

  // Decoded instruction, as produced in DOF and carried to EX.
  typedef struct packed {
    logic       hit;      // one of the 21 crypto instructions
    cx_op_e     op;
    logic [1:0] bs;       // AES byte select, instr[31:30]
    logic [4:0] rd;
    logic [4:0] rs1;
    logic [4:0] rs2;
  } cx_dec_t;

  // Signals passed from an S-box top linear layer to the shared middle layer
  // (names follow the Boyar-Peralta circuit).
  typedef struct packed {
    logic t1,  t2,  t3,  t4,  t6,  t8,  t9,  t10, t13, t14, t15;
    logic t16, t17, t19, t20, t22, t23, t24, t25, t26, t27, d;
  } bp_mid_in_t;

endpackage
