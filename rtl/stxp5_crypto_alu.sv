// stxp5_crypto_alu: scalar-cryptography slice of a 4-stage RV32 ALU pipeline.
//
// The extension adds 21 instructions (Zbkb, Zbkx, Zknh, Zkne, Zknd) to the
// ALU of a four-stage RV32E core (IF, DOF, EX, WB). This module is the part of
// the DOF, EX and WB stages that those instructions use:
//
//   DOF  cx_decoder decodes dof_instr. For a crypto instruction the operands
//        read from the register file (dof_rs1, dof_rs2), the operation, rd and
//        the 2-bit AES byte select bs are loaded into the EX pipeline
//        registers. bs is registered here, in DOF, rather than re-extracted
//        from the instruction in EX.
//   EX   one of four unified units computes the result combinationally:
//        zbkb_unit, zbkx_unit, sha256_unit, sha512_unit or aes32_unit. The
//        result is also driven on ex_bypass for the core's forwarding paths.
//   WB   the result is registered with rd; wb_we is raised unless rd is x0,
//        whose result is discarded.
//
// Every instruction occupies EX for one cycle: a result issued in DOF in cycle
// t is on ex_bypass in cycle t+1 and on wb_data in cycle t+2. stall, from the
// core's hazard unit, freezes the EX and WB registers (the core holds the DOF
// instruction in that cycle). Reset (rst_n low, asynchronous) empties EX and
// WB. The register file, fetch, hazard and forwarding logic belong to the core
// and stay outside; their signals are the ports of this module.
//
// EN_ZBKB, EN_ZBKX, EN_ZKNH, EN_ZKNE and EN_ZKND select which extensions are
// built. An instruction of a disabled extension gives dof_hit = 0, and its unit
// is not instantiated. With only Zkne or only Zknd, the AES unit's direction
// input is a constant, so the other direction's S-box and MixColumns logic
// drops out in synthesis. The default has all five enabled.
//
// Lint notes: the decoded rs1/rs2 address fields go unused here, because the
// core reads the register file itself. rst_n is reported as used both
// asynchronously and synchronously only because it also disables the EX-slot
// assertion.
//
// The stage split, the bs register in DOF, the four unified datapaths and the
// option of building each extension alone follow the source design. The port
// list, the stall behaviour and the internal operation encoding are this
// design's own.
module stxp5_crypto_alu
  import cx_pkg::*;
#(
  parameter int unsigned XLEN_P  = cx_pkg::XLEN,
  // Extension selection; all five on is the full configuration.
  parameter bit          EN_ZBKB = 1'b1,
  parameter bit          EN_ZBKX = 1'b1,
  parameter bit          EN_ZKNH = 1'b1,
  parameter bit          EN_ZKNE = 1'b1,
  parameter bit          EN_ZKND = 1'b1
) (
  input  logic              clk,
  input  logic              rst_n,
  // DOF stage
  input  logic              dof_valid,
  input  logic [31:0]       dof_instr,
  input  logic [XLEN_P-1:0] dof_rs1,
  input  logic [XLEN_P-1:0] dof_rs2,
  input  logic              stall,
  output logic              dof_hit,
  // EX stage
  output logic              ex_valid,
  output logic [4:0]        ex_rd,
  output logic [XLEN_P-1:0] ex_bypass,
  // WB stage
  output logic              wb_valid,
  output logic              wb_we,
  output logic [4:0]        wb_rd,
  output logic [XLEN_P-1:0] wb_data
);

  // ---------------------------------------------------------------- DOF
  cx_dec_t dec;
  cx_decoder u_dec (.instr(dof_instr), .dec(dec));
  logic    op_en;

  // Only instructions of the configured extensions are taken.
  assign op_en =
      (EN_ZBKB && (dec.op inside {CX_BREV8, CX_PACK, CX_PACKH, CX_ZIP, CX_UNZIP})) ||
      (EN_ZBKX && (dec.op inside {CX_XPERM8, CX_XPERM4})) ||
      (EN_ZKNH && (dec.op inside {[CX_SHA256SIG0:CX_SHA512SUM1R]})) ||
      (EN_ZKNE && (dec.op inside {CX_AES32ESI, CX_AES32ESMI})) ||
      (EN_ZKND && (dec.op inside {CX_AES32DSI, CX_AES32DSMI}));

  assign dof_hit = dof_valid && dec.hit && op_en;

  // ----------------------------------------------------- DOF/EX registers
  cx_op_e            ex_op;
  logic [1:0]        ex_bs;
  logic [XLEN_P-1:0] ex_op1, ex_op2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ex_valid <= 1'b0;
      ex_op    <= CX_NONE;
      ex_bs    <= '0;
      ex_rd    <= '0;
      ex_op1   <= '0;
      ex_op2   <= '0;
    end else if (!stall) begin
      ex_valid <= dof_hit;
      if (dof_hit) begin
        ex_op  <= dec.op;
        ex_bs  <= dec.bs;
        ex_rd  <= dec.rd;
        ex_op1 <= dof_rs1;
        ex_op2 <= dof_rs2;
      end
    end
  end

  // ------------------------------------------------------------------ EX
  cx_unit_e   unit;
  zbkb_op_e   zbkb_op;
  logic       xperm_nib;
  logic       s256_cmd, s256_n;
  logic [1:0] s512_l;
  logic       s512_f, s512_n;
  logic       aes_box, aes_mix;

  always_comb begin
    unit      = U_NONE;
    zbkb_op   = ZBKB_BREV8;
    xperm_nib = 1'b0;
    s256_cmd  = 1'b0;  s256_n = 1'b0;
    s512_l    = SHA512_L_HIGH;  s512_f = 1'b0;  s512_n = 1'b0;
    aes_box   = 1'b0;  aes_mix = 1'b0;
    unique case (ex_op)
      CX_BREV8:       begin unit = U_ZBKB; zbkb_op = ZBKB_BREV8; end
      CX_PACK:        begin unit = U_ZBKB; zbkb_op = ZBKB_PACK;  end
      CX_PACKH:       begin unit = U_ZBKB; zbkb_op = ZBKB_PACKH; end
      CX_ZIP:         begin unit = U_ZBKB; zbkb_op = ZBKB_ZIP;   end
      CX_UNZIP:       begin unit = U_ZBKB; zbkb_op = ZBKB_UNZIP; end
      CX_XPERM8:      begin unit = U_ZBKX; xperm_nib = 1'b0; end
      CX_XPERM4:      begin unit = U_ZBKX; xperm_nib = 1'b1; end
      CX_SHA256SIG0:  begin unit = U_SHA256; s256_cmd = 1'b0; s256_n = 1'b0; end
      CX_SHA256SIG1:  begin unit = U_SHA256; s256_cmd = 1'b0; s256_n = 1'b1; end
      CX_SHA256SUM0:  begin unit = U_SHA256; s256_cmd = 1'b1; s256_n = 1'b0; end
      CX_SHA256SUM1:  begin unit = U_SHA256; s256_cmd = 1'b1; s256_n = 1'b1; end
      CX_SHA512SIG0H: begin unit = U_SHA512; s512_l = SHA512_L_HIGH; s512_f = 1'b0; s512_n = 1'b0; end
      CX_SHA512SIG0L: begin unit = U_SHA512; s512_l = SHA512_L_LOW;  s512_f = 1'b0; s512_n = 1'b0; end
      CX_SHA512SIG1H: begin unit = U_SHA512; s512_l = SHA512_L_HIGH; s512_f = 1'b0; s512_n = 1'b1; end
      CX_SHA512SIG1L: begin unit = U_SHA512; s512_l = SHA512_L_LOW;  s512_f = 1'b0; s512_n = 1'b1; end
      CX_SHA512SUM0R: begin unit = U_SHA512; s512_l = SHA512_L_SUM;  s512_f = 1'b1; s512_n = 1'b0; end
      CX_SHA512SUM1R: begin unit = U_SHA512; s512_l = SHA512_L_SUM;  s512_f = 1'b1; s512_n = 1'b1; end
      CX_AES32ESI:    begin unit = U_AES32; aes_box = 1'b0; aes_mix = 1'b0; end
      CX_AES32ESMI:   begin unit = U_AES32; aes_box = 1'b0; aes_mix = 1'b1; end
      CX_AES32DSI:    begin unit = U_AES32; aes_box = 1'b1; aes_mix = 1'b0; end
      CX_AES32DSMI:   begin unit = U_AES32; aes_box = 1'b1; aes_mix = 1'b1; end
      default: ;
    endcase
  end

  logic [XLEN_P-1:0] r_zbkb, r_zbkx, r_s256, r_s512, r_aes;

  // A unit of a disabled extension is not built; its op never reaches EX.
  if (EN_ZBKB) begin : g_zbkb
    zbkb_unit #(.XLEN_P(XLEN_P)) u_zbkb (.rs1(ex_op1), .rs2(ex_op2), .op(zbkb_op), .rd(r_zbkb));
  end else begin : g_no_zbkb
    assign r_zbkb = '0;
  end

  if (EN_ZBKX) begin : g_zbkx
    zbkx_unit #(.XLEN_P(XLEN_P)) u_zbkx (.rs1(ex_op1), .rs2(ex_op2), .nibble(xperm_nib), .rd(r_zbkx));
  end else begin : g_no_zbkx
    assign r_zbkx = '0;
  end

  if (EN_ZKNH) begin : g_zknh
    sha256_unit u_sha256 (.rs1(ex_op1), .cmd(s256_cmd), .n(s256_n), .rd(r_s256));
    sha512_unit u_sha512 (.rs1(ex_op1), .rs2(ex_op2), .l(s512_l), .f(s512_f), .n(s512_n), .rd(r_s512));
  end else begin : g_no_zknh
    assign r_s256 = '0;
    assign r_s512 = '0;
  end

  if (EN_ZKNE || EN_ZKND) begin : g_aes
    // With only one direction built, box is a constant and the other
    // direction's S-box layers and MixColumns terms are optimised away.
    logic box_cfg;
    assign box_cfg = EN_ZKNE ? (EN_ZKND && aes_box) : 1'b1;
    aes32_unit u_aes32 (.rs1(ex_op1), .rs2(ex_op2), .bs(ex_bs), .box(box_cfg), .mix(aes_mix), .rd(r_aes));
  end else begin : g_no_aes
    assign r_aes = '0;
  end

  always_comb begin
    unique case (unit)
      U_ZBKB:   ex_bypass = r_zbkb;
      U_ZBKX:   ex_bypass = r_zbkx;
      U_SHA256: ex_bypass = r_s256;
      U_SHA512: ex_bypass = r_s512;
      U_AES32:  ex_bypass = r_aes;
      default:  ex_bypass = '0;
    endcase
  end

  // ------------------------------------------------------ EX/WB registers
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wb_valid <= 1'b0;
      wb_rd    <= '0;
      wb_data  <= '0;
    end else if (!stall) begin
      wb_valid <= ex_valid;
      if (ex_valid) begin
        wb_rd   <= ex_rd;
        wb_data <= ex_bypass;
      end
    end
  end

  assign wb_we = wb_valid && (wb_rd != 5'd0);

  // A valid EX slot always holds a crypto operation.
  a_ex_op_known: assert property (@(posedge clk) disable iff (!rst_n)
    ex_valid |-> (ex_op != CX_NONE));

endmodule
