// zbkb_unit: the five Zbkb bit-manipulation instructions of the extension.
//
//   brev8  rd = each byte of rs1 with its bit order reversed
//   pack   rd = {rs2[15:0], rs1[15:0]}
//   packh  rd = {16'b0, rs2[7:0], rs1[7:0]}
//   zip    rd[2i] = rs1[i], rd[2i+1] = rs1[i+16]   (i = 0..15)
//   unzip  rd[i] = rs1[2i], rd[i+16] = rs1[2i+1]   (inverse of zip)
//
// Each result is pure wiring; the unit is a five-way multiplexer on op.
// Purely combinational, no clock: it sits in the EX stage of the ALU and its
// result is valid in the same cycle as its operands. The behaviour of each
// instruction follows the RISC-V Zbkb definition; putting all five behind one
// output multiplexer is this design's choice.
//
// rs2[31:16] is never read: pack uses only the low half of rs2 and packh only
// its low byte.
module zbkb_unit
  import cx_pkg::*;
#(
  parameter int unsigned XLEN_P = cx_pkg::XLEN
) (
  input  logic [XLEN_P-1:0] rs1,
  input  logic [XLEN_P-1:0] rs2,
  input  zbkb_op_e          op,
  output logic [XLEN_P-1:0] rd
);

  localparam int unsigned HALF = XLEN_P / 2;

  logic [XLEN_P-1:0] r_brev8, r_pack, r_packh, r_zip, r_unzip;

  always_comb begin
    for (int b = 0; b < XLEN_P / 8; b++)
      for (int i = 0; i < 8; i++)
        r_brev8[8*b + i] = rs1[8*b + 7 - i];

    r_pack  = {rs2[HALF-1:0], rs1[HALF-1:0]};
    r_packh = {{(XLEN_P-16){1'b0}}, rs2[7:0], rs1[7:0]};

    for (int i = 0; i < HALF; i++) begin
      r_zip[2*i]     = rs1[i];
      r_zip[2*i + 1] = rs1[i + HALF];
      r_unzip[i]        = rs1[2*i];
      r_unzip[i + HALF] = rs1[2*i + 1];
    end
  end

  always_comb begin
    unique case (op)
      ZBKB_BREV8: rd = r_brev8;
      ZBKB_PACK:  rd = r_pack;
      ZBKB_PACKH: rd = r_packh;
      ZBKB_ZIP:   rd = r_zip;
      ZBKB_UNZIP: rd = r_unzip;
      default:    rd = '0;
    endcase
  end

endmodule
