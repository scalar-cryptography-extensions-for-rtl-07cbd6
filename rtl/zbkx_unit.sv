// zbkx_unit: the Zbkx crossbar permutations xperm8 and xperm4.
//
// xperm8: for each byte i of rs2 (i = 0..3), rd byte i is the rs1 byte that
// rs2 byte i indexes, or zero when the index is 4 or more.
// xperm4: the same on nibbles: for each nibble i of rs2 (i = 0..7), rd nibble
// i is the rs1 nibble that rs2 nibble i indexes, or zero when the index is 8
// or more.
//
// Every output lane is its own multiplexer. The low bits of the matching rs2 lane
// select one of the rs1 lanes, and the high bits, when any is set, force the
// lane to zero. There is no shifter: this is the hard-wired form that gave the
// smallest area in the original work, and this design also measured it as
// smaller than a compare per possible index. nibble chooses which of the two
// results leaves the unit. Combinational, EX-stage logic.
module zbkx_unit
  import cx_pkg::*;
#(
  parameter int unsigned XLEN_P = cx_pkg::XLEN
) (
  input  logic [XLEN_P-1:0] rs1,
  input  logic [XLEN_P-1:0] rs2,
  input  logic              nibble,   // 1 = xperm4, 0 = xperm8
  output logic [XLEN_P-1:0] rd
);

  localparam int unsigned NB = XLEN_P / 8;       // bytes
  localparam int unsigned NN = XLEN_P / 4;       // nibbles
  localparam int unsigned BW = $clog2(NB);       // in-range byte index width
  localparam int unsigned NW = $clog2(NN);       // in-range nibble index width

  logic [XLEN_P-1:0] r8, r4;

  always_comb begin
    for (int i = 0; i < NB; i++) begin
      logic [7:0] idx;
      idx = rs2[8*i +: 8];
      r8[8*i +: 8] = (idx >> BW == 0) ? rs1[8*idx[BW-1:0] +: 8] : 8'h00;
    end
    for (int i = 0; i < NN; i++) begin
      logic [3:0] idx;
      idx = rs2[4*i +: 4];
      r4[4*i +: 4] = (idx >> NW == 0) ? rs1[4*idx[NW-1:0] +: 4] : 4'h0;
    end
  end

  assign rd = nibble ? r4 : r8;

endmodule
