// sha256_unit: one datapath for the four Zknh SHA-256 instructions.
//
//   sha256sig0  rd = ror(rs1, 7)  ^ ror(rs1, 18) ^ (rs1 >> 3)
//   sha256sig1  rd = ror(rs1, 17) ^ ror(rs1, 19) ^ (rs1 >> 10)
//   sha256sum0  rd = ror(rs1, 2)  ^ ror(rs1, 13) ^ ror(rs1, 22)
//   sha256sum1  rd = ror(rs1, 6)  ^ ror(rs1, 11) ^ ror(rs1, 25)
//
// Three "shifters" feed one three-input XOR. Every shift amount is a
// constant, so a shifter is only a multiplexer over four wirings of rs1,
// selected by cmd (0 = sigma, 1 = sum) and n (function 0 or 1); the third
// shifter is a logical right shift for sigma and a rotation for sum. The
// cmd/n control and the shared structure follow the unified SHA-256 path of
// the source design; the rotation amounts are those of FIPS 180-4.
// Combinational EX-stage logic.
module sha256_unit (
  input  logic [31:0] rs1,
  input  logic        cmd,   // 0 = sigma (sig0/sig1), 1 = sum (sum0/sum1)
  input  logic        n,     // 0 = function 0, 1 = function 1
  output logic [31:0] rd
);

  function automatic logic [31:0] ror32(input logic [31:0] x, input int unsigned s);
    return (x >> s) | (x << (32 - s));
  endfunction

  logic [31:0] sh_a, sh_b, sh_c;

  always_comb begin
    unique case ({cmd, n})
      2'b00: begin sh_a = ror32(rs1, 7);  sh_b = ror32(rs1, 18); sh_c = rs1 >> 3;       end
      2'b01: begin sh_a = ror32(rs1, 17); sh_b = ror32(rs1, 19); sh_c = rs1 >> 10;      end
      2'b10: begin sh_a = ror32(rs1, 2);  sh_b = ror32(rs1, 13); sh_c = ror32(rs1, 22); end
      default: begin sh_a = ror32(rs1, 6); sh_b = ror32(rs1, 11); sh_c = ror32(rs1, 25); end
    endcase
  end

  assign rd = sh_a ^ sh_b ^ sh_c;

endmodule
