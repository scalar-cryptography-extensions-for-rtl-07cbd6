// tb_sha512_unit: checks that the RV32 SHA-512 instruction pairs rebuild the
// 64-bit SHA-512 functions. For a random 64-bit word x = {hi, lo}:
//   sig0l(lo, hi) / sig0h(hi, lo) must give the halves of sigma0(x),
//   sig1l / sig1h the halves of sigma1(x),
//   sum0r(lo, hi) / sum0r(hi, lo) the halves of Sum0(x), likewise Sum1.
// The references are computed on whole 64-bit words (FIPS 180-4).
module tb_sha512_unit;
  import cx_pkg::*;
  import tb_ref_pkg::*;

  logic [31:0] rs1, rs2, rd;
  logic [1:0]  l;
  logic        f, n;
  int checks = 0, failures = 0;

  sha512_unit dut (.rs1(rs1), .rs2(rs2), .l(l), .f(f), .n(n), .rd(rd));

  task automatic run(input logic [1:0] ll, input logic ff, input logic nn,
                     input logic [31:0] a, input logic [31:0] b, input logic [31:0] exp,
                     input string what);
    rs1 = a; rs2 = b; l = ll; f = ff; n = nn; #1;
    checks++;
    if (rd !== exp) begin
      failures++;
      $display("FAIL %s a=%h b=%h got %h exp %h", what, a, b, rd, exp);
    end
  endtask

  task automatic check_word(input logic [63:0] x);
    logic [31:0] hi = x[63:32], lo = x[31:0];
    logic [63:0] e;
    e = s512_sig0(x);
    run(SHA512_L_LOW,  0, 0, lo, hi, e[31:0],  "sig0l");
    run(SHA512_L_HIGH, 0, 0, hi, lo, e[63:32], "sig0h");
    e = s512_sig1(x);
    run(SHA512_L_LOW,  0, 1, lo, hi, e[31:0],  "sig1l");
    run(SHA512_L_HIGH, 0, 1, hi, lo, e[63:32], "sig1h");
    e = s512_sum0(x);
    run(SHA512_L_SUM,  1, 0, lo, hi, e[31:0],  "sum0r lo");
    run(SHA512_L_SUM,  1, 0, hi, lo, e[63:32], "sum0r hi");
    e = s512_sum1(x);
    run(SHA512_L_SUM,  1, 1, lo, hi, e[31:0],  "sum1r lo");
    run(SHA512_L_SUM,  1, 1, hi, lo, e[63:32], "sum1r hi");
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 64; k++) check_word(64'h1 << k);
    for (int i = 0; i < 1500; i++) check_word({$urandom, $urandom});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
