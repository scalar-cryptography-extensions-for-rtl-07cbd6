// tb_sha256_unit: checks the four SHA-256 sigma/sum functions of the unified
// datapath against the FIPS 180-4 definitions for every cmd/n setting.
module tb_sha256_unit;
  import tb_ref_pkg::*;

  logic [31:0] rs1, rd;
  logic        cmd, n;
  int checks = 0, failures = 0;

  sha256_unit dut (.rs1(rs1), .cmd(cmd), .n(n), .rd(rd));

  task automatic check(input logic c, input logic nn, input logic [31:0] a);
    logic [31:0] exp;
    unique case ({c, nn})
      2'b00: exp = s256_sig0(a);
      2'b01: exp = s256_sig1(a);
      2'b10: exp = s256_sum0(a);
      default: exp = s256_sum1(a);
    endcase
    rs1 = a; cmd = c; n = nn; #1;
    checks++;
    if (rd !== exp) begin
      failures++;
      $display("FAIL cmd=%0d n=%0d a=%h got %h exp %h", c, nn, a, rd, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 32; k++)
      for (int s = 0; s < 4; s++) check(s[1], s[0], 32'h1 << k);
    for (int i = 0; i < 2000; i++) begin
      automatic logic [31:0] a = $urandom;
      for (int s = 0; s < 4; s++) check(s[1], s[0], a);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
