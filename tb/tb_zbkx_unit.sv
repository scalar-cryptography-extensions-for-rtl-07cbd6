// tb_zbkx_unit: checks xperm8 and xperm4 against a lane-by-lane reference,
// with index words drawn both in range (a true permutation) and fully random
// (out-of-range lanes must read as zero).
module tb_zbkx_unit;
  import tb_ref_pkg::*;

  logic [31:0] rs1, rs2, rd;
  logic        nibble;
  int checks = 0, failures = 0;

  zbkx_unit dut (.rs1(rs1), .rs2(rs2), .nibble(nibble), .rd(rd));

  task automatic check(input bit nib, input logic [31:0] a, input logic [31:0] b);
    logic [31:0] exp = ref_exec(nib ? I_XPERM4 : I_XPERM8, a, b);
    rs1 = a; rs2 = b; nibble = nib; #1;
    checks++;
    if (rd !== exp) begin
      failures++;
      $display("FAIL xperm%0d a=%h b=%h got %h exp %h", nib ? 4 : 8, a, b, rd, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // byte reversal by xperm8, identity by xperm4, hand-worked
    rs1 = 32'h4433_2211; rs2 = 32'h0001_0203; nibble = 0; #1;
    checks++; if (rd !== 32'h1122_3344) failures++;
    rs1 = 32'h8765_4321; rs2 = 32'h7654_3210; nibble = 1; #1;
    checks++; if (rd !== 32'h8765_4321) failures++;
    rs2 = 32'hffff_ffff; nibble = 1; #1;
    checks++; if (rd !== 32'h0) failures++;
    for (int n = 0; n < 2000; n++) begin
      automatic logic [31:0] a = $urandom, r = $urandom;
      check(0, a, r & 32'h0303_0303);
      check(1, a, r & 32'h7777_7777);
      check(0, a, r & 32'h0707_0707);
      check(1, a, r);
      check(0, a, r);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
