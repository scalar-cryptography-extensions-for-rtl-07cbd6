// tb_zbkb_unit: checks brev8, pack, packh, zip and unzip against bit-by-bit
// reference formulas on corner values and random operands, and checks that
// zip and unzip undo each other.
module tb_zbkb_unit;
  import cx_pkg::*;
  import tb_ref_pkg::*;

  logic [31:0] rs1, rs2, rd;
  zbkb_op_e    op;
  int checks = 0, failures = 0;

  zbkb_unit dut (.rs1(rs1), .rs2(rs2), .op(op), .rd(rd));

  task automatic check(input zbkb_op_e o, input instr_e ri, input logic [31:0] a, input logic [31:0] b);
    logic [31:0] exp;
    rs1 = a; rs2 = b; op = o; #1;
    exp = ref_exec(ri, a, b);
    checks++;
    if (rd !== exp) begin
      failures++;
      $display("FAIL %s a=%h b=%h got %h exp %h", o.name(), a, b, rd, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic logic [31:0] v [6] = '{32'h0, 32'hffff_ffff, 32'h8000_0001, 32'h0123_4567, 32'hdead_beef, 32'h5555_aaaa};
    // fixed examples worked out by hand
    rs1 = 32'h0000_0001; op = ZBKB_BREV8; #1; checks++; if (rd !== 32'h0000_0080) failures++;
    rs1 = 32'h0000_ffff; op = ZBKB_ZIP;   #1; checks++; if (rd !== 32'h5555_5555) failures++;
    rs1 = 32'haaaa_aaaa; op = ZBKB_UNZIP; #1; checks++; if (rd !== 32'hffff_0000) failures++;
    foreach (v[i]) foreach (v[j]) begin
      check(ZBKB_BREV8, I_BREV8, v[i], v[j]);
      check(ZBKB_PACK,  I_PACK,  v[i], v[j]);
      check(ZBKB_PACKH, I_PACKH, v[i], v[j]);
      check(ZBKB_ZIP,   I_ZIP,   v[i], v[j]);
      check(ZBKB_UNZIP, I_UNZIP, v[i], v[j]);
    end
    for (int n = 0; n < 500; n++) begin
      automatic logic [31:0] a = $urandom, b = $urandom, z;
      check(ZBKB_BREV8, I_BREV8, a, b);
      check(ZBKB_PACK,  I_PACK,  a, b);
      check(ZBKB_PACKH, I_PACKH, a, b);
      check(ZBKB_ZIP,   I_ZIP,   a, b);
      check(ZBKB_UNZIP, I_UNZIP, a, b);
      // unzip(zip(a)) == a
      rs1 = a; op = ZBKB_ZIP; #1; z = rd;
      rs1 = z; op = ZBKB_UNZIP; #1;
      checks++; if (rd !== a) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
