// tb_aes32_unit: checks aes32esi/esmi/dsi/dsmi (all four box/mix settings,
// all four bs values) against the instruction definitions built from the
// reference S-box and GF(2^8) products, on random operands. It also checks
// that four aes32esmi instructions rebuild one column of a full AES round:
// the FIPS-197 round-1 column d4 bf 5d 30 -> 04 66 81 e5.
module tb_aes32_unit;
  import tb_ref_pkg::*;

  logic [31:0] rs1, rs2, rd;
  logic [1:0]  bs;
  logic        box, mix;
  int checks = 0, failures = 0;

  aes32_unit dut (.rs1(rs1), .rs2(rs2), .bs(bs), .box(box), .mix(mix), .rd(rd));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] acc;
    // MixColumns of the column {d4,bf,5d,30} (after SubBytes/ShiftRows) is
    // {04,66,81,e5}. Feed S-box inputs whose outputs are these bytes.
    acc = 0;
    for (int k = 0; k < 4; k++) begin
      automatic logic [7:0] sb_in [4] = '{ref_inv_sbox(8'hd4), ref_inv_sbox(8'hbf),
                                ref_inv_sbox(8'h5d), ref_inv_sbox(8'h30)};
      rs1 = acc; rs2 = {4{sb_in[k]}}; bs = 2'(k); box = 0; mix = 1; #1;
      acc = rd;
    end
    checks++;
    if (acc !== 32'he581_6604) begin failures++; $display("FAIL column %h", acc); end

    for (int n = 0; n < 1500; n++) begin
      automatic logic [31:0] a = $urandom, b = $urandom, e;
      for (int m = 0; m < 4; m++) begin
        automatic int k = $urandom_range(0, 3);
        rs1 = a; rs2 = b; bs = 2'(k); box = m[1]; mix = m[0]; #1;
        e = ref_aes32(a, b, k, m[1], m[0]);
        checks++;
        if (rd !== e) begin
          failures++;
          $display("FAIL box=%0d mix=%0d bs=%0d a=%h b=%h got %h exp %h", m[1], m[0], k, a, b, rd, e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
