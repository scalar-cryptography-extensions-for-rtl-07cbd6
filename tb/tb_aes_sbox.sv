// tb_aes_sbox: exhaustive check of the forward and inverse S-box (all 256
// inputs each way) against the GF(2^8)-inverse-plus-affine definition, a few
// published table entries, and the round trip InvSubBytes(SubBytes(x)) = x.
module tb_aes_sbox;
  import tb_ref_pkg::*;

  logic [7:0] x, y;
  logic       inv;
  int checks = 0, failures = 0;

  aes_sbox dut (.x(x), .inv(inv), .y(y));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] fy;
    // published entries: S(00)=63, S(53)=ed, S(ff)=16; InvS(00)=52, InvS(63)=00
    inv = 0; x = 8'h00; #1; checks++; if (y !== 8'h63) failures++;
    inv = 0; x = 8'h53; #1; checks++; if (y !== 8'hed) failures++;
    inv = 0; x = 8'hff; #1; checks++; if (y !== 8'h16) failures++;
    inv = 1; x = 8'h00; #1; checks++; if (y !== 8'h52) failures++;
    inv = 1; x = 8'h63; #1; checks++; if (y !== 8'h00) failures++;
    for (int i = 0; i < 256; i++) begin
      inv = 0; x = 8'(i); #1;
      checks++;
      if (y !== ref_sbox(8'(i))) begin failures++; $display("FAIL S(%h)=%h", i, y); end
      fy = y;
      inv = 1; x = fy; #1;
      checks++;
      if (y !== 8'(i)) begin failures++; $display("FAIL InvS(S(%h))=%h", i, y); end
      inv = 1; x = 8'(i); #1;
      checks++;
      if (y !== ref_inv_sbox(8'(i))) begin failures++; $display("FAIL InvS(%h)=%h", i, y); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
