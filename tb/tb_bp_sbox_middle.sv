// tb_bp_sbox_middle: checks the shared non-linear layer in its place between
// the forward and inverse linear layers of aes_sbox. Because the same middle
// layer serves both directions, every one of its 256 forward and 256 inverse
// evaluations must reproduce the S-box defined by GF(2^8) inversion and the
// affine map; any wrong product M1..M63 breaks some of them.
module tb_bp_sbox_middle;
  import tb_ref_pkg::*;

  logic [7:0] x, y;
  logic       inv;
  int checks = 0, failures = 0;
  int bad_fwd = 0, bad_inv = 0;

  aes_sbox u_sbox (.x(x), .inv(inv), .y(y));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      inv = 0; x = 8'(i); #1;
      checks++;
      if (y !== ref_sbox(8'(i))) begin failures++; bad_fwd++; end
      inv = 1; #1;
      checks++;
      if (y !== ref_inv_sbox(8'(i))) begin failures++; bad_inv++; end
    end
    if (failures != 0) $display("middle layer: %0d forward and %0d inverse mismatches", bad_fwd, bad_inv);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
