// tb_aes_mixcol: checks the forward and inverse partial MixColumns column for
// all 256 input bytes against shift-and-add GF(2^8) multiplication, plus the
// FIPS-197 worked value {57}*{02} = {ae} in the forward column.
module tb_aes_mixcol;
  import tb_ref_pkg::*;

  logic [7:0]  b;
  logic        inv;
  logic [31:0] col;
  int checks = 0, failures = 0;

  aes_mixcol dut (.b(b), .inv(inv), .col(col));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] e;
    b = 8'h57; inv = 0; #1; checks++; if (col[7:0] !== 8'hae) failures++;
    for (int i = 0; i < 256; i++) begin
      b = 8'(i);
      inv = 0; #1;
      e = {gmul(b, 3), b, b, gmul(b, 2)};
      checks++; if (col !== e) begin failures++; $display("FAIL fwd %h: %h vs %h", b, col, e); end
      inv = 1; #1;
      e = {gmul(b, 11), gmul(b, 13), gmul(b, 9), gmul(b, 14)};
      checks++; if (col !== e) begin failures++; $display("FAIL inv %h: %h vs %h", b, col, e); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
