// tb_cx_decoder: assembles every one of the 21 instructions with random
// register fields (and every bs for the AES group) and checks the decoded
// operation and fields; then checks that a set of neighbouring RV32
// encodings (base ALU operations and near misses in funct7/funct3/rs2
// fields) decode to no crypto operation.
module tb_cx_decoder;
  import cx_pkg::*;
  import tb_ref_pkg::*;

  logic [31:0] instr;
  cx_dec_t     dec;
  int checks = 0, failures = 0;

  cx_decoder dut (.instr(instr), .dec(dec));

  function automatic cx_op_e expected(input instr_e i);
    case (i)
      I_BREV8: return CX_BREV8;         I_PACK: return CX_PACK;
      I_PACKH: return CX_PACKH;         I_ZIP: return CX_ZIP;
      I_UNZIP: return CX_UNZIP;         I_XPERM8: return CX_XPERM8;
      I_XPERM4: return CX_XPERM4;       I_S256SIG0: return CX_SHA256SIG0;
      I_S256SIG1: return CX_SHA256SIG1; I_S256SUM0: return CX_SHA256SUM0;
      I_S256SUM1: return CX_SHA256SUM1; I_S512SIG0H: return CX_SHA512SIG0H;
      I_S512SIG0L: return CX_SHA512SIG0L; I_S512SIG1H: return CX_SHA512SIG1H;
      I_S512SIG1L: return CX_SHA512SIG1L; I_S512SUM0R: return CX_SHA512SUM0R;
      I_S512SUM1R: return CX_SHA512SUM1R; I_AESESI: return CX_AES32ESI;
      I_AESESMI: return CX_AES32ESMI;   I_AESDSI: return CX_AES32DSI;
      I_AESDSMI: return CX_AES32DSMI;   default: return CX_NONE;
    endcase
  endfunction

  task automatic expect_none(input logic [31:0] w);
    instr = w; #1;
    checks++;
    if (dec.hit || dec.op != CX_NONE) begin
      failures++; $display("FAIL %h decoded as %s", w, dec.op.name());
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 40; n++) begin
      for (int i = 0; i < int'(I_COUNT); i++) begin
        automatic int rd = $urandom_range(0, 31), r1 = $urandom_range(0, 31), r2 = $urandom_range(0, 31);
        automatic int bs = $urandom_range(0, 3);
        automatic instr_e ie = instr_e'(i);
        instr = asm(ie, rd, r1, r2, bs); #1;
        checks++;
        if (!dec.hit || dec.op != expected(ie) || dec.rd != 5'(rd) || dec.rs1 != 5'(r1)) begin
          failures++;
          $display("FAIL %s: %h decoded %s rd=%0d rs1=%0d", ie.name(), instr, dec.op.name(), dec.rd, dec.rs1);
        end
        if (ie >= I_AESESI && ie <= I_AESDSMI) begin
          checks++;
          if (dec.bs != 2'(bs) || dec.rs2 != 5'(r2)) begin failures++; $display("FAIL bs/rs2 %h", instr); end
        end
      end
    end
    // base RV32I words and near misses
    expect_none(32'h0000_0013);                          // addi x0,x0,0
    expect_none(enc_r(7'b0000000, 2, 1, 3'b000, 3, 7'b0110011)); // add
    expect_none(enc_r(7'b0100000, 2, 1, 3'b000, 3, 7'b0110011)); // sub
    expect_none(enc_r(7'b0000000, 2, 1, 3'b100, 3, 7'b0110011)); // xor
    expect_none(enc_r(7'b0000000, 2, 1, 3'b111, 3, 7'b0110011)); // and
    expect_none(enc_r(7'b0000001, 2, 1, 3'b100, 3, 7'b0110011)); // div
    expect_none(enc_r(7'b0110100, 7, 1, 3'b001, 3, 7'b0010011)); // brev8 with funct3 001
    expect_none(enc_r(7'b0110100, 8, 1, 3'b101, 3, 7'b0010011)); // rev8-like
    expect_none(enc_r(7'b0000100, 14, 1, 3'b001, 3, 7'b0010011)); // zip, wrong rs2 field
    expect_none(enc_r(7'b0001000, 4, 1, 3'b001, 3, 7'b0010011)); // sha256 rs2 = 4
    expect_none(enc_r(7'b0101100, 2, 1, 3'b000, 3, 7'b0110011)); // sha512 hole
    expect_none(enc_r(7'b0101110, 2, 1, 3'b001, 3, 7'b0110011)); // sha512 funct3 001
    expect_none(enc_r(7'b0010001, 2, 1, 3'b001, 3, 7'b0110011)); // aes pattern, funct3 001
    expect_none(enc_r(7'b0010011, 2, 1, 3'b000, 3, 7'b0010011)); // aes pattern on OP-IMM
    expect_none(enc_r(7'b0000100, 2, 1, 3'b100, 3, 7'b0010011)); // pack on OP-IMM
    expect_none(enc_r(7'b0010100, 2, 1, 3'b110, 3, 7'b0110011)); // xperm funct3 110
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
