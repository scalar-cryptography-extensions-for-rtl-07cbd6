// tb_stxp5_crypto_alu: end-to-end test of the crypto ALU slice at its default
// parameters.
//
// The testbench plays the host core around the slice: it holds the register
// file, presents one instruction per cycle in DOF with operands read from the
// register file and forwarded from ex_bypass (EX) and wb_data (WB), writes
// back on wb_we, and can raise stall at random. Programs:
//   1. AES-128 encryption of the FIPS-197 appendix C.1 block with aes32esmi /
//      aes32esi (16 instructions per round), checked against the published
//      ciphertext; one round is issued without stalls to check one
//      instruction per cycle.
//   2. Decryption of that ciphertext with aes32dsmi / aes32dsi and the
//      equivalent-inverse-cipher key schedule, checked against the plaintext.
//   3. SHA-256 of "abc" with sha256sig0/sig1/sum0/sum1 doing the sigma and sum
//      functions and the testbench doing the additions, checked against the
//      published digest. Round constants and initial hash come from the cube
//      and square roots of the first primes.
//   3b. SHA-512 of "abc" the same way, each 64-bit sigma/Sum made of two
//      32-bit instructions; its constants are exact integer square and cube
//      roots of the first primes, computed by bisection on wide integers.
//   4. The two-instruction SHA-512 sequences (sig0l/sig0h, sig1l/sig1h,
//      sum0r x2, sum1r x2) on random 64-bit words against 64-bit references.
//   5. A random stream of all 21 instructions, with rd = x0 and non-crypto
//      words mixed in, under random stalls, compared with a shadow register
//      file.
// Latency (DOF to WB = 2 cycles) is checked with single instructions. Each
// mechanism (stall, EX and WB forwarding, x0 discard, non-crypto word, every
// instruction) is counted and must occur at least once.
module tb_stxp5_crypto_alu;
  import cx_pkg::*;
  import tb_ref_pkg::*;

  logic        clk = 0, rst_n = 0;
  logic        dof_valid = 0, stall = 0;
  logic [31:0] dof_instr = 32'h13, dof_rs1 = 0, dof_rs2 = 0;
  logic        dof_hit, ex_valid, wb_valid, wb_we;
  logic [4:0]  ex_rd, wb_rd;
  logic [31:0] ex_bypass, wb_data;

  stxp5_crypto_alu dut (
    .clk, .rst_n, .dof_valid, .dof_instr, .dof_rs1, .dof_rs2, .stall, .dof_hit,
    .ex_valid, .ex_rd, .ex_bypass, .wb_valid, .wb_we, .wb_rd, .wb_data
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle++;

  // mechanism counters
  int n_stall = 0, n_fwd_ex = 0, n_fwd_wb = 0, n_x0 = 0, n_noncx = 0;
  int n_op [int];

  // ------------------------------------------------------- host register file
  logic [31:0] X [32];
  always @(posedge clk) begin
    if (wb_valid && !stall) begin
      if (wb_we) X[wb_rd] = wb_data;
      else n_x0++;
    end
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic logic [31:0] read_fwd(input int r);
    logic [31:0] v = X[r];
    if (r == 0) return 0;
    if (ex_valid && int'(ex_rd) == r) begin n_fwd_ex++; return ex_bypass; end
    if (wb_we && int'(wb_rd) == r) begin n_fwd_wb++; return wb_data; end
    return v;
  endfunction

  bit random_stall = 0;

  // Issue a program, one instruction per cycle unless stalled, then drain.
  task automatic run(input logic [31:0] prog [$]);
    int pc = 0;
    while (pc < prog.size()) begin
      @(negedge clk);
      stall = random_stall && ($urandom_range(0, 3) == 0);
      dof_valid = 1;
      dof_instr = prog[pc];
      dof_rs1 = read_fwd(int'(dof_instr[19:15]));
      dof_rs2 = read_fwd(int'(dof_instr[24:20]));
      #1;
      if (stall) n_stall++;
      if (!dof_hit) n_noncx++;
      @(posedge clk);
      if (!stall) pc++;
    end
    @(negedge clk);
    dof_valid = 0; stall = 0;
    repeat (3) @(negedge clk);
  endtask

  // Run one instruction on x1/x2 into x3 and return the result; checks the
  // DOF-to-WB latency when no stall is involved.
  task automatic exec1(input instr_e i, input logic [31:0] a, input logic [31:0] b,
                       input int bs, output logic [31:0] r);
    longint t0;
    int lat;
    X[1] = a; X[2] = b;
    @(negedge clk);
    dof_valid = 1; dof_instr = asm(i, 3, 1, 2, bs);
    dof_rs1 = read_fwd(1); dof_rs2 = read_fwd(2);
    stall = 0;
    t0 = cycle;
    @(negedge clk);
    dof_valid = 0;
    if (random_stall) begin
      stall = ($urandom_range(0, 1) == 1);
      if (stall) n_stall++;
    end
    while (!wb_valid) @(negedge clk);
    lat = int'(cycle - t0);
    if (!stall) chk(lat == 2, $sformatf("latency %0d", lat));
    stall = 0;
    @(negedge clk);
    r = X[3];
    n_op[int'(i)]++;
  endtask

  // ------------------------------------------------------------ AES helpers
  logic [31:0] ek [44];   // encryption round keys, little-endian words
  logic [31:0] dk [44];   // equivalent inverse cipher keys

  function automatic logic [31:0] sub_word(input logic [31:0] w);
    return {ref_sbox(w[31:24]), ref_sbox(w[23:16]), ref_sbox(w[15:8]), ref_sbox(w[7:0])};
  endfunction

  function automatic logic [31:0] inv_mix_word(input logic [31:0] w);
    logic [7:0] b0 = w[7:0], b1 = w[15:8], b2 = w[23:16], b3 = w[31:24];
    return {gmul(b0,11) ^ gmul(b1,13) ^ gmul(b2,9)  ^ gmul(b3,14),
            gmul(b0,13) ^ gmul(b1,9)  ^ gmul(b2,14) ^ gmul(b3,11),
            gmul(b0,9)  ^ gmul(b1,14) ^ gmul(b2,11) ^ gmul(b3,13),
            gmul(b0,14) ^ gmul(b1,11) ^ gmul(b2,13) ^ gmul(b3,9)};
  endfunction

  task automatic key_expand(input logic [127:0] key_be);
    logic [7:0] rc = 8'h01;
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++) ek[i][8*j +: 8] = key_be[127 - 8*(4*i + j) -: 8];
    for (int i = 4; i < 44; i++) begin
      logic [31:0] t = ek[i-1];
      if (i % 4 == 0) begin
        t = sub_word({t[7:0], t[31:8]}) ^ {24'b0, rc};
        rc = gmul(rc, 2);
      end
      ek[i] = ek[i-4] ^ t;
    end
    for (int r = 0; r <= 10; r++)
      for (int c = 0; c < 4; c++)
        dk[4*r + c] = (r == 0 || r == 10) ? ek[4*(10-r) + c] : inv_mix_word(ek[4*(10-r) + c]);
  endtask

  function automatic logic [127:0] words_to_be(input logic [31:0] w [4]);
    logic [127:0] r;
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++) r[127 - 8*(4*i + j) -: 8] = w[i][8*j +: 8];
    return r;
  endfunction

  // Register map: state set A = x10..x13, set B = x20..x23, keys x14..x17.
  // dec selects the decryption byte order and instructions.
  function automatic void aes_round_prog(ref logic [31:0] prog [$], input bit dec,
                                         input bit last, input int src, input int dst);
    instr_e op = dec ? (last ? I_AESDSI : I_AESDSMI) : (last ? I_AESESI : I_AESESMI);
    int order [4];
    // chains 0 and 1 interleaved (WB forwarding), 2 and 3 in sequence (EX forwarding)
    int sched [16][2] = '{'{0,0},'{1,0},'{0,1},'{1,1},'{0,2},'{1,2},'{0,3},'{1,3},
                          '{2,0},'{2,1},'{2,2},'{2,3},'{3,0},'{3,1},'{3,2},'{3,3}};
    for (int s = 0; s < 16; s++) begin
      int c = sched[s][0], k = sched[s][1];
      int wi = dec ? ((c - k + 4) % 4) : ((c + k) % 4);
      int r1 = (k == 0) ? 14 + c : dst + c;
      prog.push_back(asm(op, dst + c, r1, src + wi, k));
    end
  endfunction

  task automatic load_key(input logic [31:0] kk [44], input int r);
    for (int c = 0; c < 4; c++) X[14 + c] = kk[4*r + c];
  endtask

  task automatic aes_run(input bit dec, input logic [127:0] in_be, output logic [127:0] out_be);
    logic [31:0] w [4];
    logic [31:0] prog [$];
    int src = 10, dst = 20;
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++) w[i][8*j +: 8] = in_be[127 - 8*(4*i + j) -: 8];
    for (int c = 0; c < 4; c++) X[src + c] = w[c] ^ (dec ? dk[c] : ek[c]);  // whitening (base ALU)
    for (int r = 1; r <= 10; r++) begin
      load_key(dec ? dk : ek, r);
      prog.delete();
      aes_round_prog(prog, dec, r == 10, src, dst);
      for (int s = 0; s < 16; s++) n_op[dec ? (r == 10 ? int'(I_AESDSI) : int'(I_AESDSMI))
                                           : (r == 10 ? int'(I_AESESI) : int'(I_AESESMI))]++;
      run(prog);
      {src, dst} = {dst, src};
    end
    for (int c = 0; c < 4; c++) w[c] = X[src + c];
    out_be = words_to_be(w);
  endtask

  // ----------------------------------------------------------- SHA-256 helpers
  function automatic int nth_prime(input int n);
    int cnt = 0;
    for (int p = 2; ; p++) begin
      bit pr = 1;
      for (int d = 2; d * d <= p; d++) if (p % d == 0) begin pr = 0; break; end
      if (pr) begin
        if (cnt == n) return p;
        cnt++;
      end
    end
  endfunction

  function automatic logic [31:0] frac32(input real v);
    return 32'(longint'($floor((v - $floor(v)) * 4294967296.0)));
  endfunction

  task automatic sha256_abc(output logic [255:0] digest);
    logic [31:0] K [64], H [8], W [64], a, b, c, d, e, f, g, h, t1, t2, s0, s1, S0, S1;
    logic [511:0] blk;
    for (int i = 0; i < 64; i++) K[i] = frac32(real'(nth_prime(i)) ** (1.0 / 3.0));
    for (int i = 0; i < 8; i++)  H[i] = frac32($sqrt(real'(nth_prime(i))));
    chk(K[0] == 32'h428a2f98 && H[0] == 32'h6a09e667, "SHA-256 constants");
    blk = {24'h616263, 8'h80, 416'b0, 64'd24};
    for (int t = 0; t < 16; t++) W[t] = blk[511 - 32*t -: 32];
    for (int t = 16; t < 64; t++) begin
      exec1(I_S256SIG1, W[t-2], 0, 0, s1);
      exec1(I_S256SIG0, W[t-15], 0, 0, s0);
      W[t] = s1 + W[t-7] + s0 + W[t-16];
    end
    {a, b, c, d, e, f, g, h} = {H[0], H[1], H[2], H[3], H[4], H[5], H[6], H[7]};
    for (int t = 0; t < 64; t++) begin
      exec1(I_S256SUM1, e, 0, 0, S1);
      exec1(I_S256SUM0, a, 0, 0, S0);
      t1 = h + S1 + ((e & f) ^ (~e & g)) + K[t] + W[t];
      t2 = S0 + ((a & b) ^ (a & c) ^ (b & c));
      {h, g, f, e, d, c, b, a} = {g, f, e, d + t1, c, b, a, t1 + t2};
    end
    digest = {H[0] + a, H[1] + b, H[2] + c, H[3] + d, H[4] + e, H[5] + f, H[6] + g, H[7] + h};
  endtask

  // ----------------------------------------------------------- SHA-512 helpers
  // floor(r-th root of v) for r = 2 or 3, by bisection on wide integers
  function automatic logic [127:0] iroot(input logic [255:0] v, input int r);
    logic [127:0] lo = 0, hi = 128'h1 << 70;
    while (hi - lo > 1) begin
      logic [127:0] mid = lo + (hi - lo) / 2;
      logic [255:0] m = 256'(mid);
      logic [255:0] pw = (r == 2) ? m * m : m * m * m;
      if (pw <= v) lo = mid; else hi = mid;
    end
    return lo;
  endfunction

  // 64-bit function done as two 32-bit instructions: low half then high half
  task automatic exec_pair(input instr_e ilo, input instr_e ihi, input logic [63:0] x,
                           output logic [63:0] r);
    logic [31:0] lo, hi;
    exec1(ilo, x[31:0], x[63:32], 0, lo);
    exec1(ihi, x[63:32], x[31:0], 0, hi);
    r = {hi, lo};
  endtask

  task automatic sha512_abc(output logic [511:0] digest);
    logic [63:0] K [80], H [8], W [80], a, b, c, d, e, f, g, h, t1, t2, s0, s1, S0, S1;
    logic [1023:0] blk;
    for (int i = 0; i < 80; i++) K[i] = 64'(iroot(256'(nth_prime(i)) << 192, 3));
    for (int i = 0; i < 8; i++)  H[i] = 64'(iroot(256'(nth_prime(i)) << 128, 2));
    chk(K[0] == 64'h428a2f98d728ae22 && H[0] == 64'h6a09e667f3bcc908, "SHA-512 constants");
    blk = {24'h616263, 8'h80, 864'b0, 128'd24};
    for (int t = 0; t < 16; t++) W[t] = blk[1023 - 64*t -: 64];
    for (int t = 16; t < 80; t++) begin
      exec_pair(I_S512SIG1L, I_S512SIG1H, W[t-2], s1);
      exec_pair(I_S512SIG0L, I_S512SIG0H, W[t-15], s0);
      W[t] = s1 + W[t-7] + s0 + W[t-16];
    end
    {a, b, c, d, e, f, g, h} = {H[0], H[1], H[2], H[3], H[4], H[5], H[6], H[7]};
    for (int t = 0; t < 80; t++) begin
      exec_pair(I_S512SUM1R, I_S512SUM1R, e, S1);
      exec_pair(I_S512SUM0R, I_S512SUM0R, a, S0);
      t1 = h + S1 + ((e & f) ^ (~e & g)) + K[t] + W[t];
      t2 = S0 + ((a & b) ^ (a & c) ^ (b & c));
      {h, g, f, e, d, c, b, a} = {g, f, e, d + t1, c, b, a, t1 + t2};
    end
    digest = {H[0] + a, H[1] + b, H[2] + c, H[3] + d, H[4] + e, H[5] + f, H[6] + g, H[7] + h};
  endtask

  // ------------------------------------------------------------------ watchdog
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------------- main
  initial begin
    logic [127:0] ct, pt;
    logic [255:0] dg;
    logic [31:0]  prog [$];
    logic [31:0]  shadow [32];
    longint       t_start;

    for (int i = 0; i < 32; i++) X[i] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(!ex_valid && !wb_valid, "pipeline empty after reset");

    // 1./2. AES-128, FIPS-197 appendix C.1
    key_expand(128'h000102030405060708090a0b0c0d0e0f);
    random_stall = 0;
    t_start = cycle;
    aes_run(0, 128'h00112233445566778899aabbccddeeff, ct);
    chk(ct == 128'h69c4e0d86a7b0430d8cdb78070b4c55a, $sformatf("AES-128 encrypt %h", ct));
    $display("AES-128 encryption: 160 crypto instructions, %0d cycles including 2-cycle drains per round",
             cycle - t_start);
    // one round of 16 instructions with no stall: the 16 results reach WB on 16 consecutive cycles
    begin
      automatic int first = -1, last = -1, cnt = 0;
      load_key(ek, 1);
      prog.delete();
      aes_round_prog(prog, 0, 0, 10, 20);
      fork
        run(prog);
        begin
          for (int k = 0; k < 30; k++) begin
            @(posedge clk);
            if (wb_valid) begin if (first < 0) first = k; last = k; cnt++; end
          end
        end
      join
      chk(cnt == 16 && last - first == 15, $sformatf("AES round throughput: %0d results over %0d cycles", cnt, last - first + 1));
      for (int s = 0; s < 16; s++) n_op[int'(I_AESESMI)]++;
    end
    random_stall = 1;
    aes_run(1, ct, pt);
    chk(pt == 128'h00112233445566778899aabbccddeeff, $sformatf("AES-128 decrypt %h", pt));
    aes_run(0, 128'h00112233445566778899aabbccddeeff, ct);
    chk(ct == 128'h69c4e0d86a7b0430d8cdb78070b4c55a, "AES-128 encrypt under stalls");

    // 3. SHA-256("abc")
    random_stall = 0;
    sha256_abc(dg);
    chk(dg == 256'hba7816bf8f01cfea414140de5dae2223b00361a396177a9cb410ff61f20015ad,
        $sformatf("SHA-256(abc) %h", dg));

    // 3b. SHA-512("abc") with the two-instruction sequences
    begin
      logic [511:0] dg5;
      sha512_abc(dg5);
      chk(dg5 == {64'hddaf35a193617aba, 64'hcc417349ae204131, 64'h12e6fa4e89a97ea2, 64'h0a9eeee64b55d39a,
                  64'h2192992a274fc1a8, 64'h36ba3c23a3feebbd, 64'h454d4423643ce80e, 64'h2a9ac94fa54ca49f},
          $sformatf("SHA-512(abc) %h", dg5));
    end

    // 4. SHA-512 function halves, two instructions each
    random_stall = 1;
    for (int n = 0; n < 50; n++) begin
      automatic logic [63:0] x = {$urandom, $urandom};
      X[10] = x[31:0]; X[11] = x[63:32];        // a0 = low, a1 = high
      prog.delete();
      prog.push_back(asm(I_S512SIG0L, 5, 10, 11)); prog.push_back(asm(I_S512SIG0H, 6, 11, 10));
      prog.push_back(asm(I_S512SIG1L, 7, 10, 11)); prog.push_back(asm(I_S512SIG1H, 28, 11, 10));
      prog.push_back(asm(I_S512SUM0R, 29, 10, 11)); prog.push_back(asm(I_S512SUM0R, 30, 11, 10));
      prog.push_back(asm(I_S512SUM1R, 31, 10, 11)); prog.push_back(asm(I_S512SUM1R, 8, 11, 10));
      run(prog);
      chk({X[6], X[5]} == s512_sig0(x), "SHA-512 sigma0");
      chk({X[28], X[7]} == s512_sig1(x), "SHA-512 sigma1");
      chk({X[30], X[29]} == s512_sum0(x), "SHA-512 Sum0");
      chk({X[8], X[31]} == s512_sum1(x), "SHA-512 Sum1");
      n_op[int'(I_S512SIG0L)]++; n_op[int'(I_S512SIG0H)]++; n_op[int'(I_S512SIG1L)]++;
      n_op[int'(I_S512SIG1H)]++; n_op[int'(I_S512SUM0R)] += 2; n_op[int'(I_S512SUM1R)] += 2;
    end

    // 5. random instruction stream against a shadow register file
    for (int rep = 0; rep < 20; rep++) begin
      for (int i = 1; i < 32; i++) X[i] = $urandom;
      shadow = X;
      prog.delete();
      for (int n = 0; n < 60; n++) begin
        automatic int sel = $urandom_range(0, 24);
        automatic int rd = $urandom_range(0, 8), r1 = $urandom_range(0, 8), r2 = $urandom_range(0, 8);
        automatic int bs = $urandom_range(0, 3);
        if (sel >= int'(I_COUNT)) begin
          prog.push_back(enc_r(7'b0000000, r2, r1, 3'b000, 0, 7'b0110011));  // add x0 (base ALU)
        end else begin
          automatic instr_e ie = instr_e'(sel);
          automatic logic [31:0] w = asm(ie, rd, r1, r2, bs);
          prog.push_back(w);
          if (rd != 0) shadow[rd] = ref_exec(ie, shadow[r1], shadow[r2], bs);
          n_op[sel]++;
        end
      end
      run(prog);
      for (int i = 0; i < 32; i++) chk(X[i] == shadow[i], $sformatf("random stream x%0d", i));
    end

    // 6. zbkb/zbkx/aes single ops through exec1 (latency checks)
    random_stall = 0;
    for (int i = 0; i < int'(I_COUNT); i++) begin
      automatic logic [31:0] a = $urandom, b = $urandom, r;
      automatic int bs = $urandom_range(0, 3);
      exec1(instr_e'(i), a, b, bs, r);
      chk(r == ref_exec(instr_e'(i), a, b, bs), $sformatf("single op %0d", i));
    end

    // mechanism coverage
    chk(n_stall > 0, "stall never happened");
    chk(n_fwd_ex > 0, "EX forwarding never used");
    chk(n_fwd_wb > 0, "WB forwarding never used");
    chk(n_x0 > 0, "rd = x0 discard never happened");
    chk(n_noncx > 0, "non-crypto word never presented");
    for (int i = 0; i < int'(I_COUNT); i++)
      chk(n_op.exists(i) && n_op[i] > 0, $sformatf("op %0d never executed", i));
    $display("mechanisms: stall=%0d fwd_ex=%0d fwd_wb=%0d x0=%0d non_crypto=%0d",
             n_stall, n_fwd_ex, n_fwd_wb, n_x0, n_noncx);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
