// tb_stxp5_crypto_alu_cfg: checks the extension-selection parameters of the
// crypto ALU slice.
//
// Six copies of the slice are built side by side: Zbkb only, Zbkx only, Zknh
// only, Zkne only, Zknd only, and Zkne+Zknd. These are the partial
// configurations whose cost is reported separately from the full one.
//
// All six copies see the same DOF inputs. Every one of the 21 instructions is
// presented with random operands and bs. For each copy the testbench checks:
//   - dof_hit is high exactly when the instruction's extension is enabled;
//   - when it is, the result reaches WB two cycles later and matches the
//     reference model;
//   - when it is not, nothing reaches WB.
// A copy with a single AES direction ties the unit's direction input, so this
// also checks that the remaining direction is still correct.
module tb_stxp5_crypto_alu_cfg;
  import cx_pkg::*;
  import tb_ref_pkg::*;

  localparam int NCFG = 6;
  // bit 0 Zbkb, 1 Zbkx, 2 Zknh, 3 Zkne, 4 Zknd
  localparam logic [4:0] CFG [NCFG] = '{5'b00001, 5'b00010, 5'b00100, 5'b01000, 5'b10000, 5'b11000};

  logic        clk = 0, rst_n = 0;
  logic        dof_valid = 0, stall = 0;
  logic [31:0] dof_instr = 32'h13, dof_rs1 = 0, dof_rs2 = 0;
  logic        dof_hit [NCFG], ex_valid [NCFG], wb_valid [NCFG], wb_we [NCFG];
  logic [4:0]  ex_rd [NCFG], wb_rd [NCFG];
  logic [31:0] ex_bypass [NCFG], wb_data [NCFG];

  for (genvar g = 0; g < NCFG; g++) begin : g_dut
    stxp5_crypto_alu #(
      .EN_ZBKB(CFG[g][0]), .EN_ZBKX(CFG[g][1]), .EN_ZKNH(CFG[g][2]),
      .EN_ZKNE(CFG[g][3]), .EN_ZKND(CFG[g][4])
    ) dut (
      .clk, .rst_n, .dof_valid, .dof_instr, .dof_rs1, .dof_rs2, .stall,
      .dof_hit(dof_hit[g]), .ex_valid(ex_valid[g]), .ex_rd(ex_rd[g]), .ex_bypass(ex_bypass[g]),
      .wb_valid(wb_valid[g]), .wb_we(wb_we[g]), .wb_rd(wb_rd[g]), .wb_data(wb_data[g])
    );
  end

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  function automatic int ext_of(input instr_e i);
    if (i <= I_UNZIP)  return 0;
    if (i <= I_XPERM4) return 1;
    if (i <= I_S512SUM1R) return 2;
    if (i <= I_AESESMI) return 3;
    return 4;
  endfunction

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int rep = 0; rep < 4; rep++) begin
      for (int i = 0; i < int'(I_COUNT); i++) begin
        automatic instr_e ie = instr_e'(i);
        automatic int bs = $urandom_range(0, 3);
        automatic logic [31:0] a = $urandom, b = $urandom;
        automatic logic [31:0] exp = ref_exec(ie, a, b, bs);
        automatic bit en [NCFG];
        @(negedge clk);
        dof_valid = 1; dof_instr = asm(ie, 7, 1, 2, bs); dof_rs1 = a; dof_rs2 = b;
        #1;
        for (int g = 0; g < NCFG; g++) begin
          en[g] = CFG[g][ext_of(ie)];
          checks++;
          if (dof_hit[g] !== en[g]) begin
            failures++; $display("FAIL cfg %0d op %0d: dof_hit=%0b", g, i, dof_hit[g]);
          end
        end
        @(negedge clk);
        dof_valid = 0;
        @(negedge clk);
        for (int g = 0; g < NCFG; g++) begin
          checks++;
          if (wb_valid[g] !== en[g] || (en[g] && (wb_data[g] !== exp || wb_rd[g] !== 5'd7))) begin
            failures++;
            $display("FAIL cfg %0d op %0d: wb_valid=%0b data=%h exp=%h", g, i, wb_valid[g], wb_data[g], exp);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
