// tb_risc_decoder: self-checking test of the instruction decoder.
// For every mnemonic of the instruction set, instructions with random
// register and immediate fields are encoded from the instruction table
// and the decoded control fields are compared with what that mnemonic
// must produce (write enable and register, operand source, ALU operation,
// write-back source, flag class, memory and branch controls).
module tb_risc_decoder;
  import risc_pkg::*;
  logic [15:0] ir;
  ctrl_t       ctrl;
  int checks = 0, failures = 0;

  risc_decoder dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected: rf_we, wa, bsel, alu_op (checked when rf_we && wbsel==ALU or flags), wbsel, flag_upd, mem_re, mem_we, br, halt
  task automatic expect_ctrl(input string nm, input logic we, input logic [3:0] wa,
                             input bsel_e bs, input alu_op_e aop, input wbsel_e wb,
                             input flag_upd_e fu, input logic mr, input logic mw,
                             input br_e br, input logic [3:0] cnd, input logic hlt);
    logic ok;
    #1;
    ok = (ctrl.rf_we == we) && (ctrl.flag_upd == fu) && (ctrl.mem_re == mr) &&
         (ctrl.mem_we == mw) && (ctrl.br == br) && (ctrl.halt == hlt) &&
         (ctrl.ra == ir[11:8]) && (ctrl.rb == ir[3:0]) && (ctrl.imm == ir[7:0]);
    if (we) ok = ok && (ctrl.wa == wa) && (ctrl.wbsel == wb);
    if ((we && wb == WB_ALU) || fu == FL_CMP || fu == FL_ARITH)
      ok = ok && (ctrl.alu_op == aop) && (ctrl.bsel == bs);
    if (br != BR_NONE || wb == WB_COND) ok = ok && (ctrl.cond == cnd);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s ir=%h ctrl=%p", nm, ir, ctrl);
    end
  endtask

  initial begin
    logic [3:0] d, s;
    logic [7:0] im;
    for (int t = 0; t < 50; t++) begin
      d = 4'($urandom); s = 4'($urandom); im = 8'($urandom);
      ir = {4'h0, d, 4'h5, s}; expect_ctrl("ADD",   1, d, B_REG,  ALU_ADD,  WB_ALU, FL_ARITH, 0, 0, BR_NONE, 0, 0);
      ir = {4'h5, d, im};      expect_ctrl("ADDI",  1, d, B_SEXT, ALU_ADD,  WB_ALU, FL_ARITH, 0, 0, BR_NONE, 0, 0);
      ir = {4'h0, d, 4'h6, s}; expect_ctrl("ADDU",  1, d, B_REG,  ALU_ADD,  WB_ALU, FL_NONE,  0, 0, BR_NONE, 0, 0);
      ir = {4'h6, d, im};      expect_ctrl("ADDUI", 1, d, B_SEXT, ALU_ADD,  WB_ALU, FL_NONE,  0, 0, BR_NONE, 0, 0);
      ir = {4'h0, d, 4'h7, s}; expect_ctrl("ADDC",  1, d, B_REG,  ALU_ADDC, WB_ALU, FL_ARITH, 0, 0, BR_NONE, 0, 0);
      ir = {4'h7, d, im};      expect_ctrl("ADDCI", 1, d, B_SEXT, ALU_ADDC, WB_ALU, FL_ARITH, 0, 0, BR_NONE, 0, 0);
      ir = {4'h0, d, 4'hE, s}; expect_ctrl("MUL",   1, d, B_REG,  ALU_MUL,  WB_ALU, FL_NONE,  0, 0, BR_NONE, 0, 0);
      ir = {4'hE, d, im};      expect_ctrl("MULI",  1, d, B_SEXT, ALU_MUL,  WB_ALU, FL_NONE,  0, 0, BR_NONE, 0, 0);
      ir = {4'h0, d, 4'h9, s}; expect_ctrl("SUB",   1, d, B_REG,  ALU_SUB,  WB_ALU, FL_ARITH, 0, 0, BR_NONE, 0, 0);
      ir = {4'h9, d, im};      expect_ctrl("SUBI",  1, d, B_SEXT, ALU_SUB,  WB_ALU, FL_ARITH, 0, 0, BR_NONE, 0, 0);
      ir = {4'h0, d, 4'hA, s}; expect_ctrl("SUBC",  1, d, B_REG,  ALU_SUBC, WB_ALU, FL_ARITH, 0, 0, BR_NONE, 0, 0);
      ir = {4'hA, d, im};      expect_ctrl("SUBCI", 1, d, B_SEXT, ALU_SUBC, WB_ALU, FL_ARITH, 0, 0, BR_NONE, 0, 0);
      ir = {4'h0, d, 4'hB, s}; expect_ctrl("CMP",   0, d, B_REG,  ALU_SUB,  WB_ALU, FL_CMP,   0, 0, BR_NONE, 0, 0);
      ir = {4'hB, d, im};      expect_ctrl("CMPI",  0, d, B_SEXT, ALU_SUB,  WB_ALU, FL_CMP,   0, 0, BR_NONE, 0, 0);
      ir = {4'h0, d, 4'h1, s}; expect_ctrl("AND",   1, d, B_REG,  ALU_AND,  WB_ALU, FL_NONE,  0, 0, BR_NONE, 0, 0);
      ir = {4'h1, d, im};      expect_ctrl("ANDI",  1, d, B_ZEXT, ALU_AND,  WB_ALU, FL_NONE,  0, 0, BR_NONE, 0, 0);
      ir = {4'h0, d, 4'h2, s}; expect_ctrl("OR",    1, d, B_REG,  ALU_OR,   WB_ALU, FL_NONE,  0, 0, BR_NONE, 0, 0);
      ir = {4'h2, d, im};      expect_ctrl("ORI",   1, d, B_ZEXT, ALU_OR,   WB_ALU, FL_NONE,  0, 0, BR_NONE, 0, 0);
      ir = {4'h0, d, 4'h3, s}; expect_ctrl("XOR",   1, d, B_REG,  ALU_XOR,  WB_ALU, FL_NONE,  0, 0, BR_NONE, 0, 0);
      ir = {4'h3, d, im};      expect_ctrl("XORI",  1, d, B_ZEXT, ALU_XOR,  WB_ALU, FL_NONE,  0, 0, BR_NONE, 0, 0);
      ir = {4'h0, d, 4'hD, s}; expect_ctrl("MOV",   1, d, B_REG,  ALU_MOV,  WB_ALU, FL_NONE,  0, 0, BR_NONE, 0, 0);
      ir = {4'hD, d, im};      expect_ctrl("MOVI",  1, d, B_ZEXT, ALU_MOV,  WB_ALU, FL_NONE,  0, 0, BR_NONE, 0, 0);
      ir = {4'hF, d, im};      expect_ctrl("LUI",   1, d, B_ZEXT, ALU_LUI,  WB_ALU, FL_NONE,  0, 0, BR_NONE, 0, 0);
      ir = {4'h8, d, 4'h4, s}; expect_ctrl("LSH",   1, d, B_REG,  ALU_MOV,  WB_SHIFT, FL_NONE, 0, 0, BR_NONE, 0, 0);
      checks++; if (ctrl.sh_imm || ctrl.sh_arith) begin failures++; $display("FAIL LSH mode"); end
      ir = {4'h8, d, 3'b000, im[4], s}; expect_ctrl("LSHI", 1, d, B_REG, ALU_MOV, WB_SHIFT, FL_NONE, 0, 0, BR_NONE, 0, 0);
      checks++; if (!ctrl.sh_imm || ctrl.sh_arith) begin failures++; $display("FAIL LSHI mode"); end
      ir = {4'h8, d, 4'h6, s}; expect_ctrl("ASHU",  1, d, B_REG,  ALU_MOV,  WB_SHIFT, FL_NONE, 0, 0, BR_NONE, 0, 0);
      checks++; if (ctrl.sh_imm || !ctrl.sh_arith) begin failures++; $display("FAIL ASHU mode"); end
      ir = {4'h8, d, 3'b001, im[4], s}; expect_ctrl("ASHUI", 1, d, B_REG, ALU_MOV, WB_SHIFT, FL_NONE, 0, 0, BR_NONE, 0, 0);
      checks++; if (!ctrl.sh_imm || !ctrl.sh_arith) begin failures++; $display("FAIL ASHUI mode"); end
      ir = {4'h8, d, 4'h5, s}; expect_ctrl("shift unused", 0, d, B_REG, ALU_MOV, WB_ALU, FL_NONE, 0, 0, BR_NONE, 0, 0);
      ir = {4'h8, d, 1'b1, im[2:0], s}; expect_ctrl("shift unused 1xxx", 0, d, B_REG, ALU_MOV, WB_ALU, FL_NONE, 0, 0, BR_NONE, 0, 0);
      ir = {4'h4, d, 4'h0, s}; expect_ctrl("LOAD",  1, d, B_REG,  ALU_MOV,  WB_MEM,  FL_NONE,  1, 0, BR_NONE, 0, 0);
      ir = {4'h4, d, 4'h4, s}; expect_ctrl("STOR",  0, d, B_REG,  ALU_MOV,  WB_MEM,  FL_NONE,  0, 1, BR_NONE, 0, 0);
      ir = {4'h4, d, 4'h2, s}; expect_ctrl("SNXB",  1, d, B_REG,  ALU_SNXB, WB_ALU,  FL_NONE,  0, 0, BR_NONE, 0, 0);
      ir = {4'h4, d, 4'h6, s}; expect_ctrl("ZRXB",  1, d, B_REG,  ALU_ZRXB, WB_ALU,  FL_NONE,  0, 0, BR_NONE, 0, 0);
      ir = {4'h4, d, 4'hD, s}; expect_ctrl("Scond", 1, d, B_REG,  ALU_MOV,  WB_COND, FL_NONE,  0, 0, BR_NONE, s, 0);
      ir = {4'hC, d, im};      expect_ctrl("Bcond", 0, d, B_REG,  ALU_MOV,  WB_ALU,  FL_NONE,  0, 0, BR_BCOND, d, 0);
      ir = {4'h4, d, 4'hC, s}; expect_ctrl("Jcond", 0, d, B_REG,  ALU_MOV,  WB_ALU,  FL_NONE,  0, 0, BR_JCOND, d, 0);
      ir = {4'h4, d, 4'h8, s}; expect_ctrl("JAL",   1, d, B_REG,  ALU_MOV,  WB_LINK, FL_NONE,  0, 0, BR_JAL, d, 0);
      ir = {4'h4, d, 4'hA, s}; expect_ctrl("TBIT",  0, d, B_REG,  ALU_MOV,  WB_ALU,  FL_TBIT,  0, 0, BR_NONE, 0, 0);
      checks++; if (ctrl.tbit_imm) begin failures++; $display("FAIL TBIT mode"); end
      ir = {4'h4, d, 4'hE, s}; expect_ctrl("TBITI", 0, d, B_REG,  ALU_MOV,  WB_ALU,  FL_TBIT,  0, 0, BR_NONE, 0, 0);
      checks++; if (!ctrl.tbit_imm) begin failures++; $display("FAIL TBITI mode"); end
      ir = {4'h4, d, 4'h1, s}; expect_ctrl("LPR",   0, d, B_REG,  ALU_MOV,  WB_ALU,  FL_NONE,  0, 0, BR_NONE, 0, 0);
      checks++; if (!ctrl.lpr) begin failures++; $display("FAIL LPR"); end
      ir = {4'h4, d, 4'h5, s}; expect_ctrl("SPR",   1, s, B_REG,  ALU_MOV,  WB_PSR,  FL_NONE,  0, 0, BR_NONE, 0, 0);
      ir = 16'h4030;           expect_ctrl("DI",    0, 0, B_REG,  ALU_MOV,  WB_ALU,  FL_NONE,  0, 0, BR_NONE, 0, 0);
      checks++; if (!ctrl.di || ctrl.ei) begin failures++; $display("FAIL DI"); end
      ir = 16'h4070;           expect_ctrl("EI",    0, 0, B_REG,  ALU_MOV,  WB_ALU,  FL_NONE,  0, 0, BR_NONE, 0, 0);
      checks++; if (ctrl.di || !ctrl.ei) begin failures++; $display("FAIL EI"); end
      ir = {4'h4, 4'h0, 4'hB, s}; expect_ctrl("EXCP", 0, 0, B_REG, ALU_MOV, WB_ALU, FL_NONE, 0, 0, BR_NONE, 0, 0);
      ir = 16'h4090;           expect_ctrl("RETX",  0, 0, B_REG,  ALU_MOV,  WB_ALU,  FL_NONE,  0, 0, BR_NONE, 0, 0);
      ir = {4'h4, d, 4'hF, s}; expect_ctrl("special unused", 0, d, B_REG, ALU_MOV, WB_ALU, FL_NONE, 0, 0, BR_NONE, 0, 0);
      ir = {4'h0, d, 4'h4, s}; expect_ctrl("register unused", 0, d, B_REG, ALU_MOV, WB_ALU, FL_NONE, 0, 0, BR_NONE, 0, 0);
      ir = {4'h0, d, 4'hF, s}; expect_ctrl("register unused", 0, d, B_REG, ALU_MOV, WB_ALU, FL_NONE, 0, 0, BR_NONE, 0, 0);
    end
    ir = 16'h0000; expect_ctrl("WAIT", 0, 0, B_REG, ALU_MOV, WB_ALU, FL_NONE, 0, 0, BR_NONE, 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
