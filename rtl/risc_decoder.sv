// risc_decoder: instruction decoder of the execute stage.
//
// Turns a 16-bit instruction into the control bundle ctrl_t. Fields:
// [15:12] opcode, [11:8] Rdest / Rsrc / cond / Rlink, [7:4] extended opcode
// or ImmHi, [3:0] Rsrc / Raddr / Rtarget / cond / ImmLo. Read port A always
// reads bits [11:8] and port B bits [3:0]; the write register is bits
// [11:8] except for SPR, whose destination is in bits [3:0].
// Immediates are sign extended for ADDI, ADDUI, ADDCI, SUBI, SUBCI, CMPI and
// MULI and zero extended for ANDI, ORI, XORI and MOVI, as the instruction
// table prescribes. Unused opcodes, EXCP and RETX decode as no-operations
// (no interrupt logic exists). Combinational.
module risc_decoder
  import risc_pkg::*;
(
  input  logic [15:0] ir,
  output ctrl_t       ctrl
);
  logic [3:0] op, ext;

  always_comb begin
    op  = ir[15:12];
    ext = ir[7:4];

    ctrl          = '0;
    ctrl.ra       = ir[11:8];
    ctrl.rb       = ir[3:0];
    ctrl.wa       = ir[11:8];
    ctrl.imm      = ir[7:0];
    ctrl.bsel     = B_REG;
    ctrl.alu_op   = ALU_MOV;
    ctrl.wbsel    = WB_ALU;
    ctrl.flag_upd = FL_NONE;
    ctrl.br       = BR_NONE;
    ctrl.cond     = ir[11:8];

    unique case (opcode_e'(op))
      OP_REG: begin
        ctrl.rf_we = 1'b1;
        unique case (ext)
          RX_WAIT: begin
            ctrl.rf_we = 1'b0;
            ctrl.halt  = (ir[11:8] == 4'h0) && (ir[3:0] == 4'h0);
          end
          RX_AND:  ctrl.alu_op = ALU_AND;
          RX_OR:   ctrl.alu_op = ALU_OR;
          RX_XOR:  ctrl.alu_op = ALU_XOR;
          RX_ADD:  begin ctrl.alu_op = ALU_ADD;  ctrl.flag_upd = FL_ARITH; end
          RX_ADDU: ctrl.alu_op = ALU_ADD;
          RX_ADDC: begin ctrl.alu_op = ALU_ADDC; ctrl.flag_upd = FL_ARITH; end
          RX_SUB:  begin ctrl.alu_op = ALU_SUB;  ctrl.flag_upd = FL_ARITH; end
          RX_SUBC: begin ctrl.alu_op = ALU_SUBC; ctrl.flag_upd = FL_ARITH; end
          RX_CMP:  begin ctrl.alu_op = ALU_SUB;  ctrl.flag_upd = FL_CMP; ctrl.rf_we = 1'b0; end
          RX_MOV:  ctrl.alu_op = ALU_MOV;
          RX_MUL:  ctrl.alu_op = ALU_MUL;
          default: ctrl.rf_we = 1'b0;   // unused extended opcode
        endcase
      end
      OP_ANDI:  begin ctrl.rf_we = 1'b1; ctrl.bsel = B_ZEXT; ctrl.alu_op = ALU_AND; end
      OP_ORI:   begin ctrl.rf_we = 1'b1; ctrl.bsel = B_ZEXT; ctrl.alu_op = ALU_OR;  end
      OP_XORI:  begin ctrl.rf_we = 1'b1; ctrl.bsel = B_ZEXT; ctrl.alu_op = ALU_XOR; end
      OP_MOVI:  begin ctrl.rf_we = 1'b1; ctrl.bsel = B_ZEXT; ctrl.alu_op = ALU_MOV; end
      OP_LUI:   begin ctrl.rf_we = 1'b1; ctrl.bsel = B_ZEXT; ctrl.alu_op = ALU_LUI; end
      OP_ADDI:  begin ctrl.rf_we = 1'b1; ctrl.bsel = B_SEXT; ctrl.alu_op = ALU_ADD;  ctrl.flag_upd = FL_ARITH; end
      OP_ADDUI: begin ctrl.rf_we = 1'b1; ctrl.bsel = B_SEXT; ctrl.alu_op = ALU_ADD; end
      OP_ADDCI: begin ctrl.rf_we = 1'b1; ctrl.bsel = B_SEXT; ctrl.alu_op = ALU_ADDC; ctrl.flag_upd = FL_ARITH; end
      OP_SUBI:  begin ctrl.rf_we = 1'b1; ctrl.bsel = B_SEXT; ctrl.alu_op = ALU_SUB;  ctrl.flag_upd = FL_ARITH; end
      OP_SUBCI: begin ctrl.rf_we = 1'b1; ctrl.bsel = B_SEXT; ctrl.alu_op = ALU_SUBC; ctrl.flag_upd = FL_ARITH; end
      OP_CMPI:  begin ctrl.bsel = B_SEXT; ctrl.alu_op = ALU_SUB; ctrl.flag_upd = FL_CMP; end
      OP_MULI:  begin ctrl.rf_we = 1'b1; ctrl.bsel = B_SEXT; ctrl.alu_op = ALU_MUL; end
      OP_BCOND: ctrl.br = BR_BCOND;
      OP_SHIFT: begin
        ctrl.wbsel = WB_SHIFT;
        if (ext == HX_LSH) begin
          ctrl.rf_we = 1'b1;
        end else if (ext == HX_ASHU) begin
          ctrl.rf_we = 1'b1; ctrl.sh_arith = 1'b1;
        end else if (ext[3:1] == 3'b000) begin        // LSHI
          ctrl.rf_we = 1'b1; ctrl.sh_imm = 1'b1;
        end else if (ext[3:1] == 3'b001) begin        // ASHUI
          ctrl.rf_we = 1'b1; ctrl.sh_imm = 1'b1; ctrl.sh_arith = 1'b1;
        end
      end
      OP_SPEC: begin
        unique case (ext)
          SX_LOAD:  begin ctrl.mem_re = 1'b1; ctrl.rf_we = 1'b1; ctrl.wbsel = WB_MEM; end
          SX_STOR:  ctrl.mem_we = 1'b1;
          SX_SNXB:  begin ctrl.rf_we = 1'b1; ctrl.alu_op = ALU_SNXB; end
          SX_ZRXB:  begin ctrl.rf_we = 1'b1; ctrl.alu_op = ALU_ZRXB; end
          SX_LPR:   ctrl.lpr = 1'b1;
          SX_SPR:   begin ctrl.rf_we = 1'b1; ctrl.wbsel = WB_PSR; ctrl.wa = ir[3:0]; end
          SX_DI:    ctrl.di = 1'b1;
          SX_EI:    ctrl.ei = 1'b1;
          SX_JAL:   begin ctrl.br = BR_JAL; ctrl.rf_we = 1'b1; ctrl.wbsel = WB_LINK; end
          SX_JCOND: ctrl.br = BR_JCOND;
          SX_SCOND: begin ctrl.rf_we = 1'b1; ctrl.wbsel = WB_COND; ctrl.cond = ir[3:0]; end
          SX_TBIT:  ctrl.flag_upd = FL_TBIT;
          SX_TBITI: begin ctrl.flag_upd = FL_TBIT; ctrl.tbit_imm = 1'b1; end
          default:  ;   // RETX, EXCP, unused: no operation
        endcase
      end
      default: ;
    endcase
  end
endmodule
