// tb_risc_alu: self-checking test of the ALU.
// Random and corner-case operands for every operation. Expected results
// and flags come from integer arithmetic in the testbench: carry and
// borrow from 17-bit sums, overflow from the signed result range, L and N
// from direct unsigned and signed comparisons of the operands.
module tb_risc_alu;
  import risc_pkg::*;
  alu_op_e     op;
  logic [15:0] a, b, y;
  logic        cin;
  flags_t      flags;
  int checks = 0, failures = 0;

  risc_alu dut (.*);

  task automatic check(input logic [15:0] got, exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s op=%s a=%h b=%h cin=%b: got %h expected %h", what, op.name(), a, b, cin, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_one(input alu_op_e o, input logic [15:0] ia, ib, input logic ic);
    int sa, sb, sr;
    int unsigned ua, ub, ur;
    logic [15:0] ey;
    logic ec, ef;
    op = o; a = ia; b = ib; cin = ic;
    #1;
    sa = $signed(ia); sb = $signed(ib); ua = ia; ub = ib;
    ec = 0; ef = 0;
    case (o)
      ALU_ADD, ALU_ADDC: begin
        ur = ua + ub + ((o == ALU_ADDC) ? ic : 0);
        sr = sa + sb + ((o == ALU_ADDC) ? ic : 0);
        ey = ur[15:0]; ec = ur > 65535; ef = (sr > 32767) || (sr < -32768);
      end
      ALU_SUB, ALU_SUBC: begin
        sr = sa - sb - ((o == ALU_SUBC) ? ic : 0);
        ey = 16'(ua - ub - ((o == ALU_SUBC) ? ic : 0));
        ec = (ub + ((o == ALU_SUBC) ? ic : 0)) > ua; ef = (sr > 32767) || (sr < -32768);
      end
      ALU_AND:  ey = ia & ib;
      ALU_OR:   ey = ia | ib;
      ALU_XOR:  ey = ia ^ ib;
      ALU_MOV:  ey = ib;
      ALU_MUL:  ey = 16'(sa * sb);
      ALU_LUI:  ey = 16'(ub * 256);
      ALU_SNXB: ey = 16'($signed(ib[7:0]));
      ALU_ZRXB: ey = ub % 256;
      default:  ey = '0;
    endcase
    check(y, ey, "result");
    if (o inside {ALU_ADD, ALU_ADDC, ALU_SUB, ALU_SUBC}) begin
      check(16'(flags.c), 16'(ec), "C");
      check(16'(flags.f), 16'(ef), "F");
    end
    if (o == ALU_SUB) begin
      check(16'(flags.z), 16'(ia == ib), "Z");
      check(16'(flags.l), 16'(ub > ua), "L");
      check(16'(flags.n), 16'(sb > sa), "N");
    end
  endtask

  initial begin
    logic [15:0] corner [6] = '{16'h0000, 16'h0001, 16'h7FFF, 16'h8000, 16'hFFFF, 16'h00FF};
    for (int o = 0; o <= int'(ALU_ZRXB); o++) begin
      foreach (corner[i]) foreach (corner[j]) begin
        run_one(alu_op_e'(o), corner[i], corner[j], 1'b0);
        run_one(alu_op_e'(o), corner[i], corner[j], 1'b1);
      end
      for (int t = 0; t < 300; t++)
        run_one(alu_op_e'(o), 16'($urandom), 16'($urandom), 1'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
