// tb_risc_cond: self-checking test of condition evaluation.
// All 32 combinations of the C, L, F, Z and N flags against all 16
// condition codes, with random values in the other PSR bits. Expected
// outcomes are written out from the condition table.
module tb_risc_cond;
  import risc_pkg::*;
  logic [3:0]  cond;
  logic [15:0] psr;
  logic        taken;
  int checks = 0, failures = 0;

  risc_cond dut (.*);

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic c, l, f, z, n, exp;
    for (int fl = 0; fl < 32; fl++) begin
      {n, z, f, l, c} = 5'(fl);
      for (int k = 0; k < 16; k++) begin
        psr = 16'($urandom) & ~16'h00E5;
        psr[0] = c; psr[2] = l; psr[5] = f; psr[6] = z; psr[7] = n;
        cond = 4'(k);
        #1;
        case (k)
          0: exp = z;         1: exp = !z;
          2: exp = c;         3: exp = !c;
          4: exp = l;         5: exp = !l;
          6: exp = n;         7: exp = !n;
          8: exp = f;         9: exp = !f;
          10: exp = !l && !z; 11: exp = l || z;
          12: exp = !n && !z; 13: exp = n || z;
          14: exp = 1'b1;     default: exp = 1'b0;
        endcase
        checks++;
        if (taken !== exp) begin
          failures++;
          $display("FAIL cond=%0d flags nzflc=%b got %b", k, fl[4:0], taken);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
