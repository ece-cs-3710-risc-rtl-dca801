// tb_risc_shifter: self-checking test of the shifter.
// Every count from -16 to +15, both modes, random values. The expected value
// is built bit by bit in the testbench: bit i of the result is bit i - count
// of the input, or the fill bit (zero, or the sign for arithmetic right
// shifts) when that index falls outside the word.
module tb_risc_shifter;
  logic [15:0] a, y;
  logic [4:0]  amount;
  logic        arith;
  int checks = 0, failures = 0;

  risc_shifter dut (.*);

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] exp;
    int src;
    for (int t = 0; t < 40; t++) begin
      for (int k = -16; k <= 15; k++) begin
        for (int m = 0; m < 2; m++) begin
          a = (t == 0) ? 16'h8001 : 16'($urandom);
          amount = 5'(k);
          arith = 1'(m);
          #1;
          for (int i = 0; i < 16; i++) begin
            src = i - k;
            if (src < 0) exp[i] = 1'b0;
            else if (src > 15) exp[i] = arith ? a[15] : 1'b0;
            else exp[i] = a[src];
          end
          checks++;
          if (y !== exp) begin
            failures++;
            $display("FAIL a=%h k=%0d arith=%b got %h expected %h", a, k, arith, y, exp);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
