// tb_risc_pc: self-checking test of the program counter.
// Random mixes of hold, relative and absolute redirects against a model
// PC kept in the testbench; the link output is checked to be pc_x + 1.
module tb_risc_pc;
  logic        clk = 1'b0, rst_n = 1'b0, hold = 1'b0, take = 1'b0, rel = 1'b0;
  logic [15:0] pc_x = '0, rtarget = '0, pc_f, link;
  logic [7:0]  disp = '0;
  logic [15:0] model;
  int checks = 0, failures = 0;

  risc_pc dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic [15:0] got, exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int d;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    model = 16'h0;
    check(pc_f, model, "reset");
    for (int t = 0; t < 2000; t++) begin
      hold = ($urandom_range(0, 3) == 0);
      take = ($urandom_range(0, 3) == 0);
      rel = 1'($urandom);
      pc_x = 16'($urandom);
      disp = 8'($urandom);
      rtarget = 16'($urandom);
      #1;
      check(link, 16'(pc_x + 1), "link");
      @(posedge clk);
      d = $signed(disp);
      if (take) model = rel ? 16'(int'(pc_x) + d) : rtarget;
      else if (!hold) model = model + 16'd1;
      #1;
      check(pc_f, model, "pc");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
