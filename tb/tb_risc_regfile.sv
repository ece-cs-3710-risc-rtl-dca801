// tb_risc_regfile: self-checking test of the register file.
// Writes random values to random registers while keeping a shadow copy,
// and compares both read ports against the shadow after every write,
// including same-cycle write/read (the read must show the old value until
// the clock edge). Also checks that reset clears every register.
module tb_risc_regfile;
  logic        clk = 1'b0, rst_n = 1'b0, we = 1'b0;
  logic [3:0]  waddr = '0, raddr_a = '0, raddr_b = '0;
  logic [15:0] wdata = '0, rdata_a, rdata_b;
  logic [15:0] shadow [16];
  int checks = 0, failures = 0;

  risc_regfile dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic [15:0] got, exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) shadow[i] = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int i = 0; i < 16; i++) begin
      raddr_a = 4'(i); raddr_b = 4'(15 - i); #1;
      check(rdata_a, 16'h0, "reset A");
      check(rdata_b, 16'h0, "reset B");
    end
    for (int t = 0; t < 500; t++) begin
      we = ($urandom_range(0, 3) != 0);
      waddr = 4'($urandom);
      wdata = 16'($urandom);
      raddr_a = waddr;
      raddr_b = 4'($urandom);
      #1;
      check(rdata_a, shadow[raddr_a], "read before edge");
      @(posedge clk);
      if (we) shadow[waddr] = wdata;
      #1;
      we = 1'b0;
      raddr_a = 4'($urandom); raddr_b = 4'($urandom); #1;
      check(rdata_a, shadow[raddr_a], "port A");
      check(rdata_b, shadow[raddr_b], "port B");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
