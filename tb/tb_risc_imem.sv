// tb_risc_imem: self-checking test of the instruction memory.
// Loads random words through the write port, then reads addresses back
// with one cycle of latency and checks that a disabled read holds the
// previous output. Uses a 10-bit address to keep the run short.
module tb_risc_imem;
  localparam int AW = 10;
  logic          clk = 1'b0, we = 1'b0, re = 1'b0;
  logic [AW-1:0] waddr = '0, raddr = '0;
  logic [15:0]   wdata = '0, rdata, last;
  logic [15:0]   model [2**AW];
  int checks = 0, failures = 0;

  risc_imem #(.AW(AW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(posedge clk);
    for (int i = 0; i < 2**AW; i++) begin
      #1 we = 1'b1; waddr = AW'(i); wdata = 16'($urandom); model[i] = wdata;
      @(posedge clk);
    end
    #1 we = 1'b0;
    for (int t = 0; t < 3000; t++) begin
      re = ($urandom_range(0, 3) != 0);
      raddr = AW'($urandom);
      last = rdata;
      @(posedge clk);
      #1;
      checks++;
      if (rdata !== (re ? model[raddr] : last)) begin
        failures++;
        $display("FAIL addr %h re %b: got %h", raddr, re, rdata);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
