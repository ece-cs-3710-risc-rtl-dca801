// tb_risc_dmem: self-checking test of the dual-port data memory.
// Both ports issue random reads and writes at once against a shadow array;
// every read is checked one cycle later (old data on a write, port A
// winning a same-address write collision). 10-bit address for speed.
module tb_risc_dmem;
  localparam int AW = 10;
  logic          clk = 1'b0;
  logic          a_en = 1'b0, a_we = 1'b0, b_en = 1'b0, b_we = 1'b0;
  logic [AW-1:0] a_addr = '0, b_addr = '0;
  logic [15:0]   a_wdata = '0, b_wdata = '0, a_rdata, b_rdata;
  logic [15:0]   model [2**AW];
  logic [15:0]   ea, eb;
  int checks = 0, failures = 0;

  risc_dmem #(.AW(AW)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic [15:0] got, exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

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
      #1 b_en = 1'b1; b_we = 1'b1; b_addr = AW'(i); b_wdata = 16'($urandom); model[i] = b_wdata;
      @(posedge clk);
    end
    for (int t = 0; t < 4000; t++) begin
      #1;
      a_en = 1'($urandom); a_we = 1'($urandom); b_en = 1'($urandom); b_we = 1'($urandom);
      a_addr = AW'($urandom_range(0, 15)); b_addr = AW'($urandom_range(0, 15));
      a_wdata = 16'($urandom); b_wdata = 16'($urandom);
      ea = a_en ? model[a_addr] : a_rdata;
      eb = b_en ? model[b_addr] : b_rdata;
      @(posedge clk);
      if (b_en && b_we) model[b_addr] = b_wdata;
      if (a_en && a_we) model[a_addr] = a_wdata;
      #1;
      check(a_rdata, ea, "port A read");
      check(b_rdata, eb, "port B read");
    end
    #1 a_en = 1'b0; b_en = 1'b0;
    for (int i = 0; i < 16; i++) begin
      #1 b_en = 1'b1; b_we = 1'b0; b_addr = AW'(i);
      @(posedge clk); #1;
      check(b_rdata, model[i], "final contents");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
