// risc_regfile: general register file of the RISC core.
//
// NREGS registers of WIDTH bits with two combinational read ports and one
// write port. Port A reads the Rdest field (bits [11:8]), port B the
// Rsrc/Raddr field (bits [3:0]). A write lands at the rising clock edge, so
// an instruction sees the result of the one before it without bypassing.
// Sixteen 16-bit registers are the instruction set's; clearing them on reset
// and the port arrangement are this design's choice. R0 is an ordinary
// register.
module risc_regfile #(
  parameter int unsigned NREGS = 16,
  parameter int unsigned WIDTH = 16
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     we,
  input  logic [$clog2(NREGS)-1:0] waddr,
  input  logic [WIDTH-1:0]         wdata,
  input  logic [$clog2(NREGS)-1:0] raddr_a,
  output logic [WIDTH-1:0]         rdata_a,
  input  logic [$clog2(NREGS)-1:0] raddr_b,
  output logic [WIDTH-1:0]         rdata_b
);
  logic [WIDTH-1:0] regs [NREGS];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < NREGS; i++) regs[i] <= '0;
    end else if (we) begin
      regs[waddr] <= wdata;
    end
  end

  assign rdata_a = regs[raddr_a];
  assign rdata_b = regs[raddr_b];
endmodule
