// risc_imem: instruction memory.
//
// 2**AW words of 16 bits, one word per address. The fetch port reads
// synchronously: rdata shows mem[raddr] one clock after raddr, and holds
// while re is low (pipeline stall). A separate write port lets a host load
// the program. Keeping instructions apart from data follows the processor's
// reference organisation; the synchronous read and the load port are this
// design's choices. The contents are not initialised.
module risc_imem #(
  parameter int unsigned AW = 16
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [15:0]   wdata,
  input  logic          re,
  input  logic [AW-1:0] raddr,
  output logic [15:0]   rdata
);
  logic [15:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end
endmodule
