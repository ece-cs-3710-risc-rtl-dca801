// risc_dmem: data memory.
//
// 2**AW words of 16 bits with two synchronous read/write ports. Port A
// serves LOAD and STOR of the processor, port B a host (loading data,
// reading results). A read returns the addressed word one clock after the
// enabled access; a write to the same port returns the old word. If both
// ports write one address in the same cycle, port A wins. Word addressing
// follows the instruction set; the two ports and their timing are this
// design's choices.
module risc_dmem #(
  parameter int unsigned AW = 16
) (
  input  logic          clk,
  input  logic          a_en,
  input  logic          a_we,
  input  logic [AW-1:0] a_addr,
  input  logic [15:0]   a_wdata,
  output logic [15:0]   a_rdata,
  input  logic          b_en,
  input  logic          b_we,
  input  logic [AW-1:0] b_addr,
  input  logic [15:0]   b_wdata,
  output logic [15:0]   b_rdata
);
  logic [15:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (b_en) begin
      b_rdata <= mem[b_addr];
      if (b_we) mem[b_addr] <= b_wdata;
    end
    if (a_en) begin
      a_rdata <= mem[a_addr];
      if (a_we) mem[a_addr] <= a_wdata;
    end
  end
endmodule
