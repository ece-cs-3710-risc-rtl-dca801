// risc_pc: program counter and branch target logic.
//
// pc_f is the address being fetched. Each cycle it advances by one word,
// holds while the pipeline stalls, or is redirected by a taken jump. A
// relative target (Bcond) is the address of the executing branch, pc_x,
// plus the sign-extended 8-bit displacement; an absolute target (Jcond, JAL)
// is a register value. link = pc_x + 1 is the return address JAL stores.
// Word addressing and the absolute/relative split follow the instruction
// set; using the branch's own address as the base and resetting to 0 are
// this design's choices. A redirect wins over hold.
module risc_pc #(
  parameter int unsigned AW = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          hold,
  input  logic          take,
  input  logic          rel,
  input  logic [AW-1:0] pc_x,
  input  logic [7:0]    disp,
  input  logic [15:0]   rtarget,
  output logic [AW-1:0] pc_f,
  output logic [15:0]   link
);
  logic [AW-1:0] target;
  logic [15:0]   rel_target;

  always_comb begin
    rel_target = 16'(pc_x) + {{8{disp[7]}}, disp};
    target     = rel ? AW'(rel_target) : AW'(rtarget);
    link       = 16'(pc_x) + 16'd1;
  end

  always_ff @(posedge clk) begin
    if (!rst_n)     pc_f <= '0;
    else if (take)  pc_f <= target;
    else if (!hold) pc_f <= pc_f + AW'(1);
  end
endmodule
