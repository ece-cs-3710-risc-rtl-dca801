// risc_cpu: 16-bit RISC processor, two-stage pipeline, Harvard memories.
//
// Every instruction is one 16-bit word; the machine is word addressed with a
// 16-bit address space. Stage 1 (fetch) presents pc_f to the synchronous
// instruction memory, whose output register is the instruction register.
// Stage 2 (execute) decodes it, reads two registers, runs the ALU, shifter
// or condition logic and writes the result back at the end of the same
// cycle, so no forwarding is needed between consecutive instructions.
//
// Control hazards: Bcond, Jcond and JAL resolve in execute. When one is
// taken, the instruction already fetched behind it is squashed (valid_x
// cleared) and fetch restarts at the target: a taken jump costs one extra
// cycle, one not taken costs nothing. There is no delay slot.
//
// Loads: the data memory reads synchronously, so LOAD spends two cycles in
// execute. In the first the address goes to memory and fetch stalls; in the
// second the word is written to Rdest. STOR completes in one cycle.
//
// WAIT halts the processor (halted = 1) until reset; with no interrupt
// logic this is the instruction's defined behaviour. EXCP, RETX and unused
// opcodes execute as no-operations, and the PSR is brought out so that an
// interrupt controller could be added outside.
//
// Host side: prog_* writes the instruction memory (normally while rst_n is
// low), host_* is a second port into the data memory; host_rdata is valid
// one cycle after host_en. Reset is synchronous and active low; the first
// instruction executed is the one at address 0.
//
// The instruction set, the register file, the PSR and the separate
// instruction and data memories follow the processor specification; the
// pipeline timing, the synchronous memories and the host ports are this
// design's choices.
module risc_cpu
  import risc_pkg::*;
#(
  parameter int unsigned IMEM_AW = 16,
  parameter int unsigned DMEM_AW = 16
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               prog_we,
  input  logic [IMEM_AW-1:0] prog_addr,
  input  logic [15:0]        prog_data,
  input  logic               host_en,
  input  logic               host_we,
  input  logic [DMEM_AW-1:0] host_addr,
  input  logic [15:0]        host_wdata,
  output logic [15:0]        host_rdata,
  output logic               halted,
  output logic [15:0]        psr,
  output logic [15:0]        pc
);
  // ---------------------------------------------------------------- fetch
  logic [IMEM_AW-1:0] pc_f, pc_x;
  logic [15:0]        ir;
  logic               valid_x;
  logic               halted_q;
  logic               load_wait;

  // ---------------------------------------------------------------- execute
  ctrl_t       ctrl;
  logic [15:0] ra_data, rb_data, bval, alu_y, sh_y, link, wb_data, mem_rdata;
  flags_t      alu_flags;
  logic        cond_true, tbit_val;
  logic        exec, stall, take, retire;
  logic [4:0]  sh_amount;

  risc_decoder u_dec (.ir(ir), .ctrl(ctrl));

  always_comb begin
    exec   = valid_x && !halted_q;
    stall  = exec && ctrl.mem_re && !load_wait;
    retire = exec && !stall;
    take   = retire && ((ctrl.br == BR_JAL) ||
                        ((ctrl.br == BR_BCOND || ctrl.br == BR_JCOND) && cond_true));

    unique case (ctrl.bsel)
      B_SEXT:  bval = {{8{ctrl.imm[7]}}, ctrl.imm};
      B_ZEXT:  bval = {8'h00, ctrl.imm};
      default: bval = rb_data;
    endcase

    sh_amount = ctrl.sh_imm ? ir[4:0] : rb_data[4:0];
    tbit_val  = ra_data[ctrl.tbit_imm ? ir[3:0] : rb_data[3:0]];

    unique case (ctrl.wbsel)
      WB_SHIFT: wb_data = sh_y;
      WB_MEM:   wb_data = mem_rdata;
      WB_LINK:  wb_data = link;
      WB_PSR:   wb_data = psr;
      WB_COND:  wb_data = {15'b0, cond_true};
      default:  wb_data = alu_y;
    endcase
  end

  risc_regfile u_rf (
    .clk(clk), .rst_n(rst_n),
    .we(retire && ctrl.rf_we), .waddr(ctrl.wa), .wdata(wb_data),
    .raddr_a(ctrl.ra), .rdata_a(ra_data),
    .raddr_b(ctrl.rb), .rdata_b(rb_data)
  );

  risc_alu u_alu (
    .op(ctrl.alu_op), .a(ra_data), .b(bval), .cin(psr[PSR_C]),
    .y(alu_y), .flags(alu_flags)
  );

  risc_shifter #(.WIDTH(16)) u_sh (
    .a(ra_data), .amount(sh_amount), .arith(ctrl.sh_arith), .y(sh_y)
  );

  risc_cond u_cond (.cond(ctrl.cond), .psr(psr), .taken(cond_true));

  risc_psr u_psr (
    .clk(clk), .rst_n(rst_n), .en(retire), .upd(ctrl.flag_upd),
    .flags(alu_flags), .tbit(tbit_val),
    .lpr_we(ctrl.lpr), .lpr_data(ra_data),
    .set_e(ctrl.ei), .clr_e(ctrl.di), .psr(psr)
  );

  risc_pc #(.AW(IMEM_AW)) u_pc (
    .clk(clk), .rst_n(rst_n),
    .hold(stall || halted_q || (retire && ctrl.halt)),
    .take(take), .rel(ctrl.br == BR_BCOND),
    .pc_x(pc_x), .disp(ctrl.imm), .rtarget(rb_data),
    .pc_f(pc_f), .link(link)
  );

  risc_imem #(.AW(IMEM_AW)) u_imem (
    .clk(clk), .we(prog_we), .waddr(prog_addr), .wdata(prog_data),
    .re(!stall && !halted_q), .raddr(pc_f), .rdata(ir)
  );

  risc_dmem #(.AW(DMEM_AW)) u_dmem (
    .clk(clk),
    .a_en(exec && ((ctrl.mem_re && !load_wait) || ctrl.mem_we)),
    .a_we(exec && ctrl.mem_we),
    .a_addr(DMEM_AW'(rb_data)), .a_wdata(ra_data), .a_rdata(mem_rdata),
    .b_en(host_en), .b_we(host_we), .b_addr(host_addr),
    .b_wdata(host_wdata), .b_rdata(host_rdata)
  );

  // pipeline registers alongside the instruction memory output
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      valid_x   <= 1'b0;
      pc_x      <= '0;
      load_wait <= 1'b0;
      halted_q  <= 1'b0;
    end else begin
      load_wait <= stall;
      if (retire && ctrl.halt) halted_q <= 1'b1;
      if (!stall && !halted_q) begin
        pc_x    <= pc_f;
        valid_x <= !take && !(retire && ctrl.halt);
      end
    end
  end

  assign halted = halted_q;
  assign pc     = 16'(pc_f);

  // the second load cycle always follows a first one of the same LOAD
  a_load_wait: assert property (@(posedge clk) disable iff (!rst_n)
    load_wait |-> (valid_x && ctrl.mem_re && !stall));
  // a redirect never coincides with a stall
  a_take_no_stall: assert property (@(posedge clk) disable iff (!rst_n)
    !(take && stall));
endmodule
