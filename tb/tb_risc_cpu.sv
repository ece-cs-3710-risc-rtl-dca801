// tb_risc_cpu: end-to-end test of the processor at its default sizes.
//
// The testbench holds its own instruction-level model of the machine
// (registers, PSR, data memory, PC) written directly from the instruction
// definitions, with no reference to the RTL. Each test loads a program
// into the instruction memory and random data into data words 0..255
// through the host ports, releases reset, waits for WAIT to halt the core,
// and then compares every register, the PSR, data words 0..255 and the
// number of clock cycles with the model. The expected cycle count is this
// design's timing: one fill cycle, then one cycle per instruction plus one
// for each LOAD and each taken jump.
//
// Programs: first a hand-written loop with a subroutine call (backward
// branch, JAL, return through JUC, LOAD/STOR), whose results are also
// checked against hand-computed values; then NPROG random programs of
// every instruction kind with forward-only branches and jumps so that
// they always reach the final WAIT. Every mechanism of the pipeline (taken
// and untaken branches with squash, load stalls, stores, halt, each flag
// class, LPR/SPR, Scond) is counted and must occur.
module tb_risc_cpu;
  import risc_pkg::*;

  localparam int NPROG = 300;
  localparam int PLEN  = 160;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        prog_we = 1'b0, host_en = 1'b0, host_we = 1'b0;
  logic [15:0] prog_addr = '0, prog_data = '0, host_addr = '0, host_wdata = '0;
  logic [15:0] host_rdata, psr, pc;
  logic        halted;

  risc_cpu dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_taken = 0, n_not_taken = 0, n_load_stall = 0, n_store = 0, n_jal = 0,
      n_halt = 0, n_fl_arith = 0, n_fl_cmp = 0, n_fl_tbit = 0, n_lpr = 0, n_spr = 0,
      n_scond = 0, n_shift = 0, n_squash = 0;

  task automatic check(input logic [15:0] got, exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // ------------------------------------------------------------ assembler
  function automatic logic [15:0] rr(input logic [3:0] ext, rsrc, rdest);
    return {4'h0, rdest, ext, rsrc};
  endfunction
  function automatic logic [15:0] ri(input logic [3:0] op, input logic [7:0] imm, input logic [3:0] rdest);
    return {op, rdest, imm};
  endfunction
  function automatic logic [15:0] sp(input logic [3:0] hi, ext, lo);
    return {4'h4, hi, ext, lo};
  endfunction
  function automatic logic [15:0] bcond(input logic [3:0] c, input logic [7:0] disp);
    return {4'hC, c, disp};
  endfunction

  // ------------------------------------------------------------ reference model
  logic [15:0] prog [PLEN];
  logic [15:0] m_r [16];
  logic [15:0] m_psr, m_pc;
  logic [15:0] m_mem [256];
  logic        m_halt;
  int          m_cycles;

  function automatic logic m_cond(input logic [3:0] c);
    logic cf, lf, ff, zf, nf;
    cf = m_psr[0]; lf = m_psr[2]; ff = m_psr[5]; zf = m_psr[6]; nf = m_psr[7];
    case (c)
      0: return zf;          1: return !zf;
      2: return cf;          3: return !cf;
      4: return lf;          5: return !lf;
      6: return nf;          7: return !nf;
      8: return ff;          9: return !ff;
      10: return !lf && !zf; 11: return lf || zf;
      12: return !nf && !zf; 13: return nf || zf;
      14: return 1'b1;       default: return 1'b0;
    endcase
  endfunction

  function automatic logic [15:0] m_add(input logic [15:0] a, b, input int ci, input bit setf);
    int unsigned u;
    int s;
    u = int'(a) + int'(b) + ci;
    s = int'($signed(a)) + int'($signed(b)) + ci;
    if (setf) begin
      m_psr[0] = (u > 65535);
      m_psr[5] = (s > 32767) || (s < -32768);
    end
    return u[15:0];
  endfunction

  function automatic logic [15:0] m_sub(input logic [15:0] a, b, input int ci, input bit setf);
    int s;
    s = int'($signed(a)) - int'($signed(b)) - ci;
    if (setf) begin
      m_psr[0] = (int'(b) + ci) > int'(a);
      m_psr[5] = (s > 32767) || (s < -32768);
    end
    return 16'(int'(a) - int'(b) - ci);
  endfunction

  function automatic logic [15:0] m_shift(input logic [15:0] a, input logic [4:0] amt, input bit arith);
    int k;
    int sa;
    k = $signed(amt);
    if (k >= 0) return 16'(int'(a) << k);
    sa = arith ? int'($signed(a)) : int'(a);
    return 16'(sa >>> (-k));
  endfunction

  function automatic void m_cmp(input logic [15:0] rdest, src);
    m_psr[6] = (rdest == src);
    m_psr[2] = (src > rdest);
    m_psr[7] = ($signed(src) > $signed(rdest));
  endfunction

  function automatic void m_step();
    logic [15:0] ir, a, b, sx, zx, tgt;
    logic [3:0]  op, d, e, s;
    int          cost;
    ir = prog[m_pc];
    op = ir[15:12]; d = ir[11:8]; e = ir[7:4]; s = ir[3:0];
    a  = m_r[d]; b = m_r[s];
    sx = {{8{ir[7]}}, ir[7:0]}; zx = {8'h00, ir[7:0]};
    cost = 1;
    m_pc = m_pc + 16'd1;
    case (op)
      4'h0: case (e)
        4'h0: if (d == 0 && s == 0) m_halt = 1'b1;
        4'h1: m_r[d] = a & b;
        4'h2: m_r[d] = a | b;
        4'h3: m_r[d] = a ^ b;
        4'h5: m_r[d] = m_add(a, b, 0, 1);
        4'h6: m_r[d] = m_add(a, b, 0, 0);
        4'h7: m_r[d] = m_add(a, b, int'(m_psr[0]), 1);
        4'h9: m_r[d] = m_sub(a, b, 0, 1);
        4'hA: m_r[d] = m_sub(a, b, int'(m_psr[0]), 1);
        4'hB: m_cmp(a, b);
        4'hD: m_r[d] = b;
        4'hE: m_r[d] = 16'(int'(a) * int'(b));
        default: ;
      endcase
      4'h1: m_r[d] = a & zx;
      4'h2: m_r[d] = a | zx;
      4'h3: m_r[d] = a ^ zx;
      4'h5: m_r[d] = m_add(a, sx, 0, 1);
      4'h6: m_r[d] = m_add(a, sx, 0, 0);
      4'h7: m_r[d] = m_add(a, sx, int'(m_psr[0]), 1);
      4'h9: m_r[d] = m_sub(a, sx, 0, 1);
      4'hA: m_r[d] = m_sub(a, sx, int'(m_psr[0]), 1);
      4'hB: m_cmp(a, sx);
      4'hD: m_r[d] = zx;
      4'hE: m_r[d] = 16'(int'(a) * int'(sx));
      4'hF: m_r[d] = {ir[7:0], 8'h00};
      4'h8: begin
        if (e == 4'h4)            m_r[d] = m_shift(a, b[4:0], 0);
        else if (e == 4'h6)       m_r[d] = m_shift(a, b[4:0], 1);
        else if (e[3:1] == 3'b000) m_r[d] = m_shift(a, ir[4:0], 0);
        else if (e[3:1] == 3'b001) m_r[d] = m_shift(a, ir[4:0], 1);
      end
      4'hC: if (m_cond(d)) begin
        m_pc = 16'(int'(m_pc) - 1 + int'($signed(ir[7:0])));
        cost = 2;
      end
      4'h4: case (e)
        4'h0: begin m_r[d] = m_mem[b[7:0]]; cost = 2; end
        4'h4: m_mem[b[7:0]] = a;
        4'h2: m_r[d] = {{8{b[7]}}, b[7:0]};
        4'h6: m_r[d] = {8'h00, b[7:0]};
        4'hD: m_r[d] = {15'b0, m_cond(s)};
        4'hC: if (m_cond(d)) begin m_pc = b; cost = 2; end
        4'h8: begin tgt = b; m_r[d] = m_pc; m_pc = tgt; cost = 2; end
        4'hA: m_psr[5] = a[b[3:0]];
        4'hE: m_psr[5] = a[s];
        4'h1: m_psr = a & 16'h0EE7;
        4'h5: m_r[s] = m_psr;
        4'h3: m_psr[9] = 1'b0;
        4'h7: m_psr[9] = 1'b1;
        default: ;
      endcase
      default: ;
    endcase
    m_cycles += cost;
  endfunction

  // ------------------------------------------------------------ mechanism counters
  always @(posedge clk) if (rst_n) begin
    if (dut.retire) begin
      if (dut.take) n_taken++;
      if (dut.ctrl.br inside {BR_BCOND, BR_JCOND} && !dut.take) n_not_taken++;
      if (dut.ctrl.mem_we) n_store++;
      if (dut.ctrl.br == BR_JAL) n_jal++;
      if (dut.ctrl.halt) n_halt++;
      if (dut.ctrl.flag_upd == FL_ARITH) n_fl_arith++;
      if (dut.ctrl.flag_upd == FL_CMP) n_fl_cmp++;
      if (dut.ctrl.flag_upd == FL_TBIT) n_fl_tbit++;
      if (dut.ctrl.lpr) n_lpr++;
      if (dut.ctrl.rf_we && dut.ctrl.wbsel == WB_PSR) n_spr++;
      if (dut.ctrl.rf_we && dut.ctrl.wbsel == WB_COND) n_scond++;
      if (dut.ctrl.rf_we && dut.ctrl.wbsel == WB_SHIFT) n_shift++;
    end
    if (dut.stall) n_load_stall++;
    if (!dut.valid_x && !dut.halted_q) n_squash++;
  end

  // ------------------------------------------------------------ running one program
  task automatic run_program(input int len, input string name);
    int cyc;
    // load program and data with the core in reset
    rst_n = 1'b0;
    @(negedge clk);
    for (int i = 0; i < len; i++) begin
      prog_we = 1'b1; prog_addr = 16'(i); prog_data = prog[i];
      @(negedge clk);
    end
    prog_we = 1'b0;
    for (int i = 0; i < 256; i++) begin
      host_en = 1'b1; host_we = 1'b1; host_addr = 16'(i);
      host_wdata = 16'($urandom); m_mem[i] = host_wdata;
      @(negedge clk);
    end
    host_en = 1'b0; host_we = 1'b0;
    // model
    foreach (m_r[i]) m_r[i] = '0;
    m_psr = '0; m_pc = '0; m_halt = 1'b0; m_cycles = 1;
    while (!m_halt && m_cycles < 100000) m_step();
    // run the core
    @(negedge clk);
    rst_n = 1'b1;
    cyc = 0;
    while (!halted && cyc < 200000) begin
      @(negedge clk);
      cyc++;
    end
    check(16'(halted), 16'h1, {name, " halted"});
    check(16'(cyc), 16'(m_cycles), {name, " cycle count"});
    for (int i = 0; i < 16; i++) check(dut.u_rf.regs[i], m_r[i], $sformatf("%s r%0d", name, i));
    check(psr, m_psr, {name, " psr"});
    for (int i = 0; i < 256; i++) begin
      host_en = 1'b1; host_addr = 16'(i);
      @(negedge clk);
      check(host_rdata, m_mem[i], $sformatf("%s mem[%0d]", name, i));
    end
    host_en = 1'b0;
  endtask

  // directed program: sum 10..1 in a loop, double it in a subroutine, store and reload
  task automatic directed();
    int k = 0;
    prog[k++] = ri(OP_MOVI, 8'd10, 4'd1);      // 0 r1 = 10
    prog[k++] = ri(OP_MOVI, 8'd0, 4'd2);       // 1 r2 = 0
    prog[k++] = ri(OP_MOVI, 8'd12, 4'd5);      // 2 r5 = subroutine
    prog[k++] = rr(RX_ADD, 4'd1, 4'd2);        // 3 loop: r2 += r1
    prog[k++] = ri(OP_SUBI, 8'd1, 4'd1);       // 4 r1 -= 1
    prog[k++] = ri(OP_CMPI, 8'd0, 4'd1);       // 5 compare r1 with 0
    prog[k++] = bcond(C_NE, 8'hFD);            // 6 BNE loop (-3)
    prog[k++] = sp(4'd6, SX_JAL, 4'd5);        // 7 JAL r6, r5
    prog[k++] = ri(OP_MOVI, 8'h40, 4'd7);      // 8 r7 = 0x40
    prog[k++] = sp(4'd2, SX_STOR, 4'd7);       // 9 STOR r2, r7
    prog[k++] = sp(4'd8, SX_LOAD, 4'd7);       // 10 LOAD r8, r7
    prog[k++] = 16'h0000;                      // 11 WAIT
    prog[k++] = {4'h8, 4'd2, 4'h0, 4'h1};      // 12 LSHI r2 by 1
    prog[k++] = sp(C_UC, SX_JCOND, 4'd6);      // 13 JUC r6
    run_program(k, "directed");
    check(dut.u_rf.regs[8], 16'd110, "directed loop result");
    check(dut.u_rf.regs[6], 16'd8, "directed link address");
  endtask

  // random program with forward-only control flow ending in WAIT
  task automatic random_program(input int idx);
    int i = 0, rem, kind, t;
    logic [3:0] rd, rs, rt;
    bit second [PLEN];
    foreach (second[j]) second[j] = 1'b0;
    while (i < PLEN - 1) begin
      rem = PLEN - 1 - i;
      rd = 4'($urandom); rs = 4'($urandom);
      kind = $urandom_range(0, 13);
      if (kind <= 3) begin                       // register-register ALU or unused
        prog[i++] = rr(4'($urandom), rs, rd);
        if (prog[i-1] == 16'h0000) prog[i-1] = rr(RX_OR, 4'd0, 4'd0);   // keep WAIT out
      end else if (kind <= 6) begin              // immediate ALU
        prog[i++] = ri(4'($urandom_range(1, 15)) == OP_SPEC ? OP_ADDI : 4'($urandom_range(1, 15)), 8'($urandom), rd);
        if (prog[i-1][15:12] inside {OP_SPEC, OP_SHIFT, OP_BCOND}) prog[i-1][15:12] = OP_ADDCI;
      end else if (kind == 7) begin              // shifts, register and immediate
        prog[i++] = {4'h8, rd, 4'($urandom), rs};
      end else if (kind == 8 && rem >= 3) begin  // memory access through an address register
        rt = 4'($urandom);
        prog[i++] = ri(OP_MOVI, 8'($urandom), rt);
        second[i] = 1'b1;
        prog[i++] = sp(rd, $urandom_range(0, 1) ? SX_LOAD : SX_STOR, rt);
      end else if (kind == 9 && rem >= 2) begin  // Bcond forward
        prog[i] = bcond(4'($urandom), 8'($urandom_range(1, (rem < 12) ? rem : 12)));
        i++;
      end else if (kind == 10 && rem >= 3) begin // Jcond or JAL forward through a register
        rt = 4'($urandom);
        prog[i] = ri(OP_MOVI, 8'(i + 1 + $urandom_range(1, (rem - 1 < 12) ? rem - 1 : 12)), rt);
        prog[i+1] = $urandom_range(0, 1) ? sp(4'($urandom), SX_JCOND, rt) : sp(rd, SX_JAL, rt);
        second[i+1] = 1'b1;
        i += 2;
      end else begin                             // other special-class instructions
        case ($urandom_range(0, 9))
          0: prog[i++] = sp(rd, SX_SNXB, rs);
          1: prog[i++] = sp(rd, SX_ZRXB, rs);
          2: prog[i++] = sp(rd, SX_SCOND, 4'($urandom));
          3: prog[i++] = sp(rd, SX_TBIT, rs);
          4: prog[i++] = sp(rd, SX_TBITI, 4'($urandom));
          5: prog[i++] = sp(rd, SX_LPR, rs);
          6: prog[i++] = sp(rd, SX_SPR, rs);
          7: prog[i++] = sp(4'd0, $urandom_range(0, 1) ? SX_DI : SX_EI, 4'd0);
          8: prog[i++] = sp(4'd0, $urandom_range(0, 1) ? SX_EXCP : SX_RETX, 4'($urandom));
          default: prog[i++] = ri(OP_CMPI, 8'($urandom), rd);
        endcase
      end
    end
    prog[PLEN-1] = 16'h0000;
    // no jump may land between an address-setting MOVI and its user
    for (int j = 0; j < PLEN - 1; j++) begin
      if (prog[j][15:12] == OP_BCOND) begin
        t = j + int'(prog[j][7:0]);
        if (second[t]) prog[j][7:0] = prog[j][7:0] + 8'd1;
      end
      if (second[j] && prog[j][15:12] == OP_SPEC && prog[j][7:4] inside {SX_JCOND, SX_JAL}) begin
        t = int'(prog[j-1][7:0]);
        if (second[t]) prog[j-1][7:0] = prog[j-1][7:0] + 8'd1;
      end
    end
    run_program(PLEN, $sformatf("random%0d", idx));
  endtask

  initial begin
    repeat (20000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    directed();
    for (int p = 0; p < NPROG; p++) random_program(p);
    $display("mechanisms: taken=%0d squashed=%0d not_taken=%0d load_stall=%0d store=%0d jal=%0d halt=%0d",
             n_taken, n_squash, n_not_taken, n_load_stall, n_store, n_jal, n_halt);
    $display("            arith_flags=%0d cmp_flags=%0d tbit=%0d lpr=%0d spr=%0d scond=%0d shift=%0d",
             n_fl_arith, n_fl_cmp, n_fl_tbit, n_lpr, n_spr, n_scond, n_shift);
    checks++; if (n_taken == 0)      begin failures++; $display("FAIL no taken jump"); end
    checks++; if (n_squash == 0)     begin failures++; $display("FAIL no squash"); end
    checks++; if (n_not_taken == 0)  begin failures++; $display("FAIL no untaken branch"); end
    checks++; if (n_load_stall == 0) begin failures++; $display("FAIL no load stall"); end
    checks++; if (n_store == 0)      begin failures++; $display("FAIL no store"); end
    checks++; if (n_jal == 0)        begin failures++; $display("FAIL no JAL"); end
    checks++; if (n_halt == 0)       begin failures++; $display("FAIL no halt"); end
    checks++; if (n_fl_arith == 0)   begin failures++; $display("FAIL no arithmetic flags"); end
    checks++; if (n_fl_cmp == 0)     begin failures++; $display("FAIL no compare flags"); end
    checks++; if (n_fl_tbit == 0)    begin failures++; $display("FAIL no TBIT"); end
    checks++; if (n_lpr == 0)        begin failures++; $display("FAIL no LPR"); end
    checks++; if (n_spr == 0)        begin failures++; $display("FAIL no SPR"); end
    checks++; if (n_scond == 0)      begin failures++; $display("FAIL no Scond"); end
    checks++; if (n_shift == 0)      begin failures++; $display("FAIL no shift"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
