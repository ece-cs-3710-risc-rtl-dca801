// tb_risc_psr: self-checking test of the program status register.
// Random sequences of flag updates of each class, LPR loads, EI/DI and idle
// cycles, checked every cycle against a shadow register kept with explicit
// bit positions (C=0, T=1, L=2, F=5, Z=6, N=7, E=9, P=10, I=11).
module tb_risc_psr;
  import risc_pkg::*;
  logic        clk = 1'b0, rst_n = 1'b0, en = 1'b0, tbit = 1'b0, lpr_we = 1'b0;
  logic        set_e = 1'b0, clr_e = 1'b0;
  flag_upd_e   upd = FL_NONE;
  flags_t      flags = '0;
  logic [15:0] lpr_data = '0, psr, model;
  int checks = 0, failures = 0;

  risc_psr dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    model = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    checks++;
    if (psr !== 16'h0) begin failures++; $display("FAIL reset value %h", psr); end
    for (int t = 0; t < 2000; t++) begin
      en = ($urandom_range(0, 4) != 0);
      upd = flag_upd_e'($urandom_range(0, 3));
      flags = 5'($urandom);
      tbit = 1'($urandom);
      lpr_we = ($urandom_range(0, 9) == 0);
      lpr_data = 16'($urandom);
      set_e = ($urandom_range(0, 9) == 0);
      clr_e = !set_e && ($urandom_range(0, 9) == 0);
      @(posedge clk);
      if (en) begin
        if (lpr_we) begin
          model = '0;
          foreach (model[i]) if (i inside {0, 1, 2, 5, 6, 7, 9, 10, 11}) model[i] = lpr_data[i];
        end else begin
          case (upd)
            FL_ARITH: begin model[0] = flags.c; model[5] = flags.f; end
            FL_CMP:   begin model[6] = flags.z; model[2] = flags.l; model[7] = flags.n; end
            FL_TBIT:  model[5] = tbit;
            default: ;
          endcase
          if (set_e) model[9] = 1'b1;
          if (clr_e) model[9] = 1'b0;
        end
      end
      #1;
      checks++;
      if (psr !== model) begin
        failures++;
        $display("FAIL cycle %0d: psr %h expected %h", t, psr, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
