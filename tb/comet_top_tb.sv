// End-to-end testbench for comet_top at its default sizes.
//
// Every program is loaded through the host ports while reset is held
// (the whole instruction memory, unused words as no-ops, and the whole data
// memory with random words), run until halted, and the whole data memory
// is read back and compared word for word with the instruction-set
// simulator of rv_tb_pkg run on the same program and data. The number of
// retired instructions must match too.
//
// Programs: an 8-point FFT written with the butterfly custom instruction
// (its output is also compared with a floating-point DFT of the same
// input), the same FFT written in plain RV32IM (its results must be
// identical, and it must take more cycles; both counts are printed),
// then random RV32IM programs with dense register dependencies,
// loads and stores of every size, forward branches and jumps,
// multiplications, divisions and FFT instructions. The pipeline events
// (load-use stall, divider stall, forwarding from Execute and from Memory,
// redirects from Execute and from Decode, multiply, divide, FFT, and the
// cycles spent waiting on instruction- and data-cache misses) are
// counted over the run and each must have happened at least once.
module comet_top_tb;
  import comet_pkg::*;
  import rv_tb_pkg::*;

  localparam int IW = 4096, DW = 4096;
  localparam int DBASE = 32'h100;
  localparam int N_RANDOM = 300;

  logic        clk = 0, rst = 1;
  logic        ext_imem_we = 0, ext_dmem_we = 0;
  logic [31:0] ext_imem_addr = 0, ext_imem_wdata = 0, ext_dmem_addr = 0, ext_dmem_wdata = 0, ext_dmem_rdata;
  logic        halted;
  events_t     events;

  int checks = 0, failures = 0;
  longint cycles = 0;
  int n_retire = 0, n_load_use = 0, n_mc = 0, n_fwd_ex = 0, n_fwd_mem = 0;
  int n_red_ex = 0, n_red_dc = 0, n_mul = 0, n_div = 0, n_fft = 0, n_halt = 0, n_imiss = 0, n_dmiss = 0;

  always #5 clk = ~clk;

  comet_top dut (.clk, .rst, .ext_imem_we, .ext_imem_addr, .ext_imem_wdata,
                 .ext_dmem_we, .ext_dmem_addr, .ext_dmem_wdata, .ext_dmem_rdata,
                 .halted, .events);

  always @(posedge clk) if (!rst) begin
    cycles++;
    n_retire   += int'(events.retire);
    n_load_use += int'(events.load_use);
    n_mc       += int'(events.mc_stall);
    n_fwd_ex   += int'(events.fwd_ex);
    n_fwd_mem  += int'(events.fwd_mem);
    n_red_ex   += int'(events.redirect_ex);
    n_red_dc   += int'(events.redirect_dc);
    n_mul      += int'(events.mul);
    n_div      += int'(events.div);
    n_fft      += int'(events.fft);
    n_imiss    += int'(events.imiss);
    n_dmiss    += int'(events.dmiss);
  end

  task automatic expect_eq(logic [31:0] got, logic [31:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s got %h exp %h", what, got, exp);
    end
  endtask

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Load, run and compare one program; data[] is the initial data memory.
  task automatic run_program(logic [31:0] prog[], int len, logic [31:0] data[], string name,
                             output rv_iss iss, output int ran);
    int retire0;
    iss = new(IW, DW);
    for (int i = 0; i < len; i++) iss.imem[i] = prog[i];
    for (int i = 0; i < DW; i++) iss.dmem[i] = data[i];
    rst = 1;
    for (int i = 0; i < IW; i++) begin
      @(negedge clk);
      ext_imem_we = 1; ext_imem_addr = 32'(i) << 2; ext_imem_wdata = (i < len) ? prog[i] : NOP;
      ext_dmem_we = (i < DW); ext_dmem_addr = 32'(i) << 2; ext_dmem_wdata = data[i % DW];
    end
    @(negedge clk);
    ext_imem_we = 0; ext_dmem_we = 0;
    @(negedge clk);
    retire0 = n_retire;
    rst = 0;
    ran = 0;
    while (!halted && ran < 200000) begin @(negedge clk); ran++; end
    iss.run(1000000);
    checks++;
    if (!halted || !iss.halted) begin
      failures++;
      $display("FAIL %s: did not halt (rtl %0d, iss %0d)", name, halted, iss.halted);
    end else n_halt++;
    expect_eq(32'(n_retire - retire0), 32'(iss.retired), {name, " retired count"});
    for (int i = 0; i < DW; i++) begin
      ext_dmem_addr = 32'(i) << 2;
      #1 expect_eq(ext_dmem_rdata, iss.dmem[i], $sformatf("%s dmem[%0d]", name, i));
    end
    $display("%s: %0d instructions in %0d cycles", name, iss.retired, ran);
  endtask

  initial begin
    logic [31:0] prog[] = new[IW];
    logic [31:0] data[] = new[DW];
    rv_iss iss;
    int len, cyc_hw, cyc_sw;
    logic [31:0] fft_out[8];

    // ---- 8-point FFT with the custom instruction ----
    for (int i = 0; i < DW; i++) data[i] = $urandom;
    for (int n = 0; n < 8; n++)  // inputs small enough that no stage overflows
      data[DBASE / 4 + n] = {16'($signed(12'($urandom))), 16'($signed(12'($urandom)))};
    len = gen_fft_program(prog, DBASE);
    run_program(prog, len, data, "fft8", iss, cyc_hw);
    for (int k = 0; k < 8; k++) begin
      real re, im, xr, xi, ang;
      logic [31:0] y;
      re = 0.0; im = 0.0;
      y = iss.dmem[DBASE / 4 + 16 + k];
      fft_out[k] = y;
      for (int n = 0; n < 8; n++) begin
        xr = real'($signed(data[DBASE / 4 + n][31:16]));
        xi = real'($signed(data[DBASE / 4 + n][15:0]));
        ang = -2.0 * 3.14159265358979 * k * n / 8.0;
        re += xr * $cos(ang) - xi * $sin(ang);
        im += xr * $sin(ang) + xi * $cos(ang);
      end
      checks++;
      if ((real'($signed(y[31:16])) - re) > 8.0 || (re - real'($signed(y[31:16]))) > 8.0 ||
          (real'($signed(y[15:0])) - im) > 8.0 || (im - real'($signed(y[15:0]))) > 8.0) begin
        failures++;
        $display("FAIL fft X(%0d) = (%0d, %0d), DFT (%f, %f)", k, $signed(y[31:16]), $signed(y[15:0]), re, im);
      end
    end

    // ---- the same FFT in plain RV32IM, on the same input ----
    len = gen_fft_sw_program(prog, DBASE);
    run_program(prog, len, data, "fft8_sw", iss, cyc_sw);
    for (int k = 0; k < 8; k++)
      expect_eq(iss.dmem[DBASE / 4 + 16 + k], fft_out[k], $sformatf("software FFT X(%0d)", k));
    checks++;
    if (cyc_hw >= cyc_sw) begin
      failures++;
      $display("FAIL custom-instruction FFT not faster: %0d against %0d cycles", cyc_hw, cyc_sw);
    end
    $display("8-point FFT: %0d cycles with the butterfly instruction, %0d without (%0.1fx)",
             cyc_hw, cyc_sw, real'(cyc_sw) / real'(cyc_hw));

    // ---- random programs ----
    for (int p = 0; p < N_RANDOM; p++) begin
      for (int i = 0; i < DW; i++) data[i] = $urandom;
      len = gen_program(prog, 150 + $urandom_range(0, 100), DBASE);
      run_program(prog, len, data, $sformatf("random%0d", p), iss, cyc_sw);
    end

    $display("events: retire=%0d load_use=%0d div_stall=%0d fwd_ex=%0d fwd_mem=%0d redirect_ex=%0d redirect_dc=%0d mul=%0d div=%0d fft=%0d halt=%0d imiss=%0d dmiss=%0d",
             n_retire, n_load_use, n_mc, n_fwd_ex, n_fwd_mem, n_red_ex, n_red_dc, n_mul, n_div, n_fft, n_halt, n_imiss, n_dmiss);
    checks++; if (n_load_use == 0) begin failures++; $display("FAIL no load-use stall"); end
    checks++; if (n_mc == 0)       begin failures++; $display("FAIL no divider stall"); end
    checks++; if (n_fwd_ex == 0)   begin failures++; $display("FAIL no forward from Execute"); end
    checks++; if (n_fwd_mem == 0)  begin failures++; $display("FAIL no forward from Memory"); end
    checks++; if (n_red_ex == 0)   begin failures++; $display("FAIL no Execute redirect"); end
    checks++; if (n_red_dc == 0)   begin failures++; $display("FAIL no Decode redirect"); end
    checks++; if (n_mul == 0)      begin failures++; $display("FAIL no multiply"); end
    checks++; if (n_div == 0)      begin failures++; $display("FAIL no division"); end
    checks++; if (n_fft == 0)      begin failures++; $display("FAIL no FFT instruction"); end
    checks++; if (n_imiss == 0)    begin failures++; $display("FAIL no instruction-cache miss"); end
    checks++; if (n_dmiss == 0)    begin failures++; $display("FAIL no data-cache miss"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
