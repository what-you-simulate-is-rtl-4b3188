// Testbench for comet_core with memories modelled here.
//
// Part 1 checks the pipeline timing: straight-line code with back-to-back
// dependencies must run at one instruction per cycle (forwarding hides
// every ALU dependency), a load followed by a user costs exactly one extra
// cycle, a taken branch two, a JAL one, and a division in Execute holds
// the pipe for 33 extra cycles. Each is measured as the difference in
// cycles between two programs that differ only in that feature.
// Part 2 runs random programs, with instruction and data memories that
// randomly take extra cycles as caches do on a miss, and compares the data
// memory and the number of retired instructions with the instruction-set
// simulator.
module comet_core_tb;
  import comet_pkg::*;
  import rv_tb_pkg::*;

  localparam int IW = 1024, DW = 1024, DBASE = 32'h100;

  logic        clk = 0, rst = 1;
  logic [31:0] imem_addr, imem_rdata, dmem_addr, dmem_wdata, dmem_rdata;
  logic        dmem_we, dmem_re, halted;
  logic        imem_ready = 1, dmem_ready = 1;
  bit          random_ready = 0;
  logic [3:0]  dmem_be;
  events_t     events;
  logic [31:0] imem [IW];
  logic [31:0] dmem [DW];
  int checks = 0, failures = 0, retired = 0;

  always #5 clk = ~clk;

  comet_core dut (.clk, .rst, .imem_addr, .imem_rdata, .imem_ready, .dmem_addr, .dmem_re, .dmem_we,
                  .dmem_be, .dmem_wdata, .dmem_rdata, .dmem_ready, .halted, .events);

  // memories that are sometimes not ready, as a cache on a miss
  always @(negedge clk) begin
    imem_ready <= !random_ready || $urandom_range(0, 3) != 0;
    dmem_ready <= !random_ready || $urandom_range(0, 2) != 0;
  end

  assign imem_rdata = imem[imem_addr[11:2]];
  assign dmem_rdata = dmem[dmem_addr[11:2]];
  always @(posedge clk) begin
    if (dmem_we) for (int i = 0; i < 4; i++)
      if (dmem_be[i]) dmem[dmem_addr[11:2]][8*i +: 8] <= dmem_wdata[8*i +: 8];
    if (!rst) retired += int'(events.retire);
  end

  task automatic expect_eq(logic [31:0] got, logic [31:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s got %0d (%h) exp %0d (%h)", what, got, got, exp, exp);
    end
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Runs prog[0:len-1] from reset; returns cycles until halted.
  task automatic run(logic [31:0] prog[], int len, output int cycles);
    rst = 1;
    for (int i = 0; i < IW; i++) imem[i] = (i < len) ? prog[i] : NOP;
    repeat (2) @(negedge clk);
    retired = 0;
    rst = 0;
    cycles = 0;
    while (!halted && cycles < 100000) begin @(negedge clk); cycles++; end
  endtask

  // Program: n copies of a body, then ECALL
  task automatic timed(logic [31:0] body[$], int n, output int cycles);
    logic [31:0] prog[] = new[IW];
    int len = 0;
    prog[len++] = ADDI(5, 0, 100);       // x5 = 100
    prog[len++] = ADDI(6, 0, 7);         // x6 = 7
    for (int i = 0; i < n; i++) foreach (body[j]) prog[len++] = body[j];
    prog[len++] = ECALL();
    run(prog, len, cycles);
  endtask

  initial begin
    int c1, c2, len;
    logic [31:0] prog[] = new[IW];
    rv_iss iss;

    foreach (dmem[i]) dmem[i] = '0;

    // one instruction per cycle through a chain of dependent ALU operations
    timed('{ADDI(1, 1, 1)}, 100, c1);
    timed('{ADDI(1, 1, 1)}, 200, c2);
    expect_eq(32'(c2 - c1), 100, "dependent ALU chain: cycles per 100 instructions");
    timed('{ADDI(1, 1, 1), ADD(2, 1, 1), ADD(3, 2, 1)}, 50, c1);
    expect_eq(32'(c1 - c2), 32'(150 - 200), "forwarded triples run at one per cycle");

    // load-use costs one cycle
    timed('{LW(1, 0, 0), ADDI(2, 3, 1)}, 40, c1);
    timed('{LW(1, 0, 0), ADDI(2, 1, 1)}, 40, c2);
    expect_eq(32'(c2 - c1), 40, "load-use: one bubble each");

    // taken branch costs two cycles (BEQ taken skips one instruction)
    timed('{BR(1, 0, 0, 8), ADDI(2, 2, 1)}, 40, c1);  // BNE x0,x0: not taken
    timed('{BR(0, 0, 0, 8), ADDI(2, 2, 1)}, 40, c2);  // BEQ x0,x0: taken
    expect_eq(32'(c2 - c1), 40, "taken branch: two bubbles, minus the skipped instruction");

    // JAL redirect from Decode costs one cycle
    timed('{ADDI(2, 2, 1)}, 40, c1);
    timed('{JAL(0, 4)}, 40, c2);
    expect_eq(32'(c2 - c1), 40, "JAL: one bubble");

    // division holds Execute for 33 extra cycles
    timed('{ADD(2, 5, 6)}, 10, c1);
    timed('{MULDIV(4, 2, 5, 6)}, 10, c2);
    expect_eq(32'(c2 - c1), 330, "division: 33 extra cycles each");

    // results of a small directed program
    len = 0;
    prog[len++] = ADDI(1, 0, 100);
    prog[len++] = ADDI(2, 0, -7);
    prog[len++] = MULDIV(0, 3, 1, 2);      // -700
    prog[len++] = MULDIV(4, 4, 3, 2);      // 100
    prog[len++] = SW(3, 0, 16);
    prog[len++] = LW(5, 0, 16);
    prog[len++] = ADD(6, 5, 4);            // -600 (load-use)
    prog[len++] = SW(6, 0, 20);
    prog[len++] = SW(4, 0, 24);
    prog[len++] = ECALL();
    prog[len++] = SW(1, 0, 28);            // must not execute
    dmem[7] = 32'h55;
    run(prog, len, c1);
    expect_eq(dmem[4], -32'sd700, "mul result");
    expect_eq(dmem[5], -32'sd600, "load-use result");
    expect_eq(dmem[6], 32'd100, "div result");
    expect_eq(dmem[7], 32'h55, "nothing after ECALL");
    expect_eq(32'(retired), 10, "retired up to ECALL");

    // random programs against the ISS, with memories that randomly wait
    random_ready = 1;
    for (int p = 0; p < 20; p++) begin
      iss = new(IW, DW);
      len = gen_program(prog, 200, DBASE);
      for (int i = 0; i < DW; i++) begin dmem[i] = $urandom; iss.dmem[i] = dmem[i]; end
      for (int i = 0; i < len; i++) iss.imem[i] = prog[i];
      run(prog, len, c1);
      iss.run(100000);
      expect_eq(32'(halted), 1, "halted");
      expect_eq(32'(retired), 32'(iss.retired), "retired count");
      for (int i = 0; i < DW; i++) expect_eq(dmem[i], iss.dmem[i], $sformatf("program %0d dmem[%0d]", p, i));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
