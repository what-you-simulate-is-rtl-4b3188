// Comet: a five-stage in-order RV32IM processor core.
//
// The core is written as an explicit pipeline: Fetch, Decode, Execute,
// Memory and Write Back each compute the next value of the pipeline
// register that follows them (FtoDC, DCtoEx, ExtoMem, MemtoWB), and all
// registers that are not held commit together on the clock edge, so one
// instruction can enter per cycle. Around that pipeline sit three small
// control blocks:
//   - stall logic (hazard_unit): a load followed by a user of its result
//     costs one bubble; a division in Execute holds the front of the pipe
//     until the divider raises done, while older instructions drain; a
//     data-cache miss freezes the whole pipe;
//   - forwarding (forward_unit): the values that go into DCtoEx are taken
//     from the Execute result or the Memory-stage result when those are
//     newer than the register file (Write Back goes through the register
//     file's write-through);
//   - branch unit: branches and JALR redirect fetch from Execute (two
//     instructions dropped), JAL from Decode (one dropped).
// Execute holds the ALU, a one-cycle multiplier, the multi-cycle divider
// and the FFT butterfly custom instruction unit.
//
// Interfaces: the instruction and data caches are outside the core. Each
// answers in the cycle it is asked (imem_rdata for imem_addr, dmem_rdata
// for dmem_addr) when its ready is high; when the instruction cache is not
// ready Fetch offers a bubble, and when the data cache is not ready for a
// load the whole pipeline holds, as the document's stall does. Stores are
// written on the clock edge with byte enables and never wait. An ECALL stops fetch once decoded and raises halted when it
// leaves Write Back; the core then stays halted until reset. events carries
// one-cycle pulses for counting stalls, forwards and redirects. Reset is
// synchronous and active high.
//
// The stage split, the register names, the forwarding into DCtoEx and the
// state-machine divider follow the document's description of the core. The
// branch resolution points, the draining stall, the memory timing and the
// handling of ECALL are this design's choices.
module comet_core
  import comet_pkg::*;
#(
  parameter logic [31:0] RESET_PC = 32'h0
) (
  input  logic        clk,
  input  logic        rst,
  output logic [31:0] imem_addr,
  input  logic [31:0] imem_rdata,
  input  logic        imem_ready,
  output logic [31:0] dmem_addr,
  output logic        dmem_re,
  output logic        dmem_we,
  output logic [3:0]  dmem_be,
  output logic [31:0] dmem_wdata,
  input  logic [31:0] dmem_rdata,
  input  logic        dmem_ready,
  output logic        halted,
  output events_t     events
);
  // Pipeline registers
  ftodc_t   ftodc;
  dctoex_t  dctoex;
  extomem_t extomem;
  memtowb_t memtowb;

  // Next values offered by the stages
  ftodc_t   ftodc_temp;
  dctoex_t  dctoex_temp;
  extomem_t extomem_temp;
  memtowb_t memtowb_temp;

  logic halt_pending;

  // ---------------- control ----------------
  logic        load_use, mc_stall, hold_fd, hold_ex, bubble_ex, bubble_mem;
  logic        mem_wait, hold_mem, bubble_wb;
  logic        redirect, redirect_ex, kill_fetch, kill_decode;
  logic [31:0] target;

  // ---------------- Decode ----------------
  ctrl_t       dc_ctrl;
  logic [31:0] dc_imm, dc_jal_target, rf1, rf2, v1, v2;
  logic [4:0]  dc_rs1, dc_rs2, dc_rd;
  logic        dc_jal, fwd_ex, fwd_mem;

  // ---------------- Execute ----------------
  logic [31:0] ex_a, ex_b, alu_y, mul_y, div_y, fft_y, ex_result;
  logic        div_start, div_busy, div_done, fft_valid, fft_pending;

  // ---------------- Memory / Write Back ----------------
  logic [31:0] mem_result;

  // Fetch
  fetch #(.RESET_PC(RESET_PC)) u_fetch (
    .clk, .rst,
    .hold      (hold_fd),
    .redirect  (redirect),
    .target    (target),
    .stop      (halt_pending || dc_ctrl.is_ecall),
    .imem_addr (imem_addr),
    .imem_rdata(imem_rdata),
    .imem_ready(imem_ready),
    .ftodc     (ftodc_temp)
  );

  // Decode
  decode u_decode (
    .ftodc, .ctrl(dc_ctrl), .imm(dc_imm), .rs1(dc_rs1), .rs2(dc_rs2), .rd(dc_rd),
    .jal(dc_jal), .jal_target(dc_jal_target)
  );

  regfile u_regfile (
    .clk, .rst,
    .ra1(dc_rs1), .ra2(dc_rs2), .rd1(rf1), .rd2(rf2),
    .we (memtowb.valid && memtowb.wb_en), .wa(memtowb.rd), .wd(memtowb.result)
  );

  forward_unit u_forward (
    .rs1(dc_rs1), .rs2(dc_rs2), .use1(dc_ctrl.use_rs1), .use2(dc_ctrl.use_rs2),
    .rf1, .rf2,
    .ex_wb    (dctoex.valid && dctoex.ctrl.wb_en && !dctoex.ctrl.is_load),
    .ex_rd    (dctoex.rd),
    .ex_result(ex_result),
    .mem_wb   (extomem.valid && extomem.ctrl.wb_en),
    .mem_rd   (extomem.rd),
    .mem_result(mem_result),
    .v1, .v2, .fwd_ex, .fwd_mem
  );

  hazard_unit u_hazard (
    .dc_valid(ftodc.valid), .dc_use1(dc_ctrl.use_rs1), .dc_use2(dc_ctrl.use_rs2),
    .dc_rs1, .dc_rs2,
    .ex_valid(dctoex.valid), .ex_load(dctoex.ctrl.is_load), .ex_rd(dctoex.rd),
    .ex_multicycle(dctoex.ctrl.unit == UNIT_DIV), .mc_done(div_done), .mem_wait,
    .load_use, .mc_stall, .hold_fd, .hold_ex, .bubble_ex, .bubble_mem, .hold_mem, .bubble_wb
  );

  branch_unit u_branch (
    .ex_valid(dctoex.valid && !hold_ex), .ex_ctrl(dctoex.ctrl), .ex_pc(dctoex.pc),
    .ex_a(dctoex.value1), .ex_b(dctoex.value2), .ex_imm(dctoex.imm),
    .dc_jal(dc_jal && !hold_fd), .dc_target(dc_jal_target),
    .redirect, .target, .redirect_ex, .kill_fetch, .kill_decode
  );

  always_comb begin
    dctoex_temp.valid  = ftodc.valid;
    dctoex_temp.pc     = ftodc.pc;
    dctoex_temp.ctrl   = dc_ctrl;
    dctoex_temp.rd     = dc_rd;
    dctoex_temp.imm    = dc_imm;
    dctoex_temp.value1 = v1;
    dctoex_temp.value2 = v2;
  end

  // Execute
  always_comb begin
    ex_a = dctoex.ctrl.a_pc ? dctoex.pc : dctoex.value1;
    if (dctoex.ctrl.is_jal || dctoex.ctrl.is_jalr) ex_b = 32'd4;  // link value
    else if (dctoex.ctrl.b_imm)                    ex_b = dctoex.imm;
    else                                           ex_b = dctoex.value2;
  end

  alu u_alu (.op(dctoex.ctrl.alu_op), .a(ex_a), .b(ex_b), .y(alu_y));

  multiplier u_mul (.funct3(dctoex.ctrl.funct3), .a(dctoex.value1), .b(dctoex.value2), .y(mul_y));

  assign div_start = dctoex.valid && dctoex.ctrl.unit == UNIT_DIV && !div_busy;
  divider u_div (
    .clk, .rst, .start(div_start), .funct3(dctoex.ctrl.funct3),
    .a(dctoex.value1), .b(dctoex.value2), .busy(div_busy), .done(div_done), .result(div_y)
  );

  assign fft_valid = dctoex.valid && dctoex.ctrl.unit == UNIT_FFT && !hold_ex;
  fft_unit u_fft (
    .clk, .rst, .valid(fft_valid), .funct3(dctoex.ctrl.funct3), .imm(dctoex.imm[11:0]),
    .a(dctoex.value1), .b(dctoex.value2), .y(fft_y), .pending(fft_pending)
  );

  always_comb begin
    unique case (dctoex.ctrl.unit)
      UNIT_MUL: ex_result = mul_y;
      UNIT_DIV: ex_result = div_y;
      UNIT_FFT: ex_result = fft_y;
      default:  ex_result = alu_y;
    endcase
    extomem_temp.valid      = dctoex.valid;
    extomem_temp.ctrl       = dctoex.ctrl;
    extomem_temp.rd         = dctoex.rd;
    extomem_temp.result     = ex_result;
    extomem_temp.store_data = dctoex.value2;
  end

  // Memory
  assign mem_wait = dmem_re && !dmem_ready;

  mem_stage u_mem (
    .extomem, .dmem_addr, .dmem_re, .dmem_we, .dmem_be, .dmem_wdata, .dmem_rdata, .result(mem_result)
  );

  always_comb begin
    memtowb_temp.valid    = extomem.valid;
    memtowb_temp.wb_en    = extomem.ctrl.wb_en;
    memtowb_temp.is_ecall = extomem.ctrl.is_ecall;
    memtowb_temp.rd       = extomem.rd;
    memtowb_temp.result   = mem_result;
  end

  // Commit the pipeline registers
  always_ff @(posedge clk) begin
    if (rst) begin
      ftodc        <= '0;
      dctoex       <= '0;
      extomem      <= '0;
      memtowb      <= '0;
      halt_pending <= 1'b0;
      halted       <= 1'b0;
    end else begin
      if (kill_fetch)    ftodc <= '0;
      else if (!hold_fd) ftodc <= ftodc_temp;

      if (kill_decode || bubble_ex) dctoex <= '0;
      else if (!hold_ex)            dctoex <= dctoex_temp;

      if (bubble_mem)     extomem <= '0;
      else if (!hold_mem) extomem <= extomem_temp;

      if (bubble_wb) memtowb <= '0;
      else           memtowb <= memtowb_temp;

      if (ftodc.valid && dc_ctrl.is_ecall && !kill_decode && !hold_ex && !bubble_ex)
        halt_pending <= 1'b1;
      if (memtowb.valid && memtowb.is_ecall)
        halted <= 1'b1;
    end
  end

  // Instrumentation pulses
  always_comb begin
    events.retire      = memtowb.valid;
    events.load_use    = load_use;
    events.mc_stall    = mc_stall;
    events.fwd_ex      = fwd_ex && ftodc.valid && !hold_fd && !kill_decode;
    events.fwd_mem     = fwd_mem && ftodc.valid && !hold_fd && !kill_decode;
    events.redirect_ex = redirect_ex;
    events.redirect_dc = dc_jal && !hold_fd && !redirect_ex;
    events.mul         = dctoex.valid && dctoex.ctrl.unit == UNIT_MUL && !hold_ex;
    events.div         = div_done;
    events.fft         = fft_valid;
    events.imiss       = !imem_ready && !halt_pending && !dc_ctrl.is_ecall;
    events.dmiss       = mem_wait;
  end

  // Pipeline rules
  a_no_double_stall: assert property (@(posedge clk) disable iff (rst) !(load_use && mc_stall));
  a_no_redirect_on_hold: assert property (@(posedge clk) disable iff (rst) !(redirect && hold_fd));
endmodule
