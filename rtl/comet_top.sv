// Comet processor: the RV32IM core with its caches and memories.
//
// The core (comet_core) fetches through an instruction cache and loads and
// stores through a data cache. Both caches are direct mapped with
// LINE_WORDS-word lines, refill a missing line one word per cycle from the
// memory behind them, and the data cache writes through. Behind them sit a
// word-addressed instruction memory and a data memory of IMEM_WORDS /
// DMEM_WORDS 32-bit words.
//
// A host loads a program through the ext_imem_* port and data through the
// ext_dmem_* port while rst is high (reset also empties both caches),
// releases reset so the core starts at RESET_PC, waits for halted (an ECALL
// has retired) and reads results back through ext_dmem_*; since the data
// cache writes through, the data memory then holds every store. events
// gives one-cycle pulses for instrumentation (stalls, forwards, redirects,
// cache-miss cycles). Cache and memory sizes and the host ports are this
// design's choices; the pipeline follows the document.
module comet_top
  import comet_pkg::*;
#(
  parameter int unsigned IMEM_WORDS   = 4096,
  parameter int unsigned DMEM_WORDS   = 4096,
  parameter int unsigned ICACHE_LINES = 64,
  parameter int unsigned DCACHE_LINES = 64,
  parameter int unsigned LINE_WORDS   = 4,
  parameter logic [31:0] RESET_PC     = 32'h0
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        ext_imem_we,
  input  logic [31:0] ext_imem_addr,
  input  logic [31:0] ext_imem_wdata,
  input  logic        ext_dmem_we,
  input  logic [31:0] ext_dmem_addr,
  input  logic [31:0] ext_dmem_wdata,
  output logic [31:0] ext_dmem_rdata,
  output logic        halted,
  output events_t     events
);
  // core <-> caches
  logic [31:0] imem_addr, imem_rdata, dmem_addr, dmem_wdata, dmem_rdata;
  logic        imem_ready, dmem_re, dmem_we, dmem_ready;
  logic [3:0]  dmem_be;
  // caches <-> memories
  logic [31:0] im_addr, im_rdata, dm_addr, dm_rdata, dm_wdata, im_unused_wdata;
  logic        dm_we, im_unused_we;
  logic [3:0]  dm_be, im_unused_be;

  comet_core #(.RESET_PC(RESET_PC)) u_core (
    .clk, .rst, .imem_addr, .imem_rdata, .imem_ready,
    .dmem_addr, .dmem_re, .dmem_we, .dmem_be, .dmem_wdata, .dmem_rdata, .dmem_ready,
    .halted, .events
  );

  cache #(.LINES(ICACHE_LINES), .LINE_WORDS(LINE_WORDS)) u_icache (
    .clk, .rst,
    .rd_req(!halted), .wr_req(1'b0), .addr(imem_addr), .be(4'b0), .wdata(32'b0),
    .rdata(imem_rdata), .ready(imem_ready), .miss(),
    .mem_addr(im_addr), .mem_rdata(im_rdata),
    .mem_we(im_unused_we), .mem_be(im_unused_be), .mem_wdata(im_unused_wdata)
  );

  cache #(.LINES(DCACHE_LINES), .LINE_WORDS(LINE_WORDS)) u_dcache (
    .clk, .rst,
    .rd_req(dmem_re), .wr_req(dmem_we), .addr(dmem_addr), .be(dmem_be), .wdata(dmem_wdata),
    .rdata(dmem_rdata), .ready(dmem_ready), .miss(),
    .mem_addr(dm_addr), .mem_rdata(dm_rdata), .mem_we(dm_we), .mem_be(dm_be), .mem_wdata(dm_wdata)
  );

  instruction_memory #(.WORDS(IMEM_WORDS)) u_imem (
    .clk, .raddr(im_addr), .rdata(im_rdata),
    .we(ext_imem_we), .waddr(ext_imem_addr), .wdata(ext_imem_wdata)
  );

  data_memory #(.WORDS(DMEM_WORDS)) u_dmem (
    .clk,
    .a_addr(dm_addr), .a_we(dm_we), .a_be(dm_be), .a_wdata(dm_wdata), .a_rdata(dm_rdata),
    .b_addr(ext_dmem_addr), .b_we(ext_dmem_we), .b_wdata(ext_dmem_wdata), .b_rdata(ext_dmem_rdata)
  );
endmodule
