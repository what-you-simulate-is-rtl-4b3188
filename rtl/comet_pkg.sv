// Shared types of the Comet RV32IM pipeline.
//
// The core is a classic five-stage in-order pipeline: Fetch, Decode,
// Execute, Memory and Write Back. The four pipeline registers between the
// stages are records named after the stages they join (FtoDC, DCtoEx,
// ExtoMem, MemtoWB); each is a packed struct here, so the whole state that
// moves from one stage to the next is visible in one place. The decoded
// control word (ctrl_t) is produced once in Decode and travels with the
// instruction. events_t is a bundle of one-cycle pulses that the core
// raises for instrumentation (stall, forward and redirect counting).
//
// Opcode values and funct3 encodings are those of the RISC-V RV32I and
// RV32M specifications. The custom FFT instructions use the custom-0 major
// opcode; that choice, and the field layout of the FFT operands, belong to
// this design.
package comet_pkg;

  localparam int XLEN = 32;

  // RISC-V major opcodes (instr[6:0])
  localparam logic [6:0] OP_LUI    = 7'b0110111;
  localparam logic [6:0] OP_AUIPC  = 7'b0010111;
  localparam logic [6:0] OP_JAL    = 7'b1101111;
  localparam logic [6:0] OP_JALR   = 7'b1100111;
  localparam logic [6:0] OP_BRANCH = 7'b1100011;
  localparam logic [6:0] OP_LOAD   = 7'b0000011;
  localparam logic [6:0] OP_STORE  = 7'b0100011;
  localparam logic [6:0] OP_IMM    = 7'b0010011;
  localparam logic [6:0] OP_REG    = 7'b0110011;
  localparam logic [6:0] OP_FENCE  = 7'b0001111;
  localparam logic [6:0] OP_SYSTEM = 7'b1110011;
  localparam logic [6:0] OP_CUSTOM0 = 7'b0001011;

  localparam logic [31:0] NOP = 32'h0000_0013;  // addi x0, x0, 0

  typedef enum logic [3:0] {
    ALU_ADD, ALU_SUB, ALU_SLL, ALU_SLT, ALU_SLTU,
    ALU_XOR, ALU_SRL, ALU_SRA, ALU_OR, ALU_AND, ALU_PASSB
  } alu_op_e;

  // Which Execute unit produces the result
  typedef enum logic [1:0] {
    UNIT_ALU, UNIT_MUL, UNIT_DIV, UNIT_FFT
  } unit_e;

  typedef struct packed {
    logic    wb_en;      // writes rd
    logic    use_rs1;    // reads rs1
    logic    use_rs2;    // reads rs2
    logic    a_pc;       // ALU operand A is the PC
    logic    b_imm;      // ALU operand B is the immediate
    alu_op_e alu_op;
    unit_e   unit;
    logic    is_branch;  // conditional branch
    logic    is_jalr;
    logic    is_jal;
    logic    is_load;
    logic    is_store;
    logic    is_ecall;
    logic [2:0] funct3;  // branch condition, load/store size, M/FFT operation
  } ctrl_t;

  localparam ctrl_t CTRL_NOP = '{default: '0, alu_op: ALU_ADD, unit: UNIT_ALU};

  typedef struct packed {
    logic        valid;
    logic [31:0] pc;
    logic [31:0] instr;
  } ftodc_t;

  typedef struct packed {
    logic        valid;
    logic [31:0] pc;
    ctrl_t       ctrl;
    logic [4:0]  rd;
    logic [31:0] imm;
    logic [31:0] value1;  // rs1 value, already forwarded
    logic [31:0] value2;  // rs2 value, already forwarded
  } dctoex_t;

  typedef struct packed {
    logic        valid;
    ctrl_t       ctrl;
    logic [4:0]  rd;
    logic [31:0] result;     // Execute result, or address for loads/stores
    logic [31:0] store_data;
  } extomem_t;

  typedef struct packed {
    logic        valid;
    logic        wb_en;
    logic        is_ecall;
    logic [4:0]  rd;
    logic [31:0] result;
  } memtowb_t;

  // One-cycle event pulses for instrumentation
  typedef struct packed {
    logic retire;       // an instruction left Write Back
    logic load_use;     // load-use stall cycle
    logic mc_stall;     // cycle stalled on the multi-cycle divider
    logic fwd_ex;       // an operand was forwarded from Execute
    logic fwd_mem;      // an operand was forwarded from Memory
    logic redirect_ex;  // taken branch or JALR redirected fetch
    logic redirect_dc;  // JAL redirected fetch from Decode
    logic mul;          // multiply executed
    logic div;          // division finished
    logic fft;          // FFT custom instruction executed
    logic imiss;        // fetch waited for the instruction cache
    logic dmiss;        // load waited for the data cache
  } events_t;

endpackage
