// Direct-mapped, write-through cache with a refill state machine.
//
// Used twice: as instruction cache in front of Fetch and as data cache in
// front of the Memory stage. The cache holds LINES lines of LINE_WORDS
// 32-bit words, with a valid bit and a tag per line. A read (rd_req) that
// hits returns its word in the same cycle with ready high. A read that
// misses raises miss for one cycle, keeps ready low, and the state machine
// moves from IDLE to REFILL, where it copies the whole line from the
// next-level memory one word per cycle (that memory answers
// combinationally); on the last word it marks the line valid and returns
// to IDLE, so the read hits on the following cycle. A miss therefore costs
// LINE_WORDS + 1 cycles. Writes (wr_req, with byte enables) go straight
// through to the next-level memory in the same cycle and also update the
// line if it is present; they never wait and do not allocate. All lines are
// invalidated by reset, so memory loaded by a host during reset is seen.
//
// The document names the instruction and data caches and states that they
// are multi-cycle operators built as a state machine with execution logic;
// their organisation, sizes, write policy and refill timing are this
// design's choices.
module cache #(
  parameter int unsigned LINES      = 64,
  parameter int unsigned LINE_WORDS = 4
) (
  input  logic        clk,
  input  logic        rst,
  // processor side
  input  logic        rd_req,
  input  logic        wr_req,
  input  logic [31:0] addr,
  input  logic [3:0]  be,
  input  logic [31:0] wdata,
  output logic [31:0] rdata,
  output logic        ready,
  output logic        miss,
  // next-level memory side (combinational read, clocked write)
  output logic [31:0] mem_addr,
  input  logic [31:0] mem_rdata,
  output logic        mem_we,
  output logic [3:0]  mem_be,
  output logic [31:0] mem_wdata
);
  localparam int OFFB = $clog2(LINE_WORDS);
  localparam int IDXB = $clog2(LINES);
  localparam int TAGB = 32 - IDXB - OFFB - 2;

  typedef enum logic {IDLE, REFILL} state_e;

  state_e            state;
  logic              valid [LINES];
  logic [TAGB-1:0]   tags  [LINES];
  logic [31:0]       data  [LINES * LINE_WORDS];

  logic [IDXB-1:0]   idx, r_idx;
  logic [OFFB-1:0]   off, r_cnt;
  logic [TAGB-1:0]   tag, r_tag;
  logic              hit;

  always_comb begin
    off   = addr[OFFB+1:2];
    idx   = addr[OFFB+IDXB+1:OFFB+2];
    tag   = addr[31:OFFB+IDXB+2];
    hit   = valid[idx] && tags[idx] == tag;
    rdata = data[{idx, off}];
    ready = (state == IDLE) && hit;
    miss  = (state == IDLE) && rd_req && !hit;

    mem_we    = (state == IDLE) && wr_req;
    mem_be    = be;
    mem_wdata = wdata;
    mem_addr  = (state == REFILL) ? {r_tag, r_idx, r_cnt, 2'b00} : addr;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= IDLE;
      r_idx <= '0;
      r_cnt <= '0;
      r_tag <= '0;
      for (int i = 0; i < LINES; i++) valid[i] <= 1'b0;
    end else begin
      unique case (state)
        IDLE: begin
          if (miss) begin
            r_idx <= idx;
            r_tag <= tag;
            r_cnt <= '0;
            valid[idx] <= 1'b0;
            state <= REFILL;
          end else if (wr_req && hit) begin
            for (int i = 0; i < 4; i++)
              if (be[i]) data[{idx, off}][8*i +: 8] <= wdata[8*i +: 8];
          end
        end
        REFILL: begin
          data[{r_idx, r_cnt}] <= mem_rdata;
          r_cnt <= r_cnt + 1'b1;
          if (r_cnt == OFFB'(LINE_WORDS - 1)) begin
            valid[r_idx] <= 1'b1;
            tags[r_idx]  <= r_tag;
            state        <= IDLE;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end
endmodule
