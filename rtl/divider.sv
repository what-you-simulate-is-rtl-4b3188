// Multi-cycle RV32M divider: DIV, DIVU, REM, REMU.
//
// A small state machine drives a shift-and-subtract datapath, the pattern
// the design uses for every operator that needs more than one cycle. On
// start (accepted in IDLE) the magnitudes of the operands are loaded: the
// dividend into a register that shifts left one bit per cycle, the divisor
// into a register that feeds a subtractor. In RUN one quotient bit is
// produced per cycle (restoring division), XLEN cycles in all. In DONE the
// signs are applied and done pulses for one cycle with the result; the FSM
// then returns to IDLE. Latency from start to done is XLEN+1 cycles; busy is
// high from the cycle after start until done.
//
// Signed results follow the RISC-V rules: quotient negative when the
// operand signs differ, remainder takes the sign of the dividend, division
// by zero gives all ones (DIV/DIVU) and the dividend (REM/REMU), and
// -2^31 / -1 gives -2^31 with remainder 0. The state names and the
// restoring algorithm are this design's choices; the document describes the
// unit only as a state machine around a subtractor and a shifter.
module divider #(
  parameter int unsigned XLEN = 32
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            start,
  input  logic [2:0]      funct3,   // 4 DIV, 5 DIVU, 6 REM, 7 REMU
  input  logic [XLEN-1:0] a,
  input  logic [XLEN-1:0] b,
  output logic            busy,
  output logic            done,
  output logic [XLEN-1:0] result
);
  typedef enum logic [1:0] {IDLE, RUN, DONE} state_e;

  state_e                    state;
  logic [$clog2(XLEN+1)-1:0] count;
  logic [XLEN-1:0]           dividend;  // shifts left, collects quotient bits
  logic [XLEN-1:0]           divisor;
  logic [XLEN:0]             rem;
  logic                      neg_q, neg_r, want_rem, by_zero;

  logic [XLEN:0] shifted, diff;
  always_comb begin
    shifted = {rem[XLEN-1:0], dividend[XLEN-1]};
    diff    = shifted - {1'b0, divisor};
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= IDLE;
      count    <= '0;
      dividend <= '0;
      divisor  <= '0;
      rem      <= '0;
      neg_q    <= 1'b0;
      neg_r    <= 1'b0;
      want_rem <= 1'b0;
      by_zero  <= 1'b0;
    end else begin
      unique case (state)
        IDLE: if (start) begin
          logic sgn;
          sgn      = ~funct3[0];
          dividend <= (sgn && a[XLEN-1]) ? -a : a;
          divisor  <= (sgn && b[XLEN-1]) ? -b : b;
          rem      <= '0;
          neg_q    <= sgn && (a[XLEN-1] ^ b[XLEN-1]) && (b != '0);
          neg_r    <= sgn && a[XLEN-1];
          want_rem <= funct3[1];
          by_zero  <= (b == '0);
          count    <= '0;
          state    <= RUN;
        end
        RUN: begin
          if (!diff[XLEN]) begin
            rem      <= diff;
            dividend <= {dividend[XLEN-2:0], 1'b1};
          end else begin
            rem      <= shifted;
            dividend <= {dividend[XLEN-2:0], 1'b0};
          end
          count <= count + 1'b1;
          if (count == $bits(count)'(XLEN - 1)) state <= DONE;
        end
        DONE:    state <= IDLE;
        default: state <= IDLE;
      endcase
    end
  end

  always_comb begin
    busy = (state != IDLE);
    done = (state == DONE);
    if (want_rem) result = neg_r ? -rem[XLEN-1:0] : rem[XLEN-1:0];
    else          result = (neg_q && !by_zero) ? -dividend : dividend;
  end
endmodule
