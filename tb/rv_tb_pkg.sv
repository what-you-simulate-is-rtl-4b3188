// Test support for the Comet testbenches: an RV32IM instruction encoder,
// an instruction-set simulator (ISS) that serves as the reference model,
// a random program generator, and two generators for an 8-point FFT (one
// with the butterfly custom instruction, one in plain RV32IM).
//
// The ISS executes one instruction per call, on its own copy of the
// instruction and data memories, with no notion of a pipeline; running it
// and the RTL on the same program and comparing the data memory they leave
// checks the pipeline (forwarding, stalls, redirects) against plain
// sequential semantics. The FFT custom instruction is modelled here from
// its definition, with twiddle factors computed with $cos and $sin.
package rv_tb_pkg;

  // ---------------- encoder ----------------
  function automatic logic [31:0] r_type(logic [6:0] f7, logic [4:0] rs2, logic [4:0] rs1,
                                         logic [2:0] f3, logic [4:0] rd, logic [6:0] op);
    return {f7, rs2, rs1, f3, rd, op};
  endfunction
  function automatic logic [31:0] i_type(int imm, logic [4:0] rs1, logic [2:0] f3,
                                         logic [4:0] rd, logic [6:0] op);
    logic [11:0] i = 12'(imm);
    return {i, rs1, f3, rd, op};
  endfunction
  function automatic logic [31:0] s_type(int imm, logic [4:0] rs2, logic [4:0] rs1, logic [2:0] f3);
    logic [11:0] i = 12'(imm);
    return {i[11:5], rs2, rs1, f3, i[4:0], 7'b0100011};
  endfunction
  function automatic logic [31:0] b_type(int imm, logic [4:0] rs2, logic [4:0] rs1, logic [2:0] f3);
    logic [12:0] i = 13'(imm);
    return {i[12], i[10:5], rs2, rs1, f3, i[4:1], i[11], 7'b1100011};
  endfunction
  function automatic logic [31:0] u_type(int imm20, logic [4:0] rd, logic [6:0] op);
    logic [19:0] i = 20'(imm20);
    return {i, rd, op};
  endfunction
  function automatic logic [31:0] j_type(int imm, logic [4:0] rd);
    logic [20:0] i = 21'(imm);
    return {i[20], i[10:1], i[11], i[19:12], rd, 7'b1101111};
  endfunction

  function automatic logic [31:0] ADDI(int rd, int rs1, int imm); return i_type(imm, 5'(rs1), 3'd0, 5'(rd), 7'b0010011); endfunction
  function automatic logic [31:0] ADD (int rd, int rs1, int rs2); return r_type(7'd0, 5'(rs2), 5'(rs1), 3'd0, 5'(rd), 7'b0110011); endfunction
  function automatic logic [31:0] SUB (int rd, int rs1, int rs2); return r_type(7'h20, 5'(rs2), 5'(rs1), 3'd0, 5'(rd), 7'b0110011); endfunction
  function automatic logic [31:0] MULDIV(int f3, int rd, int rs1, int rs2); return r_type(7'd1, 5'(rs2), 5'(rs1), 3'(f3), 5'(rd), 7'b0110011); endfunction
  function automatic logic [31:0] LUI (int rd, int imm20); return u_type(imm20, 5'(rd), 7'b0110111); endfunction
  function automatic logic [31:0] AUIPC(int rd, int imm20); return u_type(imm20, 5'(rd), 7'b0010111); endfunction
  function automatic logic [31:0] LW  (int rd, int rs1, int imm); return i_type(imm, 5'(rs1), 3'd2, 5'(rd), 7'b0000011); endfunction
  function automatic logic [31:0] LOAD(int f3, int rd, int rs1, int imm); return i_type(imm, 5'(rs1), 3'(f3), 5'(rd), 7'b0000011); endfunction
  function automatic logic [31:0] SW  (int rs2, int rs1, int imm); return s_type(imm, 5'(rs2), 5'(rs1), 3'd2); endfunction
  function automatic logic [31:0] STORE(int f3, int rs2, int rs1, int imm); return s_type(imm, 5'(rs2), 5'(rs1), 3'(f3)); endfunction
  function automatic logic [31:0] BR  (int f3, int rs1, int rs2, int imm); return b_type(imm, 5'(rs2), 5'(rs1), 3'(f3)); endfunction
  function automatic logic [31:0] JAL (int rd, int imm); return j_type(imm, 5'(rd)); endfunction
  function automatic logic [31:0] JALR(int rd, int rs1, int imm); return i_type(imm, 5'(rs1), 3'd0, 5'(rd), 7'b1100111); endfunction
  function automatic logic [31:0] BFLY(int rd, int rs1, int rs2, int k); return r_type(7'(k), 5'(rs2), 5'(rs1), 3'd0, 5'(rd), 7'b0001011); endfunction
  function automatic logic [31:0] BFLY2(int rd); return r_type(7'd0, 5'd0, 5'd0, 3'd1, 5'(rd), 7'b0001011); endfunction
  function automatic logic [31:0] ECALL(); return 32'h0000_0073; endfunction
  function automatic logic [31:0] SLLI(int rd, int rs1, int sh); return i_type(sh & 31, 5'(rs1), 3'd1, 5'(rd), 7'b0010011); endfunction
  function automatic logic [31:0] SRLI(int rd, int rs1, int sh); return i_type(sh & 31, 5'(rs1), 3'd5, 5'(rd), 7'b0010011); endfunction
  function automatic logic [31:0] SRAI(int rd, int rs1, int sh); return i_type(32'h400 | (sh & 31), 5'(rs1), 3'd5, 5'(rd), 7'b0010011); endfunction
  function automatic logic [31:0] OR  (int rd, int rs1, int rs2); return r_type(7'd0, 5'(rs2), 5'(rs1), 3'd6, 5'(rd), 7'b0110011); endfunction

  // ---------------- FFT reference ----------------
  function automatic logic [31:0] fft_ref(logic [31:0] a, logic [31:0] b, int k, bit second);
    real ang;
    int  c, s, br, bi, ar, ai, tr, ti;
    ang = 2.0 * 3.14159265358979 * k / 16.0;
    c  = $rtoi($floor(32767.0 * $cos(ang) + 0.5));
    s  = $rtoi($floor(32767.0 * $sin(ang) + 0.5));
    ar = int'($signed(a[31:16])); ai = int'($signed(a[15:0]));
    br = int'($signed(b[31:16])); bi = int'($signed(b[15:0]));
    tr = (br * c + bi * s) >>> 15;
    ti = (bi * c - br * s) >>> 15;
    if (!second) return {16'(ar + tr), 16'(ai + ti)};
    else         return {16'(ar - tr), 16'(ai - ti)};
  endfunction

  // ---------------- instruction-set simulator ----------------
  class rv_iss;
    logic [31:0] x[32];
    logic [31:0] imem[];
    logic [31:0] dmem[];
    logic [31:0] pc;
    logic [31:0] fft_second;
    bit          halted;
    longint      retired;

    function new(int iwords, int dwords);
      imem = new[iwords];
      dmem = new[dwords];
      foreach (imem[i]) imem[i] = 32'h13;
      foreach (dmem[i]) dmem[i] = '0;
      foreach (x[i]) x[i] = '0;
      pc = 0; halted = 0; retired = 0; fft_second = 0;
    endfunction

    function automatic logic [31:0] rd32(logic [31:0] addr);
      return dmem[(addr >> 2) % dmem.size()];
    endfunction

    function void step();
      logic [31:0] ins, a, b, r, imm_i, imm_s, imm_b, imm_j, addr, w, npc;
      logic [6:0]  op; logic [2:0] f3; logic [6:0] f7; int rd; bit wr;
      longint sa, sb, ua, ub;
      logic [63:0] p;
      if (halted) return;
      ins = imem[(pc >> 2) % imem.size()];
      op = ins[6:0]; f3 = ins[14:12]; f7 = ins[31:25]; rd = ins[11:7];
      a = x[ins[19:15]]; b = x[ins[24:20]];
      imm_i = {{20{ins[31]}}, ins[31:20]};
      imm_s = {{20{ins[31]}}, ins[31:25], ins[11:7]};
      imm_b = {{19{ins[31]}}, ins[31], ins[7], ins[30:25], ins[11:8], 1'b0};
      imm_j = {{11{ins[31]}}, ins[31], ins[19:12], ins[20], ins[30:21], 1'b0};
      npc = pc + 4; wr = 0; r = 0;
      case (op)
        7'b0110111: begin r = {ins[31:12], 12'b0}; wr = 1; end
        7'b0010111: begin r = pc + {ins[31:12], 12'b0}; wr = 1; end
        7'b1101111: begin r = pc + 4; wr = 1; npc = pc + imm_j; end
        7'b1100111: begin r = pc + 4; wr = 1; npc = (a + imm_i) & ~32'd1; end
        7'b1100011: begin
          bit t;
          case (f3)
            3'd0: t = a == b;  3'd1: t = a != b;
            3'd4: t = $signed(a) < $signed(b);  3'd5: t = $signed(a) >= $signed(b);
            3'd6: t = a < b;   3'd7: t = a >= b;
            default: t = 0;
          endcase
          if (t) npc = pc + imm_b;
        end
        7'b0000011: begin
          addr = a + imm_i; w = rd32(addr) >> (8 * addr[1:0]); wr = 1;
          case (f3)
            3'd0: r = {{24{w[7]}}, w[7:0]};   3'd1: r = {{16{w[15]}}, w[15:0]};
            3'd4: r = {24'b0, w[7:0]};        3'd5: r = {16'b0, w[15:0]};
            default: r = w;
          endcase
        end
        7'b0100011: begin
          int idx;
          addr = a + imm_s; idx = (addr >> 2) % dmem.size();
          case (f3)
            3'd0: dmem[idx][8*addr[1:0] +: 8] = b[7:0];
            3'd1: dmem[idx][16*addr[1] +: 16] = b[15:0];
            default: dmem[idx] = b;
          endcase
        end
        7'b0010011, 7'b0110011: begin
          logic [31:0] bb; bb = (op == 7'b0010011) ? imm_i : b; wr = 1;
          if (op == 7'b0110011 && f7 == 7'd1) begin
            sa = $signed(a); sb = $signed(b); ua = {32'b0, a}; ub = {32'b0, b};
            case (f3)
              3'd0: begin p = sa * sb; r = p[31:0]; end
              3'd1: begin p = sa * sb; r = p[63:32]; end
              3'd2: begin p = sa * ub; r = p[63:32]; end
              3'd3: begin p = ua * ub; r = p[63:32]; end
              3'd4: r = (b == 0) ? 32'hFFFF_FFFF : (a == 32'h8000_0000 && b == 32'hFFFF_FFFF) ? a : 32'(sa / sb);
              3'd5: r = (b == 0) ? 32'hFFFF_FFFF : 32'(ua / ub);
              3'd6: r = (b == 0) ? a : (a == 32'h8000_0000 && b == 32'hFFFF_FFFF) ? 0 : 32'(sa % sb);
              default: r = (b == 0) ? a : 32'(ua % ub);
            endcase
          end else begin
            case (f3)
              3'd0: r = (op == 7'b0110011 && f7[5]) ? a - bb : a + bb;
              3'd1: r = a << bb[4:0];
              3'd2: r = {31'b0, $signed(a) < $signed(bb)};
              3'd3: r = {31'b0, a < bb};
              3'd4: r = a ^ bb;
              3'd5: r = f7[5] ? $unsigned($signed(a) >>> bb[4:0]) : a >> bb[4:0];
              3'd6: r = a | bb;
              default: r = a & bb;
            endcase
          end
        end
        7'b0001011: begin
          wr = 1;
          if (f3 == 3'd0) begin
            r = fft_ref(a, b, int'(f7[2:0]), 0);
            fft_second = fft_ref(a, b, int'(f7[2:0]), 1);
          end else r = fft_second;
        end
        7'b1110011: if (f3 == 0) halted = 1;
        default: ;
      endcase
      if (wr && rd != 0) x[rd] = r;
      pc = npc;
      retired++;
    endfunction

    function void run(int max_steps);
      for (int i = 0; i < max_steps && !halted; i++) step();
    endfunction
  endclass

  // ---------------- random program generator ----------------
  // Registers x1..x8 take most results so that dependencies are dense;
  // x31 holds the data base address and x30 is scratch for JALR targets.
  // Branches and jumps only go forward, so every program ends at the ECALL
  // after the final register dump. Returns the number of words written.
  function automatic int gen_program(ref logic [31:0] prog[], input int n_body, input int dbase);
    int pos = 0, last_cf = -10;
    prog[pos++] = LUI(31, dbase >> 12);
    prog[pos++] = ADDI(31, 31, dbase & 12'hFFF);
    for (int i = 0; i < n_body; i++) begin
      int rd  = 1 + $urandom_range(0, 7);
      int rs1 = 1 + $urandom_range(0, 7);
      int rs2 = 1 + $urandom_range(0, 7);
      int kind = $urandom_range(0, 99);
      if (kind < 20)      prog[pos++] = ADDI(rd, rs1, int'($urandom_range(0, 4095)) - 2048);
      else if (kind < 32) begin
        int f3 = $urandom_range(0, 7);
        bit alt = (f3 == 0 || f3 == 5) && ($urandom_range(0, 1) == 1);
        prog[pos++] = r_type(alt ? 7'h20 : 7'h00, 5'(rs2), 5'(rs1), 3'(f3), 5'(rd), 7'b0110011);
      end else if (kind < 38) begin
        bit sra = ($urandom_range(0, 1) == 1);
        prog[pos++] = i_type((int'(sra) << 10) | int'($urandom_range(0, 31)), 5'(rs1),
                             sra ? 3'd5 : 3'($urandom_range(0, 1) ? 1 : 5), 5'(rd), 7'b0010011);
      end
      else if (kind < 42) prog[pos++] = LUI(rd, $urandom);
      else if (kind < 44) prog[pos++] = AUIPC(rd, $urandom_range(0, 15));
      else if (kind < 52) prog[pos++] = MULDIV($urandom_range(0, 3), rd, rs1, rs2);
      else if (kind < 56) prog[pos++] = MULDIV($urandom_range(4, 7), rd, rs1, rs2);
      else if (kind < 66) begin
        int f3s[5] = '{0, 1, 2, 4, 5};
        int f3 = f3s[$urandom_range(0, 4)];
        int off = (f3 == 2) ? 4 * $urandom_range(0, 63) : (f3 == 1 || f3 == 5) ? 2 * $urandom_range(0, 127) : $urandom_range(0, 255);
        prog[pos++] = LOAD(f3, rd, 31, off);
      end else if (kind < 74) begin
        int f3 = $urandom_range(0, 2);
        int off = (f3 == 2) ? 4 * $urandom_range(0, 63) : (f3 == 1) ? 2 * $urandom_range(0, 127) : $urandom_range(0, 255);
        prog[pos++] = STORE(f3, rs2, 31, off);
      end else if (kind < 84) begin
        int f3s[6] = '{0, 1, 4, 5, 6, 7};
        last_cf = pos;
        prog[pos++] = BR(f3s[$urandom_range(0, 5)], rs1, rs2, 4 * $urandom_range(1, 3));
      end else if (kind < 88) begin
        last_cf = pos;
        prog[pos++] = JAL($urandom_range(0, 1) ? rd : 0, 4 * $urandom_range(1, 3));
      end else if (kind < 91) begin
        // every jump lands at most three words ahead: keep them from
        // landing on the JALR, whose base must come from this AUIPC
        while (pos - last_cf < 3) prog[pos++] = ADDI(rd, rs1, 1);
        prog[pos++] = AUIPC(30, 0);
        last_cf = pos;
        prog[pos++] = JALR(rd, 30, 4 * $urandom_range(2, 4));
      end else if (kind < 97) begin
        prog[pos++] = BFLY(rd, rs1, rs2, $urandom_range(0, 7));
        if ($urandom_range(0, 3) != 0) prog[pos++] = BFLY2(1 + $urandom_range(0, 7));
      end else prog[pos++] = 32'h0000_000F;  // FENCE: no-op
    end
    // pad so forward branches near the end land on no-ops
    for (int i = 0; i < 4; i++) prog[pos++] = ADDI(0, 0, 0);
    for (int r = 1; r < 32; r++) prog[pos++] = SW(r, 31, 1024 + 4 * r);
    prog[pos++] = ECALL();
    return pos;
  endfunction

  // ---------------- 8-point FFT program ----------------
  // Radix-2 decimation in time, as in the classic 8-point flow graph: the
  // eight complex inputs at dbase are loaded in bit-reversed order into
  // x1..x8, three stages of butterflies run in place (stage with span m
  // uses twiddles W_m^k = W_16^(16k/m)), and X(0..7) are stored at
  // dbase + 64. Each butterfly is one BFLY (top = a + W b, keeps a - W b)
  // and one BFLY2 (bottom = a - W b).
  function automatic int gen_fft_program(ref logic [31:0] prog[], input int dbase);
    int pos = 0;
    int rev[8] = '{0, 4, 2, 6, 1, 5, 3, 7};
    prog[pos++] = LUI(31, dbase >> 12);
    prog[pos++] = ADDI(31, 31, dbase & 12'hFFF);
    for (int i = 0; i < 8; i++) prog[pos++] = LW(1 + i, 31, 4 * rev[i]);
    for (int m = 2; m <= 8; m *= 2)
      for (int j = 0; j < 8; j += m)
        for (int k = 0; k < m / 2; k++) begin
          prog[pos++] = BFLY(1 + j + k, 1 + j + k, 1 + j + k + m / 2, k * 16 / m);
          prog[pos++] = BFLY2(1 + j + k + m / 2);
        end
    for (int i = 0; i < 8; i++) prog[pos++] = SW(1 + i, 31, 64 + 4 * i);
    prog[pos++] = ECALL();
    return pos;
  endfunction

  // The same 8-point FFT without the custom instruction: every butterfly
  // is written out with RV32IM shifts, multiplies and adds, with the same
  // Q1.15 arithmetic as the butterfly unit (products shifted right by 15,
  // sums kept to 16 bits), so both programs leave identical results. The
  // cycle counts of the two show what the custom instruction saves.
  function automatic int gen_fft_sw_program(ref logic [31:0] prog[], input int dbase);
    int pos = 0;
    int rev[8] = '{0, 4, 2, 6, 1, 5, 3, 7};
    prog[pos++] = LUI(31, dbase >> 12);
    prog[pos++] = ADDI(31, 31, dbase & 12'hFFF);
    for (int i = 0; i < 8; i++) prog[pos++] = LW(1 + i, 31, 4 * rev[i]);
    for (int m = 2; m <= 8; m *= 2)
      for (int j = 0; j < 8; j += m)
        for (int k = 0; k < m / 2; k++) begin
          int ra = 1 + j + k, rb = 1 + j + k + m / 2, tk = k * 16 / m, c, s;
          real ang = 2.0 * 3.14159265358979 * tk / 16.0;
          c = $rtoi($floor(32767.0 * $cos(ang) + 0.5));
          s = $rtoi($floor(32767.0 * $sin(ang) + 0.5));
          prog[pos++] = LUI(20, (c + 32'h800) >>> 12);
          prog[pos++] = ADDI(20, 20, c - (((c + 32'h800) >>> 12) << 12));
          prog[pos++] = LUI(21, (s + 32'h800) >>> 12);
          prog[pos++] = ADDI(21, 21, s - (((s + 32'h800) >>> 12) << 12));
          prog[pos++] = SRAI(9, rb, 16);                                   // br
          prog[pos++] = SLLI(10, rb, 16); prog[pos++] = SRAI(10, 10, 16);  // bi
          prog[pos++] = MULDIV(0, 11, 9, 20);  prog[pos++] = MULDIV(0, 12, 10, 21);
          prog[pos++] = ADD(11, 11, 12);       prog[pos++] = SRAI(11, 11, 15);  // tr
          prog[pos++] = MULDIV(0, 12, 10, 20); prog[pos++] = MULDIV(0, 13, 9, 21);
          prog[pos++] = SUB(12, 12, 13);       prog[pos++] = SRAI(12, 12, 15);  // ti
          prog[pos++] = SRAI(13, ra, 16);                                  // ar
          prog[pos++] = SLLI(14, ra, 16); prog[pos++] = SRAI(14, 14, 16);  // ai
          prog[pos++] = ADD(15, 13, 11); prog[pos++] = SUB(16, 13, 11);
          prog[pos++] = ADD(17, 14, 12); prog[pos++] = SUB(18, 14, 12);
          prog[pos++] = SLLI(15, 15, 16); prog[pos++] = SLLI(17, 17, 16);
          prog[pos++] = SRLI(17, 17, 16); prog[pos++] = OR(ra, 15, 17);
          prog[pos++] = SLLI(16, 16, 16); prog[pos++] = SLLI(18, 18, 16);
          prog[pos++] = SRLI(18, 18, 16); prog[pos++] = OR(rb, 16, 18);
        end
    for (int i = 0; i < 8; i++) prog[pos++] = SW(1 + i, 31, 64 + 4 * i);
    prog[pos++] = ECALL();
    return pos;
  endfunction

endpackage
