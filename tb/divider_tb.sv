// Self-checking testbench for divider: DIV, DIVU, REM and REMU on corner
// cases (division by zero, -2^31 / -1, signs) and random operands, against
// results computed here with the RISC-V rules. Also checks the latency:
// done must rise exactly XLEN + 1 cycles after start, and busy must be
// high in between.
module divider_tb;
  logic clk = 0, rst = 1, start = 0, busy, done;
  logic [2:0]  funct3;
  logic [31:0] a, b, result;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  divider dut (.clk, .rst, .start, .funct3, .a, .b, .busy, .done, .result);

  function automatic logic [31:0] model(int f, logic [31:0] x, logic [31:0] z);
    longint sx = longint'($signed(x)), sz = longint'($signed(z));
    longint ux = longint'({32'b0, x}), uz = longint'({32'b0, z});
    case (f)
      4: return (z == 0) ? 32'hFFFF_FFFF : 32'(sx / sz);
      5: return (z == 0) ? 32'hFFFF_FFFF : 32'(ux / uz);
      6: return (z == 0) ? x : 32'(sx % sz);
      default: return (z == 0) ? x : 32'(ux % uz);
    endcase
  endfunction

  task automatic check(int f, logic [31:0] x, logic [31:0] z);
    int cycles = 0;
    @(negedge clk);
    funct3 = 3'(f); a = x; b = z; start = 1;
    @(negedge clk);
    start = 0;
    a = $urandom; b = $urandom;  // operands must have been captured
    cycles = 1;
    while (!done) begin
      if (!busy) begin
        failures++;
        $display("FAIL busy low before done");
      end
      @(negedge clk);
      cycles++;
    end
    checks++;
    if (result !== model(f, x, z)) begin
      failures++;
      $display("FAIL f3=%0d a=%h b=%h result=%h exp=%h", f, x, z, result, model(f, x, z));
    end
    checks++;
    if (cycles != 33) begin
      failures++;
      $display("FAIL latency %0d", cycles);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] corner [7] = '{32'h0, 32'h1, 32'hFFFF_FFFF, 32'h8000_0000, 32'h7FFF_FFFF, 32'd7, -32'sd7};
    repeat (2) @(negedge clk);
    rst = 0;
    for (int f = 4; f < 8; f++)
      foreach (corner[i]) foreach (corner[j]) check(f, corner[i], corner[j]);
    repeat (400) check($urandom_range(4, 7), $urandom, ($urandom_range(0, 1) ? $urandom : $urandom_range(1, 300)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
