// Self-checking testbench for multiplier: MUL, MULH, MULHSU and MULHU on
// corner values and random operands, against 64-bit products formed here.
module multiplier_tb;
  logic [2:0]  funct3;
  logic [31:0] a, b, y;
  int checks = 0, failures = 0;

  multiplier dut (.funct3, .a, .b, .y);

  function automatic logic [31:0] model(int f, logic [31:0] x, logic [31:0] z);
    longint sx = longint'($signed(x)), sz = longint'($signed(z));
    longint ux = longint'({32'b0, x}), uz = longint'({32'b0, z});
    logic [63:0] p;
    case (f)
      0: p = ux * uz;
      1: p = sx * sz;
      2: p = sx * uz;
      default: p = ux * uz;
    endcase
    return (f == 0) ? p[31:0] : p[63:32];
  endfunction

  task automatic check(int f, logic [31:0] x, logic [31:0] z);
    funct3 = 3'(f); a = x; b = z;
    #1;
    checks++;
    if (y !== model(f, x, z)) begin
      failures++;
      $display("FAIL f3=%0d a=%h b=%h y=%h exp=%h", f, x, z, y, model(f, x, z));
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] corner [5] = '{32'h0, 32'h1, 32'hFFFF_FFFF, 32'h8000_0000, 32'h7FFF_FFFF};
    for (int f = 0; f < 4; f++)
      foreach (corner[i]) foreach (corner[j]) check(f, corner[i], corner[j]);
    repeat (2000) check($urandom_range(0, 3), $urandom, $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
