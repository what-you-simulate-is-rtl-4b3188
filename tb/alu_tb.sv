// Self-checking testbench for alu: directed corner cases and random
// operands for every operation, compared with expected values computed
// here from the RV32I definitions.
module alu_tb;
  import comet_pkg::*;
  alu_op_e     op;
  logic [31:0] a, b, y;
  int checks = 0, failures = 0;

  alu dut (.op, .a, .b, .y);

  function automatic logic [31:0] model(alu_op_e o, logic [31:0] x, logic [31:0] z);
    longint sx = longint'($signed(x)), sz = longint'($signed(z));
    case (o)
      ALU_ADD:   return 32'(longint'(x) + longint'(z));
      ALU_SUB:   return 32'(longint'(x) - longint'(z));
      ALU_SLL:   return 32'({32'b0, x} << z[4:0]);
      ALU_SLT:   return (sx < sz) ? 32'd1 : 32'd0;
      ALU_SLTU:  return (longint'(x) < longint'(z)) ? 32'd1 : 32'd0;
      ALU_XOR:   return x ^ z;
      ALU_SRL:   return 32'({32'b0, x} >> z[4:0]);
      ALU_SRA:   return 32'(sx >>> z[4:0]);
      ALU_OR:    return x | z;
      ALU_AND:   return x & z;
      ALU_PASSB: return z;
      default:   return 32'b0;
    endcase
  endfunction

  task automatic check(alu_op_e o, logic [31:0] x, logic [31:0] z);
    op = o; a = x; b = z;
    #1;
    checks++;
    if (y !== model(o, x, z)) begin
      failures++;
      $display("FAIL op=%s a=%h b=%h y=%h exp=%h", o.name(), x, z, y, model(o, x, z));
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
    logic [31:0] corner [6] = '{32'h0, 32'h1, 32'hFFFF_FFFF, 32'h8000_0000, 32'h7FFF_FFFF, 32'h1F};
    for (int o = 0; o <= int'(ALU_PASSB); o++)
      foreach (corner[i]) foreach (corner[j]) check(alu_op_e'(o), corner[i], corner[j]);
    repeat (2000) check(alu_op_e'($urandom_range(0, int'(ALU_PASSB))), $urandom, $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
