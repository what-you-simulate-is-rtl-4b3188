// Self-checking testbench for mem_stage: random loads and stores of every
// size and offset against a one-word memory model kept here; checks the
// word address, byte enables, placed store data, and the extended load
// result, and that other instructions pass their Execute result through.
module mem_stage_tb;
  import comet_pkg::*;
  extomem_t    extomem;
  logic [31:0] dmem_addr, dmem_wdata, dmem_rdata, result;
  logic        dmem_we, dmem_re;
  logic [3:0]  dmem_be;
  int checks = 0, failures = 0;

  mem_stage dut (.extomem, .dmem_addr, .dmem_re, .dmem_we, .dmem_be, .dmem_wdata, .dmem_rdata, .result);

  task automatic expect_eq(logic [31:0] got, logic [31:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got %h exp %h", what, got, exp);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int kind, f3, off;
    logic [31:0] word, addr, data, exp_word, got_word;
    int ld_f3s[5] = '{0, 1, 2, 4, 5};
    repeat (4000) begin
      kind = $urandom_range(0, 2);  // 0 load, 1 store, 2 other
      extomem = '0;
      extomem.valid = 1'b1;
      extomem.ctrl = CTRL_NOP;
      f3 = (kind == 0) ? ld_f3s[$urandom_range(0, 4)] : $urandom_range(0, 2);
      off = (f3[1:0] == 2) ? 0 : (f3[1:0] == 1) ? 2 * $urandom_range(0, 1) : $urandom_range(0, 3);
      addr = {$urandom_range(0, 65535), 2'(off)};
      data = $urandom; word = $urandom;
      extomem.ctrl.funct3 = 3'(f3);
      extomem.ctrl.is_load = (kind == 0);
      extomem.ctrl.is_store = (kind == 1);
      extomem.result = addr;
      extomem.store_data = data;
      dmem_rdata = word;
      #1;
      expect_eq(dmem_addr, {addr[31:2], 2'b00}, "word address");
      expect_eq(32'(dmem_we), 32'(kind == 1), "write enable");
      expect_eq(32'(dmem_re), 32'(kind == 0), "read request");
      if (kind == 1) begin
        exp_word = word;
        case (f3)
          0: exp_word[8*off +: 8] = data[7:0];
          1: exp_word[8*off +: 16] = data[15:0];
          default: exp_word = data;
        endcase
        got_word = word;
        for (int i = 0; i < 4; i++) if (dmem_be[i]) got_word[8*i +: 8] = dmem_wdata[8*i +: 8];
        expect_eq(got_word, exp_word, "stored word");
      end else if (kind == 0) begin
        case (f3)
          0: exp_word = 32'($signed(word[8*off +: 8]));
          1: exp_word = 32'($signed(word[8*off +: 16]));
          4: exp_word = {24'b0, word[8*off +: 8]};
          5: exp_word = {16'b0, word[8*off +: 16]};
          default: exp_word = word;
        endcase
        expect_eq(result, exp_word, "load result");
      end else begin
        expect_eq(result, addr, "pass-through");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
