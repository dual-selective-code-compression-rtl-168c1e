// branch_patch_tb: self-checking test of the branch offset insertion.
// Random Bicc and CALL instructions with zero displacement get random 6- and
// 8-bit offsets; the expected result is computed with signed arithmetic.
// Disabled patching and non-branch opcodes must pass unchanged.
module branch_patch_tb;
  logic [31:0] insn_in, insn_out;
  logic        enable, wide;
  logic [7:0]  offset;
  int checks = 0, failures = 0;

  branch_patch dut (.*);

  initial begin
    for (int n = 0; n < 4000; n++) begin
      int signed   off_val;
      logic [31:0] exp;
      wide   = 1'($urandom);
      offset = 8'($urandom);
      enable = ($urandom % 4) != 0;
      off_val = wide ? int'($signed(offset)) : int'($signed(offset[5:0]));
      case ($urandom % 3)
        0: begin // Bicc, disp22 zero
          insn_in = {2'b00, 5'($urandom), 3'b010, 22'd0};
          exp = insn_in | (32'(off_val) & 32'h003F_FFFF);
        end
        1: begin // CALL, disp30 zero
          insn_in = 32'h4000_0000;
          exp = insn_in | (32'(off_val) & 32'h3FFF_FFFF);
        end
        default: begin // arithmetic or memory instruction
          insn_in = $urandom;
          insn_in[31] = 1'b1;
          exp = insn_in;
        end
      endcase
      if (!enable) exp = insn_in;
      #1;
      checks++;
      if (insn_out !== exp) begin
        failures++;
        $display("FAIL in=%08h off=%02h wide=%0d got %08h exp %08h", insn_in, offset, wide, insn_out, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
