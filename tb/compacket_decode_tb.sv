// compacket_decode_tb: self-checking test of the ComPacket word decoder.
// Builds ComPackets of every format, ChgDict words and plain SPARC
// instructions from random field values, then compares the decoder's
// classification, slot count, TT, indexes and offset with those fields.
module compacket_decode_tb;
  import compacket_pkg::*;

  logic [31:0] word;
  word_info_t  info;
  int checks = 0, failures = 0;

  compacket_decode dut (.word(word), .info(info));

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s word=%08h", what, word);
    end
  endtask

  // Pack a ComPacket from its fields.
  function automatic logic [31:0] make_cp(logic [1:0] tt, logic s, logic b,
                                          logic [23:0] payload);
    return {2'b00, tt, s, b, payload[23:22], 2'b01, payload[21:0]};
  endfunction

  initial begin
    #1;
    for (int n = 0; n < 2000; n++) begin
      logic [1:0]  tt;
      logic        s, b;
      logic [7:0]  i0, i1, i2, i3, off;
      logic [23:0] p;
      int          exp_n;
      tt = 2'($urandom); s = 1'($urandom); b = 1'($urandom);
      i0 = 8'($urandom); i1 = 8'($urandom); i2 = 8'($urandom);
      i3 = 8'($urandom); off = 8'($urandom);
      if (!s) begin
        i0[7:6] = 0; i1[7:6] = 0; i2[7:6] = 0; i3[7:6] = 0; off[7:6] = 0;
      end
      case ({s, b})
        2'b00: begin p = {i0[5:0], i1[5:0], i2[5:0], i3[5:0]}; exp_n = 4; end
        2'b10: begin p = {i0, i1, i2};                         exp_n = 3; end
        2'b01: begin p = {i0[5:0], i1[5:0], i2[5:0], off[5:0]}; exp_n = 3; end
        default: begin p = {i0, i1, off};                      exp_n = 2; end
      endcase
      word = make_cp(tt, s, b, p);
      #1;
      check(info.kind == WORD_COMPACKET, "kind cp");
      check(int'(info.n_slots) == exp_n, "n_slots");
      check(info.tt == tt, "tt");
      check(info.has_branch == b && info.wide == s, "flags");
      check(info.idx[0] == i0 && info.idx[1] == i1, "idx0/1");
      if (exp_n > 2) check(info.idx[2] == i2, "idx2");
      if (exp_n > 3) check(info.idx[3] == i3, "idx3");
      if (b) check(info.offset == off, "offset");
    end
    // ChgDict words
    for (int n = 0; n < 200; n++) begin
      logic sel;
      sel  = 1'($urandom);
      word = {2'b00, 5'($urandom), 3'b011, 21'($urandom), sel};
      #1;
      check(info.kind == WORD_CHGDICT, "kind chg");
      check(info.chg_sel == sel, "chg sel");
      check(info.n_slots == 3'd1, "chg slots");
    end
    // Plain instructions: formats 1 and 3, and format 2 with SPARC v8 op2.
    for (int n = 0; n < 1000; n++) begin
      logic [2:0] op2;
      if (n % 2 == 0) begin
        word = $urandom;
        if (word[31:30] == 2'b00) word[31:30] = 2'b10;
      end else begin
        case ($urandom % 4)
          0: op2 = 3'b000; 1: op2 = 3'b010; 2: op2 = 3'b100; default: op2 = 3'b110;
        endcase
        word = $urandom;
        word[31:30] = 2'b00; word[24:22] = op2;
      end
      #1;
      check(info.kind == WORD_PLAIN, "kind plain");
      check(info.n_slots == 3'd1, "plain slots");
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
