// dsc_decompressor_tb: end-to-end, self-checking test of the dual-dictionary
// decompressor at its default sizes (64-entry inner-loop dictionary,
// 256-entry outer dictionary).
//
// The testbench acts as compressor, code memory and processor:
//   * It builds both dictionaries from different random instructions; entries
//     60..63 of both and 252..255 of the outer one are branches (Bicc or
//     CALL) with zero displacement.
//   * It generates a compressed code image of N_WORDS words: plain
//     instructions, ComPackets of all four formats with random TT slots and
//     branch offsets, and ChgDict words that switch between inner-loop
//     regions (indexes below 64) and outer regions. For every word it keeps
//     the fields it packed, and the expected instruction stream is computed
//     from those fields, not by decoding the words.
//   * The dictionaries sit in the memory image at DICT_BASE (top of the
//     1 MB code space) and are copied in by the decompressor's boot loader
//     after reset; the testbench checks how long that takes.
//   * A memory model answers fetches after 1 to 4 cycles with random
//     request stalls; a processor model stalls at random and takes random
//     branches to words whose region uses the currently selected dictionary.
// Phase 1 runs straight-line code with one-cycle fetches and no stalls and
// checks that one instruction is delivered every clock, i.e. that
// decompression adds no cycle. Phase 2 is the random run. Each mechanism
// (boot load, all four formats, ChgDict to either dictionary, entry at TT > 0, Bicc
// and CALL offset insertion, processor stall, fetch wait, a fetch dropped by
// a redirect) is counted and must occur.
module dsc_decompressor_tb;
  import compacket_pkg::*;

  localparam int N_WORDS  = 3000;
  localparam int PHASE1_N = 400;
  localparam int PHASE2_CYCLES = 60000;
  localparam int AW = 18;
  localparam int DICT_BASE = (1 << AW) - 320;

  logic clk = 0, rst_n = 0;
  logic dict_boot = 1, boot_busy;
  logic dict_we = 0, dict_sel = 0;
  logic [7:0]  dict_addr = 0;
  logic [31:0] dict_wdata = 0;
  logic fetch_req_valid, fetch_req_ready = 0;
  logic [AW-1:0] fetch_req_addr;
  logic fetch_rsp_valid = 0;
  logic [31:0] fetch_rsp_data = 0;
  logic redirect_valid = 0;
  logic [AW-1:0] redirect_addr = 0;
  logic inst_valid, inst_ready = 0, inst_bubble, sel_dict;
  logic [31:0] inst_data;
  logic [AW-1:0] inst_addr;
  logic [1:0] inst_slot;

  dsc_decompressor dut (.*);

  always #5 clk = ~clk;

  // ------------------------------------------------------------- image --
  logic [31:0] inner [64];
  logic [31:0] outer [256];
  logic [31:0] image [N_WORDS];
  int          kind  [N_WORDS];   // 0 plain, 1 ComPacket, 2 ChgDict
  int          nsl   [N_WORDS];
  int          fmt   [N_WORDS];   // 0:F4 1:F3 2:F3B 3:F2B
  logic [7:0]  idx   [N_WORDS][4];
  logic [7:0]  off   [N_WORDS];
  logic        wide  [N_WORDS];
  logic        hasb  [N_WORDS];
  logic [1:0]  tt    [N_WORDS];
  logic        csel  [N_WORDS];
  logic        rsel  [N_WORDS];   // dictionary in force when the word runs

  int checks = 0, failures = 0, cycles = 0;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s (cycle %0d)", what, cycles);
    end
  endtask

  function automatic logic [7:0] pick_plain_idx(logic sel, logic six);
    logic [7:0] v;
    if (!sel || six) v = 8'($urandom % 60);
    else begin
      v = 8'($urandom % 248);
      if (v >= 60) v = v + 4;            // skip 60..63
    end
    return v;
  endfunction

  function automatic logic [7:0] pick_branch_idx(logic sel, logic six);
    if (!sel || six) return 8'(60 + $urandom % 4);
    return ($urandom % 2 == 0) ? 8'(60 + $urandom % 4) : 8'(252 + $urandom % 4);
  endfunction

  function automatic logic [31:0] make_branch(int k);
    case (k % 3)
      0: return {2'b00, 1'b0, 4'($urandom), 3'b010, 22'd0};  // Bicc
      1: return {2'b00, 1'b1, 4'($urandom), 3'b110, 22'd0};  // FBfcc
      default: return 32'h4000_0000;                         // CALL
    endcase
  endfunction

  task automatic build_image();
    logic gsel;
    for (int i = 0; i < 64; i++)  inner[i] = {2'b10, 30'($urandom)};
    for (int i = 0; i < 256; i++) outer[i] = {2'b11, 30'($urandom)};
    for (int i = 60; i < 64; i++) begin
      inner[i] = make_branch(i);
      outer[i] = make_branch(i + 1);
    end
    for (int i = 252; i < 256; i++) outer[i] = make_branch(i);
    gsel = 1'b1;
    for (int w = 0; w < N_WORDS; w++) begin
      int r;
      rsel[w] = gsel;
      r = $urandom % 100;
      idx[w][0] = 0; idx[w][1] = 0; idx[w][2] = 0; idx[w][3] = 0;
      off[w] = 0; wide[w] = 0; hasb[w] = 0; tt[w] = 0; csel[w] = 0; fmt[w] = 0;
      if (w > 0 && r < 6) begin
        kind[w] = 2; nsl[w] = 1; csel[w] = ~gsel;
        image[w] = {2'b00, 5'($urandom), 3'b011, 21'($urandom), csel[w]};
        gsel = csel[w];
      end else if (r < 30) begin
        kind[w] = 0; nsl[w] = 1;
        image[w] = {2'b10, 30'($urandom)};
        if ($urandom % 2 == 0) image[w][31:30] = 2'b11;
      end else begin
        logic [23:0] p;
        kind[w] = 1;
        fmt[w]  = $urandom % 4;
        wide[w] = (fmt[w] == 1 || fmt[w] == 3);
        hasb[w] = (fmt[w] >= 2);
        nsl[w]  = (fmt[w] == 0) ? 4 : (fmt[w] == 3) ? 2 : 3;
        for (int s = 0; s < nsl[w]; s++)
          idx[w][s] = (hasb[w] && s == nsl[w] - 1) ? pick_branch_idx(gsel, !wide[w])
                                                   : pick_plain_idx(gsel, !wide[w]);
        off[w] = wide[w] ? 8'($urandom) : 8'($urandom % 64);
        tt[w]  = 2'($urandom % nsl[w]);
        case (fmt[w])
          0: p = {idx[w][0][5:0], idx[w][1][5:0], idx[w][2][5:0], idx[w][3][5:0]};
          1: p = {idx[w][0], idx[w][1], idx[w][2]};
          2: p = {idx[w][0][5:0], idx[w][1][5:0], idx[w][2][5:0], off[w][5:0]};
          default: p = {idx[w][0], idx[w][1], off[w]};
        endcase
        image[w] = {2'b00, tt[w], wide[w], hasb[w], p[23:22], 2'b01, p[21:0]};
      end
    end
  endtask

  function automatic logic [31:0] mem_word(int a);
    if (a < N_WORDS) return image[a];
    if (a >= DICT_BASE && a < DICT_BASE + 64) return inner[a - DICT_BASE];
    if (a >= DICT_BASE + 64) return outer[a - DICT_BASE - 64];
    return 32'h8000_0000 | 32'(a);
  endfunction

  // ---------------------------------------------------- reference model --
  int   exp_pos = 0, exp_slot = 0;
  logic exp_sel = 1'b1;

  function automatic logic [31:0] expected_insn();
    logic [31:0] d;
    int signed   o;
    if (kind[exp_pos] == 0) return image[exp_pos];
    if (kind[exp_pos] == 2) return 32'h0100_0000;
    d = exp_sel ? outer[idx[exp_pos][exp_slot]] : inner[idx[exp_pos][exp_slot]];
    if (hasb[exp_pos] && exp_slot == nsl[exp_pos] - 1) begin
      o = wide[exp_pos] ? int'($signed(off[exp_pos])) : int'($signed(off[exp_pos][5:0]));
      if (d[31:30] == 2'b00)      d = {d[31:22], 22'(o)};
      else if (d[31:30] == 2'b01) d = {d[31:30], 30'(o)};
    end
    return d;
  endfunction

  // ---------------------------------------------------- event counters --
  int n_fmt [4];
  int n_chg_inner = 0, n_chg_outer = 0, n_tt_entry = 0, n_bicc_patch = 0;
  int n_call_patch = 0, n_stall = 0, n_fetch_wait = 0, n_dropped = 0;
  int n_redirect = 0, n_inner_reads = 0, n_outer_reads = 0, n_delivered = 0;
  bit entered_at_tt = 0;

  // ------------------------------------------------------------- driver --
  int  mem_cnt = 0, mem_addr = 0;
  bit  mem_busy = 0;
  int  phase = 0;
  int  p1_first = -1, p1_gaps = 0, p1_count = 0;
  int  boot_start = 0, boot_cycles = -1, n_boot_reads = 0;
  bit  force_redirect = 0;

  always @(posedge clk) cycles++;

  initial begin
    n_fmt = '{0, 0, 0, 0};
    build_image();
    // Reset, then let the boot loader copy the dictionaries from memory.
    repeat (3) @(negedge clk);
    rst_n = 1;
    phase = 1;
    boot_start = cycles;

    forever begin
      logic [31:0] e;
      @(negedge clk);
      // memory model: answer the request in flight
      fetch_rsp_valid = 0;
      if (mem_busy) begin
        mem_cnt--;
        if (mem_cnt == 0) begin
          fetch_rsp_valid = 1;
          fetch_rsp_data  = mem_word(mem_addr);
          mem_busy        = 0;
        end
      end
      fetch_req_ready = (phase == 1) ? 1'b1 : ($urandom % 4 != 0);
      // processor model
      redirect_valid = 0;
      if (phase == 2 && (force_redirect || $urandom % 25 == 0)) begin
        int w;
        do w = $urandom % N_WORDS; while (rsel[w] != exp_sel);
        redirect_valid = 1;
        redirect_addr  = AW'(w);
      end
      inst_ready = (phase == 1) ? 1'b1 : ($urandom % 4 != 0);
      #1;
      check(sel_dict == exp_sel, "sel_dict");
      if (boot_busy) begin
        check(!inst_valid, "no instruction during boot load");
        if (fetch_req_valid && fetch_req_ready) begin
          check(int'(fetch_req_addr) == DICT_BASE + n_boot_reads, "boot load address");
          n_boot_reads++;
        end
      end else if (boot_cycles < 0) begin
        boot_cycles = cycles - boot_start;
        $display("boot load: %0d words in %0d cycles", n_boot_reads, boot_cycles);
        check(n_boot_reads == 320, "boot load word count");
        check(boot_cycles <= 320 + 3, "boot load one word per cycle");
      end
      if (fetch_req_valid && fetch_req_ready) begin
        mem_busy = 1;
        mem_addr = int'(fetch_req_addr);
        mem_cnt  = (phase == 1) ? 1 : 1 + $urandom % 4;
      end
      if (redirect_valid) begin
        if (mem_busy && !(fetch_req_valid && fetch_req_ready)) n_dropped++;
        n_redirect++;
        force_redirect = 0;
        exp_pos  = int'(redirect_addr);
        exp_slot = (kind[exp_pos] == 1) ? int'(tt[exp_pos]) : 0;
        entered_at_tt = (kind[exp_pos] == 1) && (tt[exp_pos] != 0);
      end else if (inst_valid && inst_ready) begin
        e = expected_insn();
        check(inst_data == e, "instruction");
        check(int'(inst_addr) == exp_pos && int'(inst_slot) == exp_slot, "location");
        check(inst_bubble == (kind[exp_pos] == 2), "bubble flag");
        if (inst_data != e && failures < 20)
          $display("  word %0d slot %0d: got %08h exp %08h", exp_pos, exp_slot, inst_data, e);
        n_delivered++;
        if (phase == 1) begin
          if (p1_first < 0) p1_first = cycles;
          p1_count++;
        end
        if (kind[exp_pos] == 1) begin
          n_fmt[fmt[exp_pos]]++;
          if (exp_sel) n_outer_reads++; else n_inner_reads++;
          if (entered_at_tt) n_tt_entry++;
          if (hasb[exp_pos] && exp_slot == nsl[exp_pos] - 1) begin
            if (e[31:30] == 2'b00) n_bicc_patch++;
            else if (e[31:30] == 2'b01) n_call_patch++;
          end
        end
        entered_at_tt = 0;
        if (kind[exp_pos] == 2) begin
          if (csel[exp_pos]) n_chg_outer++; else n_chg_inner++;
          exp_sel = csel[exp_pos];
        end
        if (exp_slot + 1 < nsl[exp_pos]) exp_slot++;
        else begin
          exp_pos++;
          exp_slot = 0;
        end
        if (exp_pos >= N_WORDS - 1) force_redirect = 1;
      end else if (inst_valid && !inst_ready) begin
        n_stall++;
      end else if (!inst_valid) begin
        if (phase == 1 && p1_first >= 0) p1_gaps++;
        if (phase == 2) n_fetch_wait++;
      end
      if (phase == 1 && p1_count == PHASE1_N) begin
        // one instruction per clock once the first one has arrived
        check(p1_gaps == 0, "phase 1: one instruction per cycle");
        check(cycles - p1_first == PHASE1_N - 1, "phase 1: cycle count");
        $display("phase 1: %0d instructions in %0d cycles", PHASE1_N, cycles - p1_first + 1);
        phase = 2;
        force_redirect = 1;
        p1_count = 0;
      end
      if (phase == 2 && cycles > PHASE2_CYCLES + 400) break;
    end

    $display("delivered=%0d redirects=%0d", n_delivered, n_redirect);
    $display("format4=%0d format3=%0d format3B=%0d format2B=%0d",
             n_fmt[0], n_fmt[1], n_fmt[2], n_fmt[3]);
    $display("chgdict->inner=%0d chgdict->outer=%0d tt_entry=%0d bicc_patch=%0d call_patch=%0d",
             n_chg_inner, n_chg_outer, n_tt_entry, n_bicc_patch, n_call_patch);
    $display("inner_reads=%0d outer_reads=%0d stall=%0d fetch_wait=%0d dropped_fetch=%0d",
             n_inner_reads, n_outer_reads, n_stall, n_fetch_wait, n_dropped);
    check(boot_cycles > 0, "boot load seen");
    check(n_fmt[0] > 0, "format 4 seen");
    check(n_fmt[1] > 0, "format 3 seen");
    check(n_fmt[2] > 0, "format 3B seen");
    check(n_fmt[3] > 0, "format 2B seen");
    check(n_chg_inner > 0 && n_chg_outer > 0, "ChgDict both ways seen");
    check(n_tt_entry > 0, "branch entry at TT seen");
    check(n_bicc_patch > 0 && n_call_patch > 0, "offset insertion seen");
    check(n_inner_reads > 0 && n_outer_reads > 0, "both dictionaries read");
    check(n_stall > 0, "processor stall seen");
    check(n_fetch_wait > 0, "fetch wait seen");
    check(n_dropped > 0, "fetch dropped on redirect seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (cycles == PHASE2_CYCLES + 20000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
