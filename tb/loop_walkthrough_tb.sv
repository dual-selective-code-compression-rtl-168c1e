// loop_walkthrough_tb: directed test of one inner loop run through the
// dual-dictionary decompressor, with two-cycle memory accesses.
//
// Code image (word address = byte address / 4):
//   0x00  I_a          plain
//   0x04  I0           plain
//   0x08  ChgDict -> inner dictionary (loop pre-header)
//   0x0c  I1           plain          <- loop head
//   0x10  ComPacket 2B: index 2, index 60 (branch, offset -1)
//   0x14  ComPacket 4 : indexes 1, 2, 3, 4
//   0x18  I2           plain
//   0x1c  ComPacket 3B: indexes 5, 6, 61 (branch back, offset -4), TT = 1
//   0x20  ChgDict -> outer dictionary (after the loop)
//   0x24  ComPacket 3 : indexes 2, 100, 255
//   0x28  I3           plain
// The processor model takes the backward branch LOOPS-1 times, landing on
// 0x0c, and once jumps straight into the middle of the packet at 0x1c
// (slot TT = 1). Index 2 must give the inner-loop entry inside the loop
// and the outer entry at 0x24. The dictionaries are written through the
// external load port (no boot load). The testbench checks the whole
// instruction sequence, the two nop bubbles and the cycle count: with
// two-cycle memory and one request in flight, a plain word costs at most
// two cycles.
module loop_walkthrough_tb;
  import compacket_pkg::*;
  localparam int AW = 18, LOOPS = 50;

  logic clk = 0, rst_n = 0;
  logic dict_boot = 0, boot_busy;
  logic dict_we = 0, dict_sel = 0;
  logic [7:0] dict_addr = 0;
  logic [31:0] dict_wdata = 0;
  logic fetch_req_valid, fetch_req_ready = 1;
  logic [AW-1:0] fetch_req_addr;
  logic fetch_rsp_valid = 0;
  logic [31:0] fetch_rsp_data = 0;
  logic redirect_valid = 0;
  logic [AW-1:0] redirect_addr = 0;
  logic inst_valid, inst_ready = 1, inst_bubble, sel_dict;
  logic [31:0] inst_data;
  logic [AW-1:0] inst_addr;
  logic [1:0] inst_slot;

  dsc_decompressor dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cycles = 0;
  always @(posedge clk) cycles++;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s (cycle %0d)", what, cycles);
    end
  endtask

  logic [31:0] inner [64];
  logic [31:0] outer [256];
  logic [31:0] mem [16];

  function automatic logic [31:0] cp(logic [1:0] tt, logic s, logic b, logic [23:0] p);
    return {2'b00, tt, s, b, p[23:22], 2'b01, p[21:0]};
  endfunction

  function automatic logic [31:0] bicc(int disp);
    return {2'b00, 1'b0, 4'b1000, 3'b010, 22'(disp)};
  endfunction

  // expected stream
  logic [31:0] exp_q [$];
  logic [AW-1:0] exp_a [$];

  task automatic expect_insn(input logic [31:0] d, input int byte_addr);
    exp_q.push_back(d);
    exp_a.push_back(AW'(byte_addr / 4));
  endtask

  // Expected instructions of the loop body, from 0x0c, or from slot 1 of
  // 0x1c when mid is set.
  task automatic expect_body(input bit mid);
    if (!mid) begin
      expect_insn(mem[3], 'h0c);
      expect_insn(inner[2], 'h10);
      expect_insn(bicc(-1), 'h10);
      for (int i = 1; i <= 4; i++) expect_insn(inner[i], 'h14);
      expect_insn(mem[6], 'h18);
      expect_insn(inner[5], 'h1c);
    end
    expect_insn(inner[6], 'h1c);
    expect_insn(bicc(-4), 'h1c);
  endtask

  int n_bubbles = 0, n_delivered = 0, iter = 0, first_cycle = -1;
  bit mid_entry_done = 0;

  initial begin
    for (int i = 0; i < 64; i++)  inner[i] = {2'b10, 30'($urandom)};
    for (int i = 0; i < 256; i++) outer[i] = {2'b11, 30'($urandom)};
    inner[60] = bicc(0); inner[61] = bicc(0);
    mem[0]  = 32'h8200_0001;                               // I_a
    mem[1]  = 32'h8400_0002;                               // I0
    mem[2]  = {2'b00, 5'd0, 3'b011, 21'd0, 1'b0};          // ChgDict -> inner
    mem[3]  = 32'h8600_0003;                               // I1
    mem[4]  = cp(2'd0, 1'b1, 1'b1, {8'd2, 8'd60, 8'hFF});  // 2B, offset -1
    mem[5]  = cp(2'd0, 1'b0, 1'b0, {6'd1, 6'd2, 6'd3, 6'd4});
    mem[6]  = 32'h8800_0004;                               // I2
    mem[7]  = cp(2'd1, 1'b0, 1'b1, {6'd5, 6'd6, 6'd61, 6'b111100}); // 3B, -4
    mem[8]  = {2'b00, 5'd0, 3'b011, 21'd0, 1'b1};          // ChgDict -> outer
    mem[9]  = cp(2'd0, 1'b1, 1'b0, {8'd2, 8'd100, 8'd255});
    mem[10] = 32'h8a00_0005;                               // I3
    for (int i = 11; i < 16; i++) mem[i] = 32'h8000_0000;

    expect_insn(mem[0], 'h00);
    expect_insn(mem[1], 'h04);
    expect_insn(SPARC_NOP, 'h08);
    for (int l = 0; l < LOOPS; l++) expect_body(0);
    expect_body(1);
    expect_insn(SPARC_NOP, 'h20);
    expect_insn(outer[2], 'h24);
    expect_insn(outer[100], 'h24);
    expect_insn(outer[255], 'h24);
    expect_insn(mem[10], 'h28);

    // external load of both dictionaries
    repeat (2) @(negedge clk);
    for (int i = 0; i < 320; i++) begin
      dict_we    = 1;
      dict_sel   = (i >= 64);
      dict_addr  = 8'((i >= 64) ? i - 64 : i);
      dict_wdata = (i >= 64) ? outer[i - 64] : inner[i];
      @(negedge clk);
    end
    dict_we = 0;
    rst_n = 1;
  end

  // two-cycle memory, one request in flight
  int mem_cnt = 0, mem_addr = 0;
  always @(posedge clk) begin
    fetch_rsp_valid <= 0;
    if (mem_cnt > 0) begin
      mem_cnt <= mem_cnt - 1;
      if (mem_cnt == 1) begin
        fetch_rsp_valid <= 1;
        fetch_rsp_data  <= mem[mem_addr % 16];
      end
    end
    if (fetch_req_valid && fetch_req_ready) begin
      mem_cnt  <= 2;
      mem_addr <= int'(fetch_req_addr);
    end
  end

  // processor model
  always @(negedge clk) begin
    if (rst_n && !boot_busy) begin
      redirect_valid <= 0;
      if (inst_valid && !redirect_valid) begin
        if (exp_q.size() == 0) begin
          check(0, "more instructions than expected");
        end else begin
          logic [31:0] e;
          logic [AW-1:0] a;
          e = exp_q.pop_front();
          a = exp_a.pop_front();
          if (first_cycle < 0) first_cycle = cycles;
          check(inst_data == e, "instruction");
          check(inst_addr == a, "address");
          if (inst_data != e) $display("  at %0h got %08h exp %08h", a * 4, inst_data, e);
          if (inst_bubble) n_bubbles++;
          n_delivered++;
          if (a == AW'('h1c / 4) && inst_slot == 2'd2) begin
            // backward branch taken: loop again, then one mid-packet entry
            iter++;
            if (iter < LOOPS) begin
              redirect_valid <= 1; redirect_addr <= AW'('h0c / 4);
            end else if (!mid_entry_done) begin
              mid_entry_done = 1;
              redirect_valid <= 1; redirect_addr <= AW'('h1c / 4);
            end
          end
          if (exp_q.size() == 0) begin
            int used;
            used = cycles - first_cycle + 1;
            $display("%0d instructions (%0d nop bubbles) in %0d cycles over %0d loop passes",
                     n_delivered, n_bubbles, used, iter);
            check(n_bubbles == 2, "two ChgDict bubbles");
            check(sel_dict == 1'b1, "outer dictionary after the loop");
            // per pass: 12 instructions from 5 words; a redirect costs at
            // most 1 + 3 cycles; plain words at most 2 cycles each
            check(used <= LOOPS * (12 + 4 + 6) + 40, "cycle budget");
            $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
            $finish;
          end
        end
      end
    end
  end

  initial begin
    wait (cycles == 20000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
