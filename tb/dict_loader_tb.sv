// dict_loader_tb: self-checking test of the dictionary boot loader.
// A memory model with random request stalls and 1-3 cycle latency holds a
// random dictionary image at DICT_BASE. With boot set, every dictionary
// write must carry the right word to the right dictionary and entry, in
// order, and busy must fall after the last one; with one-cycle memory and
// no stalls the load must take one word per cycle. With boot clear the
// loader must finish at once without touching memory.
module dict_loader_tb;
  localparam int INNER = 64, OUTER = 256, AW = 18;
  localparam int BASE  = (1 << AW) - (INNER + OUTER);

  logic clk = 0, rst_n = 0, boot = 0, busy;
  logic req_valid, req_ready = 0, rsp_valid = 0;
  logic [AW-1:0] req_addr;
  logic [31:0] rsp_data = 0;
  logic dict_we, dict_sel;
  logic [7:0] dict_addr;
  logic [31:0] dict_wdata;
  logic [31:0] img [INNER + OUTER];
  int checks = 0, failures = 0, cycles = 0;

  dict_loader dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s (cycle %0d)", what, cycles);
    end
  endtask

  // One boot run. fast: memory always ready, one-cycle latency.
  task automatic run(input bit do_boot, input bit fast);
    int busy_cnt = 0, mem_cnt = 0, mem_addr = 0, n_wr = 0, n_req = 0;
    bit mem_busy = 0;
    foreach (img[i]) img[i] = $urandom;
    @(negedge clk);
    rst_n = 0; boot = do_boot; rsp_valid = 0;
    @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < 5000; c++) begin
      @(negedge clk);
      rsp_valid = 0;
      if (mem_busy && --mem_cnt == 0) begin
        rsp_valid = 1;
        rsp_data  = img[mem_addr - BASE];
        mem_busy  = 0;
      end
      req_ready = fast ? 1'b1 : ($urandom % 3 != 0);
      #1;
      if (req_valid && req_ready) begin
        check(!mem_busy, "one request in flight");
        check(int'(req_addr) == BASE + n_req, "request address");
        mem_busy = 1; mem_addr = int'(req_addr); n_req++;
        mem_cnt = fast ? 1 : 1 + $urandom % 3;
      end
      if (dict_we) begin
        check(dict_sel == (n_wr >= INNER), "dictionary select");
        check(int'(dict_addr) == ((n_wr >= INNER) ? n_wr - INNER : n_wr), "entry");
        check(dict_wdata == img[n_wr], "data");
        n_wr++;
      end
      if (!busy) break;
      busy_cnt++;
    end
    check(!busy, "load finished");
    if (do_boot) begin
      check(n_wr == INNER + OUTER && n_req == INNER + OUTER, "all words loaded");
      if (fast) check(busy_cnt <= INNER + OUTER + 2, "one word per cycle");
      $display("boot=%0d fast=%0d: %0d words, busy %0d cycles", do_boot, fast, n_wr, busy_cnt);
    end else begin
      check(n_req == 0 && n_wr == 0, "no load without boot");
      check(busy_cnt <= 1, "done at once without boot");
    end
  endtask

  initial begin
    run(1, 1);
    run(1, 0);
    run(0, 0);
    run(1, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (cycles == 30000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
