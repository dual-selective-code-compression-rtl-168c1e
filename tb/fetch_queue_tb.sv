// fetch_queue_tb: self-checking test of the fetch FIFO against a queue
// model, with random pushes, pops and flushes, including push and pop in
// the same cycle on a full queue.
module fetch_queue_tb;
  import compacket_pkg::*;
  localparam int DEPTH = 3;
  logic clk = 0, rst_n = 0, flush = 0, push = 0, pop = 0;
  fetch_entry_t push_data = '0, head;
  logic [1:0] count;
  fetch_entry_t model [$];
  int checks = 0, failures = 0, cycles = 0, fulls = 0, flushes = 0;

  fetch_queue #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0d", what, cycles); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      check(int'(count) == model.size(), "count");
      if (model.size() > 0) check(head == model[0], "head");
      if (model.size() == DEPTH) fulls++;
      flush = ($urandom % 25 == 0);
      pop   = (model.size() > 0) && ($urandom % 2 == 0);
      push  = ((model.size() < DEPTH) || pop) && ($urandom % 3 != 0);
      push_data = '{data: $urandom, addr: 30'($urandom), entry: 1'($urandom)};
      @(posedge clk);
      if (flush) begin model.delete(); flushes++; end
      else begin
        if (pop) void'(model.pop_front());
        if (push) model.push_back(push_data);
      end
    end
    check(fulls > 0 && flushes > 0, "full and flush seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (cycles == 20000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
