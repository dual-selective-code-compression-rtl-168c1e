// dual_dictionary_tb: self-checking test of the two dictionaries with the
// Sel Dict bit. Loads different contents into the inner (64) and outer (256)
// dictionaries, checks that Sel Dict is 1 after reset, then switches it with
// ChgDict writes and checks that the same index returns the entry of the
// selected dictionary.
module dual_dictionary_tb;
  logic clk = 0, rst_n = 0;
  logic load_we = 0, load_dict = 0, chg_valid = 0, chg_sel = 0, sel_dict;
  logic [7:0]  load_addr = 0, rd_idx = 0;
  logic [31:0] load_data = 0, rd_data;
  logic [31:0] inner [64];
  logic [31:0] outer [256];
  int checks = 0, failures = 0, cycles = 0, switches = 0;

  dual_dictionary dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  task automatic load(input logic d, input int a, input logic [31:0] v);
    @(negedge clk); load_we = 1; load_dict = d; load_addr = 8'(a); load_data = v;
    @(negedge clk); load_we = 0;
  endtask

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int a = 0; a < 64; a++)  begin inner[a] = $urandom; load(0, a, inner[a]); end
    for (int a = 0; a < 256; a++) begin outer[a] = ~$urandom; load(1, a, outer[a]); end
    @(negedge clk);
    check(sel_dict == 1'b1, "sel after reset");
    for (int n = 0; n < 3000; n++) begin
      logic exp_sel;
      @(negedge clk);
      chg_valid = 0;
      if ($urandom % 8 == 0) begin
        chg_valid = 1; chg_sel = 1'($urandom);
      end
      exp_sel = chg_valid ? chg_sel : sel_dict;
      @(negedge clk);
      if (chg_valid) switches++;
      chg_valid = 0;
      rd_idx = exp_sel ? 8'($urandom) : 8'($urandom % 64);
      #1;
      check(sel_dict == exp_sel, "sel value");
      check(rd_data == (exp_sel ? outer[rd_idx] : inner[rd_idx[5:0]]), "read data");
    end
    check(switches > 0, "sel switched");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (cycles == 50000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
