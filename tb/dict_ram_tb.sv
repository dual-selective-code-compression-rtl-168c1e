// dict_ram_tb: self-checking test of one dictionary. Loads every entry
// with random instructions, reads them back in random order against a
// shadow copy, then rewrites some entries and checks again.
module dict_ram_tb;
  localparam int DEPTH = 256;
  logic clk = 0, we = 0;
  logic [7:0]  waddr = 0, raddr = 0;
  logic [31:0] wdata = 0, rdata;
  logic [31:0] shadow [DEPTH];
  int checks = 0, failures = 0, cycles = 0;

  dict_ram #(.DEPTH(DEPTH)) dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  task automatic write(input int a, input logic [31:0] d);
    @(negedge clk); we = 1; waddr = 8'(a); wdata = d; shadow[a] = d;
    @(negedge clk); we = 0;
  endtask

  initial begin
    for (int a = 0; a < DEPTH; a++) write(a, $urandom);
    for (int pass = 0; pass < 4; pass++) begin
      for (int n = 0; n < 1000; n++) begin
        @(negedge clk); raddr = 8'($urandom); #1;
        checks++;
        if (rdata !== shadow[raddr]) begin
          failures++; $display("FAIL read %0d got %08h exp %08h", raddr, rdata, shadow[raddr]);
        end
      end
      for (int n = 0; n < 50; n++) write($urandom % DEPTH, $urandom);
    end
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
