// dict_ram: one instruction dictionary.
//
// An array of DEPTH 32-bit instructions. The dictionary is written once per
// program through the load port, before execution starts, and read with an
// index taken straight from the ComPacket held in the decompressor. The read
// is asynchronous (combinational), so a dictionary instruction reaches the
// processor in the same cycle its index is selected and decompression adds
// no pipeline cycle. Sizes of up to 256 entries follow the compression
// method (8-bit indexes); the asynchronous read and the load port are this
// design's choices.
//
// Timing: load write on the rising clock edge; read combinational.
module dict_ram #(
  parameter int unsigned DEPTH = 256,
  parameter int unsigned WIDTH = 32,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata = mem[raddr];

endmodule
