// dual_dictionary: the inner-loop and outer dictionaries with the Sel Dict
// bit and the output multiplexer.
//
// Both dictionaries are read with the same index; the Sel Dict bit picks the
// inner-loop dictionary (0) or the outer dictionary (1). Sel Dict is 1 after
// reset, i.e. execution starts outside any inner loop, and it is set by each
// ChgDict instruction that the decompressor executes. The inner-loop
// dictionary is built from profile counts of the hot inner loops (64 entries
// in the main configuration), the outer one from static instruction counts of
// the remaining code (256 entries). The inner dictionary sees the low
// log2(INNER_DEPTH) bits of the index; the compressor uses only indexes below
// INNER_DEPTH inside inner loops (checked by an assertion).
//
// Interface: load port (load_we, load_dict selects inner 0 / outer 1,
// load_addr, load_data); chg_valid/chg_sel write Sel Dict; rd_idx in,
// rd_data out (combinational).
module dual_dictionary #(
  parameter int unsigned INNER_DEPTH = 64,
  parameter int unsigned OUTER_DEPTH = 256
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        load_we,
  input  logic        load_dict,
  input  logic [7:0]  load_addr,
  input  logic [31:0] load_data,
  input  logic        chg_valid,
  input  logic        chg_sel,
  input  logic [7:0]  rd_idx,
  output logic [31:0] rd_data,
  output logic        sel_dict
);

  localparam int unsigned IAW = (INNER_DEPTH > 1) ? $clog2(INNER_DEPTH) : 1;
  localparam int unsigned OAW = (OUTER_DEPTH > 1) ? $clog2(OUTER_DEPTH) : 1;

  logic [31:0] inner_q, outer_q;

  dict_ram #(.DEPTH(INNER_DEPTH)) u_inner (
    .clk   (clk),
    .we    (load_we && !load_dict),
    .waddr (load_addr[IAW-1:0]),
    .wdata (load_data),
    .raddr (rd_idx[IAW-1:0]),
    .rdata (inner_q)
  );

  dict_ram #(.DEPTH(OUTER_DEPTH)) u_outer (
    .clk   (clk),
    .we    (load_we && load_dict),
    .waddr (load_addr[OAW-1:0]),
    .wdata (load_data),
    .raddr (rd_idx[OAW-1:0]),
    .rdata (outer_q)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         sel_dict <= 1'b1;
    else if (chg_valid) sel_dict <= chg_sel;
  end

  assign rd_data = sel_dict ? outer_q : inner_q;

endmodule
