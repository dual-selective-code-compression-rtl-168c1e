// fetch_queue: small FIFO of fetched code words inside the decompressor.
//
// Words arrive from the instruction cache in program order and wait here
// until the processor has taken every instruction they stand for. While a
// ComPacket is being expanded, the next words are already being fetched, so
// the next instruction is normally inside the decompressor when the
// processor asks for it. A flush (taken branch) empties the queue. Depth and
// the flush are this design's choices.
//
// Interface: push/push_data, pop, flush (highest priority), head/count.
// The caller never pushes into a full queue (checked by an assertion).
module fetch_queue
  import compacket_pkg::*;
#(
  parameter int unsigned DEPTH = 3,
  localparam int unsigned PW   = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int unsigned CW   = $clog2(DEPTH + 1)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         flush,
  input  logic         push,
  input  fetch_entry_t push_data,
  input  logic         pop,
  output fetch_entry_t head,
  output logic [CW-1:0] count
);

  fetch_entry_t     mem [DEPTH];
  logic [PW-1:0]    rd_ptr, wr_ptr;

  function automatic logic [PW-1:0] inc(logic [PW-1:0] p);
    return (p == PW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else if (flush) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      if (push) wr_ptr <= inc(wr_ptr);
      if (pop)  rd_ptr <= inc(rd_ptr);
      count <= count + CW'(push) - CW'(pop);
    end
  end

  always_ff @(posedge clk) begin
    if (push && !flush) mem[wr_ptr] <= push_data;
  end

  assign head = mem[rd_ptr];

  a_no_overflow : assert property (@(posedge clk) disable iff (!rst_n)
    (push && !flush) |-> (count < CW'(DEPTH) || pop));
  a_no_underflow : assert property (@(posedge clk) disable iff (!rst_n)
    (pop && !flush) |-> (count != 0));

endmodule
