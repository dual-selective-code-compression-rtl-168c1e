// dict_loader: fills the two dictionaries from the program's memory image
// when execution begins.
//
// The dictionaries belong to the application: they are stored with its code
// and copied into the decompressor once, before the first instruction runs,
// so the cost is paid once per program. After reset the loader samples
// `boot`. If it is set, the loader reads INNER_DEPTH + OUTER_DEPTH words from
// consecutive word addresses starting at DICT_BASE (inner-loop dictionary
// first, then the outer one) through the same fetch port the decompressor
// uses, and writes each into its dictionary entry. If `boot` is clear, the
// dictionaries are left to the external load port. `busy` is high until the
// last word is written; the decompressor does not fetch code meanwhile.
// Loading at program start follows the compression method; the image layout,
// DICT_BASE, the boot input and the port sharing are this design's choices.
//
// Fetch protocol as in dsc_decompressor: one request in flight, response at
// least one cycle later, a new request may go out in the cycle a response
// arrives. With one-cycle memory the load takes about one word per cycle.
module dict_loader #(
  parameter int unsigned INNER_DEPTH = 64,
  parameter int unsigned OUTER_DEPTH = 256,
  parameter int unsigned ADDR_W      = 18,
  parameter logic [ADDR_W-1:0] DICT_BASE = ADDR_W'((1 << ADDR_W) - (INNER_DEPTH + OUTER_DEPTH))
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              boot,
  output logic              busy,
  // memory read port
  output logic              req_valid,
  input  logic              req_ready,
  output logic [ADDR_W-1:0] req_addr,
  input  logic              rsp_valid,
  input  logic [31:0]       rsp_data,
  // dictionary write port
  output logic              dict_we,
  output logic              dict_sel,
  output logic [7:0]        dict_addr,
  output logic [31:0]       dict_wdata
);

  localparam int unsigned TOTAL = INNER_DEPTH + OUTER_DEPTH;
  localparam int unsigned CNTW  = $clog2(TOTAL + 1);

  typedef enum logic [1:0] {ST_START, ST_LOAD, ST_DONE} state_e;
  state_e           state;
  logic [CNTW-1:0]  issued, written;
  logic             outstanding;
  logic             req_fire;

  assign busy      = (state != ST_DONE);
  assign req_valid = (state == ST_LOAD) && (32'(issued) < TOTAL)
                  && (!outstanding || rsp_valid);
  assign req_addr  = DICT_BASE + ADDR_W'(issued);
  assign req_fire  = req_valid && req_ready;

  assign dict_we    = (state == ST_LOAD) && rsp_valid && outstanding;
  assign dict_sel   = (32'(written) >= INNER_DEPTH);
  assign dict_addr  = dict_sel ? 8'(32'(written) - INNER_DEPTH) : 8'(written);
  assign dict_wdata = rsp_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= ST_START;
      issued      <= '0;
      written     <= '0;
      outstanding <= 1'b0;
    end else begin
      unique case (state)
        ST_START: state <= boot ? ST_LOAD : ST_DONE;
        ST_LOAD: begin
          if (req_fire) begin
            issued      <= issued + 1'b1;
            outstanding <= 1'b1;
          end else if (rsp_valid) begin
            outstanding <= 1'b0;
          end
          if (dict_we) begin
            written <= written + 1'b1;
            if (32'(written) == TOTAL - 1) state <= ST_DONE;
          end
        end
        default: state <= ST_DONE;
      endcase
    end
  end

  a_rsp_has_req : assert property (@(posedge clk) disable iff (!rst_n)
    (state == ST_LOAD && rsp_valid) |-> outstanding);

endmodule
