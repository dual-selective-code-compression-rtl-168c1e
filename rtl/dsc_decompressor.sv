// dsc_decompressor: dual-dictionary ComPacket decompressor, placed between
// the instruction cache and the processor (processor-decompressor-cache).
//
// Code is stored compressed in memory and cache. Each fetched word is either
// a plain SPARC v8 instruction, a ComPacket (2 to 4 dictionary indexes in one
// word) or a ChgDict instruction. The decompressor hands the processor one
// instruction per handshake:
//   * plain word    -> the word itself;
//   * ComPacket     -> the dictionary instruction of each index in turn, read
//                      from the inner-loop or the outer dictionary according
//                      to the Sel Dict bit; the last slot of a branch format
//                      gets the packet's branch offset;
//   * ChgDict       -> a nop (one pipeline bubble) while Sel Dict takes the
//                      word's select bit. The compressor places ChgDict in the
//                      pre-header of each inner loop and after its
//                      post-dominator, so inner loops run out of the inner
//                      dictionary and the rest of the code out of the outer.
// When a branch lands on a ComPacket, expansion starts at the packet's TT
// slot; when execution reaches it sequentially, at slot 0.
//
// How it works: a request port fetches words one at a time, in order, from
// consecutive word addresses, keeping up to QDEPTH words in the fetch queue
// so that the next instruction is normally already inside the decompressor.
// The head word is decoded combinationally, the dictionaries are read
// asynchronously and a slot register walks through the packet, so a
// dictionary instruction costs no extra cycle: with one-cycle fetches the
// processor receives one instruction per clock. A taken branch or trap
// (redirect) empties the queue, drops any fetch still in flight and restarts
// fetching at the target, whose first word is expanded from its TT slot.
//
// Interfaces (all signals sampled on the rising clock edge):
//   boot        dict_boot, sampled in the first cycle after reset: if set,
//               dict_loader first copies both dictionaries from the memory
//               image at DICT_BASE through the fetch port (boot_busy high),
//               then code fetching starts at RESET_ADDR.
//   load port   dict_we, dict_sel (0 inner, 1 outer), dict_addr, dict_wdata:
//               fills the dictionaries from outside instead (dict_boot = 0);
//               it works at any time, also during reset, but a write in the
//               same cycle as a boot-loader write is lost.
//   fetch port  fetch_req_valid/ready/addr (word address); one request in
//               flight; fetch_rsp_valid/data returns the word, in order, at
//               least one cycle after the request.
//   processor   inst_valid/ready/data, plus inst_addr (word address of the
//               code word) and inst_slot (slot within a ComPacket) as the
//               instruction's location; inst_bubble marks a ChgDict nop.
//               redirect_valid/redirect_addr restart the stream; an
//               instruction is not taken in a redirect cycle.
//   sel_dict    current dictionary (0 inner, 1 outer), 1 after reset.
//
// From the compression method: the ComPacket formats, TT entry slot, branch
// offset in the packet, the two dictionaries selected by Sel Dict (1 at
// start), ChgDict issuing a nop, dictionary sizes 64/256, 1 MB code memory
// (ADDR_W = 18 word-address bits). This design's choices: the handshakes,
// the fetch queue and its depth, the redirect port, bit positions of the
// encodings, the reset start address RESET_ADDR, the dictionary image
// address DICT_BASE and the boot input.
module dsc_decompressor
  import compacket_pkg::*;
#(
  parameter int unsigned INNER_DEPTH = 64,
  parameter int unsigned OUTER_DEPTH = 256,
  parameter int unsigned ADDR_W      = 18,
  parameter int unsigned QDEPTH      = 3,
  parameter logic [ADDR_W-1:0] RESET_ADDR = '0,
  parameter logic [ADDR_W-1:0] DICT_BASE  =
    ADDR_W'((1 << ADDR_W) - (INNER_DEPTH + OUTER_DEPTH))
) (
  input  logic              clk,
  input  logic              rst_n,
  // dictionary load
  input  logic              dict_boot,
  output logic              boot_busy,
  input  logic              dict_we,
  input  logic              dict_sel,
  input  logic [7:0]        dict_addr,
  input  logic [31:0]       dict_wdata,
  // instruction fetch (cache side)
  output logic              fetch_req_valid,
  input  logic              fetch_req_ready,
  output logic [ADDR_W-1:0] fetch_req_addr,
  input  logic              fetch_rsp_valid,
  input  logic [31:0]       fetch_rsp_data,
  // processor side
  input  logic              redirect_valid,
  input  logic [ADDR_W-1:0] redirect_addr,
  output logic              inst_valid,
  input  logic              inst_ready,
  output logic [31:0]       inst_data,
  output logic [ADDR_W-1:0] inst_addr,
  output logic [1:0]        inst_slot,
  output logic              inst_bubble,
  output logic              sel_dict
);

  localparam int unsigned CW = $clog2(QDEPTH + 1);

  // ----------------------------------------------------- dictionary boot --
  logic              ld_req_valid, ld_we, ld_sel;
  logic [ADDR_W-1:0] ld_req_addr;
  logic [7:0]        ld_addr;
  logic [31:0]       ld_wdata;
  logic              dec_req_valid;
  logic [ADDR_W-1:0] dec_req_addr;
  logic              dec_rsp_valid;

  dict_loader #(
    .INNER_DEPTH (INNER_DEPTH),
    .OUTER_DEPTH (OUTER_DEPTH),
    .ADDR_W      (ADDR_W),
    .DICT_BASE   (DICT_BASE)
  ) u_loader (
    .clk        (clk),
    .rst_n      (rst_n),
    .boot       (dict_boot),
    .busy       (boot_busy),
    .req_valid  (ld_req_valid),
    .req_ready  (fetch_req_ready),
    .req_addr   (ld_req_addr),
    .rsp_valid  (fetch_rsp_valid && boot_busy),
    .rsp_data   (fetch_rsp_data),
    .dict_we    (ld_we),
    .dict_sel   (ld_sel),
    .dict_addr  (ld_addr),
    .dict_wdata (ld_wdata)
  );

  // The fetch port belongs to the loader until it is done.
  assign fetch_req_valid = boot_busy ? ld_req_valid : dec_req_valid;
  assign fetch_req_addr  = boot_busy ? ld_req_addr  : dec_req_addr;
  assign dec_rsp_valid   = fetch_rsp_valid && !boot_busy;

  // ---------------------------------------------------------------- fetch --
  logic [ADDR_W-1:0] fetch_pc;
  logic              outstanding, discard, entry_pending;
  logic [ADDR_W-1:0] outst_addr;
  logic              outst_entry;

  fetch_entry_t      q_head, q_push_data;
  logic [CW-1:0]     q_count;
  logic              q_push, q_pop;
  logic              fetch_fire, inst_fire;

  assign dec_req_valid = !boot_busy && !redirect_valid
                      && (!outstanding || dec_rsp_valid)
                      && (32'(q_count) + 32'(outstanding) < QDEPTH);
  assign dec_req_addr  = fetch_pc;
  assign fetch_fire    = dec_req_valid && fetch_req_ready;

  assign q_push = dec_rsp_valid && outstanding && !discard && !redirect_valid;
  assign q_push_data = '{data:  fetch_rsp_data,
                         addr:  30'(outst_addr),
                         entry: outst_entry};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fetch_pc      <= RESET_ADDR;
      outstanding   <= 1'b0;
      discard       <= 1'b0;
      entry_pending <= 1'b0;
      outst_addr    <= '0;
      outst_entry   <= 1'b0;
    end else begin
      if (fetch_fire)         outstanding <= 1'b1;
      else if (dec_rsp_valid) outstanding <= 1'b0;
      if (dec_rsp_valid) discard <= 1'b0;

      if (redirect_valid) begin
        fetch_pc      <= redirect_addr;
        entry_pending <= 1'b1;
        discard       <= outstanding && !dec_rsp_valid;
      end else if (fetch_fire) begin
        fetch_pc      <= fetch_pc + 1'b1;
        outst_addr    <= fetch_pc;
        outst_entry   <= entry_pending;
        entry_pending <= 1'b0;
      end
    end
  end

  fetch_queue #(.DEPTH(QDEPTH)) u_queue (
    .clk       (clk),
    .rst_n     (rst_n),
    .flush     (redirect_valid),
    .push      (q_push),
    .push_data (q_push_data),
    .pop       (q_pop),
    .head      (q_head),
    .count     (q_count)
  );

  // ------------------------------------------------------------ expansion --
  word_info_t  info;
  logic        started;     // some slot of the head word was already issued
  logic [1:0]  slot_q, cur_slot;
  logic        last_slot;
  logic [31:0] dict_q, patched;
  logic        is_branch_slot;

  compacket_decode u_decode (
    .word (q_head.data),
    .info (info)
  );

  always_comb begin
    if (started)          cur_slot = slot_q;
    else if (q_head.entry && info.kind == WORD_COMPACKET) cur_slot = info.tt;
    else                  cur_slot = 2'd0;
  end

  assign last_slot      = (3'(cur_slot) + 3'd1 >= info.n_slots);
  assign is_branch_slot = (info.kind == WORD_COMPACKET) && info.has_branch && last_slot;

  dual_dictionary #(
    .INNER_DEPTH (INNER_DEPTH),
    .OUTER_DEPTH (OUTER_DEPTH)
  ) u_dicts (
    .clk       (clk),
    .rst_n     (rst_n),
    .load_we   (ld_we || dict_we),
    .load_dict (ld_we ? ld_sel   : dict_sel),
    .load_addr (ld_we ? ld_addr  : dict_addr),
    .load_data (ld_we ? ld_wdata : dict_wdata),
    .chg_valid (inst_fire && info.kind == WORD_CHGDICT),
    .chg_sel   (info.chg_sel),
    .rd_idx    (info.idx[cur_slot]),
    .rd_data   (dict_q),
    .sel_dict  (sel_dict)
  );

  branch_patch u_patch (
    .insn_in  (dict_q),
    .enable   (is_branch_slot),
    .wide     (info.wide),
    .offset   (info.offset),
    .insn_out (patched)
  );

  assign inst_valid  = (q_count != 0);
  assign inst_addr   = ADDR_W'(q_head.addr);
  assign inst_slot   = cur_slot;
  assign inst_bubble = (info.kind == WORD_CHGDICT);

  always_comb begin
    unique case (info.kind)
      WORD_COMPACKET: inst_data = patched;
      WORD_CHGDICT:   inst_data = SPARC_NOP;
      default:        inst_data = q_head.data;
    endcase
  end

  assign inst_fire = inst_valid && inst_ready && !redirect_valid;
  assign q_pop     = inst_fire && last_slot;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      started <= 1'b0;
      slot_q  <= '0;
    end else if (redirect_valid || q_pop) begin
      started <= 1'b0;
      slot_q  <= '0;
    end else if (inst_fire) begin
      started <= 1'b1;
      slot_q  <= cur_slot + 2'd1;
    end
  end

  // ----------------------------------------------------------- assertions --
  // A branch may only land on a slot that the packet holds.
  a_tt_in_packet : assert property (@(posedge clk) disable iff (!rst_n)
    (inst_valid && !started && q_head.entry && info.kind == WORD_COMPACKET)
      |-> (3'(info.tt) < info.n_slots));
  // Inside inner loops only indexes the inner dictionary holds are used.
  a_inner_index : assert property (@(posedge clk) disable iff (!rst_n)
    (inst_valid && info.kind == WORD_COMPACKET && !sel_dict)
      |-> (32'(info.idx[cur_slot]) < INNER_DEPTH));
  // The cache never answers without a request in flight.
  a_rsp_has_req : assert property (@(posedge clk) disable iff (!rst_n)
    dec_rsp_valid |-> outstanding);

endmodule
