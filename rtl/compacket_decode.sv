// compacket_decode: classifies one fetched code word and unpacks it.
//
// A word is a ComPacket, a ChgDict (change-dictionary) instruction or a plain
// SPARC v8 instruction that passes through unchanged. For a ComPacket the
// block returns the format, the number of instructions it holds, the TT
// branch-entry slot, the dictionary indexes in execution order (6-bit indexes
// zero-extended to 8 bits) and the raw branch offset. The field widths and the
// four formats follow the compression method; bit positions and the ChgDict
// encoding are this design's choice and are documented in compacket_pkg.
//
// Interface: word in, word_info_t out. Purely combinational, no latency.
module compacket_decode
  import compacket_pkg::*;
(
  input  logic [31:0] word,
  output word_info_t  info
);

  logic [23:0] payload;
  logic        s_bit, b_bit;

  assign payload = {word[25:24], word[21:0]};
  assign s_bit   = word[27];
  assign b_bit   = word[26];

  always_comb begin
    info            = '0;
    info.kind       = WORD_PLAIN;
    info.n_slots    = 3'd1;
    info.tt         = word[29:28];
    info.wide       = s_bit;
    info.has_branch = b_bit;
    info.fmt        = cp_format_e'({s_bit, b_bit});
    info.chg_sel    = word[0];

    if (word[31:30] == 2'b00 && word[23:22] == 2'b01) begin
      info.kind = WORD_COMPACKET;
      unique case ({s_bit, b_bit})
        2'b00: begin                       // Format 4
          info.n_slots = 3'd4;
          info.idx[0]  = {2'b00, payload[23:18]};
          info.idx[1]  = {2'b00, payload[17:12]};
          info.idx[2]  = {2'b00, payload[11:6]};
          info.idx[3]  = {2'b00, payload[5:0]};
        end
        2'b10: begin                       // Format 3
          info.n_slots = 3'd3;
          info.idx[0]  = payload[23:16];
          info.idx[1]  = payload[15:8];
          info.idx[2]  = payload[7:0];
        end
        2'b01: begin                       // Format 3B
          info.n_slots = 3'd3;
          info.idx[0]  = {2'b00, payload[23:18]};
          info.idx[1]  = {2'b00, payload[17:12]};
          info.idx[2]  = {2'b00, payload[11:6]};
          info.offset  = {2'b00, payload[5:0]};
        end
        default: begin                     // Format 2B
          info.n_slots = 3'd2;
          info.idx[0]  = payload[23:16];
          info.idx[1]  = payload[15:8];
          info.offset  = payload[7:0];
        end
      endcase
    end else if (word[31:30] == 2'b00 && word[24:22] == 3'b011) begin
      info.kind    = WORD_CHGDICT;
      info.n_slots = 3'd1;
    end
  end

endmodule
