// compacket_pkg: types and constants shared by the dual-dictionary ComPacket
// decompressor.
//
// A ComPacket is one 32-bit code word that stands for two to four SPARC v8
// instructions, each given as an index into an instruction dictionary. It is
// marked by an escape code that no valid SPARC v8 instruction has, followed by
// a target-slot field (TT), an index-size bit (S) and a branch bit (B). The
// widths of these fields (4 + 2 + 1 + 1 bits, leaving 24 payload bits) follow
// the compression method; the bit positions below are this design's choice:
//
//   word[31:30] = 2'b00 and word[23:22] = 2'b01   escape: format-2 opcode
//                                                  with op2 = 001 or 101,
//                                                  both unused in SPARC v8
//   word[29:28] = TT    slot executed first when a branch lands here
//   word[27]    = S     0: 6-bit indexes, 1: 8-bit indexes
//   word[26]    = B     1: the last slot is a branch, the packet carries
//                          its offset
//   payload     = {word[25:24], word[21:0]}  (24 bits, first slot in the
//                                             most significant bits)
//
// The four formats follow from {S,B}:
//   Format 4  (S=0,B=0): four 6-bit indexes
//   Format 3  (S=1,B=0): three 8-bit indexes
//   Format 3B (S=0,B=1): three 6-bit indexes, 6-bit branch offset
//   Format 2B (S=1,B=1): two 8-bit indexes, 8-bit branch offset
//
// The change-dictionary instruction (ChgDict) is another unused SPARC v8
// opcode, format 2 with op2 = 011: word[31:30] = 2'b00, word[24:22] = 3'b011.
// Its bit 0 is the new value of the Sel Dict bit (0: inner-loop dictionary,
// 1: outer dictionary). This encoding is this design's choice.
package compacket_pkg;

  localparam int unsigned IDX_W   = 8;
  localparam int unsigned SLOTS   = 4;

  // SPARC v8 "nop" (sethi 0, %g0), issued as the bubble for a ChgDict.
  localparam logic [31:0] SPARC_NOP = 32'h0100_0000;

  typedef enum logic [1:0] {
    FMT_4  = 2'b00,
    FMT_3B = 2'b01,
    FMT_3  = 2'b10,
    FMT_2B = 2'b11
  } cp_format_e;

  typedef enum logic [1:0] {
    WORD_PLAIN     = 2'd0,
    WORD_COMPACKET = 2'd1,
    WORD_CHGDICT   = 2'd2
  } word_kind_e;

  // Everything the decompressor needs to know about one fetched code word.
  typedef struct packed {
    word_kind_e                        kind;
    cp_format_e                        fmt;
    logic [1:0]                        tt;         // first slot on branch entry
    logic [2:0]                        n_slots;    // instructions in the word
    logic                              has_branch; // last slot is a branch
    logic                              wide;       // 8-bit indexes/offset
    logic [7:0]                        offset;     // raw branch offset field
    logic                              chg_sel;    // ChgDict: new Sel Dict
    logic [SLOTS-1:0][IDX_W-1:0]       idx;        // idx[0] is executed first
  } word_info_t;

  // Fetched code word as kept in the fetch queue.
  typedef struct packed {
    logic [31:0] data;
    logic [29:0] addr;     // word address in compressed code space
    logic        entry;    // reached by a branch (start at slot TT)
  } fetch_entry_t;

endpackage
