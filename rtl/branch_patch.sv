// branch_patch: completes the branch instruction of a ComPacket.
//
// A ComPacket of format 3B or 2B ends with a branch. The dictionary holds
// that branch with a zero displacement and the packet carries its offset
// (6 bits in format 3B, 8 bits in format 2B). This block sign-extends the
// offset to the displacement field of the instruction: disp22 for format-2
// branches (Bicc, FBfcc, CBccc, op = 00) and disp30 for CALL (op = 01).
// Other instructions pass unchanged. Carrying a short offset in the packet
// follows the compression method; keeping displacement zero in the
// dictionary and replacing (not adding) the field are this design's choices.
// The offset is in words, in the compressed code's address space, as SPARC
// displacements are.
//
// Purely combinational.
module branch_patch (
  input  logic [31:0] insn_in,
  input  logic        enable,
  input  logic        wide,     // 1: 8-bit offset, 0: 6-bit offset
  input  logic [7:0]  offset,
  output logic [31:0] insn_out
);

  logic [29:0] disp;

  always_comb begin
    if (wide) disp = {{22{offset[7]}}, offset};
    else      disp = {{24{offset[5]}}, offset[5:0]};

    insn_out = insn_in;
    if (enable) begin
      unique case (insn_in[31:30])
        2'b00:   insn_out = {insn_in[31:22], disp[21:0]};
        2'b01:   insn_out = {insn_in[31:30], disp};
        default: insn_out = insn_in;
      endcase
    end
  end

endmodule
