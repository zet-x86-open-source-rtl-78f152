// zet_seq_rom: the sequencer ROM, 1024 entries of {last, microcode address}.
//
// The decoder turns opcode and modrm into a 10-bit "first" address; the sequencer walks
// up from there, one entry per microinstruction, and stops after the entry whose `last`
// bit is 1. Each entry holds the 9-bit address of the microinstruction in the microcode
// ROM, so instructions share microinstructions instead of repeating them. Combinational
// read. Layout (this design's): 0 no-op, 1..12 INTO, 13..14 PUSH r16, 15 MOV r16/imm,
// 16..17 MOV mem/imm, 18 MOV reg/imm (C7 with mod = 11), 19..26 ALU AX/imm16,
// 27 IN AX/imm8, 28 IN AX/DX, 29 OUT imm8/AX, 30 OUT DX/AX, 31 JMP short, 32..33
// POP r16, 34..35 MOV r/m16,r16 (register, memory), 36..37 MOV r16,r/m16 (register,
// memory). Unused entries are a single no-op step.
module zet_seq_rom
  import zet_pkg::*;
(
  input  logic [SA_W-1:0] addr,
  output logic            last,
  output logic [UA_W-1:0] uaddr
);

  localparam logic [SA_W-1:0] SQ_NOP = 10'd0, SQ_INTO = 10'd1, SQ_PUSH = 10'd13,
                              SQ_MOVRI = 10'd15, SQ_MOVMI = 10'd16, SQ_MOVEI = 10'd18,
                              SQ_ACC = 10'd19, SQ_INI = 10'd27, SQ_IND = 10'd28,
                              SQ_OUTI = 10'd29, SQ_OUTD = 10'd30, SQ_JMPS = 10'd31,
                              SQ_POP = 10'd32, SQ_MOVRM = 10'd34, SQ_MOVMR = 10'd36;

  function automatic logic [UA_W:0] entry(input logic [SA_W-1:0] ad);
    if (ad >= SQ_INTO && ad < SQ_INTO + 10'd12)              // INTO: words 0..11
      return {ad == SQ_INTO + 10'd11, 9'(ad - SQ_INTO)};
    if (ad >= SQ_ACC && ad < SQ_ACC + 10'd8)                 // ALU AX, imm16
      return {1'b1, 9'(ad - SQ_ACC) + 9'd17};
    case (ad)
      SQ_PUSH:         return {1'b0, 9'd1};   // SP - 2 (shared with INTO)
      SQ_PUSH + 10'd1: return {1'b1, 9'd12};  // store register
      SQ_MOVRI:        return {1'b1, 9'd13};
      SQ_MOVMI:        return {1'b0, 9'd14};
      SQ_MOVMI + 10'd1:return {1'b1, 9'd15};
      SQ_MOVEI:        return {1'b1, 9'd16};
      SQ_INI:          return {1'b1, 9'd25};
      SQ_IND:          return {1'b1, 9'd26};
      SQ_OUTI:         return {1'b1, 9'd27};
      SQ_OUTD:         return {1'b1, 9'd28};
      SQ_JMPS:         return {1'b1, 9'd30};
      SQ_POP:          return {1'b0, 9'd31};  // load from the stack
      SQ_POP + 10'd1:  return {1'b1, 9'd32};  // SP + 2
      SQ_MOVRM:        return {1'b1, 9'd33};  // r/m register = reg
      SQ_MOVRM + 10'd1:return {1'b1, 9'd34};  // [EA] = reg
      SQ_MOVMR:        return {1'b1, 9'd35};  // reg = r/m register
      SQ_MOVMR + 10'd1:return {1'b1, 9'd36};  // reg = [EA]
      default:         return {1'b1, 9'd29};  // no-op
    endcase
  endfunction

  assign {last, uaddr} = entry(addr);

endmodule
