// zet_decode: opcode lookup of the Zet core.
//
// Combinational logic (not a ROM, to save memory) that maps the opcode byte and the
// modrm byte to the first sequencer ROM address of the instruction's microcode, and tells
// the fetch unit the instruction's format: whether the byte is a prefix, whether a modrm
// byte follows, how many displacement bytes follow (from mod and r/m, as in the 8086
// encoding, or a direct 16-bit offset) and how many immediate bytes. The fetch unit uses
// this to choose its next state. Supported 8086 subset: segment-override prefixes
// 26 2E 36 3E, LOCK F0, INTO CE, PUSH r16 50-57, POP r16 58-5F, MOV r16,imm16 B8-BF,
// MOV r/m16,imm16 C7, ADD/OR/ADC/SBB/AND/SUB/XOR/CMP AX,imm16 05..3D, IN AX,imm8 E5,
// IN AX,DX ED, OUT imm8,AX E7, OUT DX,AX EF, JMP short EB, MOV r/m16,r16 89 and
// MOV r16,r/m16 8B. Any other opcode decodes as a one-byte no-op.
module zet_decode
  import zet_pkg::*;
(
  input  logic [7:0]      opcode,
  input  logic [7:0]      modrm,
  output logic            prefix,      // opcode byte is a prefix
  output logic            pfx_seg,     // ... a segment override
  output logic [1:0]      pfx_sreg,    // ... naming this segment
  output logic            pfx_lock,    // ... LOCK
  output logic            need_modrm,
  output logic            direct_off,  // 16-bit offset without modrm
  output logic [1:0]      off_size,    // displacement bytes, given modrm
  output logic [1:0]      imm_size,
  output logic            imm_sext,    // sign-extend an 8-bit immediate
  output logic [SA_W-1:0] first
);

  always_comb begin
    prefix     = 1'b0;
    pfx_seg    = 1'b0;
    pfx_sreg   = opcode[4:3];
    pfx_lock   = 1'b0;
    need_modrm = 1'b0;
    direct_off = 1'b0;
    imm_size   = 2'd0;
    imm_sext   = 1'b0;
    first      = 10'd0;

    casez (opcode)
      8'b001?_?110: begin prefix = 1'b1; pfx_seg = 1'b1; end   // ES CS SS DS override
      8'hF0:        begin prefix = 1'b1; pfx_lock = 1'b1; end
      8'hCE:        first = 10'd1;                               // INTO
      8'b0101_0???: first = 10'd13;                              // PUSH r16
      8'b0101_1???: first = 10'd32;                              // POP r16
      8'b1011_1???: begin first = 10'd15; imm_size = 2'd2; end   // MOV r16, imm16
      8'hC7: begin                                               // MOV r/m16, imm16
        need_modrm = 1'b1;
        imm_size   = 2'd2;
        first      = (modrm[7:6] == 2'b11) ? 10'd18 : 10'd16;
      end
      8'b00??_?101: begin                                        // op AX, imm16
        imm_size = 2'd2;
        first    = 10'd19 + 10'(opcode[5:3]);
      end
      8'hE5: begin first = 10'd27; imm_size = 2'd1; end          // IN AX, imm8
      8'hED: first = 10'd28;                                     // IN AX, DX
      8'hE7: begin first = 10'd29; imm_size = 2'd1; end          // OUT imm8, AX
      8'hEF: first = 10'd30;                                     // OUT DX, AX
      8'h89: begin                                               // MOV r/m16, r16
        need_modrm = 1'b1;
        first      = (modrm[7:6] == 2'b11) ? 10'd34 : 10'd35;
      end
      8'h8B: begin                                               // MOV r16, r/m16
        need_modrm = 1'b1;
        first      = (modrm[7:6] == 2'b11) ? 10'd36 : 10'd37;
      end
      8'hEB: begin                                               // JMP short
        first    = 10'd31;
        imm_size = 2'd1;
        imm_sext = 1'b1;
      end
      default: first = 10'd0;
    endcase

    // displacement size from modrm (8086 rules)
    if (direct_off)
      off_size = 2'd2;
    else if (!need_modrm)
      off_size = 2'd0;
    else case (modrm[7:6])
      2'b00:   off_size = (modrm[2:0] == 3'b110) ? 2'd2 : 2'd0;
      2'b01:   off_size = 2'd1;
      2'b10:   off_size = 2'd2;
      default: off_size = 2'd0;
    endcase
  end

endmodule
