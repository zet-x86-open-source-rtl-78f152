// zet_micro_rom: the microcode ROM, 512 words of 49 bits.
//
// Addressed by the 9-bit microcode address that the sequencer ROM supplies; the read is
// combinational. Each word is a uinstr_t in the published 49-bit microinstruction format.
// Because the sequencer ROM names microinstructions by address, one word can serve
// several instructions: word 1 ("SP = SP - 2") is used both by INTO and by PUSH.
//
// Words 0..11 are the twelve steps of INTO (check OF, push flags, clear IF/TF, push IP
// and CS, load IP and CS from the vector at 0x10), field for field as the published INTO
// microcode gives them, with its don't-care bits set to zero; the var_imm codes there are
// read as 0 = 0, 1 = 2, 2 = 4. The other words implement the rest of the supported
// 8086 subset (PUSH r16, MOV r16/imm, MOV r/m16/imm, ALU AX/imm16, IN and OUT of AX,
// a no-operation word, JMP short, POP r16, MOV between a register and r/m) and are
// this design's own. The contents are written as
// SystemVerilog, so no data file is needed.
module zet_micro_rom
  import zet_pkg::*;
(
  input  logic [UA_W-1:0] addr,
  output uinstr_t         data
);

  // mnemonic names for the microcode words
  localparam logic [UA_W-1:0]
    U_OCHK = 9'd0,  U_SP2   = 9'd1,  U_F2R   = 9'd2,  U_STF   = 9'd3,
    U_CLIT = 9'd4,  U_SP4   = 9'd5,  U_STIP  = 9'd6,  U_STCS  = 9'd7,
    U_4TMP = 9'd8,  U_TMP4  = 9'd9,  U_LDCS  = 9'd10, U_LDIP  = 9'd11,
    U_STREG = 9'd12, U_MOVRI = 9'd13, U_I2TMP = 9'd14, U_STEA = 9'd15,
    U_MOVEI = 9'd16, U_ACC0 = 9'd17,  // 17..24: ALU AX, imm16 for group-1 codes 0..7
    U_INI  = 9'd25, U_IND   = 9'd26, U_OUTI  = 9'd27, U_OUTD  = 9'd28,
    U_NOP  = 9'd29, U_JMPS = 9'd30,  U_LDSP  = 9'd31, U_SPP2  = 9'd32,
    U_MRR  = 9'd33, U_STMR = 9'd34,  U_MRRM  = 9'd35, U_LDMR  = 9'd36;

  // register-writing ALU step: D <= ALU(A, B-or-immediate)
  function automatic uinstr_t alu_op(input logic [2:0] t, input logic [2:0] f,
                                     input logic [3:0] ad_a, input logic [3:0] ad_d,
                                     input logic [2:0] vimm);
    uinstr_t u = '0;
    u.t = t; u.func = f; u.addr_a = ad_a; u.addr_d = ad_d;
    u.var_imm = vimm; u.b_imm = 1'b1; u.memalu = 2'b01; u.wr = 1'b1;
    return u;
  endfunction

  // store C at S:(A + B + offset) (+2 when f = 1)
  function automatic uinstr_t store(input logic [2:0] f, input logic [3:0] ad_c);
    uinstr_t u = '0;
    u.t = T_OTHER; u.func = f; u.memalu = 2'b10; u.wr_mem = 1'b1;
    u.addr_s = S_SS; u.addr_a = R_SP; u.addr_b = R_ZERO; u.addr_c = ad_c;
    return u;
  endfunction

  // IO access of AX at port (A | immediate)
  function automatic uinstr_t io_op(input logic write, input logic [3:0] ad_a,
                                    input logic [2:0] vimm);
    uinstr_t u = '0;
    u.t = T_ARITH; u.func = 3'd1; u.addr_a = ad_a; u.var_imm = vimm; u.b_imm = 1'b1;
    u.m_io = 1'b1; u.memalu = 2'b10;
    if (write) begin u.wr_mem = 1'b1; u.addr_c = R_AX; end
    else       begin u.wr = 1'b1;     u.addr_d = R_AX; end
    return u;
  endfunction

  function automatic uinstr_t rom(input logic [UA_W-1:0] ad);
    uinstr_t u = '0;
    case (ad)
      // ---- INTO
      U_OCHK:  begin u.t = T_COND; u.func = 3'd7; end               // OF set?
      U_SP2:   u = alu_op(T_ARITH, 3'd5, R_SP, R_SP, I_2);          // SP - 2
      U_F2R:   u = alu_op(T_OTHER, 3'd5, 4'd0, R_TMP, I_0);         // flags -> tmp
      U_STF:   u = store(3'd0, R_TMP);                              // [SS:SP] = tmp
      U_CLIT:  begin u.t = T_OTHER; u.func = 3'd6; u.b_imm = 1'b1;  // IF = TF = 0
                     u.memalu = 2'b01; u.wrfl = 1'b1; end
      U_SP4:   u = alu_op(T_ARITH, 3'd5, R_SP, R_SP, I_4);          // SP - 4
      U_STIP:  u = store(3'd0, R_IP);                               // [SS:SP] = IP
      U_STCS:  u = store(3'd1, R_CS);                               // [SS:SP+2] = CS
      U_4TMP:  u = alu_op(T_MOV, 3'd0, 4'd0, R_TMP, I_4);           // tmp = 4
      U_TMP4:  u = alu_op(T_SHROT, 3'd0, R_TMP, R_TMP, I_2);        // tmp rol 2
      U_LDCS:  begin u = alu_op(T_ARITH, 3'd1, R_TMP, R_CS, I_2);   // CS = [tmp | 2]
                     u.memalu = 2'b10; end
      U_LDIP:  begin u = alu_op(T_ARITH, 3'd1, R_TMP, R_IP, I_0);   // IP = [tmp]
                     u.memalu = 2'b10; end
      // ---- PUSH r16: second step, store the opcode's register
      U_STREG: begin u = store(3'd0, 4'd0); u.var_c = V_OPREG; end
      // ---- MOV r16, imm16
      U_MOVRI: begin u = alu_op(T_MOV, 3'd0, 4'd0, 4'd0, I_INSN); u.var_d = V_OPREG; end
      // ---- MOV r/m16, imm16 (memory form: two steps)
      U_I2TMP: u = alu_op(T_MOV, 3'd0, 4'd0, R_TMP, I_INSN);
      U_STEA:  begin u = store(3'd0, R_TMP); u.var_s = 1'b1; u.var_a = V_EA;
                     u.var_b = V_EA; u.var_off = 1'b1; end
      // ---- MOV r/m16, imm16 (register form)
      U_MOVEI: begin u = alu_op(T_MOV, 3'd0, 4'd0, 4'd0, I_INSN); u.var_d = V_EA; end
      // ---- IN / OUT
      U_INI:   u = io_op(1'b0, R_ZERO, I_INSN);
      U_IND:   u = io_op(1'b0, R_DX,   I_0);
      U_OUTI:  u = io_op(1'b1, R_ZERO, I_INSN);
      U_OUTD:  u = io_op(1'b1, R_DX,   I_0);
      U_NOP:   u = '0;
      // ---- JMP short: IP (already past the instruction) + sign-extended imm8
      U_JMPS:  u = alu_op(T_ARITH, 3'd0, R_IP, R_IP, I_INSN);
      // ---- POP r16: opcode's register = [SS:SP], then SP + 2
      U_LDSP:  begin u = store(3'd0, 4'd0); u.wr_mem = 1'b0; u.wr = 1'b1;
                     u.var_d = V_OPREG; end
      U_SPP2:  u = alu_op(T_ARITH, 3'd0, R_SP, R_SP, I_2);
      // ---- MOV r/m16, r16: register form (B = reg, D = r/m), memory form (store reg)
      U_MRR:   begin u = alu_op(T_MOV, 3'd0, 4'd0, 4'd0, I_0); u.b_imm = 1'b0;
                     u.var_b = V_MREG; u.var_d = V_EA; end
      U_STMR:  begin u = store(3'd0, 4'd0); u.var_c = V_MREG; u.var_s = 1'b1;
                     u.var_a = V_EA; u.var_b = V_EA; u.var_off = 1'b1; end
      // ---- MOV r16, r/m16: register form (A = r/m + 0), memory form (load at EA)
      U_MRRM:  begin u = alu_op(T_ARITH, 3'd0, 4'd0, 4'd0, I_0);
                     u.var_a = V_EA; u.var_d = V_MREG; end
      U_LDMR:  begin u = store(3'd0, 4'd0); u.wr_mem = 1'b0; u.wr = 1'b1;
                     u.var_d = V_MREG; u.var_s = 1'b1; u.var_a = V_EA; u.var_b = V_EA;
                     u.var_off = 1'b1; end
      default: begin
        if (ad >= U_ACC0 && ad < U_ACC0 + 9'd8) begin  // ADD..CMP AX, imm16
          u = alu_op(T_ARITH, 3'(ad - U_ACC0), R_AX, R_AX, I_INSN);
          u.wrfl = 1'b1;
          if (ad == U_ACC0 + 9'd7) u.wr = 1'b0;         // CMP writes flags only
        end else begin
          u = '0;
        end
      end
    endcase
    return u;
  endfunction

  assign data = rom(addr);

endmodule
