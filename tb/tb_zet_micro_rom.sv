// tb_zet_micro_rom: checks the microcode ROM words.
//
// Words 0..11 (INTO) are compared, on every bit the published INTO microcode specifies,
// with the expected 49-bit patterns (value and care-mask pairs). The remaining words are
// checked field by field against what each supported instruction needs.
module tb_zet_micro_rom;
  import zet_pkg::*;

  logic [8:0] addr;
  uinstr_t    data;
  int checks = 0, failures = 0;

  zet_micro_rom dut (.addr(addr), .data(data));

  localparam logic [48:0] EXP [12][2] = '{
    '{49'h000001d000000, 49'h000009ffc0000},
    '{49'h0400254910010, 49'h1d866ffffc03c},
    '{49'h0000257934000, 49'h1d802ffffc000},
    '{49'h0000083883712, 49'h027ffbffc3fff},
    '{49'h000025b840000, 49'h00002fffc0000},
    '{49'h0800254910010, 49'h1d866ffffc03c},
    '{49'h0000083883f12, 49'h027ffbffc3fff},
    '{49'h0000087882712, 49'h027ffbffc3fff},
    '{49'h0800240134000, 49'h1d806ffffc000},
    '{49'h0400242934034, 49'h1d866ffffc03c},
    '{49'h0400284924034, 49'h1d867ffffc03c},
    '{49'h000028493c034, 49'h1d867ffffc03c}};

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    for (int i = 0; i < 12; i++) begin
      addr = 9'(i); #1;
      check(((data ^ EXP[i][0]) & EXP[i][1]) == 49'h0, $sformatf("INTO word %0d = %013h", i, data));
    end
    // PUSH: store opcode register at SS:SP
    addr = 9'd12; #1;
    check(data.wr_mem && data.var_c == V_OPREG && data.addr_s == S_SS && data.addr_a == R_SP
          && data.t == T_OTHER && data.func == 3'd0, "push store");
    addr = 9'd13; #1;
    check(data.wr && data.var_d == V_OPREG && data.b_imm && data.var_imm == I_INSN
          && data.t == T_MOV, "mov r16,imm");
    addr = 9'd15; #1;
    check(data.wr_mem && data.var_a == V_EA && data.var_b == V_EA && data.var_s
          && data.var_off && data.addr_c == R_TMP, "store at EA");
    for (int k = 0; k < 8; k++) begin
      addr = 9'(17 + k); #1;
      check(data.t == T_ARITH && data.func == 3'(k) && data.wrfl && data.addr_a == R_AX
            && (data.wr == (k != 7)), $sformatf("acc op %0d", k));
    end
    addr = 9'd26; #1;
    check(data.m_io && data.memalu == 2'b10 && data.wr && data.addr_a == R_DX
          && data.addr_d == R_AX, "in ax,dx");
    addr = 9'd28; #1;
    check(data.m_io && data.wr_mem && data.addr_c == R_AX && data.addr_a == R_DX, "out dx,ax");
    addr = 9'd29; #1;
    check(data == '0, "nop");
    addr = 9'd30; #1;
    check(data.wr && data.t == T_ARITH && data.func == 3'd0 && data.addr_a == R_IP
          && data.addr_d == R_IP && data.b_imm && data.var_imm == I_INSN && !data.wrfl,
          "jmp short: IP + imm");
    addr = 9'd31; #1;
    check(data.wr && !data.wr_mem && data.memalu == 2'b10 && data.var_d == V_OPREG
          && data.addr_s == S_SS && data.addr_a == R_SP && data.addr_b == R_ZERO
          && data.t == T_OTHER && data.func == 3'd0 && !data.m_io, "pop load");
    addr = 9'd32; #1;
    check(data.wr && data.t == T_ARITH && data.func == 3'd0 && data.addr_a == R_SP
          && data.addr_d == R_SP && data.var_imm == I_2 && !data.wrfl, "pop: SP + 2");
    addr = 9'd33; #1;
    check(data.wr && data.t == T_MOV && !data.b_imm && data.var_b == V_MREG
          && data.var_d == V_EA && data.memalu == 2'b01, "mov r/m reg form");
    addr = 9'd34; #1;
    check(data.wr_mem && !data.wr && data.var_c == V_MREG && data.var_a == V_EA
          && data.var_b == V_EA && data.var_s && data.var_off && data.t == T_OTHER, "mov [ea], r");
    addr = 9'd35; #1;
    check(data.wr && data.t == T_ARITH && data.func == 3'd0 && data.var_a == V_EA
          && data.var_d == V_MREG && data.b_imm && data.var_imm == I_0 && !data.wrfl, "mov r, r/m reg");
    addr = 9'd36; #1;
    check(data.wr && !data.wr_mem && data.memalu == 2'b10 && data.var_d == V_MREG
          && data.var_a == V_EA && data.var_b == V_EA && data.var_s && data.var_off, "mov r, [ea]");
    addr = 9'd300; #1;
    check(data == '0, "unused word");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
