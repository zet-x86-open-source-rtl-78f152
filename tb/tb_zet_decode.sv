// tb_zet_decode: checks the opcode lookup: prefixes, instruction format (modrm,
// displacement size for every mod/r-m case, immediate size) and first sequencer address.
module tb_zet_decode;
  import zet_pkg::*;

  logic [7:0] opcode, modrm;
  logic prefix, pfx_seg, pfx_lock, need_modrm, direct_off, imm_sext;
  logic [1:0] pfx_sreg, off_size, imm_size;
  logic [9:0] first;
  int checks = 0, failures = 0;

  zet_decode dut (.*);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (op %02h modrm %02h)", what, opcode, modrm); end
  endtask

  initial begin
    modrm = 8'h00;
    opcode = 8'h2E; #1; chk(prefix && pfx_seg && pfx_sreg == S_CS && !pfx_lock, "cs prefix");
    opcode = 8'h26; #1; chk(prefix && pfx_seg && pfx_sreg == S_ES, "es prefix");
    opcode = 8'h36; #1; chk(prefix && pfx_seg && pfx_sreg == S_SS, "ss prefix");
    opcode = 8'h3E; #1; chk(prefix && pfx_seg && pfx_sreg == S_DS, "ds prefix");
    opcode = 8'hF0; #1; chk(prefix && pfx_lock && !pfx_seg, "lock prefix");
    opcode = 8'hCE; #1; chk(!prefix && !need_modrm && imm_size == 0 && first == 10'd1, "into");
    for (int r = 0; r < 8; r++) begin
      opcode = 8'h50 + 8'(r); #1; chk(first == 10'd13 && imm_size == 0 && !need_modrm, "push");
      opcode = 8'h58 + 8'(r); #1; chk(first == 10'd32 && imm_size == 0 && !need_modrm, "pop");
      opcode = 8'hB8 + 8'(r); #1; chk(first == 10'd15 && imm_size == 2 && !need_modrm, "mov r,imm");
      opcode = {2'b00, 3'(r), 3'b101}; #1;
      chk(first == 10'd19 + 10'(r) && imm_size == 2 && !prefix, "acc op");
    end
    opcode = 8'hC7;
    for (int m = 0; m < 256; m++) begin
      int exp_off;
      modrm = 8'(m); #1;
      case (m >> 6)
        0: exp_off = ((m & 7) == 6) ? 2 : 0;
        1: exp_off = 1;
        2: exp_off = 2;
        default: exp_off = 0;
      endcase
      chk(need_modrm && imm_size == 2 && off_size == 2'(exp_off)
          && first == (((m >> 6) == 3) ? 10'd18 : 10'd16), "mov r/m,imm");
    end
    modrm = 8'h81;
    opcode = 8'hE5; #1; chk(first == 10'd27 && imm_size == 1 && !imm_sext, "in imm");
    opcode = 8'hED; #1; chk(first == 10'd28 && imm_size == 0, "in dx");
    opcode = 8'hE7; #1; chk(first == 10'd29 && imm_size == 1, "out imm");
    opcode = 8'hEF; #1; chk(first == 10'd30 && imm_size == 0, "out dx");
    for (int m = 0; m < 256; m += 5) begin
      modrm = 8'(m);
      opcode = 8'h89; #1;
      chk(need_modrm && imm_size == 0 && first == (((m >> 6) == 3) ? 10'd34 : 10'd35), "mov r/m,r");
      opcode = 8'h8B; #1;
      chk(need_modrm && imm_size == 0 && first == (((m >> 6) == 3) ? 10'd36 : 10'd37), "mov r,r/m");
    end
    modrm = 8'h81;
    opcode = 8'hEB; #1; chk(first == 10'd31 && imm_size == 1 && imm_sext && !need_modrm, "jmp short");
    opcode = 8'h90; #1; chk(first == 10'd0 && imm_size == 0 && off_size == 0 && !prefix, "nop");
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
