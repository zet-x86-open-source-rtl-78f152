// zet_exec: the execution unit of the Zet core.
//
// Runs one microinstruction at a time. It first resolves the variable fields: var_a,
// var_b, var_c and var_d replace the register address of the microinstruction by one
// taken from the instruction (1 = opcode bits 2:0, 2 = modrm reg, 3 = modrm r/m, where
// for A and B "r/m" means the base and index register of the 8086 effective address,
// BX/BP/SI/DI or the zero register, and in register form (mod = 11) the r/m register
// itself for A and zero for B); var_s = 1 takes the segment from an override prefix,
// else SS for BP-based addresses and DS otherwise; var_off = 1 supplies the instruction's
// displacement; var_imm selects 0, 2, 4, 1 or the instruction's immediate. It then reads
// the register file, muxes the B operand with the immediate (b_imm), and runs the ALU.
// When memalu[1] is set the step is a bus access at the ALU result (a 20-bit physical
// address, or a port number when m_io is set): a write of the C operand when wr_mem,
// otherwise a read; the step ends when the bus acknowledges. Otherwise the step takes one
// cycle. At the end of a step the D bus (memory data when memalu = 2'b10, else the ALU
// result) is written to register D when wr, or when wr_cnd and the ALU condition holds;
// `high` also writes ALU bits 31:16 to DX; wrfl writes the flags. A condition test
// (t = 2) that fails without a conditional write ends the instruction (`cut_short`).
// The register file, the ALU and the flags register live here.
module zet_exec
  import zet_pkg::*;
#(
  parameter logic [15:0] RESET_CS = 16'hF000,
  parameter logic [15:0] RESET_IP = 16'hFFF0
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        valid,
  input  uinstr_t     ui,
  input  insn_t       insn,
  output logic        step,
  output logic        cut_short,
  // bus
  output logic        mreq,
  output logic        mwe,
  output logic        mword,
  output logic        mio,
  output logic [19:0] maddr,
  output logic [15:0] mwdata,
  input  logic        mack,
  input  logic [15:0] mrdata,
  // to fetch
  input  logic        ip_wr,
  input  logic [15:0] ip_d,
  output logic [15:0] cs,
  output logic [15:0] ip,
  output logic [15:0] flags
);

  logic [3:0]  ra, rb, rc, rd;
  logic [1:0]  rs;
  logic [15:0] a, b, c, s, bbus, imm, off;
  logic [31:0] alu_out, dbus;
  logic [15:0] flags_n;
  logic        cond, reg_we, mem_step;
  logic [2:0]  rm;

  // effective-address base and index of the modrm r/m field; in register form (mod = 11)
  // the base is the register that r/m names and the index is zero
  function automatic logic [3:0] ea_base(input logic [7:0] m);
    if (m[7:6] == 2'b11) return {1'b0, m[2:0]};
    unique case (m[2:0])
      3'd0, 3'd1, 3'd7: return R_BX;
      3'd2, 3'd3:       return R_BP;
      3'd4:             return R_SI;
      3'd5:             return R_DI;
      default:          return (m[7:6] == 2'b00) ? R_ZERO : R_BP;  // 6: disp16 or BP
    endcase
  endfunction

  function automatic logic [3:0] ea_index(input logic [7:0] m);
    if (m[7:6] == 2'b11) return R_ZERO;
    unique case (m[2:0])
      3'd0, 3'd2: return R_SI;
      3'd1, 3'd3: return R_DI;
      default:    return R_ZERO;
    endcase
  endfunction

  function automatic logic [3:0] vsel(input logic [1:0] v, input logic [3:0] u,
                                      input logic [3:0] ea, input insn_t i);
    unique case (v)
      V_OPREG: return {1'b0, i.opcode[2:0]};
      V_MREG:  return {1'b0, i.modrm[5:3]};
      V_EA:    return ea;
      default: return u;
    endcase
  endfunction

  assign rm = insn.modrm[2:0];

  always_comb begin
    ra = vsel(ui.var_a, ui.addr_a, ea_base(insn.modrm), insn);
    rb = vsel(ui.var_b, ui.addr_b, ea_index(insn.modrm), insn);
    rc = vsel(ui.var_c, ui.addr_c, {1'b0, rm}, insn);
    rd = vsel(ui.var_d, ui.addr_d, {1'b0, rm}, insn);
    if (!ui.var_s)         rs = ui.addr_s;
    else if (insn.seg_ovr) rs = insn.seg;
    else if (ea_base(insn.modrm) == R_BP) rs = S_SS;
    else                   rs = S_DS;
    off = ui.var_off ? insn.off : 16'h0000;
    unique case (ui.var_imm)
      I_0:     imm = 16'd0;
      I_2:     imm = 16'd2;
      I_4:     imm = 16'd4;
      I_INSN:  imm = insn.imm;
      I_1:     imm = 16'd1;
      default: imm = 16'd0;
    endcase
  end

  zet_regfile #(.RESET_CS(RESET_CS), .RESET_IP(RESET_IP)) u_regs (
    .clk, .rst,
    .addr_a(ra), .a_byte(ui.a_byte), .addr_b(rb), .addr_c(rc), .c_byte(ui.c_byte),
    .addr_s(rs), .a(a), .b(b), .c(c), .s(s),
    .wr(reg_we), .addr_d(rd), .d_byte(ui.byteop), .high(ui.high && step && valid),
    .d(dbus), .ip_wr(ip_wr), .ip_d(ip_d), .cs(cs), .ip(ip)
  );

  assign bbus = ui.b_imm ? imm : b;

  zet_alu u_alu (
    .t(ui.t), .func(ui.func), .byteop(ui.byteop), .a(a), .b(bbus), .s(s), .off(off),
    .flags_i(flags), .out(alu_out), .flags_o(flags_n), .cond(cond)
  );

  assign mem_step = ui.memalu[1];
  assign mreq     = valid && mem_step;
  assign mwe      = ui.wr_mem;
  assign mword    = !ui.byteop;
  assign mio      = ui.m_io;
  assign maddr    = ui.m_io ? {4'h0, alu_out[15:0]} : alu_out[19:0];
  assign mwdata   = c;

  assign step   = valid && (!mem_step || mack);
  assign cut_short  = valid && (ui.t == T_COND) && !cond && !ui.wr_cnd;
  assign dbus   = (ui.memalu == 2'b10) ? {16'h0, mrdata} : alu_out;
  assign reg_we = step && !ui.wr_mem && (ui.wr || (ui.wr_cnd && cond));

  always_ff @(posedge clk) begin
    if (rst)                       flags <= 16'hF002;
    else if (step && ui.wrfl)      flags <= (flags_n & 16'h0FD5) | 16'hF002;
  end

endmodule
