// zet: the Zet 8086-compatible processor (single Wishbone master).
//
// Two halves. "Fetch & decode": the fetch state machine reads the instruction bytewise,
// the opcode lookup gives its first sequencer address, and the microcode sequencer walks
// the sequencer ROM and the microcode ROM, issuing one 49-bit microinstruction at a time.
// "Exec": register file, immediate/B multiplexer and ALU carry out each microinstruction.
// Fetch and exec never run at the same time (an instruction is fetched completely, then
// executed), so the 20-bit address multiplexer in front of the single Wishbone master
// selects input 0 (fetch) outside the execute state and input 1 (exec) inside it.
// Timing: one bus transaction per instruction byte, one cycle to start the sequencer, then
// one cycle per microinstruction plus the bus time of each memory step; `insn_done`
// pulses in the last cycle of every instruction. Reset starts fetching at
// RESET_CS:RESET_IP (F000:FFF0, the 8086 reset vector).
module zet
  import zet_pkg::*;
#(
  parameter logic [15:0] RESET_CS = 16'hF000,
  parameter logic [15:0] RESET_IP = 16'hFFF0
) (
  input  logic    clk,
  input  logic    rst,
  output wb_m2s_t wb_o,
  input  wb_s2m_t wb_i,
  output logic    insn_done,
  output logic    lock
);

  // fetch side
  logic         f_req, f_ack, ip_wr, start, done, step, cut_short, valid;
  logic [19:0]  f_addr;
  logic [15:0]  ip_d, cs, ip, flags;
  insn_t        insn;
  fetch_state_t fstate;
  uinstr_t      ui;
  // exec side
  logic         e_req, e_we, e_word, e_io, e_ack;
  logic [19:0]  e_addr;
  logic [15:0]  e_wdata;
  // master
  logic         sel_exec, m_req, m_we, m_word, m_io, m_ack;
  logic [19:0]  m_addr;
  logic [15:0]  m_rdata;

  zet_fetch u_fetch (
    .clk, .rst, .cs(cs), .ip(ip), .req(f_req), .addr(f_addr), .ack(f_ack),
    .byte_i(m_rdata[7:0]), .ip_wr(ip_wr), .ip_d(ip_d), .start(start), .insn(insn),
    .state(fstate), .done(done)
  );

  zet_micro_seq u_seq (
    .clk, .rst, .start(start), .first(insn.first), .step(step), .cut_short(cut_short),
    .valid(valid), .ui(ui), .done(done)
  );

  zet_exec #(.RESET_CS(RESET_CS), .RESET_IP(RESET_IP)) u_exec (
    .clk, .rst, .valid(valid), .ui(ui), .insn(insn), .step(step), .cut_short(cut_short),
    .mreq(e_req), .mwe(e_we), .mword(e_word), .mio(e_io), .maddr(e_addr),
    .mwdata(e_wdata), .mack(e_ack), .mrdata(m_rdata), .ip_wr(ip_wr), .ip_d(ip_d),
    .cs(cs), .ip(ip), .flags(flags)
  );

  // address multiplexer: 0 = fetch, 1 = exec
  assign sel_exec = (fstate == ST_EXEC);
  assign m_req    = sel_exec ? e_req   : f_req;
  assign m_addr   = sel_exec ? e_addr  : f_addr;
  assign m_we     = sel_exec && e_we;
  assign m_word   = sel_exec && e_word;
  assign m_io     = sel_exec && e_io;
  assign f_ack    = !sel_exec && m_ack;
  assign e_ack    = sel_exec && m_ack;

  zet_wb_master u_wbm (
    .clk, .rst, .req(m_req), .we(m_we), .word(m_word), .io(m_io), .addr(m_addr),
    .wdata(e_wdata), .ack(m_ack), .rdata(m_rdata), .wb_o(wb_o), .wb_i(wb_i)
  );

  assign insn_done = done;
  assign lock      = sel_exec && insn.lock;

endmodule
