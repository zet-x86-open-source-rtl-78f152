// tb_zet_exec: drives the exec unit with microcode words from the microcode ROM and
// hand-built instruction fields, as the sequencer would, and answers its bus requests
// from a small memory with random latency. Checks the bus addresses and data of PUSH,
// of the segment-overridden MOV r/m16, imm16 with base+index+displacement, IO accesses,
// flags after ADD, both outcomes of the INTO overflow test, and the CS:IP, stack
// contents and cleared IF/TF after a taken INTO.
module tb_zet_exec;
  import zet_pkg::*;

  logic clk = 0, rst = 1;
  logic valid, step, cut_short, mreq, mwe, mword, mio, mack, ip_wr;
  uinstr_t ui;
  insn_t insn;
  logic [19:0] maddr;
  logic [15:0] mwdata, mrdata, ip_d, cs, ip, flags;
  logic [8:0] uaddr;
  logic [15:0] mem [logic [20:0]];   // {io, address} -> word
  int checks = 0, failures = 0, stalls = 0;

  zet_exec #(.RESET_CS(16'hF000), .RESET_IP(16'h0100)) dut (.*);
  zet_micro_rom rom (.addr(uaddr), .data(ui));

  always #5 clk = ~clk;

  // bus responder: ack after 0..2 cycles, combinationally, as the master does
  int lat = 0;
  logic [1:0] want = 0;
  always @(posedge clk) begin
    if (mreq && !mack) begin lat <= lat + 1; stalls++; end else lat <= 0;
    if (!mreq || mack) want <= 2'($urandom % 3);
    if (mack && mwe) mem[{mio, maddr}] = mwdata;
  end
  assign mack   = mreq && (lat >= int'(want));
  assign mrdata = mem.exists({mio, maddr}) ? mem[{mio, maddr}] : 16'h0;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // issue one microinstruction; return whether it aborted
  task automatic issue(input int w, output bit ab);
    @(negedge clk);
    uaddr = 9'(w); valid = 1;
    #1;
    while (!step) begin @(negedge clk); #1; end
    ab = cut_short;
    @(negedge clk);
    valid = 0;
  endtask

  task automatic set_insn(input logic [7:0] op, input logic [7:0] m, input logic [15:0] off,
                          input logic [15:0] imm, input bit ovr, input logic [1:0] seg);
    insn = '0;
    insn.opcode = op; insn.modrm = m; insn.off = off; insn.imm = imm;
    insn.seg_ovr = ovr; insn.seg = seg;
  endtask

  task automatic mov_ri(input int r, input logic [15:0] v);
    bit ab;
    set_insn(8'hB8 + 8'(r), 0, 0, v, 0, 0);
    issue(13, ab);
  endtask

  initial begin
    bit ab;
    valid = 0; uaddr = 0; insn = '0; ip_wr = 0; ip_d = 0;
    repeat (2) @(posedge clk);
    rst = 0;
    chk(cs == 16'hF000 && ip == 16'h0100 && flags == 16'hF002, "reset state");
    // PUSH BX with SS = 0, SP = 0x0800
    mov_ri(3, 16'h0200);
    mov_ri(4, 16'h0800);
    set_insn(8'h53, 0, 0, 0, 0, 0);
    issue(1, ab); issue(12, ab);
    chk(mem[{1'b0, 20'h007FE}] == 16'h0200, "push bx stored at SS:07FE");
    // lock movw $0x7432, %cs:-0x101(%bx,%di)  with BX = 0x0200, DI = 0x0004
    mov_ri(7, 16'h0004);
    set_insn(8'hC7, 8'h81, 16'hFEFF, 16'h7432, 1, S_CS);
    issue(14, ab); issue(15, ab);
    chk(mem[{1'b0, 20'hF0103}] == 16'h7432, "store at CS:BX+DI-0x101");
    // the same with the default segment (DS = 0) and BP-based default SS
    set_insn(8'hC7, 8'h81, 16'h0010, 16'h1111, 0, 0);
    issue(14, ab); issue(15, ab);
    chk(mem[{1'b0, 20'h00214}] == 16'h1111, "store at DS:BX+DI+0x10");
    // ADD AX, 1 from 0x7FFF: OF, SF, AF set
    mov_ri(0, 16'h7FFF);
    set_insn(8'h05, 0, 0, 16'h0001, 0, 0);
    issue(17, ab);
    chk(flags[F_OF] && flags[F_SF] && !flags[F_ZF] && !flags[F_CF] && flags[F_AF], "add flags");
    // OUT DX, AX then IN AX, imm8
    mov_ri(2, 16'hF100);
    set_insn(8'hEF, 0, 0, 0, 0, 0);
    issue(28, ab);
    chk(mem[{1'b1, 20'h0F100}] == 16'h8000, "out dx, ax");
    mem[{1'b1, 20'h00060}] = 16'h00A5;
    set_insn(8'hE5, 0, 0, 16'h0060, 0, 0);
    issue(25, ab);
    set_insn(8'h50, 0, 0, 0, 0, 0);   // push ax to look at it
    issue(1, ab); issue(12, ab);
    chk(mem[{1'b0, 20'h007FC}] == 16'h00A5, "in ax, imm8");
    // INTO with OF set: full sequence; vector 4 at 0x10 -> 1234:0056
    mem[{1'b0, 20'h00010}] = 16'h0056;
    mem[{1'b0, 20'h00012}] = 16'h1234;
    // AX = 0x00A5 now; flags OF = 1 from the ADD
    begin
      logic [15:0] fl0;
      fl0 = flags;
      set_insn(8'hCE, 0, 0, 0, 0, 0);
      issue(0, ab);
      chk(!ab, "INTO continues when OF = 1");
      for (int w = 1; w < 12; w++) issue(w, ab);
      chk(cs == 16'h1234 && ip == 16'h0056, "INTO loads CS:IP from vector 4");
      chk(mem[{1'b0, 20'h007FA}] == fl0, "flags pushed");
      chk(mem[{1'b0, 20'h007F8}] == 16'hF000, "CS pushed");
      chk(mem[{1'b0, 20'h007F6}] == 16'h0100, "IP pushed");
      chk(!flags[F_IF] && !flags[F_TF], "IF and TF cleared");
    end
    // SUB AX, AX-value to clear OF, then INTO must cut_short on its first step
    set_insn(8'h2D, 0, 0, 16'h00A5, 0, 0);
    issue(22, ab);
    chk(flags[F_ZF] && !flags[F_OF], "sub to zero");
    set_insn(8'hCE, 0, 0, 0, 0, 0);
    issue(0, ab);
    chk(ab, "INTO ends at once when OF = 0");
    chk(stalls > 0, "bus stalls exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
