// tb_zet: runs the shared test program on the processor alone, with memory and IO
// models that insert random wait states, and checks every memory and IO write the
// program makes: stack pushes, the odd-address word store with segment override and
// lock, OUT data, the IN result, and the frame and vector jump of the taken INTO.
// The memory and IO models answer every access one cycle after stb, so the cycles of
// each instruction are checked against the design's timing: 3 cycles per instruction
// byte, 1 to start the sequencer, then 1 per microinstruction, 3 per memory step and 6
// for a word at an odd address.
module tb_zet;
  import zet_pkg::*;
  import tb_prog_pkg::*;

  logic clk = 0, rst = 1;
  wb_m2s_t wb_o, mem_m2s, io_m2s;
  wb_s2m_t wb_i, mem_s2m, io_s2m;
  logic insn_done, lock;
  int checks = 0, failures = 0, insns = 0, locked = 0, cyc = 0;

  zet #(.RESET_CS(16'hF000), .RESET_IP(16'hFFF0)) dut (.*);
  tb_wb_mem #(.MAXWAIT(0)) mem (.clk(clk), .wb_i(mem_m2s), .wb_o(mem_s2m));
  tb_wb_mem #(.MAXWAIT(0)) io  (.clk(clk), .wb_i(io_m2s),  .wb_o(io_s2m));

  always_comb begin
    mem_m2s = wb_o; io_m2s = wb_o;
    mem_m2s.stb = wb_o.stb && !wb_o.tga; mem_m2s.cyc = wb_o.cyc && !wb_o.tga;
    io_m2s.stb  = wb_o.stb &&  wb_o.tga; io_m2s.cyc  = wb_o.cyc &&  wb_o.tga;
    wb_i = wb_o.tga ? io_s2m : mem_s2m;
  end

  always #5 clk = ~clk;
  int done_at [$];
  // expected cycles of each instruction after the first (see the header)
  localparam int EXP_CYC [PROG_INSNS + HANDLER_INSNS - 1] = '{
    11, 11, 11,                // mov bx / di / sp, imm16: 9 + 1 + 1
    8,                         // push bx: 3 + 1 + 1 (SP-2) + 3 (store)
    32,                        // locked, overridden store: 24 + 1 + 1 (imm->tmp) + 6 (odd word)
    14, 8, 10, 11, 7, 8,       // mov si; push si; out imm; mov dx; in dx; push ax
    8, 8, 8,                   // pop cx: 3 + 1 + 3 (load) + 1; push cx; jmp short: 6 + 1 + 1
    8, 16, 16, 8,              // mov bp,ax; mov [disp16],bx: 12 + 1 + 3; mov di,[disp16]; mov si,bp
    5,                         // into, OF clear: 3 + 1 + 1
    11, 11,                    // mov ax; add ax
    26,                        // into, taken: 3 + 1 + 7 steps + 5 memory steps x 3
    11, 7};                    // handler: mov ax; out dx
  always @(posedge clk) begin
    if (!rst) cyc++;
    if (insn_done) begin insns++; done_at.push_back(cyc); end
    if (lock && wb_o.cyc && wb_o.we && wb_i.ack) locked++;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic logic [15:0] w(input int a);
    return {mem.mem[a + 1], mem.mem[a]};
  endfunction

  initial begin
    for (int i = 0; i < PROG_LEN; i++) mem.mem[20'hF0000 + 20'(16'(16'hFFF0 + i))] = PROG[i];
    mem.mem[20'h00010] = 8'h00; mem.mem[20'h00011] = 8'h01;   // vector 4: 0000:0100
    mem.mem[20'h00012] = 8'h00; mem.mem[20'h00013] = 8'h00;
    for (int i = 0; i < HANDLER_LEN; i++) mem.mem[20'h00100 + 20'(i)] = HANDLER[i];
    for (int i = 20'h00104; i < 20'h00110; i++) mem.mem[i] = 8'h90;
    io.mem[20'hF100] = 8'hC3; io.mem[20'hF101] = 8'h5A;       // port F100 reads 0x5AC3
    repeat (3) @(posedge clk);
    rst = 0;
    while (insns < PROG_INSNS + HANDLER_INSNS && cyc < 20000) @(posedge clk);
    repeat (20) @(posedge clk);
    chk(insns >= PROG_INSNS + HANDLER_INSNS, "program completed");
    chk(w(20'h007FE) == 16'h0200, "push bx");
    chk(w(20'hF0103) == 16'h7432, "lock movw $0x7432,%cs:-0x101(%bx,%di)");
    chk(locked == 2, "lock held during the locked store (two byte writes)");
    chk(w(20'h007FC) == 16'hAA55, "mov si, imm (register form) then push si");
    chk({io.mem[20'h81], io.mem[20'h80]} == 16'h1234, "out 0x80, ax");
    chk(w(20'h007FA) == 16'h5AC3, "in ax, dx then push ax; pop cx, push cx");
    chk(dut.u_exec.u_regs.r[R_CX] == 16'h5AC3, "pop cx loaded the pushed value");
    chk(w(20'h00900) == 16'h0200, "mov [0x0900], bx");
    chk(dut.u_exec.u_regs.r[R_DI] == 16'h0200, "mov di, [0x0900]");
    chk(dut.u_exec.u_regs.r[R_BP] == 16'h5AC3 && dut.u_exec.u_regs.r[R_SI] == 16'h5AC3,
        "mov bp, ax then mov si, bp");
    chk(w(20'h007F8)[11] == 1'b1 && w(20'h007F8)[7] == 1'b1 && w(20'h007F8)[6] == 1'b0,
        "flags pushed by INTO: OF and SF set, ZF clear");
    chk(w(20'h007F6) == 16'hF000, "CS pushed by INTO");
    chk(w(20'h007F4) == RET_IP, "IP pushed by INTO");
    chk({io.mem[20'hF101], io.mem[20'hF100]} == 16'h00A5, "handler ran: out dx, ax");
    chk(w(20'h007F2) == 16'h0000, "no extra push from the not-taken INTO");
    for (int i = 1; i < PROG_INSNS + HANDLER_INSNS; i++)
      chk(done_at[i] - done_at[i-1] == EXP_CYC[i-1],
          $sformatf("instruction %0d took %0d cycles, expected %0d", i, done_at[i] - done_at[i-1], EXP_CYC[i-1]));
    $display("%0d instructions in %0d cycles", PROG_INSNS + HANDLER_INSNS, cyc);
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
