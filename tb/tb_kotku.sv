// tb_kotku: end-to-end test of the SoC at its default parameters. The processor boots
// from F000:FFF0 in RAM (the memory behind the SDRAM bridge, modelled with random wait
// states, in the 100 MHz domain behind an async bridge, so every byte crosses clocks) and runs the shared test program. Checks the program's results in RAM and on
// the LEDs, and counts each mechanism the design has, failing any that never happened:
// segment-override and LOCK prefixes, a word store split into two byte transactions,
// bus wait states, an IO read of the switches, an IO write to the LEDs, an access to an
// unmapped IO port answered by the switch, INTO not taken and INTO taken (vector read).
module tb_kotku;
  import zet_pkg::*;
  import tb_prog_pkg::*;

  logic clk = 0, clk_vga = 0, clk_mem = 0, rst = 1;
  logic [7:0] sw, ledr;
  wb_m2s_t flash_m2s, uart_m2s, ps2_m2s, vga_m2s, fml_m2s, sd_m2s;
  wb_s2m_t flash_s2m, uart_s2m, ps2_s2m, vga_s2m, fml_s2m, sd_s2m;
  logic insn_done, lock;
  int checks = 0, failures = 0, insns = 0, cyc = 0;
  int acc0 = 0;
  int n_lock = 0, n_split = 0, n_ovr = 0, n_swread = 0, n_default = 0, n_vector = 0;

  kotku dut (.*);

  tb_wb_mem  #(.MAXWAIT(2))       ram   (.clk(clk_mem), .wb_i(fml_m2s),   .wb_o(fml_s2m));
  tb_wb_stub #(.DATA(16'hF1A5))   flash (.clk(clk), .wb_i(flash_m2s), .wb_o(flash_s2m));
  tb_wb_stub #(.DATA(16'h0060))   uart  (.clk(clk), .wb_i(uart_m2s),  .wb_o(uart_s2m));
  tb_wb_stub #(.DATA(16'h001C))   ps2   (.clk(clk), .wb_i(ps2_m2s),   .wb_o(ps2_s2m));
  tb_wb_stub #(.DATA(16'h0000))   vga   (.clk(clk_vga), .wb_i(vga_m2s),   .wb_o(vga_s2m));
  tb_wb_stub #(.DATA(16'h0000))   sd    (.clk(clk_mem), .wb_i(sd_m2s),    .wb_o(sd_s2m));

  always #40 clk = ~clk;           // 12.5 MHz
  always #20 clk_vga = ~clk_vga;   // 25 MHz
  always #5  clk_mem = ~clk_mem;   // 100 MHz

  wb_m2s_t cpu;
  wb_s2m_t cpu_in;
  assign cpu    = dut.cpu_m2s;
  assign cpu_in = dut.cpu_s2m;

  always @(posedge clk) if (!rst) begin
    cyc++;
    if (insn_done) insns++;
    if (cpu.cyc && cpu_in.ack) begin
      if (lock && cpu.we) n_lock++;
      if (!cpu.tga && cpu.we && {cpu.adr, 1'b0} == 20'hF0102 && cpu.sel == 2'b10) n_split++;
      if (!cpu.tga && cpu.we && {cpu.adr, 1'b0} == 20'hF0104 && cpu.sel == 2'b01) n_split++;
      if (cpu.tga && !cpu.we && {cpu.adr, 1'b0} == 20'h0F100) n_swread++;
      if (cpu.tga && {cpu.adr, 1'b0} == 20'h00080) n_default++;
      if (!cpu.tga && !cpu.we && ({cpu.adr, 1'b0} == 20'h00010 || {cpu.adr, 1'b0} == 20'h00012)) n_vector++;
    end
    if (dut.u_zet.u_fetch.start && dut.u_zet.insn.seg_ovr) n_ovr++;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic logic [15:0] w(input int a);
    return {ram.mem[a + 1], ram.mem[a]};
  endfunction

  initial begin
    sw = 8'h3C;
    for (int i = 0; i < PROG_LEN; i++) ram.mem[20'hF0000 + 20'(16'(16'hFFF0 + i))] = PROG[i];
    ram.mem[20'h00010] = 8'h00; ram.mem[20'h00011] = 8'h01;   // vector 4: 0000:0100
    for (int i = 0; i < HANDLER_LEN; i++) ram.mem[20'h00100 + 20'(i)] = HANDLER[i];
    for (int i = 'h104; i < 'h110; i++) ram.mem[i] = 8'h90;
    repeat (3) @(posedge clk);
    rst = 0;
    // the bridges' slave sides leave reset a few of their own clocks later; only count
    // slave accesses from here on
    acc0 = uart.accesses + flash.accesses + vga.accesses;
    while (insns < PROG_INSNS + HANDLER_INSNS && cyc < 20000) @(posedge clk);
    repeat (20) @(posedge clk);
    chk(insns >= PROG_INSNS + HANDLER_INSNS, "program completed");
    chk(w('h7FE) == 16'h0200, "push bx");
    chk(w('hF0103) == 16'h7432, "lock movw $0x7432,%cs:-0x101(%bx,%di)");
    chk(w('h7FC) == 16'hAA55, "push si");
    chk(w('h7FA) == 16'h003C, "in ax, dx read the switches");
    chk(w('h7F8)[11], "INTO pushed flags with OF set");
    chk(w('h7F6) == 16'hF000 && w('h7F4) == RET_IP, "INTO pushed CS:IP");
    chk(w('h7F2) == 16'h0000, "not-taken INTO pushed nothing");
    chk(w('h900) == 16'h0200, "mov [0x0900], bx");
    chk(dut.u_zet.u_exec.u_regs.r[R_SI] == 16'h003C, "mov bp, ax; mov si, bp");
    chk(dut.u_zet.u_exec.u_regs.r[R_DI] == 16'h0200, "mov di, [0x0900]");
    chk(ledr == 8'hA5, "handler wrote the LEDs");
    // mechanisms
    chk(n_ovr == 1,          $sformatf("segment override prefix (%0d)", n_ovr));
    chk(n_lock == 2,         $sformatf("lock during the locked store (%0d)", n_lock));
    chk(n_split == 2,        $sformatf("odd word split in two byte writes (%0d)", n_split));
    chk(ram.stalls > 0,      $sformatf("bus wait states (%0d)", ram.stalls));
    chk(n_swread == 1,       $sformatf("IO read of switches (%0d)", n_swread));
    chk(n_default == 1,      $sformatf("unmapped IO port answered by switch (%0d)", n_default));
    chk(n_vector == 2,       $sformatf("INTO taken: vector reads (%0d)", n_vector));
    chk(uart.accesses + flash.accesses + vga.accesses == acc0, "no stray slave access");
    $display("%0d instructions in %0d cycles, %0d bus wait states", insns, cyc, ram.stalls);
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
