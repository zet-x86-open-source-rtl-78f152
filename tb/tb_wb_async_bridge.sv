// tb_wb_async_bridge: the Wishbone clock-domain bridge at three clock ratios (master
// 12.5 MHz to slave 100 MHz, master 12.5 MHz to slave 25 MHz, and a fast master to a
// slow slave). A master model issues random byte and word reads and writes, back to
// back or with idle gaps, to a memory with random wait states on the slave side. Checks
// every read against a byte model, that each master request makes exactly one slave
// access, that ack is a one-cycle pulse, and that each transfer ends within a bound.
module tb_wb_async_bridge;
  import zet_pkg::*;

  logic clk_m = 0, clk_s = 0, rst = 1;
  int   hm = 40, hs = 5;                 // half periods in ns
  wb_m2s_t m_i, s_o;
  wb_s2m_t m_o, s_i;
  int checks = 0, failures = 0;
  logic [7:0] model [256];

  wb_async_bridge dut (.rst, .clk_m, .m_i, .m_o, .clk_s, .s_o, .s_i);
  tb_wb_mem #(.MAXWAIT(3)) mem (.clk(clk_s), .wb_i(s_o), .wb_o(s_i));

  always #(hm) clk_m = ~clk_m;
  always #(hs) clk_s = ~clk_s;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  // ack must never stay high for two master cycles
  logic ack_q = 0;
  always @(posedge clk_m) begin
    if (ack_q && m_o.ack) chk(0, "ack held two cycles");
    ack_q <= m_o.ack;
  end

  task automatic xfer(input bit we, input logic [7:0] wa, input logic [1:0] sel,
                      input logic [15:0] dat);
    int n, acc0;
    logic [15:0] exp;
    acc0 = mem.reads + mem.writes;
    @(negedge clk_m);
    m_i.adr = {11'h0, wa}; m_i.we = we; m_i.sel = sel; m_i.dat = dat;
    m_i.tga = 1'b0; m_i.cyc = 1'b1; m_i.stb = 1'b1;
    n = 0;
    do begin @(negedge clk_m); n++; end while (!m_o.ack && n < 100);
    // bound: synchronizers, up to MAXWAIT slave wait states and the return trip
    chk(n <= 6 + 10 * ((hs + hm - 1) / hm), $sformatf("transfer ended in %0d master cycles", n));
    exp = {model[{wa[6:0], 1'b1}], model[{wa[6:0], 1'b0}]};
    if (we) begin
      if (sel[0]) model[{wa[6:0], 1'b0}] = dat[7:0];
      if (sel[1]) model[{wa[6:0], 1'b1}] = dat[15:8];
    end else begin
      chk(((m_o.dat ^ exp) & {{8{sel[1]}}, {8{sel[0]}}}) == 16'h0,
          $sformatf("read %h sel %b got %h want %h", wa, sel, m_o.dat, exp));
    end
    m_i.cyc = 1'b0; m_i.stb = 1'b0;
    chk(mem.reads + mem.writes == acc0 + 1, "one slave access per request");
    if ($urandom % 3 == 0) repeat ($urandom % 4) @(negedge clk_m);
  endtask

  task automatic phase(input int m, input int s, input int n);
    hm = m; hs = s;
    rst = 1;
    repeat (4) @(negedge clk_m);
    repeat (4) @(negedge clk_s);
    rst = 0;
    repeat (2) @(negedge clk_m);
    for (int i = 0; i < n; i++) begin
      logic [1:0] sel;
      sel = 2'($urandom % 3 + 1);
      xfer($urandom % 2 == 1, 8'($urandom % 128), sel, 16'($urandom));
    end
  endtask

  initial begin
    m_i = '0;
    for (int i = 0; i < 256; i++) model[i] = 8'h00;
    phase(40, 5, 400);     // 12.5 MHz -> 100 MHz
    phase(40, 20, 400);    // 12.5 MHz -> 25 MHz
    phase(7, 33, 400);     // fast master, slow slave
    chk(mem.stalls > 0, "slave wait states happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #50ms;
    $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1);
    $finish;
  end
endmodule
