// tb_wb_switch: sends memory and IO transactions for every region of the address map
// through the switch to seven slave models that each answer with their own tag, and
// checks that exactly the right slave sees cyc/stb, that its data and ack come back, and
// that an unmapped IO port is answered by the switch itself with all-ones data.
module tb_wb_switch;
  import zet_pkg::*;

  logic clk = 0, rst = 1;
  wb_m2s_t m_i;
  wb_s2m_t m_o;
  wb_m2s_t s_o [7];
  wb_s2m_t s_i [7];
  int checks = 0, failures = 0;

  wb_switch #(.NSLAVE(7)) dut (.*);
  always #5 clk = ~clk;

  // slave models: ack one cycle after stb, data = 0xA000 + index
  for (genvar k = 0; k < 7; k++) begin : g_s
    always_ff @(posedge clk) s_i[k].ack <= s_o[k].cyc && s_o[k].stb && !s_i[k].ack;
    assign s_i[k].dat = 16'hA000 + 16'(k);
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic access(input logic [19:0] a, input bit io, input int exp);
    int n = 0;
    @(negedge clk);
    m_i = '0; m_i.adr = a[19:1]; m_i.tga = io; m_i.cyc = 1; m_i.stb = 1; m_i.sel = 2'b11;
    #1;
    for (int k = 0; k < 7; k++)
      chk((s_o[k].cyc && s_o[k].stb) == (k == exp), $sformatf("%h io=%0d slave %0d select", a, io, k));
    while (!m_o.ack && n < 10) begin @(negedge clk); n++; #1; end
    chk(m_o.ack && m_o.dat == ((exp < 0) ? 16'hFFFF : 16'hA000 + 16'(exp)),
        $sformatf("%h io=%0d answer", a, io));
    @(negedge clk);
    m_i.cyc = 0; m_i.stb = 0;
  endtask

  initial begin
    m_i = '0;
    repeat (2) @(posedge clk);
    rst = 0;
    access(20'h00000, 0, 5); access(20'h9FFFE, 0, 5); access(20'hA0000, 0, 4);
    access(20'hB8000, 0, 4); access(20'hBFFFE, 0, 4); access(20'hC0000, 0, 5);
    access(20'hFFFF0, 0, 5);
    access(20'h00238, 1, 0); access(20'h0023E, 1, 0);
    access(20'h003F8, 1, 1); access(20'h003FE, 1, 1);
    access(20'h00060, 1, 2); access(20'h00064, 1, 2);
    access(20'h0F100, 1, 3);
    access(20'h003C0, 1, 4); access(20'h003DE, 1, 4);
    access(20'h00100, 1, 6);
    access(20'h00080, 1, -1); access(20'h0F102, 1, -1); access(20'h003E0, 1, -1);
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
