// tb_sw_leds: Wishbone reads of the switches and writes of the LEDs, with the ack
// arriving one cycle after stb.
module tb_sw_leds;
  import zet_pkg::*;

  logic clk = 0, rst = 1;
  wb_m2s_t wb_i;
  wb_s2m_t wb_o;
  logic [7:0] sw, ledr;
  int checks = 0, failures = 0;

  sw_leds #(.NSW(8), .NLED(8)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic access(input bit we, input logic [15:0] dat, input logic [1:0] sel,
                        output logic [15:0] rd, output int wait_cycles);
    @(negedge clk);
    wb_i.cyc = 1; wb_i.stb = 1; wb_i.we = we; wb_i.dat = dat; wb_i.sel = sel;
    wb_i.adr = 19'h7880; wb_i.tga = 1;
    wait_cycles = 0;
    @(posedge clk); #1;
    while (!wb_o.ack) begin wait_cycles++; @(posedge clk); #1; end
    rd = wb_o.dat;
    @(negedge clk);
    wb_i.cyc = 0; wb_i.stb = 0;
  endtask

  initial begin
    logic [15:0] rd;
    int w;
    wb_i = '0; sw = 8'h00;
    repeat (2) @(posedge clk);
    rst = 0;
    chk(ledr == 8'h00, "LEDs off after reset");
    for (int n = 0; n < 50; n++) begin
      logic [7:0] v = 8'($urandom);
      sw = 8'($urandom);
      access(1'b1, {8'hAA, v}, 2'b01, rd, w);
      chk(ledr == v, "LED write");
      chk(w == 0, "write acked the cycle after stb");
      access(1'b1, {v, 8'h55}, 2'b10, rd, w);
      chk(ledr == v, "high-byte write leaves LEDs");
      access(1'b0, 16'h0, 2'b11, rd, w);
      chk(rd == {8'h00, sw}, "switch read");
      chk(w == 0, "read acked the cycle after stb");
    end
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
