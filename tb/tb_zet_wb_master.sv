// tb_zet_wb_master: random byte and word reads and writes, at even and odd addresses,
// in memory and IO space, through the master to a memory with random wait states. Checks
// data against a reference memory, that an odd word takes two bus transactions and any
// other access one, that tga follows the IO request, and the Wishbone hold rule
// (an assertion in the master).
module tb_zet_wb_master;
  import zet_pkg::*;

  logic clk = 0, rst = 1;
  logic req, we, word, io, ack;
  logic [19:0] addr;
  logic [15:0] wdata, rdata;
  wb_m2s_t wb_o;
  wb_s2m_t wb_i;
  logic [7:0] refm [logic [19:0]];
  int checks = 0, failures = 0, txns = 0, split_seen = 0;

  zet_wb_master dut (.*);
  tb_wb_mem #(.MAXWAIT(2)) mem (.clk(clk), .wb_i(wb_o), .wb_o(wb_i));

  always #5 clk = ~clk;
  always @(posedge clk) if (wb_o.cyc && wb_o.stb && wb_i.ack) txns++;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic logic [7:0] rm(input logic [19:0] a);
    return refm.exists(a) ? refm[a] : 8'h00;
  endfunction

  initial begin
    req = 0; we = 0; word = 0; io = 0; addr = 0; wdata = 0;
    repeat (2) @(posedge clk);
    rst = 0;
    for (int n = 0; n < 3000; n++) begin
      int t0, cycles;
      @(negedge clk);
      req = 1; we = 1'($urandom); word = 1'($urandom); io = ($urandom % 4) == 0;
      addr = 20'($urandom % 64) + 20'h3FF00; wdata = 16'($urandom);
      t0 = txns; cycles = 0;
      #1;
      while (!ack) begin
        if (wb_o.cyc) chk(wb_o.tga == io, "tga follows io");
        @(negedge clk); cycles++; #1;
      end
      if (!we) begin
        if (word) chk(rdata == {rm(addr + 1), rm(addr)}, $sformatf("word read %h", addr));
        else      chk(rdata == {8'h00, rm(addr)}, $sformatf("byte read %h", addr));
      end else begin
        refm[addr] = wdata[7:0];
        if (word) refm[addr + 1] = wdata[15:8];
      end
      @(posedge clk); #1;
      chk(txns - t0 == ((word && addr[0]) ? 2 : 1), "transactions per access");
      if (word && addr[0]) split_seen++;
      chk(cycles >= 1, "at least one cycle of latency");
      req = 0;
    end
    for (int a = 20'h3FF00; a < 20'h3FF40; a++)
      chk(mem.mem[a] == rm(20'(a)), $sformatf("memory byte %h", a));
    chk(split_seen > 0 && mem.stalls > 0, "odd words and wait states exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
