// tb_zet_regfile: random writes and reads against a reference array: 16-bit and 8-bit
// registers, the zero register, segment reads, the high (DX) write, the IP port and reset.
module tb_zet_regfile;
  import zet_pkg::*;

  logic clk = 0, rst = 1;
  logic [3:0] addr_a, addr_b, addr_c, addr_d;
  logic a_byte, c_byte, wr, d_byte, high, ip_wr;
  logic [1:0] addr_s;
  logic [15:0] a, b, c, s, cs, ip, ip_d;
  logic [31:0] d;
  logic [15:0] ref_r [16];
  int checks = 0, failures = 0;

  zet_regfile #(.RESET_CS(16'hF000), .RESET_IP(16'hFFF0)) dut (.*);

  always #5 clk = ~clk;

  function automatic logic [15:0] ref16(input logic [3:0] n);
    return (n == R_ZERO) ? 16'h0 : ref_r[n];
  endfunction
  function automatic logic [15:0] ref8(input logic [3:0] n);
    logic [15:0] v = ref_r[{2'b00, n[1:0]}];
    return {8'h00, n[2] ? v[15:8] : v[7:0]};
  endfunction

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    {addr_a, addr_b, addr_c, addr_d, a_byte, c_byte, wr, d_byte, high, ip_wr, addr_s} = '0;
    d = '0; ip_d = '0;
    repeat (2) @(posedge clk);
    rst = 0;
    for (int i = 0; i < 16; i++) ref_r[i] = 16'h0;
    ref_r[R_CS] = 16'hF000; ref_r[R_IP] = 16'hFFF0;
    #1;
    chk(cs == 16'hF000 && ip == 16'hFFF0, "reset CS:IP");
    for (int n = 0; n < 2000; n++) begin
      // write
      @(negedge clk);
      wr = 1'($urandom); addr_d = 4'($urandom); d = $urandom; d_byte = 1'($urandom);
      high = ($urandom % 8) == 0; ip_wr = ($urandom % 8) == 0; ip_d = 16'($urandom);
      @(posedge clk); #1;
      if (ip_wr) ref_r[R_IP] = ip_d;
      if (wr) begin
        if (d_byte && !addr_d[3]) begin
          if (addr_d[2]) ref_r[{2'b00, addr_d[1:0]}][15:8] = d[7:0];
          else           ref_r[{2'b00, addr_d[1:0]}][7:0]  = d[7:0];
        end else ref_r[addr_d] = d[15:0];
      end
      if (high) ref_r[R_DX] = d[31:16];
      wr = 0; high = 0; ip_wr = 0;
      // read
      addr_a = 4'($urandom); addr_b = 4'($urandom); addr_c = 4'($urandom);
      a_byte = 1'($urandom); c_byte = 1'($urandom); addr_s = 2'($urandom);
      #1;
      chk(a == (a_byte ? ref8(addr_a) : ref16(addr_a)), $sformatf("port A r%0d byte %0d", addr_a, a_byte));
      chk(b == ref16(addr_b), $sformatf("port B r%0d", addr_b));
      chk(c == (c_byte ? ref8(addr_c) : ref16(addr_c)), $sformatf("port C r%0d", addr_c));
      chk(s == ref_r[8 + addr_s], "port S");
      chk(ip == ref_r[R_IP] && cs == ref_r[R_CS], "cs/ip");
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
