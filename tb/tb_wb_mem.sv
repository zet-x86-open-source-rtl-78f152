// tb_wb_mem: behavioural Wishbone memory for testbenches (stands in for the RAM behind
// the SDRAM bridge). 1 MiB of bytes, little-endian 16-bit bus with byte selects. Each
// access is acknowledged after 0..MAXWAIT random wait states; ack stays high for one
// cycle only. Counts wait states so a testbench can show that stalls happened.
module tb_wb_mem
  import zet_pkg::*;
#(
  parameter int MAXWAIT = 2
) (
  input  logic    clk,
  input  wb_m2s_t wb_i,
  output wb_s2m_t wb_o
);
  logic [7:0] mem [1 << 20];
  int         wait_left = -1;
  int         stalls = 0, reads = 0, writes = 0;
  logic [19:0] ba;

  assign ba = {wb_i.adr, 1'b0};

  initial begin
    wb_o = '0;
    for (int i = 0; i < (1 << 20); i++) mem[i] = 8'h00;
  end

  always @(posedge clk) begin
    wb_o.ack <= 1'b0;
    if (wb_i.cyc && wb_i.stb && !wb_o.ack) begin
      if (wait_left < 0) wait_left = (MAXWAIT > 0) ? int'($urandom % (MAXWAIT + 1)) : 0;
      if (wait_left == 0) begin
        wb_o.ack <= 1'b1;
        if (wb_i.we) begin
          writes++;
          if (wb_i.sel[0]) mem[ba]     = wb_i.dat[7:0];
          if (wb_i.sel[1]) mem[ba + 1] = wb_i.dat[15:8];
        end else begin
          reads++;
        end
        wb_o.dat <= {mem[ba + 1], mem[ba]};
        wait_left = -1;
      end else begin
        wait_left--;
        stalls++;
      end
    end
  end
endmodule
