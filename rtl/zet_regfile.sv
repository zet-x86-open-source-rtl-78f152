// zet_regfile: the register file of the Zet core.
//
// Sixteen 16-bit registers: 0..7 are AX CX DX BX SP BP SI DI, 8..11 the segment
// registers ES CS SS DS, 12 always reads as zero, 13 is the microcode temporary, 14 a
// spare temporary and 15 the instruction pointer (numbers 4, 9, 12, 13 and 15 are the
// ones the published INTO microcode uses; the rest follow the 8086 register order).
// Read ports A, B and C are combinational; A and C can name an 8-bit register
// (a_byte/c_byte, codes 0..3 = AL CL DL BL, 4..7 = AH CH DH BH, read zero-extended). Read
// port S returns the segment register selected by the 2-bit addr_s. The write port D is
// 32 bits wide: bits 15:0 go to addr_d (as a byte register when d_byte), and when `high`
// is set bits 31:16 go to DX, as the published format describes for mul/div results.
// A separate IP port lets the fetch unit advance IP at the end of an instruction's fetch;
// a D write to IP in the same cycle wins. Writes happen on the rising clock edge.
// Reset values (CS and IP from parameters, the rest zero) are this design's choice.
module zet_regfile
  import zet_pkg::*;
#(
  parameter logic [15:0] RESET_CS = 16'hF000,
  parameter logic [15:0] RESET_IP = 16'hFFF0
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [3:0]  addr_a,
  input  logic        a_byte,
  input  logic [3:0]  addr_b,
  input  logic [3:0]  addr_c,
  input  logic        c_byte,
  input  logic [1:0]  addr_s,
  output logic [15:0] a,
  output logic [15:0] b,
  output logic [15:0] c,
  output logic [15:0] s,
  input  logic        wr,
  input  logic [3:0]  addr_d,
  input  logic        d_byte,
  input  logic        high,
  input  logic [31:0] d,
  input  logic        ip_wr,
  input  logic [15:0] ip_d,
  output logic [15:0] cs,
  output logic [15:0] ip
);

  logic [15:0] r [16];

  function automatic logic [15:0] rd16(input logic [3:0] n, input logic [15:0] v);
    return (n == R_ZERO) ? 16'h0000 : v;
  endfunction

  function automatic logic [7:0] rd8(input logic [2:0] n, input logic [15:0] v);
    return n[2] ? v[15:8] : v[7:0];
  endfunction

  always_comb begin
    a = a_byte ? {8'h00, rd8(addr_a[2:0], r[{2'b00, addr_a[1:0]}])} : rd16(addr_a, r[addr_a]);
    b = rd16(addr_b, r[addr_b]);
    c = c_byte ? {8'h00, rd8(addr_c[2:0], r[{2'b00, addr_c[1:0]}])} : rd16(addr_c, r[addr_c]);
    s = r[{2'b10, addr_s}];
  end

  assign cs = r[R_CS];
  assign ip = r[R_IP];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < 16; i++) r[i] <= 16'h0000;
      r[R_CS] <= RESET_CS;
      r[R_IP] <= RESET_IP;
    end else begin
      if (ip_wr) r[R_IP] <= ip_d;
      if (wr) begin
        if (d_byte && !addr_d[3]) begin
          if (addr_d[2]) r[{2'b00, addr_d[1:0]}][15:8] <= d[7:0];
          else           r[{2'b00, addr_d[1:0]}][7:0]  <= d[7:0];
        end else begin
          r[addr_d] <= d[15:0];
        end
      end
      if (high) r[R_DX] <= d[31:16];
    end
  end

endmodule
