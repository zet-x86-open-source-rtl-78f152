// zet_alu: the arithmetic/logic unit of the Zet core's exec stage.
//
// Purely combinational. The microinstruction's type field `t` picks a unit and `func`
// the operation inside it (the two-level multiplexer the microcode format describes).
// Operands: A and B (B already muxed with the immediate), the segment value S, the
// displacement OFF and the flags. Results: a 32-bit OUT, new flags, and COND.
//
//   t=0 move     func 0: OUT = B; func 1: OUT = A
//   t=1 arith    func = 8086 group-1 code: 0 add 1 or 2 adc 3 sbb 4 and 5 sub 6 xor 7 cmp;
//                CF PF AF ZF SF OF updated as on the 8086 (logic ops clear CF, OF, AF)
//   t=2 cond     COND = condition selected by func (7 = OF); OUT = A + B
//   t=5 shift    func = 8086 group-2 code: 0 rol 1 ror 2 rcl 3 rcr 4 shl 5 shr 6 shl 7 sar,
//                count = B[4:0]
//   t=7 other    func 0: OUT = S*16 + (A + B + OFF mod 2^16) (20-bit physical address)
//                func 1: S*16 + (A + B + OFF + 2 mod 2^16) (the following word)
//                func 5: OUT = flags; func 6: flags with IF and TF cleared
// The codes used by the published INTO microcode (t=1 sub/or, t=2 OF test, t=5 rotate,
// t=7 address/flags operations) fix these choices; the remaining codes are this design's.
// byteop makes the arithmetic, shift and move operations 8 bits wide.
module zet_alu
  import zet_pkg::*;
(
  input  logic [2:0]  t,
  input  logic [2:0]  func,
  input  logic        byteop,
  input  logic [15:0] a,
  input  logic [15:0] b,
  input  logic [15:0] s,
  input  logic [15:0] off,
  input  logic [15:0] flags_i,
  output logic [31:0] out,
  output logic [15:0] flags_o,
  output logic        cond
);

  function automatic logic parity8(input logic [7:0] v);
    return ~^v;
  endfunction

  logic [16:0] sum;
  logic [15:0] res, sa, sb;
  logic        cf, af, of, cin, msb_a, msb_b, msb_r;
  logic [4:0]  cnt;
  logic [15:0] sh;
  logic        shc, sho;

  always_comb begin
    out     = 32'h0;
    flags_o = flags_i;
    cond    = 1'b0;
    sum     = '0;
    res     = '0;
    cf      = 1'b0;
    af      = 1'b0;
    of      = 1'b0;
    sa      = byteop ? {8'h00, a[7:0]} : a;
    sb      = byteop ? {8'h00, b[7:0]} : b;
    cin     = flags_i[F_CF];
    msb_a   = byteop ? a[7] : a[15];
    msb_b   = byteop ? b[7] : b[15];
    msb_r   = 1'b0;
    cnt     = b[4:0];
    sh      = sa;
    shc     = flags_i[F_CF];
    sho     = flags_i[F_OF];

    unique case (t)
      T_MOV: begin
        out = {16'h0, (func == 3'd1) ? a : (byteop ? sb : b)};
      end

      T_ARITH: begin
        unique case (func)
          3'd0, 3'd2: begin  // add, adc
            sum = {1'b0, sa} + {1'b0, sb} + {16'h0, (func == 3'd2) & cin};
            res = sum[15:0];
            cf  = byteop ? sum[8] : sum[16];
            af  = sa[4] ^ sb[4] ^ res[4];
            msb_r = byteop ? res[7] : res[15];
            of  = (msb_a == msb_b) && (msb_r != msb_a);
          end
          3'd3, 3'd5, 3'd7: begin  // sbb, sub, cmp
            sum = {1'b0, sa} - {1'b0, sb} - {16'h0, (func == 3'd3) & cin};
            res = sum[15:0];
            cf  = byteop ? sum[8] : sum[16];
            af  = sa[4] ^ sb[4] ^ res[4];
            msb_r = byteop ? res[7] : res[15];
            of  = (msb_a != msb_b) && (msb_r != msb_a);
          end
          3'd1: res = sa | sb;
          3'd4: res = sa & sb;
          default: res = sa ^ sb;  // 6: xor
        endcase
        if (byteop) res[15:8] = 8'h00;
        msb_r = byteop ? res[7] : res[15];
        out = {16'h0, res};
        flags_o[F_CF] = cf;
        flags_o[F_AF] = af;
        flags_o[F_OF] = of;
        flags_o[F_PF] = parity8(res[7:0]);
        flags_o[F_ZF] = (res == 16'h0);
        flags_o[F_SF] = msb_r;
      end

      T_COND: begin
        unique case (func)
          3'd0: cond = flags_i[F_ZF];
          3'd1: cond = flags_i[F_CF];
          3'd2: cond = flags_i[F_SF];
          3'd3: cond = flags_i[F_PF];
          3'd4: cond = flags_i[F_CF] | flags_i[F_ZF];
          3'd5: cond = flags_i[F_SF] ^ flags_i[F_OF];
          3'd6: cond = flags_i[F_ZF] | (flags_i[F_SF] ^ flags_i[F_OF]);
          default: cond = flags_i[F_OF];
        endcase
        out = {16'h0, a + b};
      end

      T_SHROT: begin
        for (int i = 0; i < 31; i++) begin
          if (i < int'(cnt)) begin
            unique case (func)
              3'd0: begin shc = byteop ? sh[7] : sh[15];
                          sh  = byteop ? {8'h00, sh[6:0], sh[7]} : {sh[14:0], sh[15]}; end
              3'd1: begin shc = sh[0];
                          sh  = byteop ? {8'h00, sh[0], sh[7:1]} : {sh[0], sh[15:1]}; end
              3'd2: begin sho = byteop ? sh[7] : sh[15];
                          sh  = byteop ? {8'h00, sh[6:0], shc} : {sh[14:0], shc};
                          shc = sho; end
              3'd3: begin sho = sh[0];
                          sh  = byteop ? {8'h00, shc, sh[7:1]} : {shc, sh[15:1]};
                          shc = sho; end
              3'd5: begin shc = sh[0]; sh = sh >> 1; end
              3'd7: begin shc = sh[0];
                          sh  = byteop ? {8'h00, sh[7], sh[7:1]} : {sh[15], sh[15:1]}; end
              default: begin shc = byteop ? sh[7] : sh[15];
                             sh  = byteop ? {8'h00, sh[6:0], 1'b0} : {sh[14:0], 1'b0}; end
            endcase
          end
        end
        out = {16'h0, sh};
        msb_r = byteop ? sh[7] : sh[15];
        if (cnt != 5'd0) begin
          flags_o[F_CF] = shc;
          // overflow as the 8086 defines it for one-bit shifts
          unique case (func)
            3'd1, 3'd3: flags_o[F_OF] = msb_r ^ (byteop ? sh[6] : sh[14]);
            3'd5:       flags_o[F_OF] = msb_a;
            3'd7:       flags_o[F_OF] = 1'b0;
            default:    flags_o[F_OF] = msb_r ^ shc;
          endcase
          if (func[2]) begin
            flags_o[F_ZF] = (sh == 16'h0);
            flags_o[F_SF] = msb_r;
            flags_o[F_PF] = parity8(sh[7:0]);
          end
        end
      end

      T_OTHER: begin
        unique case (func)
          3'd0: out = {12'h0, {s, 4'h0} + {4'h0, 16'(a + b + off)}};
          3'd1: out = {12'h0, {s, 4'h0} + {4'h0, 16'(a + b + off + 16'd2)}};
          3'd5: out = {16'h0, flags_i};
          3'd6: begin
            out = {16'h0, flags_i};
            flags_o[F_IF] = 1'b0;
            flags_o[F_TF] = 1'b0;
          end
          default: out = 32'h0;
        endcase
      end

      default: out = 32'h0;
    endcase
  end

endmodule
