// tb_zet_alu: random operands for every ALU type and function, compared with a
// reference written independently in the testbench (8086 arithmetic, logic, rotate and
// shift semantics, condition tests, address and flag operations), in 16- and 8-bit mode.
module tb_zet_alu;
  import zet_pkg::*;

  logic [2:0]  t, func;
  logic        byteop, cond;
  logic [15:0] a, b, s, off, flags_i, flags_o;
  logic [31:0] out;
  int checks = 0, failures = 0;

  zet_alu dut (.*);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s t=%0d f=%0d byte=%0d a=%h b=%h fl=%h -> out=%h fo=%h", what, t, func,
               byteop, a, b, flags_i, out, flags_o);
    end
  endtask

  // reference group-1 operation: returns {flags, result}
  function automatic void ref_arith(input int f, input bit bo, input int x, input int y,
                                    input bit cin, output int r, output bit cf, output bit of,
                                    output bit af);
    int w = bo ? 8 : 16;
    int m = (1 << w) - 1;
    int full;
    x &= m; y &= m;
    cf = 0; of = 0; af = 0;
    case (f)
      0, 2: begin full = x + y + ((f == 2) ? int'(cin) : 0); r = full & m; cf = full > m;
                  of = ((x >> (w-1)) == (y >> (w-1))) && (((r >> (w-1)) & 1) != (x >> (w-1)));
                  af = ((x ^ y ^ r) >> 4) & 1; end
      3, 5, 7: begin full = x - y - ((f == 3) ? int'(cin) : 0); r = full & m; cf = full < 0;
                  of = ((x >> (w-1)) != (y >> (w-1))) && (((r >> (w-1)) & 1) != (x >> (w-1)));
                  af = ((x ^ y ^ r) >> 4) & 1; end
      1: r = x | y;
      4: r = x & y;
      default: r = x ^ y;
    endcase
  endfunction

  initial begin
    s = 16'h0; off = 16'h0;
    for (int n = 0; n < 4000; n++) begin
      int r, w, m;
      bit cf, of, af;
      a = 16'($urandom); b = 16'($urandom); flags_i = 16'($urandom) | 16'hF002;
      s = 16'($urandom); off = 16'($urandom);
      byteop = 1'($urandom);
      w = byteop ? 8 : 16; m = (1 << w) - 1;
      // arith
      t = T_ARITH; func = 3'($urandom);
      #1;
      ref_arith(func, byteop, a, b, flags_i[F_CF], r, cf, of, af);
      chk(out == 32'(r), "arith result");
      chk(flags_o[F_CF] == cf && flags_o[F_OF] == of && flags_o[F_ZF] == (r == 0)
          && flags_o[F_SF] == r[w-1] && flags_o[F_PF] == ~^r[7:0] && flags_o[F_AF] == af,
          "arith flags");
      // shifts / rotates, count 0..17
      t = T_SHROT; func = 3'($urandom); b = 16'($urandom % 18);
      #1;
      begin
        int v;
        bit c;
        v = a & m;
        c = flags_i[F_CF];
        for (int k = 0; k < b; k++) begin
          bit msb, lsb;
          msb = 1'((v >> (w-1)) & 1); lsb = 1'(v & 1);
          case (func)
            0: begin c = msb; v = ((v << 1) | msb) & m; end
            1: begin c = lsb; v = (v >> 1) | (int'(lsb) << (w-1)); end
            2: begin v = ((v << 1) | c) & m; c = msb; end
            3: begin v = (v >> 1) | (int'(c) << (w-1)); c = lsb; end
            5: begin c = lsb; v = v >> 1; end
            7: begin c = lsb; v = (v >> 1) | (int'(msb) << (w-1)); end
            default: begin c = msb; v = (v << 1) & m; end
          endcase
        end
        chk(out == 32'(v), "shift result");
        chk(flags_o[F_CF] == ((b == 0) ? flags_i[F_CF] : c), "shift carry");
      end
      // conditions
      t = T_COND; func = 3'($urandom);
      #1;
      begin
        bit e;
        case (func)
          0: e = flags_i[F_ZF];
          1: e = flags_i[F_CF];
          2: e = flags_i[F_SF];
          3: e = flags_i[F_PF];
          4: e = flags_i[F_CF] | flags_i[F_ZF];
          5: e = flags_i[F_SF] ^ flags_i[F_OF];
          6: e = flags_i[F_ZF] | (flags_i[F_SF] ^ flags_i[F_OF]);
          default: e = flags_i[F_OF];
        endcase
        chk(cond == e && out[15:0] == 16'(a + b), "condition");
      end
      // address forms and flag operations
      t = T_OTHER; func = 3'd0; #1;
      chk(out == ((32'(s) * 16 + ((32'(a) + 32'(b) + 32'(off)) & 32'hFFFF)) & 32'hFFFFF), "address");
      func = 3'd1; #1;
      chk(out == ((32'(s) * 16 + ((32'(a) + 32'(b) + 32'(off) + 2) & 32'hFFFF)) & 32'hFFFFF), "address+2");
      func = 3'd5; #1;
      chk(out == 32'(flags_i) && flags_o == flags_i, "flags to register");
      func = 3'd6; #1;
      chk(flags_o == (flags_i & ~16'h0300), "clear IF TF");
      // move
      t = T_MOV; func = 3'd0; byteop = 0; #1;
      chk(out == 32'(b), "move B");
    end
    // the INTO vector arithmetic: 4 rol 2 = 0x10, 0x10 or 2 = 0x12
    t = T_SHROT; func = 3'd0; byteop = 0; a = 16'd4; b = 16'd2; #1;
    chk(out == 32'h10, "4 rol 2");
    t = T_ARITH; func = 3'd1; a = 16'h10; #1;
    chk(out == 32'h12, "0x10 or 2");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
