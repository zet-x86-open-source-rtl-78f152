// tb_prog_pkg: shared test program for the processor and SoC testbenches: the 8086 instructions the
// design supports, including the two documented examples
// "lock movw $0x7432,%cs:-0x101(%bx,%di)" and "push %bx", and INTO both not taken
// and taken. A pop followed by a push of the popped register, and a short jump over a
// push, leave the stack as it was only if both work. Code starts at the reset address F000:FFF0 and wraps to F000:0000.
// The INTO handler at 0000:0100 writes 0x00A5 to port DX.
package tb_prog_pkg;
localparam int PROG_LEN = 58;
localparam logic [7:0] PROG [PROG_LEN] = '{
  8'hB8, 8'h34, 8'h12,                                  // mov ax, 0x1234
  8'hBB, 8'h00, 8'h02,                                  // mov bx, 0x0200
  8'hBF, 8'h04, 8'h00,                                  // mov di, 0x0004
  8'hBC, 8'h00, 8'h08,                                  // mov sp, 0x0800
  8'h53,                                                // push bx
  8'h2E, 8'hF0, 8'hC7, 8'h81, 8'hFF, 8'hFE, 8'h32, 8'h74, // lock movw $0x7432,%cs:-0x101(%bx,%di)
  8'hC7, 8'hC6, 8'h55, 8'hAA,                           // mov si, 0xAA55 (C7 register form)
  8'h56,                                                // push si
  8'hE7, 8'h80,                                         // out 0x80, ax
  8'hBA, 8'h00, 8'hF1,                                  // mov dx, 0xF100
  8'hED,                                                // in ax, dx
  8'h50,                                                // push ax
  8'h59,                                                // pop cx
  8'h51,                                                // push cx (same slot again)
  8'hEB, 8'h01,                                         // jmp short over the next byte
  8'h50,                                                // (skipped: would push ax)
  8'h89, 8'hC5,                                         // mov bp, ax
  8'h89, 8'h1E, 8'h00, 8'h09,                           // mov [0x0900], bx
  8'h8B, 8'h3E, 8'h00, 8'h09,                           // mov di, [0x0900]
  8'h8B, 8'hF5,                                         // mov si, bp
  8'hCE,                                                // into (OF clear: not taken)
  8'hB8, 8'hFF, 8'h7F,                                  // mov ax, 0x7FFF
  8'h05, 8'h01, 8'h00,                                  // add ax, 1 (sets OF)
  8'hCE                                                 // into (taken)
};
localparam int PROG_INSNS = 23;
localparam int HANDLER_LEN = 4;
localparam int HANDLER_INSNS = 2;
localparam logic [7:0] HANDLER [HANDLER_LEN] = '{
  8'hB8, 8'hA5, 8'h00,                                  // mov ax, 0x00A5
  8'hEF                                                 // out dx, ax
};
// return address pushed by the taken INTO: F000:(FFF0 + PROG_LEN) mod 2^16
localparam logic [15:0] RET_IP = 16'(32'hFFF0 + PROG_LEN);
endpackage
