// zet_pkg: types and constants shared by the Zet 8086 core and its SoC.
//
// The 49-bit microinstruction layout (field names and bit positions) follows the
// published microcode format exactly; the packed struct lists the fields from bit 48
// down to bit 0. The encodings of the variable-field selectors (var_*), the register
// numbers not fixed by the published INTO microcode, the ALU type codes beyond those the
// INTO microcode uses, and the Wishbone bundle layout are choices of this design and are
// collected here so that every module agrees on them.
package zet_pkg;

  // ---------------------------------------------------------------- microinstruction
  typedef struct packed {
    logic [2:0] var_imm;  // 48:46 immediate select
    logic       var_off;  // 45    offset select
    logic [1:0] var_d;    // 44:43
    logic [1:0] var_c;    // 42:41
    logic [1:0] var_b;    // 40:39
    logic [1:0] var_a;    // 38:37
    logic       var_s;    // 36
    logic       c_byte;   // 35    addr_c names an 8-bit register
    logic       a_byte;   // 34    addr_a names an 8-bit register
    logic       b_imm;    // 33    ALU B input is the immediate
    logic       m_io;     // 32    1 = IO space, 0 = memory space
    logic [1:0] memalu;   // 31:30 bit 1: memory access; value 2'b10: D bus from memory
    logic       byteop;   // 29    byte operation
    logic [2:0] func;     // 28:26 function inside the type
    logic [2:0] t;        // 25:23 ALU type
    logic       high;     // 22    write ALU bits 31:16 to DX
    logic       wr_cnd;   // 21    conditional register write
    logic       wr;       // 20    register write
    logic       wr_mem;   // 19    memory write
    logic       wrfl;     // 18    flags write
    logic [3:0] addr_d;   // 17:14
    logic [3:0] addr_c;   // 13:10
    logic [3:0] addr_b;   // 9:6
    logic [3:0] addr_a;   // 5:2
    logic [1:0] addr_s;   // 1:0
  } uinstr_t;

  localparam int unsigned UI_W   = 49;   // microinstruction width
  localparam int unsigned UA_W   = 9;    // microcode ROM address width
  localparam int unsigned SA_W   = 10;   // sequencer ROM address width

  // ---------------------------------------------------------------- registers
  // 0..7 general registers in 8086 order, 8..11 segment registers, 12 reads as zero,
  // 13 temporary, 14 spare, 15 instruction pointer.
  localparam logic [3:0] R_AX = 4'd0, R_CX = 4'd1, R_DX = 4'd2, R_BX = 4'd3,
                         R_SP = 4'd4, R_BP = 4'd5, R_SI = 4'd6, R_DI = 4'd7,
                         R_ES = 4'd8, R_CS = 4'd9, R_SS = 4'd10, R_DS = 4'd11,
                         R_ZERO = 4'd12, R_TMP = 4'd13, R_TMP2 = 4'd14, R_IP = 4'd15;
  // segment numbers on addr_s
  localparam logic [1:0] S_ES = 2'd0, S_CS = 2'd1, S_SS = 2'd2, S_DS = 2'd3;

  // ---------------------------------------------------------------- variable fields
  // var_a / var_b / var_c / var_d
  localparam logic [1:0] V_UCODE = 2'd0,  // address taken from the microinstruction
                         V_OPREG = 2'd1,  // opcode bits 2:0
                         V_MREG  = 2'd2,  // modrm reg field (bits 5:3)
                         V_EA    = 2'd3;  // modrm r/m: base (A), index (B), register (C, D)
  // var_imm
  localparam logic [2:0] I_0 = 3'd0, I_2 = 3'd1, I_4 = 3'd2, I_INSN = 3'd3, I_1 = 3'd4;

  // ---------------------------------------------------------------- ALU types
  localparam logic [2:0] T_MOV   = 3'd0,  // func 000: out = B
                         T_ARITH = 3'd1,  // func = 8086 group-1 code: add or adc sbb and sub xor cmp
                         T_COND  = 3'd2,  // func = condition; out = A + B
                         T_SHROT = 3'd5,  // func = 8086 group-2 code: rol ror rcl rcr shl shr - sar
                         T_OTHER = 3'd7;  // addresses and flag operations (see zet_alu)

  // ---------------------------------------------------------------- flags (8086 layout)
  localparam int unsigned F_CF = 0, F_PF = 2, F_AF = 4, F_ZF = 6, F_SF = 7,
                          F_TF = 8, F_IF = 9, F_DF = 10, F_OF = 11;

  // ---------------------------------------------------------------- fetch FSM
  typedef enum logic [2:0] {
    ST_OPCODE = 3'd0, ST_MODRM = 3'd1, ST_OFFSET = 3'd2, ST_IMMED = 3'd3, ST_EXEC = 3'd4
  } fetch_state_t;

  // decoded instruction as handed from fetch to execute
  typedef struct packed {
    logic [7:0]  opcode;
    logic [7:0]  modrm;
    logic [15:0] off;       // displacement, sign-extended
    logic [15:0] imm;       // immediate, extended as the decoder says
    logic        seg_ovr;   // a segment override prefix was seen
    logic [1:0]  seg;       // the overriding segment
    logic        lock;      // lock prefix seen
    logic [SA_W-1:0] first; // first sequencer ROM address
  } insn_t;

  // ---------------------------------------------------------------- Wishbone
  typedef struct packed {
    logic [19:1] adr;   // word address
    logic [15:0] dat;
    logic [1:0]  sel;
    logic        we;
    logic        cyc;
    logic        stb;
    logic        tga;   // 1 = IO space
  } wb_m2s_t;

  typedef struct packed {
    logic [15:0] dat;
    logic        ack;
  } wb_s2m_t;

endpackage
