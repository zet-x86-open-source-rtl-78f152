// zet_fetch: the fetch state machine of the Zet core.
//
// An 8086 instruction is: prefixes, opcode, optional modrm, optional displacement
// ("offset", 1 or 2 bytes), optional immediate (1 or 2 bytes), up to 9 bytes in all. The
// machine reads it one byte per bus transaction from CS:(IP + n), in five states:
//   0 opcode or prefix, 1 modrm, 2 offset, 3 immediate, 4 execute.
// In every state the combinational decoder (zet_decode), looking at the byte just read,
// chooses the next state: a prefix stays in state 0, and any of states 1..3 is skipped
// when the instruction has no such field. When the last byte arrives the machine writes
// IP + length back to IP (so microcode sees the address of the next instruction), moves
// to state 4 and pulses `start` with the collected instruction; it returns to state 0
// when the microcode sequencer reports `done`. An 8-bit displacement is sign-extended;
// an 8-bit immediate is sign- or zero-extended as the decoder says.
module zet_fetch
  import zet_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic [15:0] cs,
  input  logic [15:0] ip,
  // byte reads through the Wishbone master
  output logic        req,
  output logic [19:0] addr,
  input  logic        ack,
  input  logic [7:0]  byte_i,
  // IP update
  output logic        ip_wr,
  output logic [15:0] ip_d,
  // to execute
  output logic        start,
  output insn_t       insn,
  output fetch_state_t state,
  input  logic        done
);

  logic [3:0]  cnt;        // bytes read of this instruction
  logic        bidx;       // byte index inside offset / immediate
  logic [7:0]  opcode_q, modrm_q;
  logic [15:0] off_q, imm_q;
  logic        seg_ovr_q, lock_q;
  logic [1:0]  seg_q;
  fetch_state_t next;

  // decoder sees the byte arriving now in states 0 and 1
  logic            d_prefix, d_pfx_seg, d_pfx_lock, d_need_modrm, d_direct_off, d_imm_sext;
  logic [1:0]      d_pfx_sreg, d_off_size, d_imm_size;
  logic [SA_W-1:0] d_first;
  logic [7:0]      dec_op, dec_modrm;

  assign dec_op    = (state == ST_OPCODE) ? byte_i : opcode_q;
  assign dec_modrm = (state == ST_MODRM)  ? byte_i : modrm_q;

  zet_decode u_decode (
    .opcode(dec_op), .modrm(dec_modrm), .prefix(d_prefix), .pfx_seg(d_pfx_seg),
    .pfx_sreg(d_pfx_sreg), .pfx_lock(d_pfx_lock), .need_modrm(d_need_modrm),
    .direct_off(d_direct_off), .off_size(d_off_size), .imm_size(d_imm_size),
    .imm_sext(d_imm_sext), .first(d_first)
  );

  logic [15:0] ip_n;
  assign ip_n  = ip + 16'(cnt);
  assign addr  = {cs, 4'h0} + {4'h0, ip_n};
  assign req   = (state != ST_EXEC);

  // next state after the byte that arrives now
  always_comb begin
    next = state;
    unique case (state)
      ST_OPCODE:
        if (d_prefix)               next = ST_OPCODE;
        else if (d_need_modrm)      next = ST_MODRM;
        else if (d_off_size != 2'd0) next = ST_OFFSET;
        else if (d_imm_size != 2'd0) next = ST_IMMED;
        else                        next = ST_EXEC;
      ST_MODRM:
        if (d_off_size != 2'd0)     next = ST_OFFSET;
        else if (d_imm_size != 2'd0) next = ST_IMMED;
        else                        next = ST_EXEC;
      ST_OFFSET:
        if (bidx || d_off_size == 2'd1)
          next = (d_imm_size != 2'd0) ? ST_IMMED : ST_EXEC;
      ST_IMMED:
        if (bidx || d_imm_size == 2'd1) next = ST_EXEC;
      default: next = state;
    endcase
  end

  assign ip_wr = ack && (next == ST_EXEC) && (state != ST_EXEC);
  assign ip_d  = ip + 16'(cnt) + 16'd1;

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= ST_OPCODE;
      cnt       <= '0;
      bidx      <= 1'b0;
      opcode_q  <= 8'h90;
      modrm_q   <= '0;
      off_q     <= '0;
      imm_q     <= '0;
      seg_ovr_q <= 1'b0;
      seg_q     <= '0;
      lock_q    <= 1'b0;
      start     <= 1'b0;
      insn      <= '0;
    end else begin
      start <= 1'b0;
      if (state == ST_EXEC) begin
        if (done) begin
          state     <= ST_OPCODE;
          cnt       <= '0;
          seg_ovr_q <= 1'b0;
          lock_q    <= 1'b0;
        end
      end else if (ack) begin
        cnt <= cnt + 4'd1;
        unique case (state)
          ST_OPCODE: begin
            if (d_prefix) begin
              if (d_pfx_seg) begin seg_ovr_q <= 1'b1; seg_q <= d_pfx_sreg; end
              if (d_pfx_lock) lock_q <= 1'b1;
            end else begin
              opcode_q <= byte_i;
              modrm_q  <= '0;
              off_q    <= '0;
              imm_q    <= '0;
            end
          end
          ST_MODRM: modrm_q <= byte_i;
          ST_OFFSET: begin
            if (!bidx) off_q <= {{8{byte_i[7]}}, byte_i};
            else       off_q[15:8] <= byte_i;
            bidx <= !bidx && (d_off_size == 2'd2);
          end
          ST_IMMED: begin
            if (!bidx) imm_q <= {{8{d_imm_sext & byte_i[7]}}, byte_i};
            else       imm_q[15:8] <= byte_i;
            bidx <= !bidx && (d_imm_size == 2'd2);
          end
          default: ;
        endcase
        state <= next;
        if (next == ST_EXEC) begin
          start        <= 1'b1;
          insn.opcode  <= (state == ST_OPCODE) ? byte_i : opcode_q;
          insn.modrm   <= (state == ST_MODRM)  ? byte_i : ((state == ST_OPCODE) ? 8'h00 : modrm_q);
          insn.off     <= (state == ST_OFFSET) ? (bidx ? {byte_i, off_q[7:0]} : {{8{byte_i[7]}}, byte_i})
                                               : ((state == ST_OPCODE) ? 16'h0 : off_q);
          insn.imm     <= (state == ST_IMMED)  ? (bidx ? {byte_i, imm_q[7:0]}
                                                       : {{8{d_imm_sext & byte_i[7]}}, byte_i})
                                               : ((state == ST_OPCODE) ? 16'h0 : imm_q);
          insn.seg_ovr <= seg_ovr_q;
          insn.seg     <= seg_q;
          insn.lock    <= lock_q;
          insn.first   <= d_first;
        end
      end
    end
  end

endmodule
