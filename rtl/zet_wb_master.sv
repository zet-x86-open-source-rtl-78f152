// zet_wb_master: Wishbone classic master of the Zet core.
//
// Serves one request at a time from the core: a byte or 16-bit word, read or write, in
// memory or IO space (Wishbone tag tga = 1 for IO), at a 20-bit byte address. The bus
// is 16 bits wide with two byte selects. Each bus cycle is a single read or write
// transaction: cyc, stb, adr, sel, we and (for writes) dat_o are driven from registers
// and held until the slave's ack, then cyc and stb drop for at least one cycle. A word
// at an odd address is split into two byte transactions (address, then address + 1).
// A byte is delivered and taken on the lane its address selects; the requester sees it in
// bits 7:0 of rdata. `ack` is high, combinationally from the slave's ack, in the cycle
// the last transaction completes, so the requester can move on at that clock edge.
// Requests are held steady by the requester until `ack`.
module zet_wb_master
  import zet_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  // core side
  input  logic        req,
  input  logic        we,
  input  logic        word,
  input  logic        io,
  input  logic [19:0] addr,
  input  logic [15:0] wdata,
  output logic        ack,
  output logic [15:0] rdata,
  // Wishbone side
  output wb_m2s_t     wb_o,
  input  wb_s2m_t     wb_i
);

  typedef enum logic [1:0] { M_IDLE, M_BUS1, M_BUS2 } mstate_t;
  mstate_t     state;
  logic        split;      // odd word: two byte transactions
  logic [7:0]  lo_byte;    // first byte of a split read
  logic [19:0] cur;        // byte address of the current transaction
  logic        cur_word;

  logic [7:0] lane_byte;
  assign lane_byte = cur[0] ? wb_i.dat[15:8] : wb_i.dat[7:0];

  always_comb begin
    ack   = 1'b0;
    rdata = 16'h0000;
    if (wb_o.cyc && wb_i.ack) begin
      if (state == M_BUS1 && !split) begin
        ack   = 1'b1;
        rdata = cur_word ? wb_i.dat : {8'h00, lane_byte};
      end else if (state == M_BUS2) begin
        ack   = 1'b1;
        rdata = {lane_byte, lo_byte};
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= M_IDLE;
      split    <= 1'b0;
      lo_byte  <= 8'h00;
      cur      <= '0;
      cur_word <= 1'b0;
      wb_o     <= '0;
    end else begin
      unique case (state)
        M_IDLE: if (req) begin
          state    <= M_BUS1;
          split    <= word && addr[0];
          cur      <= addr;
          cur_word <= word && !addr[0];
          wb_o.adr <= addr[19:1];
          wb_o.we  <= we;
          wb_o.tga <= io;
          wb_o.cyc <= 1'b1;
          wb_o.stb <= 1'b1;
          if (word && !addr[0]) begin
            wb_o.sel <= 2'b11;
            wb_o.dat <= wdata;
          end else begin
            wb_o.sel <= addr[0] ? 2'b10 : 2'b01;
            wb_o.dat <= {wdata[7:0], wdata[7:0]};
          end
        end
        M_BUS1: if (wb_i.ack) begin
          wb_o.cyc <= 1'b0;
          wb_o.stb <= 1'b0;
          if (split) begin
            state   <= M_BUS2;
            lo_byte <= lane_byte;
          end else begin
            state <= M_IDLE;
          end
        end
        M_BUS2: begin
          if (!wb_o.cyc) begin  // second half of an odd word: the next (even) byte
            cur      <= cur + 20'd1;
            wb_o.adr <= wb_o.adr + 19'd1;
            wb_o.sel <= 2'b01;
            wb_o.dat <= {wdata[15:8], wdata[15:8]};
            wb_o.cyc <= 1'b1;
            wb_o.stb <= 1'b1;
          end else if (wb_i.ack) begin
            wb_o.cyc <= 1'b0;
            wb_o.stb <= 1'b0;
            split    <= 1'b0;
            state    <= M_IDLE;
          end
        end
        default: state <= M_IDLE;
      endcase
    end
  end

  // Wishbone rule: the master keeps stb, adr and we steady until ack.
  property p_hold;
    @(posedge clk) disable iff (rst) (wb_o.stb && !wb_i.ack) |=> (wb_o.stb && $stable(wb_o.adr) && $stable(wb_o.we));
  endproperty
  a_hold: assert property (p_hold);

endmodule
