// wb_async_bridge: Wishbone bridge between two unrelated clocks.
//
// Carries one single read or write transaction at a time from a Wishbone master in
// clock domain `clk_m` to a slave in domain `clk_s` and brings the answer back. The
// master's request is captured in registers when a new strobe arrives, and a request
// toggle crosses to the slave side through a two-flop synchronizer; the slave side then
// runs a classic cycle (cyc, stb held until the slave's ack), captures the read data and
// returns a done toggle through a second two-flop synchronizer, upon which the master
// side raises ack for one cycle. Address, data and control cross as a bundle that is
// stable for the whole time the toggle is in flight, so only the toggles need
// synchronizing. Latency: about two clocks of each domain plus the slave's own time.
// The handshake scheme and its timing are this design's choice.
module wb_async_bridge
  import zet_pkg::*;
(
  input  logic    rst,      // asynchronous to both clocks, synchronized in each domain
  // master side
  input  logic    clk_m,
  input  wb_m2s_t m_i,
  output wb_s2m_t m_o,
  // slave side
  input  logic    clk_s,
  output wb_m2s_t s_o,
  input  wb_s2m_t s_i
);

  // ---------------------------------------------------------------- reset synchronizers
  logic [1:0] rst_m_sr, rst_s_sr;
  logic       rst_m, rst_s;
  always_ff @(posedge clk_m or posedge rst)
    if (rst) rst_m_sr <= 2'b11; else rst_m_sr <= {rst_m_sr[0], 1'b0};
  always_ff @(posedge clk_s or posedge rst)
    if (rst) rst_s_sr <= 2'b11; else rst_s_sr <= {rst_s_sr[0], 1'b0};
  assign rst_m = rst_m_sr[1];
  assign rst_s = rst_s_sr[1];

  // ---------------------------------------------------------------- master side
  wb_m2s_t    req_q;        // request held stable while in flight
  logic       req_tgl;      // toggles once per request
  logic       busy;
  logic [2:0] done_sync;    // synchronizer + edge detect of the slave's done toggle
  logic [15:0] rdat_q;      // slave-side read data, stable when done arrives
  logic       done_tgl;

  always_ff @(posedge clk_m) begin
    if (rst_m) begin
      req_q     <= '0;
      req_tgl   <= 1'b0;
      busy      <= 1'b0;
      done_sync <= '0;
      m_o       <= '0;
    end else begin
      done_sync <= {done_sync[1:0], done_tgl};
      m_o.ack   <= 1'b0;
      if (!busy && m_i.cyc && m_i.stb && !m_o.ack) begin
        req_q   <= m_i;
        req_tgl <= !req_tgl;
        busy    <= 1'b1;
      end else if (busy && (done_sync[2] != done_sync[1])) begin
        busy    <= 1'b0;
        m_o.ack <= 1'b1;
        m_o.dat <= rdat_q;
      end
    end
  end

  // ---------------------------------------------------------------- slave side
  logic [2:0] req_sync;

  always_ff @(posedge clk_s) begin
    if (rst_s) begin
      req_sync <= '0;
      done_tgl <= 1'b0;
      s_o      <= '0;
      rdat_q   <= '0;
    end else begin
      req_sync <= {req_sync[1:0], req_tgl};
      if (!s_o.cyc) begin
        if (req_sync[2] != req_sync[1]) begin
          s_o     <= req_q;
          s_o.cyc <= 1'b1;
          s_o.stb <= 1'b1;
        end
      end else if (s_i.ack) begin
        s_o.cyc  <= 1'b0;
        s_o.stb  <= 1'b0;
        rdat_q   <= s_i.dat;
        done_tgl <= !done_tgl;
      end
    end
  end

endmodule
