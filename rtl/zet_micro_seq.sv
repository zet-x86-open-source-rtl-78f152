// zet_micro_seq: the microcode sequencer.
//
// On `start` it loads the decoder's first address into its sequencer-ROM pointer and
// begins issuing. While running, the sequencer ROM entry at the pointer gives the
// microcode address, and the microcode ROM word at that address is presented on `ui`
// with `valid` high. Each time the exec unit reports `step` (the microinstruction has
// finished; memory steps take as long as the bus), the pointer moves to the next entry,
// until the entry marked `last` finishes, or `cut_short` is raised (a condition test that
// failed ends the instruction early). `done` pulses in that final cycle.
// Timing: the first microinstruction is issued the cycle after `start`; each non-memory
// microinstruction takes one cycle.
module zet_micro_seq
  import zet_pkg::*;
(
  input  logic            clk,
  input  logic            rst,
  input  logic            start,
  input  logic [SA_W-1:0] first,
  input  logic            step,
  input  logic            cut_short,
  output logic            valid,
  output uinstr_t         ui,
  output logic            done
);

  logic [SA_W-1:0] ptr;
  logic            running;
  logic            last;
  logic [UA_W-1:0] uaddr;

  zet_seq_rom   u_seq_rom   (.addr(ptr), .last(last), .uaddr(uaddr));
  zet_micro_rom u_micro_rom (.addr(uaddr), .data(ui));

  assign valid = running;
  assign done  = running && step && (last || cut_short);

  always_ff @(posedge clk) begin
    if (rst) begin
      running <= 1'b0;
      ptr     <= '0;
    end else if (start && !running) begin
      running <= 1'b1;
      ptr     <= first;
    end else if (running && step) begin
      if (last || cut_short) running <= 1'b0;
      else               ptr     <= ptr + 1'b1;
    end
  end

endmodule
