// tb_zet_micro_seq: starts the sequencer at each instruction's first address and
// checks the order of microcode words it issues, the one-cycle-per-step rate, the stall
// while `step` is low, the `last` stop and an early `cut_short`.
module tb_zet_micro_seq;
  import zet_pkg::*;

  logic clk = 0, rst = 1;
  logic start, step, cut_short, valid, done;
  logic [9:0] first;
  uinstr_t ui;
  int checks = 0, failures = 0;

  zet_micro_seq dut (.*);
  zet_micro_rom ref_rom (.addr(ref_addr), .data(ref_ui));
  logic [8:0] ref_addr;
  uinstr_t    ref_ui;

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // run from `f`, expecting microcode words `exp`; stall `gap` cycles between steps
  task automatic run(input int f, input int exp[$], input int gap, input int abort_at);
    int cyc = 0;
    @(negedge clk); start = 1; first = 10'(f);
    @(negedge clk); start = 0;
    foreach (exp[i]) begin
      for (int g = 0; g < gap; g++) begin
        step = 0; #1;
        chk(valid && !done, "holds while stalled");
        @(negedge clk); cyc++;
      end
      ref_addr = 9'(exp[i]); #1;
      chk(valid && ui == ref_ui, $sformatf("start %0d step %0d issues word %0d", f, i, exp[i]));
      step = 1; cut_short = (i == abort_at); #1;
      chk(done == (i == exp.size() - 1 || i == abort_at), "done on last step");
      @(negedge clk); cyc++;
      step = 0; cut_short = 0;
      if (i == abort_at) break;
    end
    #1 chk(!valid, "idle after done");
    chk(cyc == ((abort_at >= 0) ? abort_at + 1 : exp.size()) * (gap + 1), "cycle count");
  endtask

  initial begin
    start = 0; step = 0; cut_short = 0; first = 0; ref_addr = 0;
    repeat (2) @(posedge clk);
    rst = 0;
    run(1, '{0,1,2,3,4,5,6,7,8,9,10,11}, 0, -1);   // INTO
    run(1, '{0,1,2,3,4,5,6,7,8,9,10,11}, 2, -1);   // INTO with stalls
    run(1, '{0,1,2}, 0, 0);                         // INTO with OF clear: ends at once
    run(13, '{1,12}, 1, -1);                        // PUSH
    run(16, '{14,15}, 0, -1);                       // MOV mem, imm
    run(22, '{20}, 0, -1);                          // SBB AX, imm
    run(0, '{29}, 0, -1);                           // no-op
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
