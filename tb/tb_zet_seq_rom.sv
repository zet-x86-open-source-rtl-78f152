// tb_zet_seq_rom: checks the sequencer ROM layout: each instruction's run of entries
// points at the right microcode words and only its final entry has `last` set.
module tb_zet_seq_rom;
  import zet_pkg::*;

  logic [9:0] addr;
  logic       last;
  logic [8:0] uaddr;
  int checks = 0, failures = 0;

  zet_seq_rom dut (.addr(addr), .last(last), .uaddr(uaddr));

  task automatic expect_entry(input int a, input bit l, input int u);
    addr = 10'(a); #1;
    checks++;
    if (last !== l || uaddr !== 9'(u)) begin
      failures++;
      $display("FAIL seq[%0d] = {%0d,%0d}, expected {%0d,%0d}", a, last, uaddr, l, u);
    end
  endtask

  initial begin
    expect_entry(0, 1, 29);
    for (int i = 0; i < 12; i++) expect_entry(1 + i, i == 11, i);
    expect_entry(13, 0, 1);   // push shares SP-2 with INTO
    expect_entry(14, 1, 12);
    expect_entry(15, 1, 13);
    expect_entry(16, 0, 14);
    expect_entry(17, 1, 15);
    expect_entry(18, 1, 16);
    for (int k = 0; k < 8; k++) expect_entry(19 + k, 1, 17 + k);
    expect_entry(27, 1, 25);
    expect_entry(28, 1, 26);
    expect_entry(29, 1, 27);
    expect_entry(30, 1, 28);
    expect_entry(31, 1, 30);  // jmp short
    expect_entry(32, 0, 31);  // pop: load, then SP + 2
    expect_entry(33, 1, 32);
    for (int k = 0; k < 4; k++) expect_entry(34 + k, 1, 33 + k);  // mov r/m,r and r,r/m
    expect_entry(500, 1, 29);
    expect_entry(1023, 1, 29);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
