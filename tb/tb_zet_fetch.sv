// tb_zet_fetch: feeds the fetch state machine a byte stream of 8086 instructions from
// a memory with random latency and checks each collected instruction (opcode, modrm,
// displacement, immediate, prefixes, first sequencer address), the IP written back
// (the instruction's length), that every byte costs one bus read, and that all five
// states and their transitions are used.
module tb_zet_fetch;
  import zet_pkg::*;

  logic clk = 0, rst = 1;
  logic [15:0] cs, ip, ip_d;
  logic req, ack, ip_wr, start, done;
  logic [19:0] addr;
  logic [7:0] byte_i;
  insn_t insn;
  fetch_state_t state;
  logic [7:0] mem [1 << 20];
  int checks = 0, failures = 0, reads = 0;
  int visits [5];
  int trans [5][5];
  fetch_state_t prev;

  zet_fetch dut (.*);
  always #5 clk = ~clk;

  // IP register as the register file keeps it
  always_ff @(posedge clk) if (rst) ip <= 16'hFFF0; else if (ip_wr) ip <= ip_d;
  assign cs = 16'hF000;

  // memory: ack after 0..2 idle cycles, combinational like the bus master's ack
  int lat = 0;
  always @(posedge clk) begin
    if (req && !ack) lat <= lat + 1; else lat <= 0;
    if (ack) reads++;
  end
  logic [1:0] want;
  always @(posedge clk) if (!req || ack) want <= 2'($urandom % 3);
  assign ack    = req && (lat >= int'(want));
  assign byte_i = mem[addr];

  always @(posedge clk) if (!rst) begin
    visits[state]++;
    if (prev != state) trans[prev][state]++;
    prev <= state;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // expected instructions
  typedef struct { logic [7:0] b[$]; logic [7:0] op, mrm; logic [15:0] off, imm;
                   bit ovr; logic [1:0] seg; bit lock; int first; } exp_t;
  exp_t prog[$];

  initial begin
    int p = 20'hFFFF0;
    logic [15:0] exp_ip;
    prog.push_back('{b:'{8'h2E,8'hF0,8'hC7,8'h81,8'hFF,8'hFE,8'h32,8'h74}, op:8'hC7, mrm:8'h81,
                     off:16'hFEFF, imm:16'h7432, ovr:1, seg:S_CS, lock:1, first:16});
    prog.push_back('{b:'{8'h53}, op:8'h53, mrm:0, off:0, imm:0, ovr:0, seg:0, lock:0, first:13});
    prog.push_back('{b:'{8'hCE}, op:8'hCE, mrm:0, off:0, imm:0, ovr:0, seg:0, lock:0, first:1});
    prog.push_back('{b:'{8'hB8,8'h34,8'h12}, op:8'hB8, mrm:0, off:0, imm:16'h1234, ovr:0, seg:0, lock:0, first:15});
    prog.push_back('{b:'{8'hC7,8'hC3,8'hCD,8'hAB}, op:8'hC7, mrm:8'hC3, off:0, imm:16'hABCD, ovr:0, seg:0, lock:0, first:18});
    prog.push_back('{b:'{8'h26,8'hC7,8'h46,8'hF0,8'h01,8'h02}, op:8'hC7, mrm:8'h46, off:16'hFFF0, imm:16'h0201, ovr:1, seg:S_ES, lock:0, first:16});
    prog.push_back('{b:'{8'hC7,8'h06,8'h34,8'h12,8'h78,8'h56}, op:8'hC7, mrm:8'h06, off:16'h1234, imm:16'h5678, ovr:0, seg:0, lock:0, first:16});
    prog.push_back('{b:'{8'hE5,8'h80}, op:8'hE5, mrm:0, off:0, imm:16'h0080, ovr:0, seg:0, lock:0, first:27});
    prog.push_back('{b:'{8'h2D,8'h01,8'h00}, op:8'h2D, mrm:0, off:0, imm:16'h0001, ovr:0, seg:0, lock:0, first:24});
    prog.push_back('{b:'{8'h90}, op:8'h90, mrm:0, off:0, imm:0, ovr:0, seg:0, lock:0, first:0});
    foreach (mem[i]) mem[i] = 8'h90;
    // program starts at F000:FFF0 and wraps to F000:0000
    exp_ip = 16'hFFF0;
    foreach (prog[k]) foreach (prog[k].b[j]) begin
      mem[20'hF0000 + 20'(exp_ip)] = prog[k].b[j];
      exp_ip++;
    end
    done = 0; prev = ST_OPCODE;
    repeat (2) @(posedge clk);
    rst = 0;
    exp_ip = 16'hFFF0;
    foreach (prog[k]) begin
      int r0;
      r0 = reads;
      @(posedge clk iff start);
      #1;
      exp_ip = exp_ip + 16'(prog[k].b.size());
      chk(state == ST_EXEC && !req, "in execute, bus free");
      chk(insn.opcode == prog[k].op && insn.modrm == prog[k].mrm && insn.off == prog[k].off
          && insn.imm == prog[k].imm && insn.seg_ovr == prog[k].ovr
          && (!prog[k].ovr || insn.seg == prog[k].seg) && insn.lock == prog[k].lock
          && insn.first == 10'(prog[k].first), $sformatf("instruction %0d fields: %p", k, insn));
      chk(ip == exp_ip, $sformatf("instruction %0d IP %h expected %h", k, ip, exp_ip));
      chk(reads - r0 == prog[k].b.size(), $sformatf("one read per byte: %0d for %0d", reads - r0, prog[k].b.size()));
      repeat (2) @(posedge clk);
      @(negedge clk); done = 1;
      @(negedge clk); done = 0;
      chk(state == ST_OPCODE, "back to opcode state");
    end
    chk(trans[0][1] > 0 && trans[1][2] > 0 && trans[2][3] > 0 && trans[3][4] > 0
        && trans[0][3] > 0 && trans[0][4] > 0 && trans[1][3] > 0 && trans[4][0] > 0,
        "state transitions exercised");
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
