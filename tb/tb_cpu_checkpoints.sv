// tb_cpu_checkpoints: file-driven regression of the processor against
// register checkpoints produced by an external golden reference model.
//
// tb/instr.hex holds one 16-bit instruction word per line. tb/checkpoints.mem
// holds, for every instruction, five hex fields: the instruction's address and
// r0..r3 after it has executed. tb/golden.mem holds the final r0..r3. The
// files were produced by a software model that draws NUM_INSTR = 100
// instructions uniformly from NOP/ADD/SUB/MOV/XOR with random rd and a signed
// immediate in [-128, +127] and applies each to a four-entry register array
// masked to 16 bits.
//
// The testbench drives one instruction per clock after a five-clock reset.
// After each clock it compares all four registers with the checkpoint line
// (an instruction passes only if all four match) and checks that the PC is
// the checkpoint address plus one. At the end the registers must equal the
// golden final state. It prints the pass/fail tally per instruction.
module tb_cpu_checkpoints;

  localparam int NUM_INSTR = 100;

  logic        clk = 1'b0;
  logic        rst;
  logic [15:0] instr;
  logic [7:0]  pc;
  logic        halt;
  logic [15:0] r0, r1, r2, r3;

  always #5 clk = ~clk;

  simple_cpu dut (.*);

  logic [15:0] prog   [NUM_INSTR];
  logic [15:0] chk    [5 * NUM_INSTR];
  logic [15:0] golden [4];

  int checks = 0;
  int failures = 0;
  int pass_cnt = 0;
  int fail_cnt = 0;

  initial begin
    #(10 * 20 * NUM_INSTR);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    $readmemh("tb/instr.hex", prog);
    $readmemh("tb/checkpoints.mem", chk);
    $readmemh("tb/golden.mem", golden);
    rst = 1'b1;
    instr = 16'h0000;
    repeat (5) @(negedge clk);
    rst = 1'b0;
    for (int i = 0; i < NUM_INSTR; i++) begin
      instr = prog[i];
      @(negedge clk);
      checks++;
      if (r0 === chk[5*i+1] && r1 === chk[5*i+2] && r2 === chk[5*i+3] && r3 === chk[5*i+4]) begin
        pass_cnt++;
      end else begin
        fail_cnt++;
        failures++;
        $display("FAIL instr=%0d (%h) exp %h %h %h %h got %h %h %h %h", i, prog[i],
                 chk[5*i+1], chk[5*i+2], chk[5*i+3], chk[5*i+4], r0, r1, r2, r3);
      end
      checks++;
      if (16'(pc) !== chk[5*i] + 16'd1) begin
        failures++;
        $display("FAIL instr=%0d pc %h expected %h", i, pc, chk[5*i] + 16'd1);
      end
    end
    checks++;
    if ({r0, r1, r2, r3} !== {golden[0], golden[1], golden[2], golden[3]}) begin
      failures++;
      $display("FAIL final state %h %h %h %h, golden %h %h %h %h",
               r0, r1, r2, r3, golden[0], golden[1], golden[2], golden[3]);
    end
    $display("instructions: PASS=%0d FAIL=%0d", pass_cnt, fail_cnt);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
