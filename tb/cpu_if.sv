// cpu_if: the signal bundle between the processor and its verification
// environment: clock, reset, the instruction word driven in, and the program
// counter, halt flag and four registers observed out. The testbench drives
// `instr` and `rst` half a clock before the rising edge that uses them and
// samples the outputs half a clock after it.
interface cpu_if (input logic clk);
  logic        rst;
  logic [15:0] instr;
  logic [7:0]  pc;
  logic        halt;
  logic [15:0] r0, r1, r2, r3;
endinterface
