// alu_execute: the Execute-stage logic of the pipelined ALU.
//
// Purely combinational. One shared adder computes a + b for ADD and
// a + ~b + 1 for SUB and SLT; the remaining operations are selected by a
// case statement on the opcode, as in the case-based structure the
// accelerator is built on. Alongside the result it produces the four status
// flags:
//   Z  result is zero (every operation)
//   N  result bit WIDTH-1 (every operation)
//   C  carry out of the adder for ADD and SUB (for SUB this is 1 when no
//      borrow occurs, i.e. a >= b unsigned); 0 for the other operations
//   V  two's-complement overflow for ADD and SUB; 0 for the others
// SLT returns 1 when a < b as signed numbers, taken from N xor V of a - b.
// Shifts use the low log2(WIDTH) bits of b, as RISC-V does. An opcode outside
// the eight defined ones gives a zero result (and so Z = 1).
//
// Which operations exist and that Z, C, V, N are produced here follow the
// accelerator's description; the flag conventions for C and V under SUB and
// for the logic/shift operations, and the illegal-opcode result, are this
// design's choices.
//
// Ports: a, b operands; op opcode (alu_pkg::alu_op_e codes); result; flags.
module alu_execute
  import alu_pkg::*;
#(
  parameter int unsigned WIDTH = DATA_WIDTH
) (
  input  logic [WIDTH-1:0]    a,
  input  logic [WIDTH-1:0]    b,
  input  logic [OP_WIDTH-1:0] op,
  output logic [WIDTH-1:0]    result,
  output alu_flags_t          flags
);

  localparam int unsigned SHW = $clog2(WIDTH);

  logic             subtract;
  logic [WIDTH-1:0] b_eff;
  logic [WIDTH:0]   sum;      // carry out in bit WIDTH
  logic             ovf;
  logic             is_arith;

  assign subtract = (op == OP_SUB) || (op == OP_SLT);
  assign b_eff    = subtract ? ~b : b;
  assign sum      = {1'b0, a} + {1'b0, b_eff} + {{WIDTH{1'b0}}, subtract};
  // Overflow: both adder inputs share a sign that the sum does not have.
  assign ovf      = (a[WIDTH-1] == b_eff[WIDTH-1]) && (sum[WIDTH-1] != a[WIDTH-1]);
  assign is_arith = (op == OP_ADD) || (op == OP_SUB);

  always_comb begin
    unique case (op)
      OP_ADD,
      OP_SUB:  result = sum[WIDTH-1:0];
      OP_AND:  result = a & b;
      OP_OR:   result = a | b;
      OP_XOR:  result = a ^ b;
      OP_SLL:  result = a << b[SHW-1:0];
      OP_SRL:  result = a >> b[SHW-1:0];
      OP_SLT:  result = {{(WIDTH-1){1'b0}}, sum[WIDTH-1] ^ ovf};
      default: result = '0;
    endcase
  end

  always_comb begin
    flags.z = (result == '0);
    flags.n = result[WIDTH-1];
    flags.c = is_arith & sum[WIDTH];
    flags.v = is_arith & ovf;
  end

endmodule
