// alu_pkg: types and constants shared by the ALU accelerator.
//
// The operation set is the eight RV32I register-register operations the
// accelerator supports: ADD, SUB, AND, OR, XOR, SLL, SRL and SLT. Their
// 4-bit codes are this design's own choice: they reuse the RISC-V encoding
// {funct7[5], funct3}, so a core can pass its decoded fields straight in.
// Any other code is treated as illegal and returns a zero result.
//
// The four status flags Zero, Carry, Overflow and Negative are packed into
// a struct whose bit order (Z in bit 0 up to N in bit 3) is also the layout
// of the flags register of the AXI4-Lite wrapper.
package alu_pkg;

  localparam int unsigned DATA_WIDTH = 32;
  localparam int unsigned OP_WIDTH   = 4;

  typedef enum logic [OP_WIDTH-1:0] {
    OP_ADD = 4'b0000,
    OP_SLL = 4'b0001,
    OP_SLT = 4'b0010,
    OP_XOR = 4'b0100,
    OP_SRL = 4'b0101,
    OP_OR  = 4'b0110,
    OP_AND = 4'b0111,
    OP_SUB = 4'b1000
  } alu_op_e;

  // Status flags, Z in bit 0.
  typedef struct packed {
    logic n;  // Negative: bit 31 of the result
    logic v;  // Overflow: signed overflow of ADD/SUB
    logic c;  // Carry: carry out of ADD/SUB (SUB: 1 = no borrow)
    logic z;  // Zero: result is all zeros
  } alu_flags_t;

  // Register offsets of the AXI4-Lite slave (byte addresses).
  localparam logic [4:0] REG_CONTROL = 5'h00;
  localparam logic [4:0] REG_OP_A    = 5'h04;
  localparam logic [4:0] REG_OP_B    = 5'h08;
  localparam logic [4:0] REG_OPCODE  = 5'h0C;
  localparam logic [4:0] REG_RESULT  = 5'h10;
  localparam logic [4:0] REG_FLAGS   = 5'h14;

  // Bits of the control register.
  localparam int unsigned CTRL_START = 0;  // write 1: launch one operation
  localparam int unsigned CTRL_DONE  = 1;  // read: result register is valid
  localparam int unsigned CTRL_BUSY  = 2;  // read: an operation is in flight

endpackage
