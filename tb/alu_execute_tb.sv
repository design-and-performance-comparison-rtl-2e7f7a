// alu_execute_tb: self-checking test of the Execute-stage logic.
//
// Drives directed corner cases (carry out, signed overflow in both
// directions, zero results, maximum shifts, signed/unsigned SLT
// disagreement, an illegal opcode) followed by random operands for every
// opcode, and compares result and all four flags with a reference model
// built on 64-bit integer arithmetic rather than on the 33-bit adder the
// block uses. A 32-bit carry is bit 32 of the wide unsigned sum; overflow is
// a signed 64-bit sum that leaves the 32-bit range. A watchdog ends the run.
module alu_execute_tb;
  import alu_pkg::*;

  localparam int unsigned W = 32;

  logic [W-1:0]        a, b, result;
  logic [OP_WIDTH-1:0] op;
  alu_flags_t          flags;

  int checks   = 0;
  int failures = 0;

  alu_execute #(.WIDTH(W)) dut (.a(a), .b(b), .op(op), .result(result), .flags(flags));

  // Reference model
  task automatic model(input logic [W-1:0] x, input logic [W-1:0] y,
                       input logic [OP_WIDTH-1:0] o,
                       output logic [W-1:0] r, output alu_flags_t f);
    longint unsigned us;
    longint signed   ss;
    bit arith;
    arith = 1'b0;
    f = '0;
    case (o)
      4'b0000: begin  // ADD
        us = longint'(x) + longint'(y);
        ss = longint'($signed(x)) + longint'($signed(y));
        r = us[W-1:0]; f.c = us[W]; arith = 1'b1;
        f.v = (ss > 64'sd2147483647) || (ss < -64'sd2147483648);
      end
      4'b1000: begin  // SUB, carry = no borrow
        us = longint'(x) - longint'(y);
        ss = longint'($signed(x)) - longint'($signed(y));
        r = us[W-1:0]; f.c = (x >= y); arith = 1'b1;
        f.v = (ss > 64'sd2147483647) || (ss < -64'sd2147483648);
      end
      4'b0111: r = x & y;
      4'b0110: r = x | y;
      4'b0100: r = x ^ y;
      4'b0001: r = W'(longint'(x) << y[4:0]);
      4'b0101: r = x >> y[4:0];
      4'b0010: r = ($signed(x) < $signed(y)) ? 1 : 0;
      default: r = 0;
    endcase
    if (!arith) begin f.c = 0; f.v = 0; end
    f.z = (r == 0);
    f.n = r[W-1];
  endtask

  int seen_c = 0, seen_v = 0, seen_z = 0, seen_n = 0;

  task automatic check(input logic [W-1:0] x, input logic [W-1:0] y,
                       input logic [OP_WIDTH-1:0] o);
    logic [W-1:0] r_exp;
    alu_flags_t   f_exp;
    a = x; b = y; op = o;
    #1;
    model(x, y, o, r_exp, f_exp);
    checks++;
    if (result !== r_exp || flags !== f_exp) begin
      failures++;
      $display("FAIL op=%b a=%h b=%h : got %h flags=%b, expected %h flags=%b",
               o, x, y, result, flags, r_exp, f_exp);
    end
    seen_c += int'(flags.c); seen_v += int'(flags.v);
    seen_z += int'(flags.z); seen_n += int'(flags.n);
  endtask

  localparam logic [OP_WIDTH-1:0] OPS [8] = '{4'b0000, 4'b1000, 4'b0111, 4'b0110,
                                               4'b0100, 4'b0001, 4'b0101, 4'b0010};

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Directed cases
    check(32'hFFFF_FFFF, 32'h0000_0001, OP_ADD);  // carry, zero
    check(32'h7FFF_FFFF, 32'h0000_0001, OP_ADD);  // positive overflow
    check(32'h8000_0000, 32'h8000_0000, OP_ADD);  // negative overflow, carry, zero
    check(32'h0000_0005, 32'h0000_0005, OP_SUB);  // zero, no borrow
    check(32'h0000_0000, 32'h0000_0001, OP_SUB);  // borrow, negative
    check(32'h8000_0000, 32'h0000_0001, OP_SUB);  // overflow
    check(32'h7FFF_FFFF, 32'hFFFF_FFFF, OP_SUB);  // overflow
    check(32'hFFFF_FFFF, 32'h0000_0001, OP_SLT);  // -1 < 1 signed
    check(32'h0000_0001, 32'hFFFF_FFFF, OP_SLT);
    check(32'h8000_0000, 32'h7FFF_FFFF, OP_SLT);  // overflow inside SLT
    check(32'h7FFF_FFFF, 32'h8000_0000, OP_SLT);
    check(32'h1234_5678, 32'h1234_5678, OP_SLT);
    check(32'h0000_0001, 32'h0000_001F, OP_SLL);
    check(32'h8000_0000, 32'h0000_001F, OP_SRL);
    check(32'hDEAD_BEEF, 32'hFFFF_FFE4, OP_SLL);  // only b[4:0] counts
    check(32'hDEAD_BEEF, 32'h0000_0020, OP_SRL);  // shift by 0
    check(32'hF0F0_F0F0, 32'h0F0F_0F0F, OP_AND);
    check(32'hF0F0_F0F0, 32'h0F0F_0F0F, OP_OR);
    check(32'hAAAA_AAAA, 32'hAAAA_AAAA, OP_XOR);
    check(32'h1234_5678, 32'h9ABC_DEF0, 4'b1111);  // illegal opcode
    check(32'h1234_5678, 32'h9ABC_DEF0, 4'b0011);  // illegal opcode
    // Random operands, every opcode
    for (int i = 0; i < 4000; i++) begin
      logic [W-1:0] x, y;
      x = $urandom; y = $urandom;
      if (i % 7 == 0) y = x;              // equal operands
      if (i % 11 == 0) x = {1'b1, x[W-2:0]};
      check(x, y, OPS[i % 8]);
    end
    checks++;
    if (seen_c == 0 || seen_v == 0 || seen_z == 0 || seen_n == 0) begin
      failures++;
      $display("FAIL: a flag was never raised c=%0d v=%0d z=%0d n=%0d",
               seen_c, seen_v, seen_z, seen_n);
    end
    $display("flags raised: C=%0d V=%0d Z=%0d N=%0d", seen_c, seen_v, seen_z, seen_n);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
