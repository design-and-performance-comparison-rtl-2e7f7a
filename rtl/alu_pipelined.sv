// alu_pipelined: two-stage pipelined 32-bit ALU with status flags and
// valid/ready flow control.
//
// Stage 1, Execute: the operation selected by in_op is computed on in_a and
// in_b by alu_execute, and result and Zero/Carry/Overflow/Negative flags are
// captured in the Execute register when the input handshake completes.
// Stage 2, Writeback: the Execute register is copied into the output register,
// which drives out_result/out_flags with out_valid.
//
// Timing: an operation accepted at a rising edge (in_valid && in_ready) is
// presented on the outputs after the second rising edge, i.e. a latency of
// two clock cycles, and with out_ready held high one operation is accepted
// and one completed every cycle. Each stage holds its contents while the
// stage after it is full and cannot move, so back-pressure on out_ready
// propagates to in_ready without losing or duplicating operations:
//   wb_ready = !out_valid || out_ready,  in_ready = !ex_valid || wb_ready.
// The outputs of a waiting result do not change until out_ready is seen.
//
// The two stages, their names and roles, the two-cycle latency, the one
// result per cycle and the valid/ready handshake are the accelerator's; the
// exact ready equations, the synchronous active-low reset (which clears only
// the valid bits) are this design's choices.
module alu_pipelined
  import alu_pkg::*;
#(
  parameter int unsigned WIDTH = DATA_WIDTH
) (
  input  logic                clk,
  input  logic                rst_n,
  // request
  input  logic                in_valid,
  output logic                in_ready,
  input  logic [WIDTH-1:0]    in_a,
  input  logic [WIDTH-1:0]    in_b,
  input  logic [OP_WIDTH-1:0] in_op,
  // response
  output logic                out_valid,
  input  logic                out_ready,
  output logic [WIDTH-1:0]    out_result,
  output alu_flags_t          out_flags
);

  // Execute stage
  logic [WIDTH-1:0] ex_result_d;
  alu_flags_t       ex_flags_d;
  logic             ex_valid;
  logic [WIDTH-1:0] ex_result;
  alu_flags_t       ex_flags;
  logic             wb_ready;

  alu_execute #(.WIDTH(WIDTH)) u_execute (
    .a      (in_a),
    .b      (in_b),
    .op     (in_op),
    .result (ex_result_d),
    .flags  (ex_flags_d)
  );

  assign wb_ready = !out_valid || out_ready;
  assign in_ready = !ex_valid || wb_ready;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ex_valid <= 1'b0;
    end else if (in_ready) begin
      ex_valid <= in_valid;
    end
  end

  always_ff @(posedge clk) begin
    if (in_ready && in_valid) begin
      ex_result <= ex_result_d;
      ex_flags  <= ex_flags_d;
    end
  end

  // Writeback stage
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
    end else if (wb_ready) begin
      out_valid <= ex_valid;
    end
  end

  always_ff @(posedge clk) begin
    if (wb_ready && ex_valid) begin
      out_result <= ex_result;
      out_flags  <= ex_flags;
    end
  end

  // A result waiting for out_ready stays on the outputs unchanged.
  a_out_hold: assert property (@(posedge clk) disable iff (!rst_n)
      out_valid && !out_ready |=> out_valid && $stable(out_result) && $stable(out_flags))
    else $error("alu_pipelined: output changed while stalled");

endmodule
