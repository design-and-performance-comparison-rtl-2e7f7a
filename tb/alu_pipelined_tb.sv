// alu_pipelined_tb: self-checking test of the two-stage pipelined ALU.
//
// A scoreboard queue holds the expected result, flags and acceptance cycle
// of every request taken (in_valid && in_ready at a rising edge); each
// response (out_valid && out_ready) must match the oldest entry. Expected
// values come from a small reference model using 64-bit arithmetic.
// Phase 1 streams requests back to back with out_ready high and checks the
// timing: every response appears exactly two cycles after its request was
// accepted, and one request is accepted on every cycle (N requests in N
// cycles). Phase 2 toggles in_valid and out_ready at random to exercise
// bubbles and back-pressure, and counts stalls on both sides; a mechanism
// that never happened is a failure. Inputs change at falling edges.
module alu_pipelined_tb;
  import alu_pkg::*;

  localparam int unsigned W = 32;
  localparam int N_STREAM = 200;
  localparam int N_RANDOM = 3000;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic in_valid = 1'b0, in_ready, out_valid, out_ready = 1'b0;
  logic [W-1:0] in_a = '0, in_b = '0, out_result;
  logic [OP_WIDTH-1:0] in_op = '0;
  alu_flags_t out_flags;

  always #5 clk = ~clk;

  alu_pipelined #(.WIDTH(W)) dut (
    .clk, .rst_n, .in_valid, .in_ready, .in_a, .in_b, .in_op,
    .out_valid, .out_ready, .out_result, .out_flags
  );

  int checks = 0, failures = 0;
  longint cycle = 0;
  int accepted = 0, completed = 0;
  int in_stalls = 0, out_stalls = 0, bubbles = 0;

  typedef struct {
    logic [W-1:0] r;
    alu_flags_t   f;
    longint       t;
  } exp_t;
  exp_t sb[$];

  function automatic exp_t model(logic [W-1:0] x, logic [W-1:0] y, logic [OP_WIDTH-1:0] o);
    exp_t e;
    longint unsigned us;
    longint signed ss;
    e.f = '0;
    case (o)
      4'b0000, 4'b1000: begin
        us = (o == 4'b0000) ? longint'(x) + longint'(y) : longint'(x) - longint'(y);
        ss = (o == 4'b0000) ? longint'($signed(x)) + longint'($signed(y))
                            : longint'($signed(x)) - longint'($signed(y));
        e.r = us[W-1:0];
        e.f.c = (o == 4'b0000) ? us[W] : (x >= y);
        e.f.v = (ss != longint'($signed(us[W-1:0])));
      end
      4'b0111: e.r = x & y;
      4'b0110: e.r = x | y;
      4'b0100: e.r = x ^ y;
      4'b0001: e.r = x << y[4:0];
      4'b0101: e.r = x >> y[4:0];
      4'b0010: e.r = W'($signed(x) < $signed(y));
      default: e.r = '0;
    endcase
    e.f.z = (e.r == '0);
    e.f.n = e.r[W-1];
    return e;
  endfunction

  bit check_latency = 1'b0;
  bit took = 1'b0;  // the request on the inputs was accepted at the last edge

  // Monitor: scoreboard and counters, sampled at each rising edge.
  always @(posedge clk) begin
    cycle <= cycle + 1;
    took <= rst_n && in_valid && in_ready;
    if (rst_n) begin
      if (in_valid && !in_ready) in_stalls++;
      if (out_valid && !out_ready) out_stalls++;
      if (!in_valid && in_ready) bubbles++;
      if (in_valid && in_ready) begin
        exp_t e;
        e = model(in_a, in_b, in_op);
        e.t = cycle;
        sb.push_back(e);
        accepted++;
      end
      if (out_valid && out_ready) begin
        checks++;
        if (sb.size() == 0) begin
          failures++;
          $display("FAIL: response with nothing outstanding");
        end else begin
          exp_t e;
          e = sb.pop_front();
          if (out_result !== e.r || out_flags !== e.f) begin
            failures++;
            $display("FAIL: got %h/%b expected %h/%b", out_result, out_flags, e.r, e.f);
          end
          if (check_latency) begin
            checks++;
            if (cycle - e.t != 2) begin
              failures++;
              $display("FAIL: latency %0d cycles, expected 2", cycle - e.t);
            end
          end
        end
        completed++;
      end
    end
  end

  localparam logic [OP_WIDTH-1:0] OPS [8] = '{4'b0000, 4'b1000, 4'b0111, 4'b0110,
                                               4'b0100, 4'b0001, 4'b0101, 4'b0010};

  task automatic drive_random();
    in_a  = $urandom;
    in_b  = ($urandom % 4 == 0) ? in_a : $urandom;
    in_op = OPS[$urandom % 8];
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint t_first, t_last;
    repeat (3) @(negedge clk);
    checks++;
    if (out_valid !== 1'b0 || in_ready !== 1'b1) begin
      failures++;
      $display("FAIL: pipeline not empty/ready after reset");
    end
    rst_n = 1'b1;

    // Phase 1: back-to-back stream, out_ready high
    check_latency = 1'b1;
    out_ready = 1'b1;
    @(negedge clk);
    t_first = cycle;
    for (int i = 0; i < N_STREAM; i++) begin
      in_valid = 1'b1;
      drive_random();
      @(negedge clk);
    end
    in_valid = 1'b0;
    t_last = cycle;
    wait (sb.size() == 0);
    @(negedge clk);
    checks++;
    if (accepted != N_STREAM || (t_last - t_first) != longint'(N_STREAM)) begin
      failures++;
      $display("FAIL: %0d requests took %0d cycles, expected %0d",
               accepted, t_last - t_first, N_STREAM);
    end
    $display("stream: %0d operations accepted in %0d cycles", accepted, t_last - t_first);
    check_latency = 1'b0;

    // Phase 2: random valid and ready
    for (int i = 0; i < N_RANDOM; i++) begin
      out_ready = ($urandom % 3 != 0);
      // a request is held, unchanged, until it is accepted
      if (!in_valid || took) begin
        in_valid = ($urandom % 4 != 0);
        drive_random();
      end
      @(negedge clk);
    end
    in_valid  = 1'b0;
    out_ready = 1'b1;
    repeat (5) @(negedge clk);

    checks++;
    if (sb.size() != 0 || accepted != completed) begin
      failures++;
      $display("FAIL: %0d accepted, %0d completed", accepted, completed);
    end
    checks++;
    if (in_stalls == 0 || out_stalls == 0 || bubbles == 0) begin
      failures++;
      $display("FAIL: a mechanism never happened");
    end
    $display("mechanisms: input stalls=%0d output stalls=%0d bubbles=%0d completed=%0d",
             in_stalls, out_stalls, bubbles, completed);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
