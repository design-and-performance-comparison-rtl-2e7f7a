// alu_axi_wrapper_tb: end-to-end test of the ALU accelerator through its
// AXI4-Lite slave port, at the default parameters.
//
// The testbench plays the processor and interconnect: bus tasks issue
// AXI4-Lite writes (address first, data first or both together, with a
// randomly delayed BREADY) and reads (with a randomly delayed RREADY).
// Software-style operations write OP_A, OP_B and OPCODE, write START, poll
// DONE and read RESULT and FLAGS; both are compared with a reference model
// using 64-bit arithmetic. On top of every opcode with random and corner
// operands it checks:
//   - the two-cycle pipeline latency, exactly: a CONTROL read taken three
//     edges after the START write still shows DONE=0/BUSY=1, one taken four
//     edges after shows DONE=1/BUSY=0;
//   - two STARTs in a row: both flow through, the second result is kept;
//   - WSTRB byte lanes, read-back of the operand registers, an unmapped
//     offset, an illegal opcode;
//   - each of the Z, C, V and N flags raised at least once.
// Every mechanism is counted and one that never happened counts a failure.
// It finishes with a run of back-to-back operations and reports the bus
// cycles per operation, the way the accelerator's throughput is measured
// from software. Inputs change at falling clock edges.
module alu_axi_wrapper_tb;
  import alu_pkg::*;

  localparam int N_RANDOM = 1000;
  localparam int N_PERF   = 200;

  logic        clk = 1'b0;
  logic        aresetn = 1'b0;
  logic [4:0]  awaddr = '0, araddr = '0;
  logic        awvalid = 1'b0, awready, wvalid = 1'b0, wready;
  logic [31:0] wdata = '0, rdata;
  logic [3:0]  wstrb = '0;
  logic [1:0]  bresp, rresp;
  logic        bvalid, bready = 1'b0, arvalid = 1'b0, arready, rvalid, rready = 1'b0;

  always #5 clk = ~clk;

  alu_axi_wrapper dut (
    .S_AXI_ACLK(clk), .S_AXI_ARESETN(aresetn),
    .S_AXI_AWADDR(awaddr), .S_AXI_AWPROT(3'b000), .S_AXI_AWVALID(awvalid), .S_AXI_AWREADY(awready),
    .S_AXI_WDATA(wdata), .S_AXI_WSTRB(wstrb), .S_AXI_WVALID(wvalid), .S_AXI_WREADY(wready),
    .S_AXI_BRESP(bresp), .S_AXI_BVALID(bvalid), .S_AXI_BREADY(bready),
    .S_AXI_ARADDR(araddr), .S_AXI_ARPROT(3'b000), .S_AXI_ARVALID(arvalid), .S_AXI_ARREADY(arready),
    .S_AXI_RDATA(rdata), .S_AXI_RRESP(rresp), .S_AXI_RVALID(rvalid), .S_AXI_RREADY(rready)
  );

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // mechanism counters
  int n_op [16];
  int n_z = 0, n_c = 0, n_v = 0, n_n = 0;
  int n_aw_first = 0, n_w_first = 0, n_together = 0;
  int n_b_held = 0, n_r_held = 0, n_busy = 0, n_strb = 0, n_double = 0;
  int n_latency = 0, n_unmapped = 0, n_illegal = 0;

  task automatic fail(input string msg);
    failures++;
    $display("FAIL: %s", msg);
  endtask

  // ------------------------------------------------------------------
  // Bus tasks; called and returning just after a falling edge.
  // ------------------------------------------------------------------
  task automatic send_aw(input logic [4:0] addr, input int delay);
    repeat (delay) @(negedge clk);
    awaddr = addr; awvalid = 1'b1;
    #1;
    while (!awready) @(negedge clk);
    @(negedge clk);
    awvalid = 1'b0;
  endtask

  task automatic send_w(input logic [31:0] data, input logic [3:0] strb, input int delay);
    repeat (delay) @(negedge clk);
    wdata = data; wstrb = strb; wvalid = 1'b1;
    #1;
    while (!wready) @(negedge clk);
    @(negedge clk);
    wvalid = 1'b0;
  endtask

  // mode 0: together, 1: address first, 2: data first; bdelay: BREADY delay
  task automatic axi_write(input logic [4:0] addr, input logic [31:0] data,
                           input logic [3:0] strb = 4'hF, input int mode = 0,
                           input int bdelay = 0);
    case (mode)
      1: begin fork send_aw(addr, 0); send_w(data, strb, 2); join n_aw_first++; end
      2: begin fork send_aw(addr, 2); send_w(data, strb, 0); join n_w_first++; end
      default: begin fork send_aw(addr, 0); send_w(data, strb, 0); join n_together++; end
    endcase
    while (!bvalid) @(negedge clk);
    if (bdelay > 0) begin
      repeat (bdelay) @(negedge clk);
      checks++;
      if (!bvalid) fail("BVALID dropped before BREADY");
      else n_b_held++;
    end
    checks++;
    if (bresp !== 2'b00) fail("write response not OKAY");
    bready = 1'b1;
    @(negedge clk);
    bready = 1'b0;
  endtask

  task automatic axi_read(input logic [4:0] addr, output logic [31:0] data,
                          input int rdelay = 0);
    logic [31:0] first;
    araddr = addr; arvalid = 1'b1;
    #1;
    while (!arready) @(negedge clk);
    @(negedge clk);
    arvalid = 1'b0;
    while (!rvalid) @(negedge clk);
    first = rdata;
    if (rdelay > 0) begin
      repeat (rdelay) @(negedge clk);
      checks++;
      if (!rvalid || rdata !== first) fail("read data not held until RREADY");
      else n_r_held++;
    end
    checks++;
    if (rresp !== 2'b00) fail("read response not OKAY");
    data = rdata;
    rready = 1'b1;
    @(negedge clk);
    rready = 1'b0;
  endtask

  // ------------------------------------------------------------------
  // Reference model
  // ------------------------------------------------------------------
  function automatic logic [35:0] model(logic [31:0] x, logic [31:0] y, logic [3:0] o);
    logic [31:0] r;
    logic c, v;
    longint unsigned us;
    longint signed ss;
    c = 0; v = 0;
    case (o)
      4'b0000: begin
        us = longint'(x) + longint'(y); ss = longint'($signed(x)) + longint'($signed(y));
        r = us[31:0]; c = us[32]; v = (ss != longint'($signed(r)));
      end
      4'b1000: begin
        us = longint'(x) - longint'(y); ss = longint'($signed(x)) - longint'($signed(y));
        r = us[31:0]; c = (x >= y); v = (ss != longint'($signed(r)));
      end
      4'b0111: r = x & y;
      4'b0110: r = x | y;
      4'b0100: r = x ^ y;
      4'b0001: r = x << y[4:0];
      4'b0101: r = x >> y[4:0];
      4'b0010: r = {31'b0, $signed(x) < $signed(y)};
      default: r = 0;
    endcase
    // {N, V, C, Z, result}
    return {r[31], v, c, (r == 0), r};
  endfunction

  // One software-style operation, fully checked.
  task automatic run_op(input logic [31:0] x, input logic [31:0] y, input logic [3:0] o,
                        input bit randomize_bus = 1'b1);
    logic [31:0] d, res, flg;
    logic [35:0] e;
    int polls;
    axi_write(REG_OP_A,   x, 4'hF, randomize_bus ? $urandom % 3 : 0, randomize_bus ? $urandom % 3 : 0);
    axi_write(REG_OP_B,   y, 4'hF, randomize_bus ? $urandom % 3 : 0, 0);
    axi_write(REG_OPCODE, {28'b0, o}, 4'hF, 0, 0);
    axi_write(REG_CONTROL, 32'h1, 4'hF, 0, 0);
    polls = 0;
    do begin
      axi_read(REG_CONTROL, d, randomize_bus ? $urandom % 2 : 0);
      if (d[CTRL_BUSY]) n_busy++;
      polls++;
    end while (!d[CTRL_DONE] && polls < 20);
    checks++;
    if (!d[CTRL_DONE]) fail("DONE never set");
    axi_read(REG_RESULT, res, 0);
    axi_read(REG_FLAGS, flg, 0);
    e = model(x, y, o);
    checks++;
    if (res !== e[31:0] || flg !== {28'b0, e[35:32]}) begin
      failures++;
      $display("FAIL: op %b a=%h b=%h: result %h flags %b, expected %h %b",
               o, x, y, res, flg[3:0], e[31:0], e[35:32]);
    end
    n_op[o]++;
    n_z += int'(flg[0]); n_c += int'(flg[1]); n_v += int'(flg[2]); n_n += int'(flg[3]);
  endtask

  localparam logic [3:0] OPS [8] = '{4'b0000, 4'b1000, 4'b0111, 4'b0110,
                                     4'b0100, 4'b0001, 4'b0101, 4'b0010};

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d;
    longint t0, t1;
    foreach (n_op[i]) n_op[i] = 0;
    repeat (4) @(negedge clk);
    aresetn = 1'b1;
    @(negedge clk);

    // Reset state
    axi_read(REG_CONTROL, d);
    checks++;
    if (d !== 32'h0) fail("CONTROL not idle after reset");
    axi_read(REG_RESULT, d);
    checks++;
    if (d !== 32'h0) fail("RESULT not cleared by reset");

    // Register read-back and byte strobes
    axi_write(REG_OP_A, 32'hA5A5_5A5A, 4'hF, 1, 2);
    axi_write(REG_OP_A, 32'h1122_3344, 4'b0101, 2, 0);
    axi_read(REG_OP_A, d, 2);
    checks++;
    if (d !== 32'hA522_5A44) fail($sformatf("WSTRB merge gave %h", d));
    else n_strb++;
    axi_write(REG_OPCODE, 32'hFFFF_FFF8, 4'hF);
    axi_read(REG_OPCODE, d);
    checks++;
    if (d !== 32'h0000_0008) fail($sformatf("OPCODE read back %h", d));
    axi_read(5'h18, d);
    checks++;
    if (d !== 32'h0) fail("unmapped offset not zero");
    else n_unmapped++;

    // Corner cases: every flag, every opcode
    run_op(32'hFFFF_FFFF, 32'h0000_0001, OP_ADD);   // Z, C
    run_op(32'h7FFF_FFFF, 32'h0000_0001, OP_ADD);   // V, N
    run_op(32'h8000_0000, 32'h8000_0000, OP_ADD);   // Z, C, V
    run_op(32'h0000_0003, 32'h0000_0007, OP_SUB);   // borrow, N
    run_op(32'h8000_0000, 32'h0000_0001, OP_SUB);   // V
    run_op(32'h0000_0009, 32'h0000_0009, OP_SUB);   // Z, C
    run_op(32'hF0F0_F0F0, 32'h0F0F_0F0F, OP_AND);
    run_op(32'hF0F0_F0F0, 32'h0F0F_0F0F, OP_OR);
    run_op(32'h1234_5678, 32'h1234_5678, OP_XOR);
    run_op(32'h0000_0001, 32'h0000_001F, OP_SLL);
    run_op(32'h8000_0000, 32'h0000_001F, OP_SRL);
    run_op(32'hFFFF_FFFE, 32'h0000_0001, OP_SLT);
    run_op(32'h0000_0001, 32'hFFFF_FFFE, OP_SLT);
    run_op(32'hCAFE_F00D, 32'h0000_0001, 4'b1111);  // illegal opcode
    n_illegal++;

    // Exact latency. The START write lands at the edge where BVALID rises
    // (BREADY follows at once); the task returns 1.5 cycles later.
    axi_write(REG_OPCODE, {28'b0, OP_ADD});
    axi_write(REG_CONTROL, 32'h1);
    @(negedge clk);                 // next read handshake: 3 edges after START
    axi_read(REG_CONTROL, d);
    checks++;
    if (d[CTRL_DONE] !== 1'b0 || d[CTRL_BUSY] !== 1'b1)
      fail($sformatf("3 edges after START: CONTROL=%h, expected busy, not done", d));
    axi_write(REG_CONTROL, 32'h1);
    @(negedge clk);
    @(negedge clk);                 // next read handshake: 4 edges after START
    axi_read(REG_CONTROL, d);
    checks++;
    if (d[CTRL_DONE] !== 1'b1 || d[CTRL_BUSY] !== 1'b0)
      fail($sformatf("4 edges after START: CONTROL=%h, expected done, idle", d));
    else n_latency++;

    // Two STARTs in a row with a different opcode: both flow, last one kept
    axi_write(REG_OP_A, 32'd100);
    axi_write(REG_OP_B, 32'd42);
    axi_write(REG_OPCODE, {28'b0, OP_SUB});
    axi_write(REG_CONTROL, 32'h1);
    axi_write(REG_OPCODE, {28'b0, OP_ADD});
    axi_write(REG_CONTROL, 32'h1);
    repeat (4) @(negedge clk);
    axi_read(REG_RESULT, d);
    checks++;
    if (d !== 32'd142) fail($sformatf("second of two STARTs gave %0d", d));
    else n_double++;
    axi_write(REG_CONTROL, 32'h0);  // START bit clear: no new operation
    repeat (4) @(negedge clk);
    axi_read(REG_CONTROL, d);
    checks++;
    if (d[CTRL_DONE] !== 1'b1 || d[CTRL_BUSY] !== 1'b0) fail("write of 0 to CONTROL started an operation");

    // Random operations
    for (int i = 0; i < N_RANDOM; i++) begin
      logic [31:0] x, y;
      x = $urandom; y = $urandom;
      if (i % 5 == 0) y = x;
      if (i % 9 == 0) y = y & 32'h1F;
      run_op(x, y, OPS[$urandom % 8]);
    end

    // Throughput as software sees it: back-to-back operations, no bus delays
    t0 = cycle;
    for (int i = 0; i < N_PERF; i++) run_op($urandom, $urandom, OPS[i % 8], 1'b0);
    t1 = cycle;
    $display("software loop: %0d operations in %0d cycles, %0d.%02d cycles per operation",
             N_PERF, t1 - t0, (t1 - t0) / longint'(N_PERF), ((t1 - t0) % longint'(N_PERF)) * 100 / longint'(N_PERF));

    // Every mechanism must have happened
    for (int i = 0; i < 8; i++) begin
      checks++;
      if (n_op[OPS[i]] == 0) fail($sformatf("opcode %b never run", OPS[i]));
    end
    checks++;
    if (n_z == 0 || n_c == 0 || n_v == 0 || n_n == 0) fail("a flag was never raised");
    checks++;
    if (n_aw_first == 0 || n_w_first == 0 || n_together == 0 || n_b_held == 0 || n_r_held == 0)
      fail("a bus ordering or hold case never happened");
    checks++;
    if (n_busy == 0 || n_strb == 0 || n_double == 0 || n_latency == 0 || n_unmapped == 0 || n_illegal == 0)
      fail("a control mechanism never happened");
    $display("ops ADD=%0d SUB=%0d AND=%0d OR=%0d XOR=%0d SLL=%0d SRL=%0d SLT=%0d illegal=%0d",
             n_op[0], n_op[8], n_op[7], n_op[6], n_op[4], n_op[1], n_op[5], n_op[2], n_illegal);
    $display("flags Z=%0d C=%0d V=%0d N=%0d; busy polls=%0d", n_z, n_c, n_v, n_n, n_busy);
    $display("bus: aw-first=%0d w-first=%0d together=%0d b-held=%0d r-held=%0d strb=%0d",
             n_aw_first, n_w_first, n_together, n_b_held, n_r_held, n_strb);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
