// alu_axi_wrapper: the ALU accelerator as a memory-mapped AXI4-Lite slave.
//
// This is the IP a processor reaches through its AXI interconnect (mapped
// at 0x4000_0000 in the reference system). Software writes the two operands
// and the opcode, writes 1 to bit 0 of the control register to launch the
// operation, then polls the done bit and reads the result and flags. Each
// start sends one request into alu_pipelined; the response is captured
// into the result and flags registers two cycles later.
//
// Register map (byte offsets, 32-bit registers):
//   0x00 CONTROL  W: bit 0 START (1 = launch one operation, self-clearing)
//                 R: bit 1 DONE  (a result has arrived since the last start)
//                    bit 2 BUSY  (an operation is still in the pipeline)
//   0x04 OP_A     R/W operand A
//   0x08 OP_B     R/W operand B (SLL/SRL use bits 4:0 as shift amount)
//   0x0C OPCODE   R/W bits 3:0, codes of alu_pkg::alu_op_e
//   0x10 RESULT   R   result of the last completed operation
//   0x14 FLAGS    R   bit 0 Z, bit 1 C, bit 2 V, bit 3 N of that operation
// Unmapped offsets read as zero and ignore writes; every response is OKAY.
// WSTRB is honoured on OP_A, OP_B and OPCODE.
//
// Bus timing: the write address and write data channels are accepted
// independently; the register is written once both have arrived, and BVALID
// is raised the next cycle. A read returns RVALID the cycle after ARVALID is
// accepted. One write and one read can be outstanding at a time. With START
// written at edge k, the request enters the ALU at edge k+1 and DONE is set
// at edge k+3 (two cycles of ALU latency plus one of capture).
//
// The control, operand A, operand B, opcode and result registers, the
// start-by-control-register protocol and the 32-bit AXI4-Lite port are the
// accelerator's; the offsets, the bit positions, the DONE/BUSY status, the
// FLAGS register and the bus timing are this design's choices. The result
// side of the ALU is always ready, so the ALU never stalls behind it.
// The synchronous reset S_AXI_ARESETN is active low.
module alu_axi_wrapper
  import alu_pkg::*;
#(
  parameter int unsigned C_S_AXI_DATA_WIDTH = 32,
  parameter int unsigned C_S_AXI_ADDR_WIDTH = 5
) (
  input  logic                            S_AXI_ACLK,
  input  logic                            S_AXI_ARESETN,
  // write address channel
  input  logic [C_S_AXI_ADDR_WIDTH-1:0]   S_AXI_AWADDR,
  input  logic [2:0]                      S_AXI_AWPROT,
  input  logic                            S_AXI_AWVALID,
  output logic                            S_AXI_AWREADY,
  // write data channel
  input  logic [C_S_AXI_DATA_WIDTH-1:0]   S_AXI_WDATA,
  input  logic [C_S_AXI_DATA_WIDTH/8-1:0] S_AXI_WSTRB,
  input  logic                            S_AXI_WVALID,
  output logic                            S_AXI_WREADY,
  // write response channel
  output logic [1:0]                      S_AXI_BRESP,
  output logic                            S_AXI_BVALID,
  input  logic                            S_AXI_BREADY,
  // read address channel
  input  logic [C_S_AXI_ADDR_WIDTH-1:0]   S_AXI_ARADDR,
  input  logic [2:0]                      S_AXI_ARPROT,
  input  logic                            S_AXI_ARVALID,
  output logic                            S_AXI_ARREADY,
  // read data channel
  output logic [C_S_AXI_DATA_WIDTH-1:0]   S_AXI_RDATA,
  output logic [1:0]                      S_AXI_RRESP,
  output logic                            S_AXI_RVALID,
  input  logic                            S_AXI_RREADY
);

  localparam int unsigned DW = C_S_AXI_DATA_WIDTH;
  localparam int unsigned AW = C_S_AXI_ADDR_WIDTH;
  localparam logic [1:0]  RESP_OKAY = 2'b00;

  logic clk;
  assign clk = S_AXI_ACLK;

  // ---------------------------------------------------------------------
  // Write channels
  // ---------------------------------------------------------------------
  logic          aw_held, w_held;
  logic [AW-1:0] aw_addr;
  logic [DW-1:0] w_data;
  logic [DW/8-1:0] w_strb;
  logic          do_write;

  assign S_AXI_AWREADY = !aw_held && !S_AXI_BVALID;
  assign S_AXI_WREADY  = !w_held  && !S_AXI_BVALID;
  assign S_AXI_BRESP   = RESP_OKAY;
  assign do_write      = aw_held && w_held;

  always_ff @(posedge clk) begin
    if (!S_AXI_ARESETN) begin
      aw_held      <= 1'b0;
      w_held       <= 1'b0;
      S_AXI_BVALID <= 1'b0;
    end else begin
      if (S_AXI_AWVALID && S_AXI_AWREADY) aw_held <= 1'b1;
      if (S_AXI_WVALID  && S_AXI_WREADY)  w_held  <= 1'b1;
      if (do_write) begin
        aw_held      <= 1'b0;
        w_held       <= 1'b0;
        S_AXI_BVALID <= 1'b1;
      end else if (S_AXI_BREADY) begin
        S_AXI_BVALID <= 1'b0;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (S_AXI_AWVALID && S_AXI_AWREADY) aw_addr <= S_AXI_AWADDR;
    if (S_AXI_WVALID && S_AXI_WREADY) begin
      w_data <= S_AXI_WDATA;
      w_strb <= S_AXI_WSTRB;
    end
  end

  // Byte-wise merge of the held write data into a register value.
  function automatic logic [DW-1:0] merge(input logic [DW-1:0] old_val,
                                          input logic [DW-1:0] new_val,
                                          input logic [DW/8-1:0] strb);
    logic [DW-1:0] r;
    for (int i = 0; i < DW/8; i++) begin
      r[i*8 +: 8] = strb[i] ? new_val[i*8 +: 8] : old_val[i*8 +: 8];
    end
    return r;
  endfunction

  // ---------------------------------------------------------------------
  // Registers
  // ---------------------------------------------------------------------
  logic [DW-1:0]       op_a, op_b;
  logic [OP_WIDTH-1:0] opcode;
  logic [DW-1:0]       result_q;
  alu_flags_t          flags_q;
  logic                done_q;
  logic [1:0]          inflight;   // pending start + Execute + Writeback
  logic                start_wr;   // this write sets START
  logic                start_pending;

  // ALU connections
  logic                alu_in_ready;
  logic                alu_out_valid;
  logic [DW-1:0]       alu_result;
  alu_flags_t          alu_flags;

  logic [DW-1:0] opcode_merged;
  assign opcode_merged = merge({{(DW-OP_WIDTH){1'b0}}, opcode}, w_data, w_strb);

  assign start_wr = do_write && (aw_addr[4:0] == REG_CONTROL)
                 && w_strb[0] && w_data[CTRL_START];

  always_ff @(posedge clk) begin
    if (!S_AXI_ARESETN) begin
      op_a   <= '0;
      op_b   <= '0;
      opcode <= '0;
    end else if (do_write) begin
      unique case (aw_addr[4:0])
        REG_OP_A:   op_a   <= merge(op_a, w_data, w_strb);
        REG_OP_B:   op_b   <= merge(op_b, w_data, w_strb);
        REG_OPCODE: opcode <= opcode_merged[OP_WIDTH-1:0];
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (!S_AXI_ARESETN) begin
      start_pending <= 1'b0;
      done_q        <= 1'b0;
      inflight      <= '0;
      result_q      <= '0;
      flags_q       <= '0;
    end else begin
      start_pending <= start_wr || (start_pending && !alu_in_ready);
      if (start_wr)           done_q <= 1'b0;
      else if (alu_out_valid) done_q <= 1'b1;
      inflight <= inflight + {1'b0, start_wr} - {1'b0, alu_out_valid};
      if (alu_out_valid) begin
        result_q <= alu_result;
        flags_q  <= alu_flags;
      end
    end
  end

  alu_pipelined #(.WIDTH(DW)) u_alu (
    .clk        (clk),
    .rst_n      (S_AXI_ARESETN),
    .in_valid   (start_pending),
    .in_ready   (alu_in_ready),
    .in_a       (op_a),
    .in_b       (op_b),
    .in_op      (opcode),
    .out_valid  (alu_out_valid),
    .out_ready  (1'b1),
    .out_result (alu_result),
    .out_flags  (alu_flags)
  );

  // ---------------------------------------------------------------------
  // Read channels
  // ---------------------------------------------------------------------
  logic [DW-1:0] rd_mux;

  always_comb begin
    rd_mux = '0;
    unique case (S_AXI_ARADDR[4:0])
      REG_CONTROL: begin
        rd_mux[CTRL_DONE] = done_q;
        rd_mux[CTRL_BUSY] = (inflight != '0);
      end
      REG_OP_A:    rd_mux = op_a;
      REG_OP_B:    rd_mux = op_b;
      REG_OPCODE:  rd_mux[OP_WIDTH-1:0] = opcode;
      REG_RESULT:  rd_mux = result_q;
      REG_FLAGS:   rd_mux[3:0] = flags_q;
      default: ;
    endcase
  end

  assign S_AXI_ARREADY = !S_AXI_RVALID;
  assign S_AXI_RRESP   = RESP_OKAY;

  always_ff @(posedge clk) begin
    if (!S_AXI_ARESETN) begin
      S_AXI_RVALID <= 1'b0;
      S_AXI_RDATA  <= '0;
    end else if (S_AXI_ARVALID && S_AXI_ARREADY) begin
      S_AXI_RVALID <= 1'b1;
      S_AXI_RDATA  <= rd_mux;
    end else if (S_AXI_RREADY) begin
      S_AXI_RVALID <= 1'b0;
    end
  end

  // The protection bits and the unused opcode bits carry no meaning here.
  logic unused_prot;
  assign unused_prot = ^{S_AXI_AWPROT, S_AXI_ARPROT, S_AXI_ARADDR[1:0],
                        opcode_merged[DW-1:OP_WIDTH]};

  // AXI4-Lite: a response stays valid, with its data, until it is taken.
  a_b_hold: assert property (@(posedge clk) disable iff (!S_AXI_ARESETN)
      S_AXI_BVALID && !S_AXI_BREADY |=> S_AXI_BVALID)
    else $error("alu_axi_wrapper: BVALID dropped before BREADY");
  a_r_hold: assert property (@(posedge clk) disable iff (!S_AXI_ARESETN)
      S_AXI_RVALID && !S_AXI_RREADY |=> S_AXI_RVALID && $stable(S_AXI_RDATA))
    else $error("alu_axi_wrapper: read data changed before RREADY");

endmodule
