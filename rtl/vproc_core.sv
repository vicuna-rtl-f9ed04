// Vicuna vector coprocessor core.
//
// Connects the decoder, the in-order instruction queue, the issue logic, the
// five functional units and the vector register file:
//
//   main core --> decoder --> queue --> issue --+--> VLSU  --> data cache
//                                               +--> VALU
//                                               +--> VMUL
//                                               +--> VSLDU
//                                               +--> VIDXU --> scalar result
//
// Every unit has its own register-file read port (the VMUL has two, for
// multiply-accumulate). Units read whole registers and write whole registers
// (with byte enables). Three write ports serve the five units: the VLSU and
// the VALU share port 0 with the VLSU taking precedence, the VMUL owns
// port 1, and the VSLDU and VIDXU share port 2 with the VSLDU taking
// precedence. A unit that gives way is delayed by at most one cycle through
// the port's buffer, and its destination register is released one cycle
// after it finishes in every case.
//
// Scalar results (vsetvl from the decoder, vmv.x.s from the VIDXU) return on
// res_valid_o / res_data_o; the main core waits for them when wait_o was set
// with the acknowledge. vec_pending_o is high while a vector load or store
// is queued or executing; the memory arbiter uses it to hold back main-core
// memory traffic that follows a cache miss. The ev_* outputs pulse for
// every cycle in which issue is held by a hazard or a busy unit, and for
// every write delayed on a shared write port.
//
// Sizes: VREG_W = 2048 and MUL_W = 1024 are the fast configuration of the
// document (128 8-bit multiplies per cycle). ALU_W and the queue depth are
// not given there and are this design's choices, as is the pairing of units
// on write ports 1 and 2 (the VLSU/VALU pairing is the document's).
//
// Lint note: the assertions in this module are disabled during reset with
// `disable iff (!rst_ni)`; lint counts that as a synchronous use of the
// asynchronous reset (SYNCASYNCNET). The assertions are not part of the
// circuit, so the warning stands.
module vproc_core
  import vproc_pkg::*;
#(
  parameter int unsigned VREG_W  = 2048,
  parameter int unsigned ALU_W   = 512,
  parameter int unsigned MUL_W   = 1024,
  parameter int unsigned Q_DEPTH = 4
) (
  input  logic        clk_i,
  input  logic        rst_ni,
  // coprocessor interface to the main core
  input  logic        instr_valid_i,
  input  logic [31:0] instr_i,
  input  logic [31:0] rs1_i,
  input  logic [31:0] rs2_i,
  output logic        instr_ack_o,
  output logic        instr_wait_o,
  output logic        instr_illegal_o,
  output logic        res_valid_o,
  output logic [31:0] res_data_o,
  // vector port of the data cache
  output logic        mem_req_o,
  output logic        mem_we_o,
  output logic [31:0] mem_addr_o,
  output logic [31:0] mem_wdata_o,
  output logic [3:0]  mem_be_o,
  input  logic        mem_done_i,
  input  logic [31:0] mem_rdata_i,
  // to the memory arbiter
  output logic        vec_pending_o,
  // events, one cycle each, for performance counters
  output logic        ev_hazard_o,    // the queue head waits for a register
  output logic        ev_unit_o,      // the queue head waits for its unit
  output logic        ev_wdelay_o     // a unit's write is delayed one cycle
);

  localparam int unsigned VB = VREG_W / 8;
  localparam int unsigned NW = 3;
  localparam int unsigned NR = 6;

  // decoder -> queue
  logic    q_push, q_ready, q_valid, q_pop, q_has_lsu;
  vinstr_t q_in, q_head, iss_instr;
  logic    cfg_res_valid;
  logic [31:0] cfg_res_data;

  vproc_decoder #(.VREG_W(VREG_W)) u_decoder (
    .clk_i          (clk_i),
    .rst_ni         (rst_ni),
    .valid_i        (instr_valid_i),
    .instr_i        (instr_i),
    .rs1_i          (rs1_i),
    .rs2_i          (rs2_i),
    .ack_o          (instr_ack_o),
    .wait_o         (instr_wait_o),
    .illegal_o      (instr_illegal_o),
    .cfg_res_valid_o(cfg_res_valid),
    .cfg_res_data_o (cfg_res_data),
    .q_ready_i      (q_ready),
    .q_push_o       (q_push),
    .q_instr_o      (q_in)
  );

  vproc_queue #(.DEPTH(Q_DEPTH)) u_queue (
    .clk_i    (clk_i),
    .rst_ni   (rst_ni),
    .push_i   (q_push),
    .instr_i  (q_in),
    .ready_o  (q_ready),
    .valid_o  (q_valid),
    .head_o   (q_head),
    .pop_i    (q_pop),
    .has_lsu_o(q_has_lsu)
  );

  logic [NUM_UNITS-1:0] busy, issue;
  logic hazard_stall, unit_stall;

  vproc_dispatcher u_dispatch (
    .clk_i         (clk_i),
    .rst_ni        (rst_ni),
    .valid_i       (q_valid),
    .instr_i       (q_head),
    .pop_o         (q_pop),
    .busy_i        (busy),
    .issue_o       (issue),
    .instr_o       (iss_instr),
    .hazard_stall_o(hazard_stall),
    .unit_stall_o  (unit_stall)
  );

  // register file ports
  logic [NR-1:0][4:0]        rd_addr;
  logic [NR-1:0][VREG_W-1:0] rd_data;
  logic [NW-1:0]             wr_en;
  logic [NW-1:0][4:0]        wr_addr;
  logic [NW-1:0][VREG_W-1:0] wr_data;
  logic [NW-1:0][VB-1:0]     wr_be;

  vproc_vregfile #(.VREG_W(VREG_W), .NW(NW), .NR(NR)) u_vregfile (
    .clk_i    (clk_i),
    .wr_en_i  (wr_en),
    .wr_addr_i(wr_addr),
    .wr_data_i(wr_data),
    .wr_be_i  (wr_be),
    .rd_addr_i(rd_addr),
    .rd_data_o(rd_data)
  );

  // unit write requests
  logic              lsu_we, alu_we, mul_we, sld_we, idx_we;
  logic [4:0]        lsu_wa, alu_wa, mul_wa, sld_wa, idx_wa;
  logic [VREG_W-1:0] lsu_wd, alu_wd, mul_wd, sld_wd, idx_wd;
  logic [VB-1:0]     lsu_wb, alu_wb, mul_wb, sld_wb, idx_wb;
  logic              idx_res_valid;
  logic [31:0]       idx_res_data;
  logic              collision0, collision2;

  vproc_vlsu #(.VREG_W(VREG_W)) u_vlsu (
    .clk_i    (clk_i),
    .rst_ni   (rst_ni),
    .issue_i  (issue[UNIT_VLSU]),
    .instr_i  (iss_instr),
    .busy_o   (busy[UNIT_VLSU]),
    .rd_addr_o(rd_addr[0]),
    .rd_data_i(rd_data[0]),
    .wr_we_o  (lsu_we),
    .wr_addr_o(lsu_wa),
    .wr_data_o(lsu_wd),
    .wr_be_o  (lsu_wb),
    .req_o    (mem_req_o),
    .we_o     (mem_we_o),
    .addr_o   (mem_addr_o),
    .wdata_o  (mem_wdata_o),
    .be_o     (mem_be_o),
    .done_i   (mem_done_i),
    .rdata_i  (mem_rdata_i)
  );

  vproc_valu #(.VREG_W(VREG_W), .ALU_W(ALU_W)) u_valu (
    .clk_i    (clk_i),
    .rst_ni   (rst_ni),
    .issue_i  (issue[UNIT_VALU]),
    .instr_i  (iss_instr),
    .busy_o   (busy[UNIT_VALU]),
    .rd_addr_o(rd_addr[1]),
    .rd_data_i(rd_data[1]),
    .wr_we_o  (alu_we),
    .wr_addr_o(alu_wa),
    .wr_data_o(alu_wd),
    .wr_be_o  (alu_wb)
  );

  vproc_vmul #(.VREG_W(VREG_W), .MUL_W(MUL_W)) u_vmul (
    .clk_i    (clk_i),
    .rst_ni   (rst_ni),
    .issue_i  (issue[UNIT_VMUL]),
    .instr_i  (iss_instr),
    .busy_o   (busy[UNIT_VMUL]),
    .rd_addr_o(rd_addr[3:2]),
    .rd_data_i(rd_data[3:2]),
    .wr_we_o  (mul_we),
    .wr_addr_o(mul_wa),
    .wr_data_o(mul_wd),
    .wr_be_o  (mul_wb)
  );

  vproc_vsldu #(.VREG_W(VREG_W)) u_vsldu (
    .clk_i    (clk_i),
    .rst_ni   (rst_ni),
    .issue_i  (issue[UNIT_VSLDU]),
    .instr_i  (iss_instr),
    .busy_o   (busy[UNIT_VSLDU]),
    .rd_addr_o(rd_addr[4]),
    .rd_data_i(rd_data[4]),
    .wr_we_o  (sld_we),
    .wr_addr_o(sld_wa),
    .wr_data_o(sld_wd),
    .wr_be_o  (sld_wb)
  );

  vproc_vidxu #(.VREG_W(VREG_W)) u_vidxu (
    .clk_i      (clk_i),
    .rst_ni     (rst_ni),
    .issue_i    (issue[UNIT_VIDXU]),
    .instr_i    (iss_instr),
    .busy_o     (busy[UNIT_VIDXU]),
    .rd_addr_o  (rd_addr[5]),
    .rd_data_i  (rd_data[5]),
    .wr_we_o    (idx_we),
    .wr_addr_o  (idx_wa),
    .wr_data_o  (idx_wd),
    .wr_be_o    (idx_wb),
    .res_valid_o(idx_res_valid),
    .res_data_o (idx_res_data)
  );

  // write port 0: VLSU first, VALU buffered on a collision
  vproc_wport_arb #(.VREG_W(VREG_W)) u_wport0 (
    .clk_i      (clk_i),
    .rst_ni     (rst_ni),
    .a_we_i     (lsu_we),
    .a_addr_i   (lsu_wa),
    .a_data_i   (lsu_wd),
    .a_be_i     (lsu_wb),
    .b_we_i     (alu_we),
    .b_addr_i   (alu_wa),
    .b_data_i   (alu_wd),
    .b_be_i     (alu_wb),
    .we_o       (wr_en[0]),
    .addr_o     (wr_addr[0]),
    .data_o     (wr_data[0]),
    .be_o       (wr_be[0]),
    .collision_o(collision0)
  );

  // write port 1: VMUL alone
  assign wr_en[1]   = mul_we;
  assign wr_addr[1] = mul_wa;
  assign wr_data[1] = mul_wd;
  assign wr_be[1]   = mul_wb;

  // write port 2: VSLDU first, VIDXU buffered on a collision
  vproc_wport_arb #(.VREG_W(VREG_W)) u_wport2 (
    .clk_i      (clk_i),
    .rst_ni     (rst_ni),
    .a_we_i     (sld_we),
    .a_addr_i   (sld_wa),
    .a_data_i   (sld_wd),
    .a_be_i     (sld_wb),
    .b_we_i     (idx_we),
    .b_addr_i   (idx_wa),
    .b_data_i   (idx_wd),
    .b_be_i     (idx_wb),
    .we_o       (wr_en[2]),
    .addr_o     (wr_addr[2]),
    .data_o     (wr_data[2]),
    .be_o       (wr_be[2]),
    .collision_o(collision2)
  );

  // scalar results: the decoder's and the VIDXU's never coincide, because the
  // main core waits for one before it sends the next instruction
  assign res_valid_o = cfg_res_valid | idx_res_valid;
  assign res_data_o  = cfg_res_valid ? cfg_res_data : idx_res_data;

  assign vec_pending_o = q_has_lsu | busy[UNIT_VLSU] | issue[UNIT_VLSU];

  assign ev_hazard_o = hazard_stall;
  assign ev_unit_o   = unit_stall;
  assign ev_wdelay_o = collision0 | collision2;

  one_scalar_result: assert property (@(posedge clk_i) disable iff (!rst_ni)
    !(cfg_res_valid && idx_res_valid));

endmodule
