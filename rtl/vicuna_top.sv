// Vicuna processing system without its main core.
//
// A timing-predictable RISC-V vector coprocessor for a small in-order main
// core (a two-stage RV32 core in the reference system), with the memory
// system the two share:
//
//   main core --coprocessor interface--> vproc_core (vector coprocessor)
//   main core data port  --> data cache port 1 --+
//   vector load/store     --> data cache port 0 -+--> mem_arbiter --> external
//   main core fetch port  --> instruction cache ----+                  memory
//
// The data cache is shared; the vector unit's accesses always go first. The
// memory arbiter keeps all memory traffic in program order: a main-core
// cache miss (data or instruction) waits until the vector loads and stores
// that were handed to the coprocessor before it have completed, and a data
// access of the main core goes before its own instruction fetch. With
// in-order issue, one fixed unit per instruction type and fixed unit
// latencies, this makes the whole system free of timing anomalies.
//
// The main core itself is not part of this module: its coprocessor
// interface, its data port and its fetch port are brought out as ports.
//
// Coprocessor interface: instr_valid_i with instr_i, rs1_i, rs2_i is held
// until instr_ack_o; with the acknowledge, instr_wait_o says that a scalar
// result will follow on res_valid_o / res_data_o (the main core stalls
// until then) and instr_illegal_o that the instruction was refused.
// Main-core data and fetch ports: req held until done, data with done.
// External memory: one 32-bit word per beat, req held until gnt, one rvalid
// per beat in order. The ev_* outputs pulse once per event for performance
// counters.
//
// The instruction cache is the same two-port cache module with port 0 tied
// off and no writes. Its write-side memory outputs (im_we, im_wdata, im_be),
// its scalar flag (every fetch is a main-core access) and its port-0 done
// are therefore constant or meaningless and left unconnected to anything;
// lint reports them as unused signals.
//
// Default sizes are the document's fast configuration: 2048-bit vector
// registers, 1024-bit multiplier datapath, 128 kB data cache. The ALU width,
// queue depth, line size and instruction-cache size are this design's
// choices.
//
// Lint note: rst_ni is reported as used both asynchronously and
// synchronously (SYNCASYNCNET) because the assertions of the submodules are
// disabled during reset; the assertions are not part of the circuit.
module vicuna_top #(
  parameter int unsigned VREG_W   = 2048,
  parameter int unsigned ALU_W    = 512,
  parameter int unsigned MUL_W    = 1024,
  parameter int unsigned Q_DEPTH  = 4,
  parameter int unsigned DC_SIZE  = 128 * 1024,
  parameter int unsigned IC_SIZE  = 8 * 1024,
  parameter int unsigned LINE_B   = 32
) (
  input  logic        clk_i,
  input  logic        rst_ni,
  // coprocessor interface
  input  logic        instr_valid_i,
  input  logic [31:0] instr_i,
  input  logic [31:0] rs1_i,
  input  logic [31:0] rs2_i,
  output logic        instr_ack_o,
  output logic        instr_wait_o,
  output logic        instr_illegal_o,
  output logic        res_valid_o,
  output logic [31:0] res_data_o,
  // main-core data port
  input  logic        data_req_i,
  input  logic        data_we_i,
  input  logic [31:0] data_addr_i,
  input  logic [31:0] data_wdata_i,
  input  logic [3:0]  data_be_i,
  output logic        data_done_o,
  output logic [31:0] data_rdata_o,
  // main-core instruction fetch port
  input  logic        fetch_req_i,
  input  logic [31:0] fetch_addr_i,
  output logic        fetch_done_o,
  output logic [31:0] fetch_rdata_o,
  // external memory
  output logic        mem_req_o,
  output logic        mem_we_o,
  output logic [31:0] mem_addr_o,
  output logic [31:0] mem_wdata_o,
  output logic [3:0]  mem_be_o,
  input  logic        mem_gnt_i,
  input  logic        mem_rvalid_i,
  input  logic [31:0] mem_rdata_i,
  // events, one cycle each, for performance counters
  output logic        ev_hazard_o,     // vector issue held by a register hazard
  output logic        ev_unit_o,       // vector issue held by a busy unit
  output logic        ev_wdelay_o,     // vector register write delayed a cycle
  output logic        ev_dc_miss_o,    // data-cache line fill starts
  output logic        ev_ic_miss_o,    // instruction-cache line fill starts
  output logic        ev_mem_hold_o    // main-core memory access held back
);

  // vector core <-> data cache port 0
  logic        v_req, v_we, v_done, vec_pending;
  logic [31:0] v_addr, v_wdata, dc_rdata;
  logic [3:0]  v_be;

  vproc_core #(
    .VREG_W (VREG_W),
    .ALU_W  (ALU_W),
    .MUL_W  (MUL_W),
    .Q_DEPTH(Q_DEPTH)
  ) u_core (
    .clk_i          (clk_i),
    .rst_ni         (rst_ni),
    .instr_valid_i  (instr_valid_i),
    .instr_i        (instr_i),
    .rs1_i          (rs1_i),
    .rs2_i          (rs2_i),
    .instr_ack_o    (instr_ack_o),
    .instr_wait_o   (instr_wait_o),
    .instr_illegal_o(instr_illegal_o),
    .res_valid_o    (res_valid_o),
    .res_data_o     (res_data_o),
    .mem_req_o      (v_req),
    .mem_we_o       (v_we),
    .mem_addr_o     (v_addr),
    .mem_wdata_o    (v_wdata),
    .mem_be_o       (v_be),
    .mem_done_i     (v_done),
    .mem_rdata_i    (dc_rdata),
    .vec_pending_o  (vec_pending),
    .ev_hazard_o    (ev_hazard_o),
    .ev_unit_o      (ev_unit_o),
    .ev_wdelay_o    (ev_wdelay_o)
  );

  // data cache: port 0 vector core (precedence), port 1 main core
  logic [1:0]  dc_done;
  logic        dc_miss;
  logic        dm_req, dm_we, dm_scalar, dm_last, dm_gnt, dm_rvalid;
  logic [31:0] dm_addr, dm_wdata, arb_rdata;
  logic [3:0]  dm_be;

  cache #(.SIZE_B(DC_SIZE), .LINE_B(LINE_B)) u_dcache (
    .clk_i     (clk_i),
    .rst_ni    (rst_ni),
    .req_i     ({data_req_i, v_req}),
    .we_i      ({data_we_i, v_we}),
    .addr_i    ({data_addr_i, v_addr}),
    .wdata_i   ({data_wdata_i, v_wdata}),
    .be_i      ({data_be_i, v_be}),
    .done_o    (dc_done),
    .rdata_o   (dc_rdata),
    .miss_o    (dc_miss),
    .m_req_o   (dm_req),
    .m_we_o    (dm_we),
    .m_addr_o  (dm_addr),
    .m_wdata_o (dm_wdata),
    .m_be_o    (dm_be),
    .m_scalar_o(dm_scalar),
    .m_last_o  (dm_last),
    .m_gnt_i   (dm_gnt),
    .m_rvalid_i(dm_rvalid),
    .m_rdata_i (arb_rdata)
  );

  assign v_done       = dc_done[0];
  assign data_done_o  = dc_done[1];
  assign data_rdata_o = dc_rdata;

  // instruction cache: only port 1 is used (read-only)
  logic [1:0]  ic_done;
  logic        ic_miss;
  logic        im_req, im_we, im_scalar, im_last, im_gnt, im_rvalid;
  logic [31:0] im_addr, im_wdata;
  logic [3:0]  im_be;

  cache #(.SIZE_B(IC_SIZE), .LINE_B(LINE_B)) u_icache (
    .clk_i     (clk_i),
    .rst_ni    (rst_ni),
    .req_i     ({fetch_req_i, 1'b0}),
    .we_i      (2'b00),
    .addr_i    ({fetch_addr_i, 32'd0}),
    .wdata_i   ('0),
    .be_i      ('0),
    .done_o    (ic_done),
    .rdata_o   (fetch_rdata_o),
    .miss_o    (ic_miss),
    .m_req_o   (im_req),
    .m_we_o    (im_we),
    .m_addr_o  (im_addr),
    .m_wdata_o (im_wdata),
    .m_be_o    (im_be),
    .m_scalar_o(im_scalar),
    .m_last_o  (im_last),
    .m_gnt_i   (im_gnt),
    .m_rvalid_i(im_rvalid),
    .m_rdata_i (arb_rdata)
  );

  assign fetch_done_o = ic_done[1];
  assign ev_dc_miss_o = dc_miss;
  assign ev_ic_miss_o = ic_miss;

  mem_arbiter u_arbiter (
    .clk_i        (clk_i),
    .rst_ni       (rst_ni),
    .vec_pending_i(vec_pending),
    .d_req_i      (dm_req),
    .d_we_i       (dm_we),
    .d_addr_i     (dm_addr),
    .d_wdata_i    (dm_wdata),
    .d_be_i       (dm_be),
    .d_scalar_i   (dm_scalar),
    .d_last_i     (dm_last),
    .d_gnt_o      (dm_gnt),
    .d_rvalid_o   (dm_rvalid),
    .i_req_i      (im_req),
    .i_addr_i     (im_addr),
    .i_last_i     (im_last),
    .i_gnt_o      (im_gnt),
    .i_rvalid_o   (im_rvalid),
    .rdata_o      (arb_rdata),
    .mem_req_o    (mem_req_o),
    .mem_we_o     (mem_we_o),
    .mem_addr_o   (mem_addr_o),
    .mem_wdata_o  (mem_wdata_o),
    .mem_be_o     (mem_be_o),
    .mem_gnt_i    (mem_gnt_i),
    .mem_rvalid_i (mem_rvalid_i),
    .mem_rdata_i  (mem_rdata_i),
    .hold_o       (ev_mem_hold_o)
  );

endmodule
