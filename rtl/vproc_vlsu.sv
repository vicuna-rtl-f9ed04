// Vector load/store unit (VLSU).
//
// Executes unit-stride vector loads (vle8/16/32) and stores (vse8/16/32):
// vl elements of the instruction's element width at consecutive addresses
// starting at the base address from scalar register rs1.
//
// How it works: the unit moves one MEM_W = 32-bit word per data-cache access,
// one access at a time. A load shifts every returned word into the top of a
// register-wide result shift register; when ceil(vl * EEW / 32) words have
// arrived, the register is moved into place and written back in one cycle,
// with byte enables covering exactly vl elements. A store first reads the
// source register (vs3) into a shift register and then writes it out word
// by word, shifting by 32 bits after each access, with byte strobes that
// stop after the vl-th element.
//
// Memory port: req_o is held with addr/we/wdata/be until done_i, which also
// carries rdata_i for a read. The cache answers a hit in the same cycle, so
// a hit costs one cycle per word; a miss stretches that access only.
//
// Timing: busy_o is high from the cycle after issue until the write-back
// (loads) or the last store access; pending accesses are reported to the
// memory arbiter through the core. With all accesses hitting, a load takes
// words + 1 cycles and a store words + 2 cycles.
//
// The unit, its memory connection to the shared data cache and the rule that
// its accesses go first follow the document; word-at-a-time accesses,
// word-aligned base addresses and unit stride only are this design's
// choices. Masked, strided and indexed accesses are not supported.
//
// Lint note: the unit keeps the whole decoded instruction in ins_q but
// needs only some of its fields (the register-read and -write flags, for
// example, serve the issue logic), so lint reports the other bits of ins_q
// as unused.
//
// Lint note: the assertions in this module are disabled during reset with
// `disable iff (!rst_ni)`; lint counts that as a synchronous use of the
// asynchronous reset (SYNCASYNCNET). The assertions are not part of the
// circuit, so the warning stands.
module vproc_vlsu
  import vproc_pkg::*;
#(
  parameter int unsigned VREG_W = 2048
) (
  input  logic                clk_i,
  input  logic                rst_ni,
  input  logic                issue_i,
  input  vinstr_t             instr_i,
  output logic                busy_o,
  output logic [4:0]          rd_addr_o,
  input  logic [VREG_W-1:0]   rd_data_i,
  output logic                wr_we_o,
  output logic [4:0]          wr_addr_o,
  output logic [VREG_W-1:0]   wr_data_o,
  output logic [VREG_W/8-1:0] wr_be_o,
  // data cache port
  output logic                req_o,
  output logic                we_o,
  output logic [31:0]         addr_o,
  output logic [31:0]         wdata_o,
  output logic [3:0]          be_o,
  input  logic                done_i,
  input  logic [31:0]         rdata_i
);

  localparam int unsigned VB = VREG_W / 8;

  typedef enum logic [2:0] {S_IDLE, S_RD, S_RD2, S_MEM, S_WB} state_e;

  state_e            state_q;
  vinstr_t           ins_q;
  logic [VREG_W-1:0] data_sr_q;
  logic [31:0]       nbytes_q, nwords_q, word_q;

  logic is_store;
  assign is_store = (lsu_op_e'(ins_q.op) == LSU_STORE);

  assign busy_o    = (state_q != S_IDLE);
  assign rd_addr_o = ins_q.vd;

  // bytes moved by the instruction being issued
  logic [31:0] nb;
  assign nb = instr_i.vl * sew_bytes(instr_i.sew);

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      state_q   <= S_IDLE;
      ins_q     <= '0;
      data_sr_q <= '0;
      nbytes_q  <= '0;
      nwords_q  <= '0;
      word_q    <= '0;
    end else begin
      case (state_q)
        S_IDLE: if (issue_i) begin
          ins_q    <= instr_i;
          nbytes_q <= nb;
          nwords_q <= (nb + 3) / 4;
          word_q   <= '0;
          if (lsu_op_e'(instr_i.op) == LSU_STORE) begin
            state_q <= S_RD;
          end else begin
            state_q <= (nb == 0) ? S_WB : S_MEM;
          end
        end
        S_RD:  state_q <= S_RD2;
        S_RD2: begin
          data_sr_q <= rd_data_i;
          state_q   <= (nwords_q == 0) ? S_IDLE : S_MEM;
        end
        S_MEM: if (done_i) begin
          if (is_store) begin
            data_sr_q <= data_sr_q >> 32;
          end else begin
            data_sr_q <= {rdata_i, data_sr_q[VREG_W-1:32]};
          end
          word_q <= word_q + 1;
          if (word_q + 1 == nwords_q) begin
            state_q <= is_store ? S_IDLE : S_WB;
          end
        end
        S_WB:    state_q <= S_IDLE;
        default: state_q <= S_IDLE;
      endcase
    end
  end

  // Memory request
  always_comb begin
    req_o   = (state_q == S_MEM);
    we_o    = is_store;
    addr_o  = {ins_q.scalar[31:2], 2'b00} + (word_q << 2);
    wdata_o = data_sr_q[31:0];
    for (int b = 0; b < 4; b++) begin
      be_o[b] = (word_q * 4 + 32'(b)) < nbytes_q;
    end
  end

  // Register write-back of a load
  always_comb begin
    wr_we_o   = (state_q == S_WB);
    wr_addr_o = ins_q.vd;
    wr_data_o = data_sr_q >> (VREG_W - 32 * nwords_q);
    for (int b = 0; b < VB; b++) begin
      wr_be_o[b] = 32'(b) < nbytes_q;
    end
  end

  base_word_aligned: assert property (@(posedge clk_i) disable iff (!rst_ni)
    (state_q == S_MEM) |-> (ins_q.scalar[1:0] == 2'b00));

endmodule
