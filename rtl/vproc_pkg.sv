// Shared types of the vector coprocessor.
//
// A decoded vector instruction travels from the decoder through the
// instruction queue to exactly one functional unit as a vinstr_t. Each
// instruction carries its own copy of the vector length and element width
// that were in force when it was decoded, so a later vsetvl never changes an
// instruction already in flight. The unit that executes a kind of
// instruction is fixed by the decoder (one unit per instruction type, no
// run-time choice), which is what keeps execution times data-independent.
package vproc_pkg;

  // Functional units (one of each)
  typedef enum logic [2:0] {
    UNIT_VLSU  = 3'd0,
    UNIT_VALU  = 3'd1,
    UNIT_VMUL  = 3'd2,
    UNIT_VSLDU = 3'd3,
    UNIT_VIDXU = 3'd4
  } unit_e;

  localparam int unsigned NUM_UNITS = 5;

  // Element width (SEW); LMUL is always 1 in this implementation
  typedef enum logic [1:0] {
    EW8  = 2'd0,
    EW16 = 2'd1,
    EW32 = 2'd2
  } sew_e;

  // Operations of the vector ALU
  typedef enum logic [4:0] {
    ALU_ADD  = 5'd0,
    ALU_SUB  = 5'd1,
    ALU_RSUB = 5'd2,
    ALU_AND  = 5'd3,
    ALU_OR   = 5'd4,
    ALU_XOR  = 5'd5,
    ALU_MINU = 5'd6,
    ALU_MIN  = 5'd7,
    ALU_MAXU = 5'd8,
    ALU_MAX  = 5'd9,
    ALU_SLL  = 5'd10,
    ALU_SRL  = 5'd11,
    ALU_SRA  = 5'd12,
    ALU_MV   = 5'd13
  } alu_op_e;

  // Operations of the vector multiplier
  typedef enum logic [4:0] {
    MUL_MUL    = 5'd0,   // low half of vs2*vs1
    MUL_MULH   = 5'd1,   // high half, signed x signed
    MUL_MULHU  = 5'd2,   // high half, unsigned x unsigned
    MUL_MULHSU = 5'd3,   // high half, signed vs2 x unsigned vs1
    MUL_MACC   = 5'd4,   // vd = vs1*vs2 + vd
    MUL_NMSAC  = 5'd5    // vd = -(vs1*vs2) + vd
  } mul_op_e;

  // Operations of the slide unit
  typedef enum logic [4:0] {
    SLD_UP    = 5'd0,
    SLD_DOWN  = 5'd1,
    SLD_1UP   = 5'd2,   // vslide1up: slide up by one, scalar into element 0
    SLD_1DOWN = 5'd3    // vslide1down: slide down by one, scalar into element vl-1
  } sld_op_e;

  // Operations of the indexing unit
  typedef enum logic [4:0] {
    IDX_MV_XS     = 5'd0,  // rd = vs2[0]            (scalar result)
    IDX_MV_SX     = 5'd1,  // vd[0] = rs1
    IDX_GATHER_VV = 5'd2,  // vd[i] = vs2[vs1[i]]
    IDX_GATHER_X  = 5'd3   // vd[i] = vs2[x]
  } idx_op_e;

  // Operations of the load/store unit (unit-stride only)
  typedef enum logic [4:0] {
    LSU_LOAD  = 5'd0,
    LSU_STORE = 5'd1
  } lsu_op_e;

  // Decoded vector instruction
  typedef struct packed {
    unit_e       unit;
    logic [4:0]  op;          // unit-specific operation (cast to the unit's enum)
    logic [4:0]  vd;          // destination (vs3 for stores)
    logic [4:0]  vs1;
    logic [4:0]  vs2;
    logic        rd_vs1;      // vs1 is read
    logic        rd_vs2;      // vs2 is read
    logic        rd_vd;       // vd is read (stores, multiply-accumulate, slide-up)
    logic        wr_vd;       // vd is written
    logic        use_scalar;  // operand A is the scalar value, not vs1
    logic [31:0] scalar;      // rs1 value or sign-/zero-extended immediate
    sew_e        sew;
    logic [31:0] vl;          // vector length in elements
  } vinstr_t;

  // Bytes per element
  function automatic int unsigned sew_bytes(sew_e s);
    case (s)
      EW8:     return 1;
      EW16:    return 2;
      default: return 4;
    endcase
  endfunction

endpackage
