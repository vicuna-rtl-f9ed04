// Encoders for the RISC-V vector instructions (specification draft 0.10)
// used by the testbenches, and a reference model of the element operations.
// Element values are handled as 32-bit words; the reference functions take
// the element width in bytes (1, 2 or 4) and truncate the result to it.
package rvv_enc_pkg;

  localparam logic [6:0] OPV = 7'b1010111;

  function automatic logic [31:0] vsetvli(input logic [4:0] rd, input logic [4:0] rs1,
                                          input logic [2:0] vsew);
    // vtype: vlmul = 0 (LMUL 1), vsew in bits 4:2, vta = vma = 0
    return {1'b0, 11'({vsew, 2'b00}), rs1, 3'b111, rd, OPV};
  endfunction

  // funct3: OPIVV 000, OPMVV 010, OPIVI 011, OPIVX 100, OPMVX 110
  function automatic logic [31:0] opv(input logic [5:0] funct6, input logic [2:0] funct3,
                                      input logic [4:0] vd, input logic [4:0] vs2,
                                      input logic [4:0] vs1);
    return {funct6, 1'b1, vs2, vs1, funct3, vd, OPV};
  endfunction

  // eew: 0 -> 8 bit, 1 -> 16 bit, 2 -> 32 bit
  function automatic logic [2:0] width_code(input int eew);
    case (eew)
      0: return 3'b000;
      1: return 3'b101;
      default: return 3'b110;
    endcase
  endfunction

  function automatic logic [31:0] vle(input int eew, input logic [4:0] vd, input logic [4:0] rs1);
    return {6'b000000, 1'b1, 5'b00000, rs1, width_code(eew), vd, 7'b0000111};
  endfunction

  function automatic logic [31:0] vse(input int eew, input logic [4:0] vs3, input logic [4:0] rs1);
    return {6'b000000, 1'b1, 5'b00000, rs1, width_code(eew), vs3, 7'b0100111};
  endfunction

  function automatic logic [31:0] trunc(input logic [31:0] v, input int eb);
    case (eb)
      1: return {24'd0, v[7:0]};
      2: return {16'd0, v[15:0]};
      default: return v;
    endcase
  endfunction

  function automatic logic signed [63:0] sx(input logic [31:0] v, input int eb);
    case (eb)
      1: return 64'($signed(v[7:0]));
      2: return 64'($signed(v[15:0]));
      default: return 64'($signed(v));
    endcase
  endfunction

  // ALU reference: op codes as in vproc_pkg::alu_op_e; a = vs2 element, b = vs1/scalar
  function automatic logic [31:0] ref_alu(input int op, input logic [31:0] a,
                                          input logic [31:0] b, input int eb);
    logic [31:0] r;
    int sh;
    sh = int'(b) & (eb * 8 - 1);
    case (op)
      0: r = a + b;
      1: r = a - b;
      2: r = b - a;
      3: r = a & b;
      4: r = a | b;
      5: r = a ^ b;
      6: r = (trunc(a, eb) < trunc(b, eb)) ? a : b;
      7: r = (sx(a, eb) < sx(b, eb)) ? a : b;
      8: r = (trunc(a, eb) > trunc(b, eb)) ? a : b;
      9: r = (sx(a, eb) > sx(b, eb)) ? a : b;
      10: r = a << sh;
      11: r = trunc(a, eb) >> sh;
      12: r = 32'(sx(a, eb) >>> sh);
      default: r = b;
    endcase
    return trunc(r, eb);
  endfunction

  // Multiplier reference: op codes as in vproc_pkg::mul_op_e; a = vs2, b = vs1, c = vd
  function automatic logic [31:0] ref_mul(input int op, input logic [31:0] a,
                                          input logic [31:0] b, input logic [31:0] c,
                                          input int eb);
    logic signed [63:0] sa, sb, ua, ub;
    logic [63:0] p;
    sa = sx(a, eb);
    sb = sx(b, eb);
    ua = 64'(trunc(a, eb));
    ub = 64'(trunc(b, eb));
    case (op)
      0: p = ua * ub;
      1: p = sa * sb;
      2: p = ua * ub;
      3: p = sa * ub;
      4: p = 64'(c) + ua * ub;
      default: p = 64'(c) - ua * ub;
    endcase
    if (op >= 1 && op <= 3) begin
      return trunc(32'(p >> (8 * eb)), eb);
    end
    return trunc(p[31:0], eb);
  endfunction

  // Reference model of the vector machine and random program generator.
  // gen() picks a random legal instruction, applies it to the model's
  // registers and memory in program order, and returns its encoding, the
  // scalar operands and (for vsetvli / vmv.x.s) the expected scalar result.
  // Vector data lives in the memory window [base, base + size).
  class vref;
    int unsigned vb;                 // bytes per vector register
    logic [7:0]  r [32][256];
    logic [7:0]  m [int unsigned];
    int unsigned eb = 1, vl = 0;
    bit          vill = 1;
    int unsigned base, size;
    int unsigned nregs = 8;          // registers used by gen()

    function new(int unsigned vbytes, int unsigned b, int unsigned sz);
      vb = vbytes;
      base = b;
      size = sz;
      for (int i = 0; i < 32; i++) for (int j = 0; j < 256; j++) r[i][j] = 0;
    endfunction

    function logic [31:0] get(int v, int unsigned i, int unsigned w);
      logic [31:0] x = 0;
      for (int k = 0; k < int'(w); k++) x[8*k +: 8] = r[v][i*w + k];
      return x;
    endfunction

    function void put(int v, int unsigned i, int unsigned w, logic [31:0] x);
      for (int k = 0; k < int'(w); k++) r[v][i*w + k] = x[8*k +: 8];
    endfunction

    function logic [7:0] rdm(int unsigned a);
      return m.exists(a) ? m[a] : 8'h00;
    endfunction

    function logic [4:0] rr();
      return 5'($urandom % nregs);
    endfunction

    function int unsigned vlmax();
      return vb / eb;
    endfunction

    // kind of the last generated instruction, for the testbench's statistics
    string last;

    function void gen(output logic [31:0] ins, output logic [31:0] rs1, output logic [31:0] rs2,
                      output bit has_res, output logic [31:0] res);
      logic [4:0] vd, vs1, vs2;
      int unsigned c;
      logic [7:0] tmp [2][256];
      rs1 = $urandom;
      rs2 = 0;
      has_res = 0;
      res = 0;
      vd = rr(); vs1 = rr(); vs2 = rr();
      c = vill ? 0 : $urandom % 100;
      if (c < 6) begin
        // vsetvli
        logic [2:0] vsew;
        bit use_max;
        vsew = 3'($urandom % 3);
        use_max = ($urandom % 3) == 0;
        rs1 = $urandom % (vb + 4);
        ins = vsetvli(5'd5, use_max ? 5'd0 : 5'd6, vsew);
        eb = 1 << vsew;
        vl = use_max ? vlmax() : ((rs1 > vlmax()) ? vlmax() : rs1);
        vill = 0;
        has_res = 1;
        res = vl;
        last = "vsetvli";
      end else if (c < 24) begin
        // unit-stride load / store, EEW <= SEW
        int unsigned ew, span, a;
        ew = 1 << ($urandom % ($clog2(eb) + 1));
        span = vl * ew;
        a = base + ((($urandom % ((size - span) / 4 + 1))) * 4);
        rs1 = a;
        if ($urandom % 2) begin
          ins = vle($clog2(ew), vd, 5'd10);
          for (int unsigned i = 0; i < span; i++) r[vd][i] = rdm(a + i);
          last = "vle";
        end else begin
          ins = vse($clog2(ew), vd, 5'd10);
          for (int unsigned i = 0; i < span; i++) m[a + i] = r[vd][i];
          last = "vse";
        end
      end else if (c < 56) begin
        // ALU
        logic [5:0] f6;
        int op, f;
        logic [2:0] f3;
        logic [31:0] sc;
        bit shift;
        f = $urandom % 14;
        case (f)
          0: begin f6 = 6'b000000; op = 0; end
          1: begin f6 = 6'b000010; op = 1; end
          2: begin f6 = 6'b000011; op = 2; end
          3: begin f6 = 6'b000100; op = 6; end
          4: begin f6 = 6'b000101; op = 7; end
          5: begin f6 = 6'b000110; op = 8; end
          6: begin f6 = 6'b000111; op = 9; end
          7: begin f6 = 6'b001001; op = 3; end
          8: begin f6 = 6'b001010; op = 4; end
          9: begin f6 = 6'b001011; op = 5; end
          10: begin f6 = 6'b010111; op = 13; end
          11: begin f6 = 6'b100101; op = 10; end
          12: begin f6 = 6'b101000; op = 11; end
          default: begin f6 = 6'b101001; op = 12; end
        endcase
        shift = (op >= 10 && op <= 12);
        case ($urandom % 3)
          0: f3 = 3'b000;
          1: f3 = 3'b100;
          default: f3 = 3'b011;
        endcase
        if (f3 == 3'b011 && ((op == 1) || (op >= 6 && op <= 9))) f3 = 3'b100;
        if (f3 == 3'b000 && op == 2) f3 = 3'b100;
        if (op == 13) vs2 = 0;
        sc = (f3 == 3'b011) ? (shift ? {27'd0, vs1} : {{27{vs1[4]}}, vs1}) : rs1;
        ins = opv(f6, f3, vd, vs2, vs1);
        for (int unsigned i = 0; i < vl; i++) begin
          logic [31:0] b;
          b = (f3 == 3'b000) ? get(vs1, i, eb) : sc;
          b = ref_alu(op, get(vs2, i, eb), b, eb);
          for (int k = 0; k < int'(eb); k++) tmp[1][i*eb + k] = b[8*k +: 8];
        end
        for (int unsigned i = 0; i < vl * eb; i++) r[vd][i] = tmp[1][i];
        last = "valu";
      end else if (c < 76) begin
        // multiplier
        logic [5:0] f6;
        int op;
        logic [2:0] f3;
        case ($urandom % 6)
          0: begin f6 = 6'b100100; op = 2; end
          1: begin f6 = 6'b100101; op = 0; end
          2: begin f6 = 6'b100110; op = 3; end
          3: begin f6 = 6'b100111; op = 1; end
          4: begin f6 = 6'b101101; op = 4; end
          default: begin f6 = 6'b101111; op = 5; end
        endcase
        f3 = ($urandom % 2) ? 3'b010 : 3'b110;
        ins = opv(f6, f3, vd, vs2, vs1);
        for (int unsigned i = 0; i < vl; i++) begin
          logic [31:0] b, x;
          b = (f3 == 3'b010) ? get(vs1, i, eb) : rs1;
          x = ref_mul(op, get(vs2, i, eb), b, get(vd, i, eb), eb);
          for (int k = 0; k < int'(eb); k++) tmp[1][i*eb + k] = x[8*k +: 8];
        end
        for (int unsigned i = 0; i < vl * eb; i++) r[vd][i] = tmp[1][i];
        last = "vmul";
      end else if (c < 86) begin
        // slides; vd differs from vs2
        longint unsigned off;
        bit up, imm;
        up = $urandom % 2;
        imm = $urandom % 2;
        while (vd == vs2) vd = rr();
        if ($urandom % 3 == 0) begin
          // vslide1up.vx / vslide1down.vx
          rs1 = $urandom;
          ins = opv(up ? 6'b001110 : 6'b001111, 3'b110, vd, vs2, vs1);
          for (int unsigned i = 0; i < vl; i++) begin
            logic [31:0] x;
            if (up) x = (i == 0) ? rs1 : get(vs2, i - 1, eb);
            else    x = (i == vl - 1) ? rs1 : get(vs2, i + 1, eb);
            put(vd, i, eb, x);
          end
          last = up ? "vslide1up" : "vslide1down";
          return;
        end
        rs1 = ($urandom % 4 == 0) ? $urandom : $urandom % (vlmax() + 2);
        off = imm ? longint'(vs1) : longint'(rs1);
        ins = opv(up ? 6'b001110 : 6'b001111, imm ? 3'b011 : 3'b100, vd, vs2, vs1);
        for (int unsigned i = 0; i < vl; i++) begin
          if (up) begin
            if (longint'(i) >= off) put(vd, i, eb, get(vs2, i - int'(off), eb));
          end else begin
            put(vd, i, eb, (longint'(i) + off < longint'(vlmax())) ? get(vs2, i + int'(off), eb) : 0);
          end
        end
        last = up ? "vslideup" : "vslidedown";
      end else if (c < 94) begin
        // gather; vd differs from the sources
        int fm;
        longint unsigned x;
        while (vd == vs2 || vd == vs1) vd = rr();
        fm = $urandom % 3;
        rs1 = ($urandom % 4 == 0) ? $urandom : $urandom % (vlmax() + 2);
        x = (fm == 2) ? longint'(vs1) : longint'(rs1);
        ins = opv(6'b001100, (fm == 0) ? 3'b000 : (fm == 1) ? 3'b100 : 3'b011, vd, vs2, vs1);
        for (int unsigned i = 0; i < vl; i++) begin
          longint unsigned ix;
          ix = (fm == 0) ? longint'(get(vs1, i, eb)) : x;
          for (int k = 0; k < int'(eb); k++) tmp[1][i*eb + k] =
            (ix < longint'(vlmax())) ? r[vs2][int'(ix)*eb + k] : 8'h00;
        end
        for (int unsigned i = 0; i < vl * eb; i++) r[vd][i] = tmp[1][i];
        last = "vrgather";
      end else if (c < 97) begin
        // vmv.s.x
        ins = opv(6'b010000, 3'b110, vd, 5'd0, 5'd10);
        if (vl != 0) put(vd, 0, eb, rs1);
        last = "vmv.s.x";
      end else begin
        // vmv.x.s
        ins = opv(6'b010000, 3'b010, 5'd11, vs2, 5'd0);
        has_res = 1;
        res = 32'(sx(get(vs2, 0, eb), eb));
        last = "vmv.x.s";
      end
    endfunction
  endclass

endpackage
