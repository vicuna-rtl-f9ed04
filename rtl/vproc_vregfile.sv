// Vector register file: 32 registers of VREG_W bits, NW write ports and NR
// read ports, built as an XOR-based multi-ported RAM.
//
// Every write port w owns a bank B_w. The value of register r is the XOR of
// B_0[r] ^ B_1[r] ^ ... ^ B_{NW-1}[r]. When port w writes data D to r, it
// stores D ^ (XOR of all other banks at r) into B_w, so that the XOR of all
// banks becomes D. Each bank has one write port and is replicated so that
// every copy has exactly one read port: one copy per external read port and
// one copy for each other write port's read-before-write. Only the bytes
// selected by the byte-enable mask are rewritten, so a write can update
// individual elements of a register while leaving the others unchanged.
//
// Timing: a read address presented in cycle t gives the data in cycle t+1
// (registered read); a write presented in cycle t is visible to reads
// presented in cycle t+1. Two write ports must not write the same register
// in the same cycle (the issue logic's hazard check rules that out).
//
// The register count, the XOR organisation and the byte-selective update
// follow the document. The number of ports, the registered read and the
// use of behavioural arrays for the banks are this design's choices. The
// banks are given an initial value of zero (an FPGA block-RAM
// initialisation): without it the copies of one bank would start with
// different contents and registers never written would read inconsistently.
module vproc_vregfile #(
  parameter int unsigned VREG_W = 2048,
  parameter int unsigned NW     = 3,
  parameter int unsigned NR     = 6
) (
  input  logic                  clk_i,
  input  logic [NW-1:0]         wr_en_i,
  input  logic [NW-1:0][4:0]    wr_addr_i,
  input  logic [NW-1:0][VREG_W-1:0]   wr_data_i,
  input  logic [NW-1:0][VREG_W/8-1:0] wr_be_i,
  input  logic [NR-1:0][4:0]    rd_addr_i,
  output logic [NR-1:0][VREG_W-1:0]   rd_data_o
);

  localparam int unsigned NCOPY = NR + NW - 1;

  // Combinational read output of copy c of the bank of write port w
  logic [VREG_W-1:0] copy_rd [NW][NCOPY];

  // Index of the copy of bank w that write port v reads (v != w)
  function automatic int unsigned wcopy(int unsigned w, int unsigned v);
    return NR + ((v < w) ? v : v - 1);
  endfunction

  // Write port that reads copy c (c >= NR) of bank w
  function automatic int unsigned copy_reader(int unsigned w, int unsigned c);
    return (c - NR < w) ? c - NR : c - NR + 1;
  endfunction

  // New bank contents for each write port
  logic [NW-1:0][VREG_W-1:0] wr_enc;

  always_comb begin
    for (int unsigned w = 0; w < NW; w++) begin
      wr_enc[w] = wr_data_i[w];
      for (int unsigned v = 0; v < NW; v++) begin
        if (v != w) begin
          wr_enc[w] = wr_enc[w] ^ copy_rd[v][wcopy(v, w)];
        end
      end
    end
  end

  for (genvar w = 0; w < NW; w++) begin : g_bank
    for (genvar c = 0; c < NCOPY; c++) begin : g_copy
      logic [VREG_W-1:0] mem [32];
      logic [4:0]        raddr;

      // All copies start cleared, as FPGA block RAM with an initial value
      // does; the copies of one bank must hold equal contents.
      initial begin
        for (int i = 0; i < 32; i++) begin
          mem[i] = '0;
        end
      end

      assign raddr = (c < NR) ? rd_addr_i[c] : wr_addr_i[copy_reader(w, c)];
      assign copy_rd[w][c] = mem[raddr];

      always_ff @(posedge clk_i) begin
        if (wr_en_i[w]) begin
          for (int b = 0; b < VREG_W / 8; b++) begin
            if (wr_be_i[w][b]) begin
              mem[wr_addr_i[w]][8*b +: 8] <= wr_enc[w][8*b +: 8];
            end
          end
        end
      end
    end
  end

  for (genvar r = 0; r < NR; r++) begin : g_rd
    logic [VREG_W-1:0] val;
    always_comb begin
      val = '0;
      for (int unsigned w = 0; w < NW; w++) begin
        val = val ^ copy_rd[w][r];
      end
    end
    always_ff @(posedge clk_i) begin
      rd_data_o[r] <= val;
    end
  end

endmodule
