// Behavioural model of the external memory: a 32-bit wide SRAM that accepts
// one word request per cycle (gnt is always high) and answers every request,
// read or write, with rvalid after LAT cycles, in order. Writes honour the
// byte enables. The contents are set and inspected by the testbench through
// the mem array; addresses wrap at WORDS words.
module ext_mem_model #(
  parameter int unsigned LAT   = 5,
  parameter int unsigned WORDS = 16384
) (
  input  logic        clk_i,
  input  logic        req_i,
  input  logic        we_i,
  input  logic [31:0] addr_i,
  input  logic [31:0] wdata_i,
  input  logic [3:0]  be_i,
  output logic        gnt_o,
  output logic        rvalid_o,
  output logic [31:0] rdata_o
);

  logic [31:0] mem [WORDS];
  logic        vpipe [LAT];
  logic [31:0] dpipe [LAT];
  int unsigned reads, writes;

  initial begin
    for (int i = 0; i < LAT; i++) begin
      vpipe[i] = 1'b0;
      dpipe[i] = '0;
    end
    reads  = 0;
    writes = 0;
  end

  assign gnt_o    = 1'b1;
  assign rvalid_o = vpipe[LAT-1];
  assign rdata_o  = dpipe[LAT-1];

  always @(posedge clk_i) begin
    int unsigned wi;
    wi = (addr_i >> 2) % WORDS;
    for (int i = LAT - 1; i > 0; i--) begin
      vpipe[i] <= vpipe[i-1];
      dpipe[i] <= dpipe[i-1];
    end
    vpipe[0] <= req_i;
    dpipe[0] <= mem[wi];
    if (req_i) begin
      if (we_i) begin
        writes <= writes + 1;
        for (int b = 0; b < 4; b++) begin
          if (be_i[b]) mem[wi][8*b +: 8] <= wdata_i[8*b +: 8];
        end
      end else begin
        reads <= reads + 1;
      end
    end
  end

endmodule
