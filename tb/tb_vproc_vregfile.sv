// Self-checking testbench of the XOR-based multi-ported register file
// (64-bit registers): random byte-masked writes on all three write ports to
// distinct registers in the same cycle, random reads on all six read ports,
// compared with a plain array model. Checks the one-cycle read latency and
// that a write is visible to a read presented in the next cycle.
module tb_vproc_vregfile;
  localparam int VW = 64, NW = 3, NR = 6;

  logic clk = 0;
  logic [NW-1:0] wr_en;
  logic [NW-1:0][4:0] wr_addr;
  logic [NW-1:0][VW-1:0] wr_data;
  logic [NW-1:0][VW/8-1:0] wr_be;
  logic [NR-1:0][4:0] rd_addr;
  logic [NR-1:0][VW-1:0] rd_data;
  logic [VW-1:0] model [32];
  logic [NR-1:0][VW-1:0] exp_q;
  int checks = 0, failures = 0;

  vproc_vregfile #(.VREG_W(VW), .NW(NW), .NR(NR)) dut (
    .clk_i(clk), .wr_en_i(wr_en), .wr_addr_i(wr_addr), .wr_data_i(wr_data), .wr_be_i(wr_be),
    .rd_addr_i(rd_addr), .rd_data_o(rd_data));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 32; r++) model[r] = '0;
    wr_en = '0; wr_addr = '0; wr_data = '0; wr_be = '0; rd_addr = '0;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      // compare reads presented in the previous cycle
      if (cyc > 0) begin
        for (int r = 0; r < NR; r++) begin
          checks++;
          if (rd_data[r] !== exp_q[r]) begin
            failures++;
            if (failures < 10) $display("cyc %0d port %0d got %h exp %h", cyc, r, rd_data[r], exp_q[r]);
          end
        end
      end
      // new reads see the model as it stands now (writes of earlier cycles)
      for (int r = 0; r < NR; r++) begin
        rd_addr[r] = 5'($urandom);
        exp_q[r]   = model[rd_addr[r]];
      end
      // new writes: each register may be written by any port over time
      for (int w = 0; w < NW; w++) begin
        wr_en[w]   = ($urandom % 3) != 0;
        // any register, but not one another port writes in this cycle
        wr_addr[w] = 5'($urandom);
        for (int v = 0; v < w; v++) if (wr_addr[w] == wr_addr[v]) wr_addr[w] = 5'($urandom);
        for (int v = 0; v < w; v++) if (wr_addr[w] == wr_addr[v]) wr_en[w] = 0;
        wr_data[w] = {$urandom, $urandom};
        wr_be[w]   = (cyc < 100) ? '1 : 8'($urandom);
        if (wr_en[w]) begin
          for (int b = 0; b < VW / 8; b++)
            if (wr_be[w][b]) model[wr_addr[w]][8*b +: 8] = wr_data[w][8*b +: 8];
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
