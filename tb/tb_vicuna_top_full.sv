// Full-size end-to-end testbench: runs tb_vicuna_top with the processing
// system at its default parameters (the document's fast configuration:
// 2048-bit vector registers, 1024-bit multiplier, 128 kB data cache), with
// no parameter overridden on vicuna_top. See tb_vicuna_top for the checks.
module tb_vicuna_top_full;
  tb_vicuna_top #(.FULL(1'b1)) u_tb ();
endmodule
