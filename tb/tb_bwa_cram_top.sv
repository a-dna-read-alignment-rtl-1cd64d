// tb_bwa_cram_top: end-to-end run of the accelerator at a reduced size
// (8 PEs of 2 tiles x 8 slots x 8 columns, 16 read contexts, 12-base reads,
// a 900-base reference, 60 reads in four batches). See bwa_tb_env.
module tb_bwa_cram_top;
  bwa_tb_env #(.NPE(8), .NBT(2), .SLOTS(8), .COLS(8), .NCTX(16), .RLEN(12),
               .REF_LEN(900), .NREADS(60), .FULL(0), .MAXCYC(5_000_000)) env ();
endmodule
