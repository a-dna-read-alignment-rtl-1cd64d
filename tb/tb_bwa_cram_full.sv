// tb_bwa_cram_full: end-to-end run of bwa_cram_top with all its default
// parameters (16 PEs of 65,536 BWT rows, 1000 read contexts, 100-base
// reads). The 70,000-base random reference spans two PEs; 4 reads (two
// exact, one from the duplicated segment, one random) form one batch started
// by `go`. The run takes about 2.0 million clocks: three reads of 100 bases
// need about 200 interval computations each, 2,762 clocks apiece, on the two
// PEs that hold data. See bwa_tb_env for what is checked; all mechanism
// counters (conflicts, empty interval, LF steps, SV hit, `$` correction,
// batch) must be non-zero here as well.
module tb_bwa_cram_full;
  bwa_tb_env #(.NPE(16), .NBT(16), .SLOTS(32), .COLS(128), .NCTX(1000), .RLEN(100),
               .REF_LEN(70000), .NREADS(4), .FULL(1), .MAXCYC(3_000_000)) env ();
endmodule
