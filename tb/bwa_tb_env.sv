// bwa_tb_env: end-to-end test environment for bwa_cram_top.
//
// It builds everything the host would prepare for a random reference: the
// suffix array (prefix doubling with counting sorts), the BWT, the Count
// table and the Count-augmented Occ samples, the suffix vector (rows whose
// text position is a multiple of 32) and the sampled suffix array with its
// per-vector base addresses. It loads them through the top's load ports,
// streams reads (exact substrings, substrings of a duplicated segment, and
// random reads that rarely occur) and checks every result against a plain
// software search: found / not found, number of occurrences, and the text
// position of the lexicographically smallest matching suffix (which must
// also hold the read). It also requires every mechanism of the design to
// occur: PE conflicts, empty intervals, LF walk-back steps, SV hits, `$`
// corrections, and more than one batch (auto-start on a full batch and a
// start by `go`).
// FULL=1 instantiates the top with its default parameters (no overrides).
module bwa_tb_env #(
  parameter int  NPE     = 8,
  parameter int  NBT     = 2,
  parameter int  SLOTS   = 8,
  parameter int  COLS    = 8,
  parameter int  NCTX    = 16,
  parameter int  RLEN    = 12,
  parameter int  REF_LEN = 900,
  parameter int  NREADS  = 40,
  parameter bit  FULL    = 0,
  parameter longint MAXCYC = 5_000_000
) ();
  import bwa_pkg::*;

  localparam int SAMPLE = NBT * SLOTS;
  localparam int PECH   = SAMPLE * COLS;
  localparam int N      = REF_LEN + 1;
  localparam int OFFW   = $clog2(SAMPLE);
  localparam int LOCW   = OFFW + $clog2(COLS);
  localparam int PEW    = NPE > 1 ? $clog2(NPE) : 1;
  localparam int TW     = $clog2(NBT + 2);
  localparam int SV_LEN = NPE * PECH;
  localparam int NVEC   = SV_LEN / COLS;
  localparam int VW     = $clog2(NVEC);
  localparam int NSSA   = (SV_LEN + 31) / 32;
  localparam int AW     = $clog2(NSSA + 1);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [31:0]          bwt_len, primary;
  logic                 pe_ld_valid, sv_ld_valid, ssa_ld_valid, base_ld_valid;
  logic [PEW-1:0]       pe_ld_pe;
  logic [TW-1:0]        pe_ld_tile;
  logic [ROW_W-1:0]     pe_ld_row;
  logic [COLS-1:0]      pe_ld_data, sv_ld_data;
  logic [VW-1:0]        sv_ld_vec, base_ld_vec;
  logic [AW-1:0]        ssa_ld_addr, base_ld_data;
  logic [31:0]          ssa_ld_data;
  logic                 rd_valid, rd_ready, go, res_valid, res_ready, res_found;
  logic [31:0]          rd_id, res_id, res_pos, res_hits;
  logic [RLEN-1:0][1:0] rd_bases;
  logic [31:0]          stat_intervals, stat_conflicts, stat_nomatch, stat_lf,
                        stat_sv_hit, stat_dollar, stat_batches;
  logic [1:0]           phase;

  if (FULL) begin : g_full
    bwa_cram_top u_dut (.*);
  end else begin : g_red
    bwa_cram_top #(.NPE(NPE), .NBT(NBT), .SLOTS(SLOTS), .COLS(COLS), .NCTX(NCTX),
                   .RLEN(RLEN)) u_dut (.*);
  end

  // ---- reference and index --------------------------------------------------
  logic [1:0] text [REF_LEN];
  int         sa   [N];
  int         rnk  [N];
  logic [2:0] bwtc [N];         // 0 = `$`, 1..4 = A..T
  int         cnt_c [4];
  int         prim;

  task automatic build_sa();
    int tmp [N], key2 [N], idx [N], cnt [], newr [N];
    int k, maxr;
    for (int i = 0; i < N; i++) rnk[i] = (i == REF_LEN) ? 0 : int'(text[i]) + 1;
    maxr = 4;
    k = 1;
    forever begin
      cnt = new[maxr + 2];
      // counting sort on the second key, then stable on the first
      for (int i = 0; i < N; i++) key2[i] = (i + k < N) ? rnk[i + k] + 1 : 0;
      foreach (cnt[j]) cnt[j] = 0;
      for (int i = 0; i < N; i++) cnt[key2[i]]++;
      for (int j = 1; j < maxr + 2; j++) cnt[j] += cnt[j - 1];
      for (int i = N - 1; i >= 0; i--) begin cnt[key2[i]]--; tmp[cnt[key2[i]]] = i; end
      foreach (cnt[j]) cnt[j] = 0;
      for (int i = 0; i < N; i++) cnt[rnk[i]]++;
      for (int j = 1; j < maxr + 2; j++) cnt[j] += cnt[j - 1];
      for (int i = N - 1; i >= 0; i--) begin
        cnt[rnk[tmp[i]]]--; idx[cnt[rnk[tmp[i]]]] = tmp[i];
      end
      newr[idx[0]] = 0;
      for (int i = 1; i < N; i++)
        newr[idx[i]] = newr[idx[i-1]] +
          ((rnk[idx[i]] != rnk[idx[i-1]] || key2[idx[i]] != key2[idx[i-1]]) ? 1 : 0);
      for (int i = 0; i < N; i++) rnk[i] = newr[i];
      maxr = newr[idx[N-1]];
      if (maxr == N - 1) break;
      k = k * 2;
    end
    for (int i = 0; i < N; i++) sa[rnk[i]] = i;
    for (int i = 0; i < N; i++) begin
      bwtc[i] = (sa[i] == 0) ? 3'd0 : 3'(int'(text[sa[i] - 1]) + 1);
      if (sa[i] == 0) prim = i;
    end
    cnt_c = '{1, 1, 1, 1};
    for (int i = 0; i < REF_LEN; i++)
      for (int a = int'(text[i]) + 1; a < 4; a++) cnt_c[a]++;
  endtask

  // ---- expected results --------------------------------------------------------
  logic [RLEN-1:0][1:0] reads [NREADS];
  bit   exp_found [NREADS];
  int   exp_hits  [NREADS];
  int   exp_pos   [NREADS];

  function automatic bit suffix_has(int s, int r);
    if (s + RLEN > REF_LEN) return 0;
    for (int m = 0; m < RLEN; m++) if (text[s + m] != reads[r][m]) return 0;
    return 1;
  endfunction

  task automatic expect_read(int r);
    exp_hits[r] = 0;
    exp_pos[r] = -1;
    // rows of the suffix array in order: the first matching row is idx_l
    for (int i = 0; i < N; i++)
      if (suffix_has(sa[i], r)) begin
        if (exp_hits[r] == 0) exp_pos[r] = sa[i];
        exp_hits[r]++;
      end
    exp_found[r] = (exp_hits[r] != 0);
  endtask

  // ---- checking -------------------------------------------------------------------
  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // progress report for the long full-size run
  always @(posedge clk)
    if (FULL != 0 && cyc % 200_000 == 0) begin
      $display("cycle %0d: phase=%0d intervals=%0d lf=%0d", cyc, phase, stat_intervals, stat_lf);
      $fflush;
    end

  initial begin
    while (cyc < MAXCYC) @(posedge clk);
    failures++;
    $display("watchdog expired at cycle %0d", cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic logic pe_bit(int q, int t, int r, int c);
    if (t < NBT) begin
      if (r < 2 * SLOTS) begin
        int g;
        logic [1:0] ch;
        g = q * PECH + c * SAMPLE + t * SLOTS + r / 2;
        ch = (g < N) ? ((bwtc[g] == 0) ? 2'd0 : 2'(bwtc[g] - 1)) : 2'($urandom);
        return (r % 2 == 0) ? ch[1] : ch[0];
      end else if (r < 2 * SLOTS + 8) begin
        logic [1:0] a;
        a = 2'((r - 2 * SLOTS) / 2);
        return (r % 2 == 0) ? a[1] : a[0];
      end
      return 1'($urandom);
    end
    return 1'($urandom);
  endfunction

  initial begin
    int occ_run [4];
    int nkept, npe_used, nvec_used, got;
    bit seen_id [NREADS];
    pe_ld_valid = 0; sv_ld_valid = 0; ssa_ld_valid = 0; base_ld_valid = 0;
    pe_ld_pe = '0; pe_ld_tile = '0; pe_ld_row = '0; pe_ld_data = '0;
    sv_ld_vec = '0; sv_ld_data = '0; ssa_ld_addr = '0; ssa_ld_data = '0;
    base_ld_vec = '0; base_ld_data = '0;
    rd_valid = 0; rd_id = '0; rd_bases = '0; go = 0; res_ready = 1;
    bwt_len = 32'(N); primary = '0;

    // reference with one duplicated segment
    for (int i = 0; i < REF_LEN; i++) text[i] = 2'($urandom);
    for (int m = 0; m < RLEN + 8; m++) text[REF_LEN / 2 + m] = text[REF_LEN / 5 + m];
    // a run of T at the start puts the `$` row among the last BWT rows, so
    // the first HIGH step of reads ending in A must apply the `$` correction
    for (int m = 0; m < 8; m++) text[m] = 2'd3;
    // an A followed by a copy of the text start: a read across it needs the
    // `$` correction on its HIGH bound, otherwise it reports two hits
    text[REF_LEN / 3 - 1] = 2'd0;
    for (int m = 0; m < RLEN; m++) text[REF_LEN / 3 + m] = text[m];
    build_sa();
    primary = 32'(prim);

    // reads: exact, from the duplicated segment or across the copied text start,
    // random, at the text end
    for (int r = 0; r < NREADS; r++) begin
      int s;
      case (r % 5)
        0, 1: s = int'($urandom % (REF_LEN - RLEN + 1));
        2:    s = ((r / 5) % 2 == 1) ? REF_LEN / 3 - 1 - int'($urandom % 4)
                                     : REF_LEN / 5 + int'($urandom % 8);
        3:    s = -1;
        default: s = REF_LEN - RLEN - int'($urandom % 3);
      endcase
      for (int m = 0; m < RLEN; m++) reads[r][m] = (s < 0) ? 2'($urandom) : text[s + m];
      expect_read(r);
    end

    repeat (3) @(posedge clk);
    rst_n = 1;

    // PE tiles
    npe_used = (N - 1) / PECH + 1;
    occ_run = '{0, 0, 0, 0};
    for (int q = 0; q < npe_used; q++) begin
      int occ [][4];
      occ = new[COLS];
      for (int c = 0; c < COLS; c++) begin
        for (int a = 0; a < 4; a++) occ[c][a] = cnt_c[a] + occ_run[a];
        for (int p = 0; p < SAMPLE; p++) begin
          int g;
          g = q * PECH + c * SAMPLE + p;
          if (g < N && bwtc[g] != 0) occ_run[bwtc[g] - 1]++;
        end
      end
      for (int t = 0; t < NBT + 2; t++)
        for (int r = 0; r < TILE_ROWS; r++) begin
          @(negedge clk);
          pe_ld_valid = 1; pe_ld_pe = PEW'(q); pe_ld_tile = TW'(t); pe_ld_row = ROW_W'(r);
          for (int c = 0; c < COLS; c++)
            pe_ld_data[c] = (t == NBT) ? ((r < 128) ? 1'(occ[c][r / 32] >> (r % 32)) : 1'b0)
                                       : pe_bit(q, t, r, c);
        end
    end
    @(negedge clk) pe_ld_valid = 0;

    // suffix vector, SSA and base addresses
    nvec_used = (N - 1) / COLS + 1;
    nkept = 0;
    for (int v = 0; v < nvec_used; v++) begin
      @(negedge clk);
      base_ld_valid = 1; base_ld_vec = VW'(v); base_ld_data = AW'(nkept);
      sv_ld_valid = 1; sv_ld_vec = VW'(v);
      for (int b = 0; b < COLS; b++) begin
        int j;
        j = v * COLS + b;
        sv_ld_data[b] = (j < N) && (sa[j] % 32 == 0);
      end
      for (int b = 0; b < COLS; b++)
        if (sv_ld_data[b]) begin
          @(negedge clk);
          base_ld_valid = 0; sv_ld_valid = 0;
          ssa_ld_valid = 1; ssa_ld_addr = AW'(nkept); ssa_ld_data = 32'(sa[v * COLS + b]);
          nkept++;
        end
      @(negedge clk);
      base_ld_valid = 0; sv_ld_valid = 0; ssa_ld_valid = 0;
    end
    $display("loaded: %0d BWT rows over %0d PEs, %0d SSA entries, cycle %0d",
             N, npe_used, nkept, cyc);

    // reads in, results out
    fork
      begin
        for (int r = 0; r < NREADS; r++) begin
          @(negedge clk);
          rd_valid = 1; rd_id = 32'(r); rd_bases = reads[r];
          @(posedge clk);
          while (!rd_ready) @(posedge clk);
        end
        @(negedge clk) rd_valid = 0;
        while (phase != 2'd0) @(posedge clk);
        @(negedge clk) go = 1;
        @(negedge clk) go = 0;
      end
      begin
        got = 0;
        foreach (seen_id[r]) seen_id[r] = 0;
        while (got < NREADS) begin
          @(posedge clk);
          if (res_valid && res_ready) begin
            int r;
            r = int'(res_id);
            got++;
            check(r < NREADS && !seen_id[r], $sformatf("unexpected result id %0d", r));
            if (r < NREADS) begin
              seen_id[r] = 1;
              check(res_found == exp_found[r],
                    $sformatf("read %0d found=%0d exp %0d", r, res_found, exp_found[r]));
              if (exp_found[r]) begin
                check(res_hits == 32'(exp_hits[r]),
                      $sformatf("read %0d hits=%0d exp %0d", r, res_hits, exp_hits[r]));
                check(res_pos == 32'(exp_pos[r]),
                      $sformatf("read %0d pos=%0d exp %0d", r, res_pos, exp_pos[r]));
                check(suffix_has(int'(res_pos), r),
                      $sformatf("read %0d not at reported position", r));
              end
            end
          end
        end
      end
    join
    // the batch counts as complete once the controller is back in LOAD
    while (phase != 2'd0) @(posedge clk);
    @(posedge clk);
    $display("done at cycle %0d: intervals=%0d conflicts=%0d nomatch=%0d lf=%0d sv_hit=%0d dollar=%0d batches=%0d",
             cyc, stat_intervals, stat_conflicts, stat_nomatch, stat_lf, stat_sv_hit,
             stat_dollar, stat_batches);
    check(stat_conflicts > 0, "no PE conflict happened");
    check(stat_nomatch > 0, "no empty interval happened");
    check(stat_lf > 0, "no LF walk-back step happened");
    check(stat_sv_hit > 0, "no SV hit happened");
    check(stat_dollar > 0, "no `$` correction happened");
    check(stat_batches >= ((NREADS > NCTX) ? 2 : 1), "batch count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
