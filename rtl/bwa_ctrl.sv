// bwa_ctrl: global controller of the BWA-CRAM accelerator.
//
// It holds a batch of up to NCTX reads (the read contexts) and runs them in
// three phases that do not overlap:
//   ALIGN  - backward search (Algorithm "read alignment"): for every context
//            the runtime scheduler issues two interval computations per read
//            character, LOW on idx_l and HIGH on idx_h, each to the PE that
//            stores that BWT index. The scheduler visits one context per
//            clock, round robin, and issues at most one request per clock;
//            a request for a busy PE is a conflict and the scheduler moves
//            on to the next context. When both results of a character are
//            back, new_l = R_low and new_h = R_high - 1; new_l > new_h ends
//            the read with no alignment.
//   LOCATE - for every aligned read, starting at F index j = idx_l: check the
//            suffix vector (sv_unit); if j is not sampled, run an LF step on
//            the PE holding j (read BWT[j], inclusive interval with it,
//            minus 1) and count it; otherwise read SSA and add the count
//            (ssa_unit). SV/SSA accesses are serialised; LF steps of
//            different reads run in parallel on the PEs.
//   DRAIN  - return one result per read, in context order.
// Reads are accepted only in the LOAD phase; `go` (or a full batch) starts
// ALIGN. PE results are Count-augmented ranks; the terminator `$` is stored
// in the BWT as an A, so when the queried character is A and the `$` row
// (`primary`) lies inside the counted part of the column, the controller
// subtracts 1.
//
// Interfaces: valid/ready everywhere. PE requests share kind/ch/loc and have
// one valid per PE; PE responses are taken one per clock, lowest PE first.
// `stat_*` outputs count the scheduler's events.
// The phase order, the round-robin scan and the per-read context (next
// character, low and high index) follow the accelerator's description; the
// exact context layout, arbitration and `$` handling are this design's.
module bwa_ctrl
  import bwa_pkg::*;
#(
  parameter int NPE    = 16,        // processing elements
  parameter int LOCW   = 16,        // index bits inside a PE (65,536 chars)
  parameter int OFFW   = 9,         // index bits inside a PE column (512)
  parameter int NCTX   = 1000,      // read contexts (reads in flight)
  parameter int RLEN   = 100,       // read length in bases
  parameter int IDXW   = 32,        // BWT index / text position width
  parameter int VEC_W  = TILE_COLS, // SV vector width
  parameter int IDW    = 32,        // read id width
  localparam int PEW   = NPE > 1 ? $clog2(NPE) : 1,
  localparam int CW    = $clog2(NCTX),
  localparam int PW    = $clog2(RLEN + 1),
  localparam int SVIW  = LOCW + $clog2(NPE),
  localparam int VW    = SVIW - $clog2(VEC_W),
  localparam int BW    = $clog2(VEC_W)
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // configuration
  input  logic [IDXW-1:0]             bwt_len,     // BWT length incl. `$`
  input  logic [IDXW-1:0]             primary,     // row of `$` in the BWT
  // reads in
  input  logic                        rd_valid,
  output logic                        rd_ready,
  input  logic [IDW-1:0]              rd_id,
  input  logic [RLEN-1:0][1:0]        rd_bases,    // base 0 first
  input  logic                        go,
  // results out
  output logic                        res_valid,
  input  logic                        res_ready,
  output logic [IDW-1:0]              res_id,
  output logic                        res_found,
  output logic [IDXW-1:0]             res_pos,     // text position of idx_l
  output logic [IDXW-1:0]             res_hits,    // idx_h - idx_l + 1
  // PEs
  output logic [NPE-1:0]              pe_req_valid,
  input  logic [NPE-1:0]              pe_req_ready,
  output pe_kind_e                    pe_req_kind,
  output logic [1:0]                  pe_req_ch,
  output logic [LOCW-1:0]             pe_req_loc,
  input  logic [NPE-1:0]              pe_resp_valid,
  output logic [NPE-1:0]              pe_resp_ready,
  input  logic [NPE-1:0][IDXW-1:0]    pe_resp_val,
  input  logic [NPE-1:0][1:0]         pe_resp_ch,
  // suffix vector
  output logic                        sv_req_valid,
  input  logic                        sv_req_ready,
  output logic [SVIW-1:0]             sv_req_idx,
  input  logic                        sv_resp_valid,
  output logic                        sv_resp_ready,
  input  logic                        sv_resp_hit,
  input  logic [VEC_W-1:0]            sv_resp_vec,
  // sampled suffix array
  output logic                        ssa_req_valid,
  input  logic                        ssa_req_ready,
  output logic [VW-1:0]               ssa_req_vec,
  output logic [BW-1:0]               ssa_req_bit,
  output logic [VEC_W-1:0]            ssa_req_bits,
  output logic [IDXW-1:0]             ssa_req_steps,
  input  logic                        ssa_resp_valid,
  output logic                        ssa_resp_ready,
  input  logic [IDXW-1:0]             ssa_resp_pos,
  // statistics
  output logic [31:0]                 stat_intervals,
  output logic [31:0]                 stat_conflicts,
  output logic [31:0]                 stat_nomatch,
  output logic [31:0]                 stat_lf,
  output logic [31:0]                 stat_sv_hit,
  output logic [31:0]                 stat_dollar,
  output logic [31:0]                 stat_batches,
  output logic [1:0]                  phase_o
);

  typedef enum logic [1:0] {PH_LOAD, PH_ALIGN, PH_LOCATE, PH_DRAIN} phase_e;
  typedef enum logic [2:0] {
    CS_FREE, CS_ALIGN, CS_CHECK, CS_SVWAIT, CS_LF, CS_LFWAIT, CS_DONE
  } cst_e;

  // ---- read contexts -------------------------------------------------------
  cst_e                  c_st    [NCTX];
  logic [RLEN-1:0][1:0]  c_bases [NCTX];
  logic [IDW-1:0]        c_id    [NCTX];
  logic [PW-1:0]         c_pos   [NCTX];   // bases still to align
  logic [IDXW-1:0]       c_l     [NCTX];
  logic [IDXW-1:0]       c_h     [NCTX];
  logic [IDXW-1:0]       c_nl    [NCTX];
  logic [IDXW-1:0]       c_nh    [NCTX];   // new high + 1
  logic                  c_iss_l [NCTX];
  logic                  c_iss_h [NCTX];
  logic                  c_got_l [NCTX];
  logic                  c_got_h [NCTX];
  logic                  c_found [NCTX];
  logic [IDXW-1:0]       c_steps [NCTX];
  logic [IDXW-1:0]       c_res   [NCTX];   // text position
  logic [IDXW-1:0]       c_hits  [NCTX];   // rows of the final interval

  // per-PE tag of the outstanding request
  logic [CW-1:0]         t_ctx   [NPE];
  pe_kind_e              t_kind  [NPE];
  logic [IDXW-1:0]       t_idx   [NPE];

  phase_e         phase;
  logic [CW-1:0]  p;          // scan pointer
  logic [CW:0]    n_ctx;      // contexts loaded in this batch
  logic           seen;       // scan pass found work for the phase
  logic           sv_busy;    // an SV/SSA access is in progress
  logic [CW-1:0]  sv_ctx;
  logic           ssa_pend;

  assign phase_o = phase;

  // `$` correction for a rank counted over [column base, idx) or [.., idx]
  function automatic logic dollar_in(logic [IDXW-1:0] idx, logic incl, logic [1:0] ch);
    logic [IDXW-1:0] base;
    base = idx & ~((IDXW'(1) << OFFW) - 1'b1);
    return (ch == BASE_A) && (primary >= base) &&
           (incl ? (primary <= idx) : (primary < idx));
  endfunction

  function automatic logic [PEW-1:0] pe_of(logic [IDXW-1:0] idx);
    return PEW'(idx >> LOCW);
  endfunction

  // ---- scheduler decision (combinational) --------------------------------
  cst_e            cur_st;
  logic [IDXW-1:0] want_idx;
  logic            want_pe_req;
  pe_kind_e        want_kind;
  logic [1:0]      want_ch;
  logic            pe_free;
  logic            issue, advance, conflict;
  logic [PW-1:0]   cur_pos;

  always_comb begin
    cur_st      = c_st[p];
    cur_pos     = c_pos[p];
    want_pe_req = 1'b0;
    want_idx    = c_l[p];
    want_kind   = PQ_LOW;
    want_ch     = '0;
    if (cur_pos != 0) want_ch = c_bases[p][cur_pos - 1'b1];
    if (phase == PH_ALIGN && cur_st == CS_ALIGN && !(c_got_l[p] && c_got_h[p])) begin
      if (!c_iss_l[p]) begin
        want_pe_req = 1'b1;
      end else if (!c_iss_h[p]) begin
        want_pe_req = 1'b1; want_idx = c_h[p]; want_kind = PQ_HIGH;
      end
    end else if (phase == PH_LOCATE && cur_st == CS_LF) begin
      want_pe_req = 1'b1; want_kind = PQ_LF;
    end
    pe_free  = pe_req_ready[pe_of(want_idx)];
    issue    = want_pe_req && pe_free;
    conflict = want_pe_req && !pe_free;
    // stay on a context that still has its HIGH request to issue
    advance  = !(issue && want_kind == PQ_LOW);
  end

  always_comb begin
    pe_req_valid = '0;
    if (issue) pe_req_valid[pe_of(want_idx)] = 1'b1;
    pe_req_kind = want_kind;
    pe_req_ch   = want_ch;
    pe_req_loc  = want_idx[LOCW-1:0];
  end

  // ---- PE response arbitration: lowest PE first -----------------------------
  logic           rsp_any;
  logic [PEW-1:0] rsp_pe;
  always_comb begin
    rsp_any = 1'b0;
    rsp_pe  = '0;
    for (int q = NPE - 1; q >= 0; q--)
      if (pe_resp_valid[q]) begin rsp_any = 1'b1; rsp_pe = PEW'(q); end
    pe_resp_ready = '0;
    if (rsp_any) pe_resp_ready[rsp_pe] = 1'b1;
  end

  logic [IDXW-1:0] rsp_val;
  logic            rsp_fix;
  always_comb begin
    rsp_fix = dollar_in(t_idx[rsp_pe], t_kind[rsp_pe] != PQ_LOW, pe_resp_ch[rsp_pe]);
    rsp_val = pe_resp_val[rsp_pe] - IDXW'(rsp_fix);
  end

  // ---- SV / SSA access -----------------------------------------------------
  logic             sv_start;
  logic             sv_wait_rsp;    // SV request accepted, response pending
  logic             ssa_sent;
  logic [VEC_W-1:0] sv_vec;
  assign sv_start      = (phase == PH_LOCATE) && cur_st == CS_CHECK && !sv_busy;
  assign sv_req_valid  = sv_busy && !ssa_pend && c_st[sv_ctx] == CS_SVWAIT && !sv_wait_rsp;
  assign sv_req_idx    = SVIW'(c_l[sv_ctx]);
  assign sv_resp_ready = 1'b1;
  assign ssa_resp_ready = 1'b1;
  assign ssa_req_valid = ssa_pend && !ssa_sent;
  assign ssa_req_vec   = VW'(c_l[sv_ctx] >> BW);
  assign ssa_req_bit   = BW'(c_l[sv_ctx]);
  assign ssa_req_bits  = sv_vec;
  assign ssa_req_steps = c_steps[sv_ctx];

  // ---- result output --------------------------------------------------------
  assign res_valid = (phase == PH_DRAIN) && cur_st == CS_DONE;
  assign res_id    = c_id[p];
  assign res_found = c_found[p];
  assign res_pos   = c_res[p];
  assign res_hits  = c_found[p] ? c_hits[p] : '0;
  assign rd_ready  = (phase == PH_LOAD) && (n_ctx < (CW + 1)'(NCTX));

  // ---- state update ------------------------------------------------------------
  logic last;
  assign last = (int'(p) == NCTX - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase <= PH_LOAD; p <= '0; n_ctx <= '0; seen <= 1'b0;
      sv_busy <= 1'b0; sv_ctx <= '0; ssa_pend <= 1'b0; ssa_sent <= 1'b0;
      sv_wait_rsp <= 1'b0; sv_vec <= '0;
      stat_intervals <= '0; stat_conflicts <= '0; stat_nomatch <= '0;
      stat_lf <= '0; stat_sv_hit <= '0; stat_dollar <= '0; stat_batches <= '0;
      for (int c = 0; c < NCTX; c++) c_st[c] <= CS_FREE;
      for (int q = 0; q < NPE; q++) begin
        t_ctx[q] <= '0; t_kind[q] <= PQ_LOW; t_idx[q] <= '0;
      end
    end else begin
      unique case (phase)
        // -------------------------------------------------------------------
        PH_LOAD: begin
          if (rd_valid && rd_ready) begin
            c_st[n_ctx[CW-1:0]]    <= CS_ALIGN;
            c_bases[n_ctx[CW-1:0]] <= rd_bases;
            c_id[n_ctx[CW-1:0]]    <= rd_id;
            c_pos[n_ctx[CW-1:0]]   <= PW'(RLEN);
            c_l[n_ctx[CW-1:0]]     <= '0;
            c_h[n_ctx[CW-1:0]]     <= bwt_len - 1'b1;
            c_iss_l[n_ctx[CW-1:0]] <= 1'b0;
            c_iss_h[n_ctx[CW-1:0]] <= 1'b0;
            c_got_l[n_ctx[CW-1:0]] <= 1'b0;
            c_got_h[n_ctx[CW-1:0]] <= 1'b0;
            c_found[n_ctx[CW-1:0]] <= 1'b0;
            c_steps[n_ctx[CW-1:0]] <= '0;
            n_ctx <= n_ctx + 1'b1;
          end
          if ((go || n_ctx == (CW + 1)'(NCTX)) && n_ctx != 0) begin
            phase <= PH_ALIGN; p <= '0; seen <= 1'b0;
          end
        end
        // -------------------------------------------------------------------
        PH_ALIGN, PH_LOCATE: begin
          if (issue) begin
            t_ctx[pe_of(want_idx)]  <= p;
            t_kind[pe_of(want_idx)] <= want_kind;
            t_idx[pe_of(want_idx)]  <= want_idx;
            stat_intervals <= stat_intervals + 1'b1;
            if (want_kind == PQ_LOW)  c_iss_l[p] <= 1'b1;
            if (want_kind == PQ_HIGH) c_iss_h[p] <= 1'b1;
            if (want_kind == PQ_LF)   c_st[p] <= CS_LFWAIT;
          end
          if (conflict) stat_conflicts <= stat_conflicts + 1'b1;
          // both bounds of a character are back: finish the character
          if (phase == PH_ALIGN && cur_st == CS_ALIGN && c_got_l[p] && c_got_h[p]) begin
            c_got_l[p] <= 1'b0; c_got_h[p] <= 1'b0;
            c_iss_l[p] <= 1'b0; c_iss_h[p] <= 1'b0;
            if (c_nl[p] >= c_nh[p]) begin
              c_st[p] <= CS_DONE;            // empty interval: no alignment
              stat_nomatch <= stat_nomatch + 1'b1;
            end else begin
              c_l[p]   <= c_nl[p];
              c_h[p]   <= c_nh[p] - 1'b1;
              c_pos[p] <= cur_pos - 1'b1;
              if (cur_pos == 1) begin
                c_st[p] <= CS_CHECK; c_found[p] <= 1'b1;
                c_hits[p] <= c_nh[p] - c_nl[p];
              end
            end
          end
          // start an SV check
          if (sv_start) begin
            sv_busy <= 1'b1; sv_ctx <= p; c_st[p] <= CS_SVWAIT;
          end
          if (sv_req_valid && sv_req_ready) sv_wait_rsp <= 1'b1;
          if (sv_resp_valid && sv_wait_rsp) begin
            sv_wait_rsp <= 1'b0;
            if (sv_resp_hit) begin
              ssa_pend <= 1'b1; sv_vec <= sv_resp_vec;
              stat_sv_hit <= stat_sv_hit + 1'b1;
            end else begin
              c_st[sv_ctx] <= CS_LF; sv_busy <= 1'b0;
            end
          end
          if (ssa_req_valid && ssa_req_ready) ssa_sent <= 1'b1;
          if (ssa_resp_valid && ssa_sent) begin
            ssa_sent <= 1'b0; ssa_pend <= 1'b0; sv_busy <= 1'b0;
            c_res[sv_ctx] <= ssa_resp_pos;
            c_st[sv_ctx]  <= CS_DONE;
          end
          // PE result
          if (rsp_any) begin
            if (rsp_fix) stat_dollar <= stat_dollar + 1'b1;
            unique case (t_kind[rsp_pe])
              PQ_LOW:  begin c_nl[t_ctx[rsp_pe]] <= rsp_val; c_got_l[t_ctx[rsp_pe]] <= 1'b1; end
              PQ_HIGH: begin c_nh[t_ctx[rsp_pe]] <= rsp_val; c_got_h[t_ctx[rsp_pe]] <= 1'b1; end
              default: begin
                c_l[t_ctx[rsp_pe]]     <= rsp_val - 1'b1;
                c_steps[t_ctx[rsp_pe]] <= c_steps[t_ctx[rsp_pe]] + 1'b1;
                c_st[t_ctx[rsp_pe]]    <= CS_CHECK;
                stat_lf <= stat_lf + 1'b1;
              end
            endcase
          end
          // scan pointer and phase change
          if ((phase == PH_ALIGN && cur_st == CS_ALIGN) ||
              (phase == PH_LOCATE && cur_st inside {CS_CHECK, CS_SVWAIT, CS_LF, CS_LFWAIT}))
            seen <= 1'b1;
          if (advance) begin
            p <= last ? '0 : p + 1'b1;
            if (last) begin
              seen <= 1'b0;
              if (!seen && !((phase == PH_ALIGN && cur_st == CS_ALIGN) ||
                  (phase == PH_LOCATE && cur_st inside {CS_CHECK, CS_SVWAIT, CS_LF, CS_LFWAIT})))
                phase <= (phase == PH_ALIGN) ? PH_LOCATE : PH_DRAIN;
            end
          end
        end
        // -------------------------------------------------------------------
        PH_DRAIN: begin
          if (!(res_valid && !res_ready)) begin
            if (cur_st == CS_DONE) c_st[p] <= CS_FREE;
            p <= last ? '0 : p + 1'b1;
            if (last) begin
              phase <= PH_LOAD; n_ctx <= '0;
              stat_batches <= stat_batches + 1'b1;
            end
          end
        end
        default: phase <= PH_LOAD;
      endcase
    end
  end

  // a PE never answers without an outstanding request
  always_ff @(posedge clk)
    if (rst_n && issue) assert (pe_req_ready[pe_of(want_idx)]) else $error("issue to busy PE");

endmodule
