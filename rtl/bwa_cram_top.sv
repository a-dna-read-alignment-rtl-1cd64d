// bwa_cram_top: BWA-CRAM, an in-memory accelerator for exact DNA short-read
// alignment with the Burrows-Wheeler transform (BWT).
//
// NPE processing elements (pe) each hold 65,536 BWT characters and the
// sampled Occ entries for them, and compute the interval (rank) function
// inside their CRAM tiles. The global controller (bwa_ctrl) keeps a batch of
// read contexts, schedules interval computations on the PEs (runtime
// scheduler), and afterwards turns every aligned interval into a text
// position through the suffix vector (sv_unit, in-memory AND check) and the
// sampled suffix array (ssa_unit), walking back with LF steps on the PEs when
// a row is not sampled.
//
// Host side: everything the accelerator stores is generated off-line and
// written through the load ports (PE tile rows, SV vectors, SSA entries and
// SSA base addresses); bwt_len and primary (row of `$`) are static
// configuration. Reads enter on rd_* (valid/ready), `go` starts a batch,
// results leave on res_* (valid/ready) in context order.
// BWT index layout: PE = idx / 65536, column = (idx % 65536) / 512, slot =
// idx % 512. Default size: 16 PEs (1,048,576 BWT rows); the full human-genome
// configuration needs 45,777 PEs, which is far beyond what can be simulated
// as flip-flops and is left to the NPE parameter.
module bwa_cram_top
  import bwa_pkg::*;
#(
  parameter int NPE    = 16,
  parameter int NBT    = 16,
  parameter int SLOTS  = 32,
  parameter int COLS   = TILE_COLS,
  parameter int OCC_W  = 32,
  parameter int NCTX   = 1000,
  parameter int RLEN   = 100,
  parameter int SA_STEP = 32,
  localparam int OFFW  = $clog2(NBT * SLOTS),
  localparam int LOCW  = OFFW + $clog2(COLS),
  localparam int PEW   = NPE > 1 ? $clog2(NPE) : 1,
  localparam int TW    = $clog2(NBT + 2),
  localparam int SV_LEN = NPE << LOCW,
  localparam int NVEC  = SV_LEN / COLS,
  localparam int VW    = $clog2(NVEC),
  localparam int NSSA  = (SV_LEN + SA_STEP - 1) / SA_STEP,
  localparam int AW    = $clog2(NSSA + 1)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [31:0]            bwt_len,
  input  logic [31:0]            primary,
  // loading
  input  logic                   pe_ld_valid,
  input  logic [PEW-1:0]         pe_ld_pe,
  input  logic [TW-1:0]          pe_ld_tile,
  input  logic [ROW_W-1:0]       pe_ld_row,
  input  logic [COLS-1:0]        pe_ld_data,
  input  logic                   sv_ld_valid,
  input  logic [VW-1:0]          sv_ld_vec,
  input  logic [COLS-1:0]        sv_ld_data,
  input  logic                   ssa_ld_valid,
  input  logic [AW-1:0]          ssa_ld_addr,
  input  logic [31:0]            ssa_ld_data,
  input  logic                   base_ld_valid,
  input  logic [VW-1:0]          base_ld_vec,
  input  logic [AW-1:0]          base_ld_data,
  // reads and results
  input  logic                   rd_valid,
  output logic                   rd_ready,
  input  logic [31:0]            rd_id,
  input  logic [RLEN-1:0][1:0]   rd_bases,
  input  logic                   go,
  output logic                   res_valid,
  input  logic                   res_ready,
  output logic [31:0]            res_id,
  output logic                   res_found,
  output logic [31:0]            res_pos,
  output logic [31:0]            res_hits,
  // statistics
  output logic [31:0]            stat_intervals,
  output logic [31:0]            stat_conflicts,
  output logic [31:0]            stat_nomatch,
  output logic [31:0]            stat_lf,
  output logic [31:0]            stat_sv_hit,
  output logic [31:0]            stat_dollar,
  output logic [31:0]            stat_batches,
  output logic [1:0]             phase
);

  logic [NPE-1:0]             pe_req_valid, pe_req_ready, pe_resp_valid, pe_resp_ready;
  pe_kind_e                   pe_req_kind;
  logic [1:0]                 pe_req_ch;
  logic [LOCW-1:0]            pe_req_loc;
  logic [NPE-1:0][31:0]       pe_resp_val;
  logic [NPE-1:0][1:0]        pe_resp_ch;

  for (genvar q = 0; q < NPE; q++) begin : g_pe
    logic busy;
    pe #(.NBT(NBT), .SLOTS(SLOTS), .COLS(COLS), .OCC_W(OCC_W)) u_pe (
      .clk, .rst_n,
      .ld_valid(pe_ld_valid && pe_ld_pe == PEW'(q)), .ld_tile(pe_ld_tile),
      .ld_row(pe_ld_row), .ld_data(pe_ld_data),
      .req_valid(pe_req_valid[q]), .req_ready(pe_req_ready[q]),
      .req_kind(pe_req_kind), .req_ch(pe_req_ch), .req_loc(pe_req_loc),
      .resp_valid(pe_resp_valid[q]), .resp_ready(pe_resp_ready[q]),
      .resp_val(pe_resp_val[q]), .resp_ch(pe_resp_ch[q]), .busy
    );
  end

  logic                       sv_req_valid, sv_req_ready, sv_resp_valid, sv_resp_ready, sv_resp_hit;
  logic [LOCW+PEW-1:0]        sv_req_idx;
  logic [COLS-1:0]            sv_resp_vec;
  logic                       ssa_req_valid, ssa_req_ready, ssa_resp_valid, ssa_resp_ready;
  logic [VW-1:0]              ssa_req_vec;
  logic [$clog2(COLS)-1:0]    ssa_req_bit;
  logic [COLS-1:0]            ssa_req_bits;
  logic [31:0]                ssa_req_steps, ssa_resp_pos;

  bwa_ctrl #(.NPE(NPE), .LOCW(LOCW), .OFFW(OFFW), .NCTX(NCTX), .RLEN(RLEN),
             .IDXW(32), .VEC_W(COLS), .IDW(32)) u_ctrl (
    .clk, .rst_n, .bwt_len, .primary,
    .rd_valid, .rd_ready, .rd_id, .rd_bases, .go,
    .res_valid, .res_ready, .res_id, .res_found, .res_pos, .res_hits,
    .pe_req_valid, .pe_req_ready, .pe_req_kind, .pe_req_ch, .pe_req_loc,
    .pe_resp_valid, .pe_resp_ready, .pe_resp_val, .pe_resp_ch,
    .sv_req_valid, .sv_req_ready, .sv_req_idx, .sv_resp_valid, .sv_resp_ready,
    .sv_resp_hit, .sv_resp_vec,
    .ssa_req_valid, .ssa_req_ready, .ssa_req_vec, .ssa_req_bit, .ssa_req_bits,
    .ssa_req_steps, .ssa_resp_valid, .ssa_resp_ready, .ssa_resp_pos,
    .stat_intervals, .stat_conflicts, .stat_nomatch, .stat_lf, .stat_sv_hit,
    .stat_dollar, .stat_batches, .phase_o(phase)
  );

  sv_unit #(.SV_LEN(SV_LEN), .VEC_W(COLS)) u_sv (
    .clk, .rst_n, .ld_valid(sv_ld_valid), .ld_vec(sv_ld_vec), .ld_data(sv_ld_data),
    .req_valid(sv_req_valid), .req_ready(sv_req_ready), .req_idx(sv_req_idx),
    .resp_valid(sv_resp_valid), .resp_ready(sv_resp_ready), .resp_hit(sv_resp_hit),
    .resp_vec(sv_resp_vec)
  );

  ssa_unit #(.SV_LEN(SV_LEN), .SA_STEP(SA_STEP), .VEC_W(COLS), .POS_W(32)) u_ssa (
    .clk, .rst_n,
    .ld_ssa_valid(ssa_ld_valid), .ld_ssa_addr(ssa_ld_addr), .ld_ssa_data(ssa_ld_data),
    .ld_base_valid(base_ld_valid), .ld_base_vec(base_ld_vec), .ld_base_data(base_ld_data),
    .req_valid(ssa_req_valid), .req_ready(ssa_req_ready), .req_vec(ssa_req_vec),
    .req_bit(ssa_req_bit), .req_bits(ssa_req_bits), .req_steps(ssa_req_steps),
    .resp_valid(ssa_resp_valid), .resp_ready(ssa_resp_ready), .resp_pos(ssa_resp_pos)
  );

endmodule
