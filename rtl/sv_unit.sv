// sv_unit: suffix-vector (SV) storage and in-memory membership check.
//
// The SV has one bit per BWT row (F index): 1 when the suffix-array value of
// that row is kept in the sampled suffix array (SSA). It is stored as
// VEC_W-bit vectors, VPT vectors per CRAM tile (126 in a 128x128 tile); the
// two remaining rows of each tile are the query row and the result row.
// A check of F index j (vector v = j / VEC_W, bit b = j % VEC_W, in tile
// v / VPT, row v % VPT) takes these tile commands:
//   0: write the query row with a single 1 at bit b
//   1: preset the result row to 1 (AND preset)
//   2: AND(vector row, query row) -> result row, all columns in parallel
//   3: read the result row; hit = OR of its bits
//   4: read the vector row itself (the SSA address needs its lower bits)
// and answers on the cycle after. One check is in flight at a time.
//
// Loading: ld_valid writes ld_data as SV vector ld_vec (one per clock).
// Interface: req_valid/req_ready with req_idx; resp_valid/resp_ready with
// resp_hit and resp_vec (the whole vector containing the bit).
// The tile organisation (126 vectors + 2 working rows, AND with a one-hot
// query row, read-out of the result) follows the accelerator's SV scheme;
// the step order and the read-back of the vector are this design's choices.
module sv_unit
  import bwa_pkg::*;
#(
  parameter int SV_LEN = 16 * 65536,     // SV bits = BWT rows
  parameter int VEC_W  = TILE_COLS,
  parameter int VPT    = TILE_ROWS - 2,
  localparam int NVEC  = (SV_LEN + VEC_W - 1) / VEC_W,
  localparam int NTILE = (NVEC + VPT - 1) / VPT,
  localparam int IDXW  = $clog2(SV_LEN),
  localparam int VW    = $clog2(NVEC) > 0 ? $clog2(NVEC) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             ld_valid,
  input  logic [VW-1:0]    ld_vec,
  input  logic [VEC_W-1:0] ld_data,
  input  logic             req_valid,
  output logic             req_ready,
  input  logic [IDXW-1:0]  req_idx,
  output logic             resp_valid,
  input  logic             resp_ready,
  output logic             resp_hit,
  output logic [VEC_W-1:0] resp_vec
);

  localparam int QROW = VPT;
  localparam int RROW = VPT + 1;
  localparam int TSW  = NTILE > 1 ? $clog2(NTILE) : 1;

  typedef enum logic [2:0] {V_IDLE, V_RUN, V_RESP} vst_e;
  vst_e               st;
  logic [2:0]         step;
  logic [TSW-1:0]     cur_t;
  logic [ROW_W-1:0]   cur_r;
  logic [VEC_W-1:0]   qvec;

  cram_cmd_t          cmd;
  logic [VEC_W-1:0]   wdata;
  logic [VEC_W-1:0]   rdata [NTILE];

  always_comb begin
    cmd   = CMD_NOP;
    wdata = '0;
    if (ld_valid) begin
      cmd.op  = OP_WRITE;
      cmd.row = ROW_W'(ld_vec % VPT);
      wdata   = ld_data;
    end else if (rst_n && st == V_RUN) begin
      unique case (step)
        3'd0: begin cmd.op = OP_WRITE; cmd.row = ROW_W'(QROW); wdata = qvec; end
        3'd1: begin cmd.op = OP_WRITE; cmd.row = ROW_W'(RROW); wdata = '1; end
        3'd2: begin
          cmd.op = OP_GATE; cmd.gate = G_AND;
          cmd.in_row[0] = cur_r; cmd.in_row[1] = ROW_W'(QROW);
          cmd.row = ROW_W'(RROW);
        end
        3'd3: begin cmd.op = OP_READ; cmd.row = ROW_W'(RROW); end
        3'd4: begin cmd.op = OP_READ; cmd.row = cur_r; end
        default: ;
      endcase
    end
  end

  logic [TSW-1:0] sel_t;
  assign sel_t = ld_valid ? TSW'(ld_vec / VPT) : cur_t;

  for (genvar t = 0; t < NTILE; t++) begin : g_tile
    cram_cmd_t tcmd;
    logic [MAX_IN-1:0][VEC_W-1:0] unused_rows;
    assign tcmd = (sel_t == TSW'(t)) ? cmd : CMD_NOP;
    cram_tile #(.ROWS(TILE_ROWS), .COLS(VEC_W)) u_tile (
      .clk, .en(sel_t == TSW'(t)), .cmd(tcmd), .col_en('1), .wdata,
      .ext_in('0), .rd_rows(unused_rows), .rdata(rdata[t])
    );
  end

  assign req_ready  = (st == V_IDLE) && !ld_valid;
  assign resp_valid = (st == V_RESP);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= V_IDLE; step <= '0; cur_t <= '0; cur_r <= '0; qvec <= '0;
      resp_hit <= 1'b0; resp_vec <= '0;
    end else begin
      unique case (st)
        V_IDLE: if (req_valid && !ld_valid) begin
          cur_t <= TSW'((req_idx / VEC_W) / VPT);
          cur_r <= ROW_W'((req_idx / VEC_W) % VPT);
          qvec  <= VEC_W'(1) << (req_idx % VEC_W);
          step  <= '0;
          st    <= V_RUN;
        end
        V_RUN: begin
          step <= step + 1'b1;
          if (step == 3'd4) resp_hit <= |rdata[cur_t];
          if (step == 3'd5) begin
            resp_vec <= rdata[cur_t];
            st <= V_RESP;
          end
        end
        V_RESP: if (resp_ready) st <= V_IDLE;
        default: st <= V_IDLE;
      endcase
    end
  end

endmodule
