// ssa_unit: sampled suffix array (SSA) storage and access.
//
// The SSA keeps the suffix-array value of every BWT row whose text position is
// a multiple of the sampling step (32), in row order. Which rows are kept is
// recorded by the suffix vector (see sv_unit); the SSA entry of a kept row j
// sits at address base[v] + (number of kept rows in vector v below bit b),
// with v = j / VEC_W and b = j % VEC_W. base[] holds, per SV vector, the
// number of kept rows before it and is generated with the SSA by the host.
// The unit returns SSA[address] + steps, where steps is the number of LF
// (interval) iterations the controller walked back to reach a kept row.
//
// Interface: req_valid/req_ready with {vec, bit, vector bits, steps};
// resp_valid/resp_ready with the text position, two cycles after the request.
// Loading: ld_ssa_valid writes one entry, ld_base_valid one base value.
// Accesses are serialised, one at a time. The base table and the address
// arithmetic are this design's choice; the document only says that the SSA
// is sampled every 32nd text position and addressed through the SV.
module ssa_unit
  import bwa_pkg::*;
#(
  parameter int SV_LEN = 16 * 65536,
  parameter int SA_STEP = 32,
  parameter int VEC_W  = TILE_COLS,
  parameter int POS_W  = 32,
  localparam int NSSA  = (SV_LEN + SA_STEP - 1) / SA_STEP,
  localparam int NVEC  = (SV_LEN + VEC_W - 1) / VEC_W,
  localparam int AW    = $clog2(NSSA + 1),
  localparam int VW    = $clog2(NVEC) > 0 ? $clog2(NVEC) : 1,
  localparam int BW    = $clog2(VEC_W)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             ld_ssa_valid,
  input  logic [AW-1:0]    ld_ssa_addr,
  input  logic [POS_W-1:0] ld_ssa_data,
  input  logic             ld_base_valid,
  input  logic [VW-1:0]    ld_base_vec,
  input  logic [AW-1:0]    ld_base_data,
  input  logic             req_valid,
  output logic             req_ready,
  input  logic [VW-1:0]    req_vec,
  input  logic [BW-1:0]    req_bit,
  input  logic [VEC_W-1:0] req_bits,
  input  logic [POS_W-1:0] req_steps,
  output logic             resp_valid,
  input  logic             resp_ready,
  output logic [POS_W-1:0] resp_pos
);

  logic [POS_W-1:0] ssa  [NSSA];
  logic [AW-1:0]    base [NVEC];

  typedef enum logic [1:0] {A_IDLE, A_READ, A_RESP} ast_e;
  ast_e             st;
  logic [AW-1:0]    addr;
  logic [POS_W-1:0] steps;
  logic [POS_W-1:0] sa_val;

  // kept rows of the vector below the queried bit
  logic [VEC_W-1:0] below;
  logic [BW:0]      rank;
  always_comb begin
    below = req_bits & ((VEC_W'(1) << req_bit) - VEC_W'(1));
    rank  = '0;
    for (int c = 0; c < VEC_W; c++) rank += (BW + 1)'(below[c]);
  end

  always_ff @(posedge clk) begin
    if (ld_ssa_valid)  ssa[ld_ssa_addr]  <= ld_ssa_data;
    if (ld_base_valid) base[ld_base_vec] <= ld_base_data;
    sa_val <= ssa[addr];
  end

  assign req_ready  = (st == A_IDLE);
  assign resp_valid = (st == A_RESP);
  assign resp_pos   = sa_val + steps;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= A_IDLE; addr <= '0; steps <= '0;
    end else begin
      unique case (st)
        A_IDLE: if (req_valid) begin
          addr  <= base[req_vec] + AW'(rank);
          steps <= req_steps;
          st    <= A_READ;
        end
        A_READ: st <= A_RESP;
        A_RESP: if (resp_ready) st <= A_IDLE;
        default: st <= A_IDLE;
      endcase
    end
  end

endmodule
