// pe: processing element of the BWA-CRAM accelerator.
//
// A PE holds one segment of the BWT (NBT*SLOTS*COLS characters, 65,536 at the
// default size) in NBT CRAM tiles, plus two tiles for the sampled Occ table:
// the first holds, per column, the four Count-augmented Occ entries (OCC_W
// bits each) valid at the first character of that column; the second is the
// work tile in which the final addition is done. Characters are stored
// column-major: column c of the PE covers characters c*SAMPLE .. c*SAMPLE +
// SAMPLE-1 of the segment, tile t holding slots t*SLOTS .. t*SLOTS+SLOTS-1 of
// them, so the Occ table is sampled once per column (every 512 characters).
// pe_ctrl sequences the in-memory interval computation; this module wires the
// tiles, including the column links that let a tile read rows of the tile
// `link_dist` places further on (modulo NBT+2).
//
// Loading: while the PE is idle, ld_valid writes ld_data into row ld_row of
// tile ld_tile (all columns), one row per clock. Requests and responses use
// valid/ready handshakes (see pe_ctrl); a request takes about 2.8k cycles.
module pe
  import bwa_pkg::*;
#(
  parameter int NBT   = 16,
  parameter int SLOTS = 32,
  parameter int COLS  = TILE_COLS,
  parameter int OCC_W = 32,
  localparam int NT   = NBT + 2,
  localparam int TW   = $clog2(NT),
  localparam int LOCW = $clog2(NBT * SLOTS) + $clog2(COLS)
) (
  input  logic              clk,
  input  logic              rst_n,
  // row loading
  input  logic              ld_valid,
  input  logic [TW-1:0]     ld_tile,
  input  logic [ROW_W-1:0]  ld_row,
  input  logic [COLS-1:0]   ld_data,
  // interval requests
  input  logic              req_valid,
  output logic              req_ready,
  input  pe_kind_e          req_kind,
  input  logic [1:0]        req_ch,
  input  logic [LOCW-1:0]   req_loc,
  output logic              resp_valid,
  input  logic              resp_ready,
  output logic [OCC_W-1:0]  resp_val,
  output logic [1:0]        resp_ch,
  output logic              busy
);

  cram_cmd_t               c_cmd, t_cmd;
  logic [NT-1:0]           c_en, t_en;
  logic [COLS-1:0]         c_col, c_wdata, t_col, t_wdata;
  logic [TW-1:0]           link_dist, rd_tile;
  logic [$clog2(COLS)-1:0] rd_col;
  logic                    rbit;
  logic                    ctl_ready;

  logic [MAX_IN-1:0][COLS-1:0] rd_rows [NT];
  logic [MAX_IN-1:0][COLS-1:0] ext_in  [NT];
  logic [COLS-1:0]             rdata   [NT];

  pe_ctrl #(.NBT(NBT), .SLOTS(SLOTS), .COLS(COLS), .OCC_W(OCC_W)) u_ctrl (
    .clk, .rst_n,
    .req_valid(req_valid && !ld_valid), .req_ready(ctl_ready),
    .req_kind, .req_ch, .req_loc,
    .resp_valid, .resp_ready, .resp_val, .resp_ch,
    .cmd(c_cmd), .tile_en(c_en), .col_en(c_col), .wdata(c_wdata),
    .link_dist, .rd_tile, .rd_col, .rbit, .busy
  );

  assign req_ready = ctl_ready && !ld_valid;

  // host row writes take the tiles while the controller is idle
  always_comb begin
    if (ld_valid) begin
      t_cmd   = '{op: OP_WRITE, gate: G_NAND, in_row: '0, in_ext: '0, row: ld_row};
      t_en    = '0;
      t_en[ld_tile] = 1'b1;
      t_col   = '1;
      t_wdata = ld_data;
    end else begin
      t_cmd = c_cmd; t_en = c_en; t_col = c_col; t_wdata = c_wdata;
    end
  end

  for (genvar t = 0; t < NT; t++) begin : g_tile
    localparam int SRC0 = t;
    always_comb begin
      int src;
      src = SRC0 + int'(link_dist);
      if (src >= NT) src -= NT;
      ext_in[t] = rd_rows[src];
    end
    cram_tile #(.ROWS(TILE_ROWS), .COLS(COLS)) u_tile (
      .clk, .en(t_en[t]), .cmd(t_cmd), .col_en(t_col), .wdata(t_wdata),
      .ext_in(ext_in[t]), .rd_rows(rd_rows[t]), .rdata(rdata[t])
    );
  end

  assign rbit = rdata[rd_tile][rd_col];

  always_ff @(posedge clk)
    if (rst_n) assert (!(ld_valid && busy)) else $error("pe: row load while busy");

endmodule
