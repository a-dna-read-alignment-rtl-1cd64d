// cram_tile: functional model of one CRAM tile (default 128 rows x 128 columns).
//
// The tile is a bit array that works in two modes. In memory mode a whole row
// is written (only the enabled columns change) or read into the registered
// rdata output, as through the tile's row decoder and sense amplifiers. In
// logic mode the cells of up to five input rows drive one output row in every
// enabled column at the same time (column parallelism). The output cell
// switches to ~preset when the number of 0-valued inputs reaches the gate's
// threshold and otherwise keeps what it held, so a gate only gives its Boolean
// function if the controller wrote the PRESET value into the output row first
// (bwa_pkg lists arity, threshold and preset per gate). An assertion flags a
// gate whose output cells were not preset, or whose output row is also one of
// its inputs.
//
// Inputs flagged in cmd.in_ext come from ext_in instead of the local rows:
// this models the transistors that join the columns of adjacent tiles, so a
// gate can take operands from another tile. rd_rows shows the contents of the
// rows named in cmd.in_row, for a linked tile to use.
//
// Timing: one command per clock; writes and gates update at the clock edge,
// a READ presents the row on rdata one cycle later. `en` gates the whole tile.
// The threshold/preset model of the gates and the mode encoding are this
// design's reading of the cell physics; sizes follow the 128x128 tiles used
// for the PEs and the suffix-vector storage.
module cram_tile
  import bwa_pkg::*;
#(
  parameter int ROWS = TILE_ROWS,
  parameter int COLS = TILE_COLS
) (
  input  logic                              clk,
  input  logic                              en,
  input  cram_cmd_t                         cmd,
  input  logic [COLS-1:0]                   col_en,
  input  logic [COLS-1:0]                   wdata,
  input  logic [MAX_IN-1:0][COLS-1:0]       ext_in,
  output logic [MAX_IN-1:0][COLS-1:0]       rd_rows,
  output logic [COLS-1:0]                   rdata
);

  logic [COLS-1:0] mem [ROWS];

  // rows addressed by the gate inputs (also seen by linked tiles)
  always_comb begin
    for (int k = 0; k < MAX_IN; k++) rd_rows[k] = mem[cmd.in_row[k]];
  end

  // Gate evaluation, bit-sliced over all columns: z[k] marks the columns
  // where input k holds 0; a small adder tree counts the zeros per column
  // (cnt2:cnt1:cnt0) and `fire` compares that count with the threshold.
  logic [MAX_IN-1:0][COLS-1:0] gin, z;
  logic [COLS-1:0] s01, c01, cnt0, cnt1, cnt2, c34, s34, c_lo;
  logic [COLS-1:0] fire, old_row, gate_out;
  always_comb begin
    for (int k = 0; k < MAX_IN; k++) begin
      gin[k] = cmd.in_ext[k] ? ext_in[k] : rd_rows[k];
      z[k]   = (k < gate_arity(cmd.gate)) ? ~gin[k] : '0;
    end
    s01  = z[0] ^ z[1] ^ z[2];
    c01  = (z[0] & z[1]) | (z[0] & z[2]) | (z[1] & z[2]);
    s34  = z[3] ^ z[4];
    c34  = z[3] & z[4];
    cnt0 = s01 ^ s34;
    c_lo = s01 & s34;
    cnt1 = c01 ^ c34 ^ c_lo;
    cnt2 = (c01 & c34) | (c01 & c_lo) | (c34 & c_lo);
    unique case (gate_thresh(cmd.gate))
      1:       fire = cnt0 | cnt1 | cnt2;
      2:       fire = cnt1 | cnt2;
      default: fire = cnt2 | (cnt1 & cnt0);
    endcase
    old_row  = mem[cmd.row];
    gate_out = gate_preset(cmd.gate) ? (old_row & ~fire) : (old_row | fire);
  end

  always_ff @(posedge clk) begin
    if (en) begin
      unique case (cmd.op)
        OP_WRITE: mem[cmd.row] <= (mem[cmd.row] & ~col_en) | (wdata & col_en);
        OP_GATE:  mem[cmd.row] <= (mem[cmd.row] & ~col_en) | (gate_out & col_en);
        OP_READ:  rdata <= mem[cmd.row];
        default: ;
      endcase
    end
  end

  // Rules of logic mode: output preset, output distinct from local inputs.
  always_ff @(posedge clk) begin
    if (en && cmd.op == OP_GATE) begin
      assert (((mem[cmd.row] ^ {COLS{gate_preset(cmd.gate)}}) & col_en) == '0)
        else $error("cram_tile: gate output row %0d not preset", cmd.row);
      for (int k = 0; k < MAX_IN; k++)
        if (k < gate_arity(cmd.gate) && !cmd.in_ext[k])
          assert (cmd.in_row[k] != cmd.row)
            else $error("cram_tile: row %0d is input and output", cmd.row);
    end
  end

endmodule
