// bwa_pkg: types and constants shared by the BWA-CRAM accelerator.
//
// A CRAM tile is a 2-D array of spintronic cells that can act as memory
// (row read / row write) or compute: a logic gate connects a few input rows
// to one output row, and every enabled column evaluates the gate at once.
// Physically, the current through the input cells grows with the number of
// inputs that hold 0 (low resistance); when it exceeds the switching current
// the output cell flips away from its PRESET value. Every gate is therefore
// described here by (arity, zero-threshold, preset): the output becomes
// ~preset when at least `threshold` inputs are 0, otherwise it keeps its old
// value. The gate set (NAND, NOR, AND, COPY, INV, MAJ3, MAJ5, TH) is the one
// the accelerator uses; the per-gate thresholds and presets follow from the
// gate truth tables (NAND: preset 0, flips unless both inputs are 1; TH:
// 1 when at least three of four inputs are 0).
//
// Character code (2 bits per base): A=0, C=1, G=2, T=3. The terminator `$`
// of the BWT is stored as A; the global controller corrects for it.
package bwa_pkg;

  localparam int TILE_ROWS = 128;          // tile rows (128x128 tiles)
  localparam int TILE_COLS = 128;          // tile columns
  localparam int ROW_W     = $clog2(TILE_ROWS);
  localparam int MAX_IN    = 5;            // widest gate (MAJ5)

  typedef enum logic [2:0] {
    G_NAND, G_NOR, G_AND, G_COPY, G_INV, G_MAJ3, G_MAJ5, G_TH
  } gate_e;

  typedef enum logic [1:0] {
    OP_NOP,    // nothing
    OP_WRITE,  // memory mode: row <= wdata in enabled columns
    OP_READ,   // memory mode: rdata <= row (registered)
    OP_GATE    // logic mode: row <= gate(in_row[]) in enabled columns
  } op_e;

  // One command broadcast to the tiles of a PE (or to a single tile).
  typedef struct packed {
    op_e                              op;
    gate_e                            gate;
    logic [MAX_IN-1:0][ROW_W-1:0]     in_row;   // input rows of a gate
    logic [MAX_IN-1:0]                in_ext;   // input taken from a linked tile
    logic [ROW_W-1:0]                 row;      // output / write / read row
  } cram_cmd_t;

  localparam cram_cmd_t CMD_NOP = '{op: OP_NOP, gate: G_NAND, in_row: '0,
                                    in_ext: '0, row: '0};

  function automatic int gate_arity(gate_e g);
    case (g)
      G_COPY, G_INV: return 1;
      G_MAJ3:        return 3;
      G_TH:          return 4;
      G_MAJ5:        return 5;
      default:       return 2;
    endcase
  endfunction

  // Number of 0-valued inputs needed to switch the output cell.
  function automatic int gate_thresh(gate_e g);
    case (g)
      G_NOR, G_MAJ3: return 2;
      G_MAJ5, G_TH:  return 3;
      default:       return 1;
    endcase
  endfunction

  // Value the output cell must hold before the gate fires.
  function automatic logic gate_preset(gate_e g);
    case (g)
      G_AND, G_COPY, G_MAJ3, G_MAJ5: return 1'b1;
      default:                       return 1'b0;
    endcase
  endfunction

  // Base codes
  localparam logic [1:0] BASE_A = 2'd0, BASE_C = 2'd1, BASE_G = 2'd2, BASE_T = 2'd3;

  // PE request / response
  typedef enum logic [1:0] {
    PQ_LOW,   // interval, exclusive rank (new low index)
    PQ_HIGH,  // interval, inclusive rank (new high index + 1)
    PQ_LF     // read BWT char at index, then inclusive interval with it
  } pe_kind_e;

endpackage
