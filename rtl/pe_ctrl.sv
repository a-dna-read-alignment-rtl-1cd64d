// pe_ctrl: local controller of a processing element (PE).
//
// It runs the interval function for one BWT index as a sequence of
// memory-mode writes and logic-mode gates on the PE's tiles, one command per
// clock, all in the single tile column that holds the index:
//   1. (LF requests only) read the 2-bit BWT character at the index.
//   2. CMP:  for each of the SLOTS character slots of a tile, XOR both bits
//      of the stored character with the queried character's alphabet rows
//      (NOR, COPY, COPY, TH) and NOR the two XOR bits into that slot's Score
//      row. All BWT tiles work in parallel; a slot's Score bit is only
//      produced in tiles whose slot lies before the index (or at it, for an
//      inclusive rank), so the other Score rows stay 0.
//   3. CLR:  clear the two ping-pong accumulator banks and the zero row of the
//      work tile.
//   4. PCNT: population count of the Score rows: each Score bit is added into
//      the accumulator with a ripple of in-memory full adders
//      (Cout = MAJ3, two INV copies of ~Cout, Sum = MAJ5), in all tiles at once.
//   5. RED:  a log2(NBT)-level tree adds the tile counts across tiles through
//      the column links between tiles.
//   6. MOVE: copy the PE-wide count into the work tile (second Occ tile).
//   7. ADD:  add the count to the sampled, Count-augmented Occ entry of the
//      queried character (first Occ tile) with OCC_W full adders.
//   8. READ: read the OCC_W result bits out with row reads and respond.
// Every gate is preceded by the write of its PRESET value to the output row.
// The result is Occ'[col][ch] + matches, where Occ' already includes Count.
//
// Row map of a BWT tile (defaults): slot k at rows 2k (high bit) and 2k+1;
// alphabet A,C,G,T at rows 64..71 (row 64, the high bit of A, doubles as an
// all-zero row); Score rows 72..103; accumulator banks 104..113 and
// 114..123 (bank 1 also serves as XOR scratch during CMP); carry rows 124,
// 125; adder scratch rows 126, 127. Occ tile: OCC_W rows per character.
// Work tile: count 0..CNT_W-1, zero row, carries, adder scratch, result
// rows from 32.
//
// The compare-then-add scheme, the tile counts and the Occ layout follow the
// accelerator's description; the row map, the serial popcount, the tree
// reduction and the step order are this design's choices. About 2.8k cycles
// per request at the default size.
//
// Interface: req_valid/req_ready handshake accepts {kind, ch, loc}; loc is the
// index inside this PE (column = loc / (NBT*SLOTS), offset = loc % (NBT*SLOTS)).
// resp_valid/resp_ready returns the result and the character used.
module pe_ctrl
  import bwa_pkg::*;
#(
  parameter int NBT   = 16,     // BWT tiles per PE
  parameter int SLOTS = 32,     // characters per tile column
  parameter int COLS  = TILE_COLS,
  parameter int OCC_W = 32,     // width of a sampled Occ entry
  localparam int NT    = NBT + 2,
  localparam int SAMPLE = NBT * SLOTS,        // Occ sampling interval
  localparam int OFFW  = $clog2(SAMPLE),
  localparam int COLW  = $clog2(COLS),
  localparam int LOCW  = OFFW + COLW,
  localparam int TW    = $clog2(NT),
  localparam int CNT_W = OFFW + 1,
  localparam int PW    = $clog2(SLOTS) + 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              req_valid,
  output logic              req_ready,
  input  pe_kind_e          req_kind,
  input  logic [1:0]        req_ch,
  input  logic [LOCW-1:0]   req_loc,
  output logic              resp_valid,
  input  logic              resp_ready,
  output logic [OCC_W-1:0]  resp_val,
  output logic [1:0]        resp_ch,
  // to the tiles
  output cram_cmd_t         cmd,
  output logic [NT-1:0]     tile_en,
  output logic [COLS-1:0]   col_en,
  output logic [COLS-1:0]   wdata,
  output logic [TW-1:0]     link_dist,     // linked tile = (tile + dist) mod NT
  output logic [TW-1:0]     rd_tile,  // tile whose rdata is sampled
  output logic [COLW-1:0]   rd_col,
  input  logic              rbit,     // rdata[rd_col] of tile rd_tile
  output logic              busy
);

  localparam int OCC_T = NBT;
  localparam int WK_T  = NBT + 1;
  localparam int LV    = $clog2(NBT);
  // BWT tile rows
  localparam int ALPH  = 2 * SLOTS;
  localparam int ZERO  = ALPH;
  localparam int SCORE = ALPH + 8;
  localparam int ACC0  = SCORE + SLOTS;
  localparam int CARRY = ACC0 + 2 * CNT_W;
  localparam int S1    = CARRY + 2;
  localparam int S2    = CARRY + 3;
  localparam int XT1 = ACC0 + CNT_W, XT2 = XT1 + 1, XT3 = XT1 + 2, XX1 = XT1 + 3, XX0 = XT1 + 4;
  // work tile rows
  localparam int WZERO = CNT_W;
  localparam int WCAR  = CNT_W + 1;
  localparam int WS1   = CNT_W + 3;
  localparam int WS2   = CNT_W + 4;
  localparam int WRES  = 32;

  initial begin
    assert (S2 < TILE_ROWS) else $fatal(1, "pe_ctrl: BWT tile rows overflow");
    assert (4 * OCC_W <= TILE_ROWS && WRES + OCC_W <= TILE_ROWS && WS2 < WRES)
      else $fatal(1, "pe_ctrl: Occ/work tile rows overflow");
    assert ((1 << LV) == NBT) else $fatal(1, "pe_ctrl: NBT must be a power of 2");
  end

  typedef enum logic [3:0] {
    S_IDLE, S_GETCH, S_CMP, S_CLR, S_PCNT, S_RED, S_MOVE, S_ADD, S_READ, S_RESP
  } st_e;

  st_e               st;
  logic [4:0]        s;        // sub-step
  logic [7:0]        i;        // bit index
  logic [7:0]        k;        // slot / level
  logic              bank;
  logic              incl;
  logic [1:0]        ch;
  logic [COLW-1:0]   col;
  logic [OFFW-1:0]   off;
  logic [OCC_W-1:0]  res;

  // ---- command builders ----------------------------------------------------
  function automatic cram_cmd_t c_write(int row);
    cram_cmd_t c;
    c = '{op: OP_WRITE, gate: G_NAND, in_row: '0, in_ext: '0, row: ROW_W'(row)};
    return c;
  endfunction

  function automatic cram_cmd_t c_gate(gate_e g, int r0, int r1, int r2, int r3, int r4,
                                       logic [MAX_IN-1:0] ext, int row);
    cram_cmd_t c;
    c.op = OP_GATE;
    c.gate = g;
    c.in_row[0] = ROW_W'(r0);
    c.in_row[1] = ROW_W'(r1);
    c.in_row[2] = ROW_W'(r2);
    c.in_row[3] = ROW_W'(r3);
    c.in_row[4] = ROW_W'(r4);
    c.in_ext = ext;
    c.row = ROW_W'(row);
    return c;
  endfunction

  function automatic cram_cmd_t c_read(int row);
    cram_cmd_t c;
    c = '{op: OP_READ, gate: G_NAND, in_row: '0, in_ext: '0, row: ROW_W'(row)};
    return c;
  endfunction

  // 8-step XOR: T1=NOR(a,b); T2=T3=COPY(T1); out=TH(a,b,T2,T3)
  function automatic cram_cmd_t xor_step(int st8, int a, int b, int o);
    case (st8)
      0: return c_write(XT1);
      1: return c_gate(G_NOR, a, b, 0, 0, 0, '0, XT1);
      2: return c_write(XT2);
      3: return c_gate(G_COPY, XT1, 0, 0, 0, 0, '0, XT2);
      4: return c_write(XT3);
      5: return c_gate(G_COPY, XT1, 0, 0, 0, 0, '0, XT3);
      6: return c_write(o);
      default: return c_gate(G_TH, a, b, XT2, XT3, 0, '0, o);
    endcase
  endfunction

  // 8-step full adder: Cout=MAJ3(a,b,ci); S1=S2=INV(Cout); Sum=MAJ5(a,b,ci,S1,S2)
  function automatic cram_cmd_t fa_step(int st8, int a, logic ae, int b, logic be, int ci,
                                        int co, int sm, int s1, int s2);
    logic [MAX_IN-1:0] e;
    e = {3'b000, be, ae};
    case (st8)
      0: return c_write(co);
      1: return c_gate(G_MAJ3, a, b, ci, 0, 0, e, co);
      2: return c_write(s1);
      3: return c_gate(G_INV, co, 0, 0, 0, 0, '0, s1);
      4: return c_write(s2);
      5: return c_gate(G_INV, co, 0, 0, 0, 0, '0, s2);
      6: return c_write(sm);
      default: return c_gate(G_MAJ5, a, b, ci, s1, s2, e, sm);
    endcase
  endfunction

  // preset value written by the even steps of both sequences
  function automatic logic step_wval(int st8, logic is_fa);
    if (is_fa) return (st8 == 0 || st8 == 6);
    else       return (st8 == 2 || st8 == 4);
  endfunction

  function automatic int acc(logic b, int bit_i);
    return ACC0 + (b ? CNT_W : 0) + bit_i;
  endfunction

  // ---- command generation -------------------------------------------------
  logic [NBT-1:0] bwt_all;
  logic [NBT-1:0] slot_en;
  logic           wval;
  always_comb begin
    bwt_all = '1;
    for (int t = 0; t < NBT; t++) begin
      int p;
      p = t * SLOTS + int'(k);
      slot_en[t] = (p < int'(off)) || (incl && p == int'(off));
    end
    cmd     = CMD_NOP;
    tile_en = '0;
    wval    = 1'b0;
    link_dist = '0;
    rd_tile = '0;
    // no tile command until reset has been seen (state may power up random)
    if (rst_n) unique case (st)
      S_GETCH: begin
        rd_tile = TW'(off / SLOTS);
        tile_en[off / SLOTS] = 1'b1;
        if (s == 0) cmd = c_read(2 * (off % SLOTS));
        else if (s == 1) cmd = c_read(2 * (off % SLOTS) + 1);
      end
      S_CMP: begin
        tile_en[NBT-1:0] = bwt_all;
        if (s < 8) begin
          cmd  = xor_step(int'(s), 2 * int'(k), ALPH + 2 * int'(ch), XX1);
          wval = step_wval(int'(s), 1'b0);
        end else if (s < 16) begin
          cmd  = xor_step(int'(s) - 8, 2 * int'(k) + 1, ALPH + 2 * int'(ch) + 1, XX0);
          wval = step_wval(int'(s) - 8, 1'b0);
        end else if (s == 16) begin
          cmd  = c_write(SCORE + int'(k));
          wval = 1'b0;
        end else begin
          cmd = c_gate(G_NOR, XX1, XX0, 0, 0, 0, '0, SCORE + int'(k));
          tile_en[NBT-1:0] = slot_en;
        end
      end
      S_CLR: begin
        if (int'(i) < 2 * CNT_W) begin
          tile_en[NBT-1:0] = bwt_all;
          cmd = c_write(ACC0 + int'(i));
        end else begin
          tile_en[WK_T] = 1'b1;
          cmd = c_write(WZERO);
        end
      end
      S_PCNT: begin
        tile_en[NBT-1:0] = bwt_all;
        wval = step_wval(int'(s), 1'b1);
        if (i == 0)
          cmd = fa_step(int'(s), acc(bank, 0), 1'b0, SCORE + int'(k), 1'b0, ZERO,
                        CARRY, acc(!bank, 0), S1, S2);
        else
          cmd = fa_step(int'(s), acc(bank, int'(i)), 1'b0, ZERO, 1'b0,
                        CARRY + ((int'(i) - 1) & 1), CARRY + (int'(i) & 1),
                        acc(!bank, int'(i)), S1, S2);
      end
      S_RED: begin
        for (int t = 0; t < NBT; t++)
          tile_en[t] = ((t % (2 << k)) == 0);
        link_dist = TW'(1 << k);
        wval = step_wval(int'(s), 1'b1);
        cmd  = fa_step(int'(s), acc(bank, int'(i)), 1'b0, acc(bank, int'(i)), 1'b1,
                       (i == 0) ? ZERO : CARRY + ((int'(i) - 1) & 1), CARRY + (int'(i) & 1),
                       acc(!bank, int'(i)), S1, S2);
      end
      S_MOVE: begin
        tile_en[WK_T] = 1'b1;
        link_dist = TW'(NT - WK_T);
        if (s == 0) begin
          cmd  = c_write(int'(i));
          wval = 1'b1;
        end else begin
          cmd = c_gate(G_COPY, acc(bank, int'(i)), 0, 0, 0, 0, 5'b00001, int'(i));
        end
      end
      S_ADD: begin
        tile_en[WK_T] = 1'b1;
        link_dist = TW'(NT - 1);                   // work tile -> Occ tile
        wval = step_wval(int'(s), 1'b1);
        cmd  = fa_step(int'(s), int'(ch) * OCC_W + int'(i), 1'b1,
                       (int'(i) < CNT_W) ? int'(i) : WZERO, 1'b0,
                       (i == 0) ? WZERO : WCAR + ((int'(i) - 1) & 1), WCAR + (int'(i) & 1),
                       WRES + int'(i), WS1, WS2);
      end
      S_READ: begin
        rd_tile = TW'(WK_T);
        tile_en[WK_T] = 1'b1;
        if (int'(i) < OCC_W) cmd = c_read(WRES + int'(i));
      end
      default: ;
    endcase
    col_en = '0;
    col_en[col] = 1'b1;
    wdata = {COLS{wval}};
  end

  assign rd_col     = col;
  assign req_ready  = (st == S_IDLE);
  assign busy       = (st != S_IDLE);
  assign resp_valid = (st == S_RESP);
  assign resp_val   = res;
  assign resp_ch    = ch;

  // ---- sequencing -----------------------------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; s <= '0; i <= '0; k <= '0; bank <= 1'b0;
      incl <= 1'b0; ch <= '0; col <= '0; off <= '0; res <= '0;
    end else begin
      unique case (st)
        S_IDLE: if (req_valid) begin
          col  <= req_loc[LOCW-1:OFFW];
          off  <= req_loc[OFFW-1:0];
          ch   <= req_ch;
          incl <= (req_kind != PQ_LOW);
          s <= '0; i <= '0; k <= '0; bank <= 1'b0;
          st <= (req_kind == PQ_LF) ? S_GETCH : S_CMP;
        end
        S_GETCH: begin
          // rdata of a READ is seen one cycle after it is issued
          s <= s + 1'b1;
          if (s == 1) ch[1] <= rbit;
          if (s == 2) begin
            ch[0] <= rbit;
            s <= '0;
            st <= S_CMP;
          end
        end
        S_CMP: begin
          if (s == 17) begin
            s <= '0;
            if (int'(k) == SLOTS - 1) begin k <= '0; i <= '0; st <= S_CLR; end
            else k <= k + 1'b1;
          end else s <= s + 1'b1;
        end
        S_CLR: begin
          if (int'(i) == 2 * CNT_W) begin i <= '0; k <= '0; st <= S_PCNT; end
          else i <= i + 1'b1;
        end
        S_PCNT: begin
          if (s == 7) begin
            s <= '0;
            if (int'(i) == PW - 1) begin
              i <= '0;
              bank <= !bank;
              if (int'(k) == SLOTS - 1) begin
                k <= '0;
                st <= (LV == 0) ? S_MOVE : S_RED;
              end else k <= k + 1'b1;
            end else i <= i + 1'b1;
          end else s <= s + 1'b1;
        end
        S_RED: begin
          if (s == 7) begin
            s <= '0;
            if (int'(i) == CNT_W - 1) begin
              i <= '0;
              bank <= !bank;
              if (int'(k) == LV - 1) begin k <= '0; st <= S_MOVE; end
              else k <= k + 1'b1;
            end else i <= i + 1'b1;
          end else s <= s + 1'b1;
        end
        S_MOVE: begin
          if (s == 1) begin
            s <= '0;
            if (int'(i) == CNT_W - 1) begin i <= '0; st <= S_ADD; end
            else i <= i + 1'b1;
          end else s <= s + 1'b1;
        end
        S_ADD: begin
          if (s == 7) begin
            s <= '0;
            if (int'(i) == OCC_W - 1) begin i <= '0; st <= S_READ; end
            else i <= i + 1'b1;
          end else s <= s + 1'b1;
        end
        S_READ: begin
          if (i != 0) res[i-1] <= rbit;
          if (int'(i) == OCC_W) begin i <= '0; st <= S_RESP; end
          else i <= i + 1'b1;
        end
        S_RESP: if (resp_ready) st <= S_IDLE;
        default: st <= S_IDLE;
      endcase
    end
  end

endmodule
