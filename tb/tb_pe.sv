// tb_pe: self-checking test of one processing element at its default size
// (16 BWT tiles x 32 slots x 128 columns = 65,536 characters).
// It loads a random BWT segment, the alphabet rows, Count-augmented Occ
// samples and random scratch rows, then issues LOW (exclusive rank), HIGH
// (inclusive rank) and LF (read character, inclusive rank) requests at random
// and edge offsets. Each result is compared with Occ'[col][ch] + number of
// matches in the column prefix, computed here from the loaded data, and the
// latency is compared with the controller's fixed step count.
module tb_pe;
  import bwa_pkg::*;
  localparam int NBT = 16, SLOTS = 32, COLS = 128, OCC_W = 32;
  localparam int SAMPLE = NBT * SLOTS, NCH = SAMPLE * COLS, NT = NBT + 2;
  localparam int LAT = 1 + 32 * 18 + 21 + 32 * 6 * 8 + 4 * 10 * 8 + 20 + 32 * 8 + 33;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic              ld_valid;
  logic [4:0]        ld_tile;
  logic [6:0]        ld_row;
  logic [COLS-1:0]   ld_data;
  logic              req_valid, req_ready, resp_valid, resp_ready, busy;
  pe_kind_e          req_kind;
  logic [1:0]        req_ch, resp_ch;
  logic [15:0]       req_loc;
  logic [OCC_W-1:0]  resp_val;

  pe dut (.*);

  logic [1:0]  bwt [NCH];
  logic [31:0] occ [COLS][4];
  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic tile_bit(int t, int r, int c);
    if (t < NBT) begin
      if (r < 2 * SLOTS) begin
        logic [1:0] ch;
        ch = bwt[c * SAMPLE + t * SLOTS + r / 2];
        return (r % 2 == 0) ? ch[1] : ch[0];
      end else if (r < 2 * SLOTS + 8) begin
        logic [1:0] a;
        a = 2'((r - 2 * SLOTS) / 2);
        return (r % 2 == 0) ? a[1] : a[0];
      end
      return 1'($urandom);
    end else if (t == NBT) begin
      return occ[c][r / OCC_W][r % OCC_W];
    end
    return 1'($urandom);
  endfunction

  task automatic run(pe_kind_e kind, logic [1:0] ch, int loc);
    int col, off, n, t0, lat;
    logic [1:0] use_ch;
    logic [31:0] exp;
    col = loc / SAMPLE;
    off = loc % SAMPLE;
    use_ch = (kind == PQ_LF) ? bwt[loc] : ch;
    n = 0;
    for (int p = 0; p < SAMPLE; p++)
      if ((p < off || (kind != PQ_LOW && p == off)) && bwt[col * SAMPLE + p] == use_ch) n++;
    exp = occ[col][use_ch] + 32'(n);
    @(negedge clk);
    req_valid = 1; req_kind = kind; req_ch = ch; req_loc = 16'(loc);
    @(posedge clk);
    while (!req_ready) @(posedge clk);
    t0 = cyc;
    @(negedge clk) req_valid = 0;
    while (!resp_valid) @(posedge clk);
    lat = cyc - t0;
    checks++;
    if (resp_val !== exp || resp_ch !== use_ch) begin
      failures++;
      $display("FAIL kind=%s loc=%0d ch=%0d: got %0d/%0d exp %0d/%0d", kind.name(), loc, ch,
               resp_val, resp_ch, exp, use_ch);
    end
    checks++;
    if (lat != LAT + ((kind == PQ_LF) ? 3 : 0)) begin
      failures++;
      $display("FAIL latency %0d, expected %0d", lat, LAT + ((kind == PQ_LF) ? 3 : 0));
    end
    @(negedge clk) resp_ready = 1;
    @(negedge clk) resp_ready = 0;
  endtask

  initial begin
    int base [4];
    int run_cnt [4];
    ld_valid = 0; req_valid = 0; resp_ready = 0; ld_tile = '0; ld_row = '0; ld_data = '0;
    req_kind = PQ_LOW; req_ch = '0; req_loc = '0;
    for (int j = 0; j < NCH; j++) bwt[j] = 2'($urandom);
    base[0] = 1 + int'($urandom % 1000);
    for (int a = 1; a < 4; a++) base[a] = base[a-1] + int'($urandom % 100000);
    run_cnt = '{0, 0, 0, 0};
    for (int c = 0; c < COLS; c++) begin
      for (int a = 0; a < 4; a++) occ[c][a] = 32'(base[a] + run_cnt[a]);
      for (int p = 0; p < SAMPLE; p++) run_cnt[bwt[c * SAMPLE + p]]++;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < NT; t++)
      for (int r = 0; r < TILE_ROWS; r++) begin
        @(negedge clk);
        ld_valid = 1; ld_tile = 5'(t); ld_row = 7'(r);
        for (int c = 0; c < COLS; c++) ld_data[c] = tile_bit(t, r, c);
      end
    @(negedge clk) ld_valid = 0;
    // edge cases
    run(PQ_LOW, 2'd0, 0);
    run(PQ_HIGH, 2'd1, 0);
    run(PQ_HIGH, 2'd3, SAMPLE - 1);
    run(PQ_LOW, 2'd2, NCH - 1);
    run(PQ_HIGH, 2'd2, NCH - 1);
    run(PQ_LF, 2'd0, 31 * SAMPLE + 32);
    for (int n = 0; n < 10; n++)
      run(pe_kind_e'($urandom % 3), 2'($urandom), int'($urandom % NCH));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
