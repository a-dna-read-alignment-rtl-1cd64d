// tb_cram_tile: self-checking test of the CRAM tile model.
// For every gate and every input combination, in random columns, it presets
// the output row, fires the gate and compares with the gate's truth table
// (NAND, NOR, AND, COPY, INV, MAJ3, MAJ5, TH: 1 when at least three of four
// inputs are 0). It then checks that disabled columns and a
// disabled tile keep their data, that linked-tile (ext) inputs are used, that
// a row read appears on rdata one cycle later, and runs the two composite
// sequences the PEs rely on: XOR (NOR, COPY, COPY, TH) and the full adder
// (MAJ3, INV, INV, MAJ5), checked against a + b + cin.
module tb_cram_tile;
  import bwa_pkg::*;
  localparam int C = 128;
  logic clk = 0;
  always #5 clk = ~clk;

  logic                    en;
  cram_cmd_t               cmd;
  logic [C-1:0]            col_en, wdata, rdata;
  logic [MAX_IN-1:0][C-1:0] ext_in, rd_rows;

  cram_tile #(.ROWS(128), .COLS(C)) dut (.*);

  int checks = 0, failures = 0;
  logic [C-1:0] model [128];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic do_cmd(cram_cmd_t c, logic [C-1:0] ce, logic [C-1:0] wd);
    @(negedge clk);
    en = 1; cmd = c; col_en = ce; wdata = wd;
    @(negedge clk);
    en = 0; cmd = CMD_NOP;
  endtask

  task automatic wr(int row, logic [C-1:0] v);
    cram_cmd_t c;
    c = CMD_NOP; c.op = OP_WRITE; c.row = ROW_W'(row);
    do_cmd(c, '1, v);
  endtask

  task automatic gate(gate_e g, int r0, int r1, int r2, int r3, int r4, int o);
    cram_cmd_t c;
    c = CMD_NOP; c.op = OP_GATE; c.gate = g;
    c.in_row[0] = ROW_W'(r0); c.in_row[1] = ROW_W'(r1); c.in_row[2] = ROW_W'(r2);
    c.in_row[3] = ROW_W'(r3); c.in_row[4] = ROW_W'(r4); c.row = ROW_W'(o);
    do_cmd(c, '1, '0);
  endtask

  function automatic logic ref_gate(gate_e g, logic [4:0] x);
    case (g)
      G_NAND: return !(x[0] && x[1]);
      G_NOR:  return !(x[0] || x[1]);
      G_AND:  return x[0] && x[1];
      G_COPY: return x[0];
      G_INV:  return !x[0];
      G_MAJ3: return (int'(x[0]) + int'(x[1]) + int'(x[2])) >= 2;
      G_MAJ5: return ($countones(x) >= 3);
      default: return ((4 - $countones(x[3:0])) >= 3);   // TH
    endcase
  endfunction

  initial begin
    logic [C-1:0] in [5];
    logic [C-1:0] v;
    en = 0; cmd = CMD_NOP; col_en = '0; wdata = '0; ext_in = '0;
    @(negedge clk);
    // all gates, random inputs in all columns (covers every combination)
    for (int gi = 0; gi < 8; gi++) begin
      gate_e g;
      g = gate_e'(gi);
      for (int rep = 0; rep < 4; rep++) begin
        for (int k = 0; k < 5; k++) begin
          for (int w = 0; w < C / 32; w++) in[k][w*32 +: 32] = $urandom;
          wr(10 + k, in[k]);
        end
        wr(20, {C{gate_preset(g)}});
        gate(g, 10, 11, 12, 13, 14, 20);
        for (int c = 0; c < C; c++) begin
          logic [4:0] x;
          for (int k = 0; k < 5; k++) x[k] = in[k][c];
          v[c] = ref_gate(g, x);
        end
        check(dut.mem[20] == v, $sformatf("gate %s", g.name()));
      end
    end
    // column enable and tile enable
    wr(30, '0);
    begin
      cram_cmd_t c;
      c = CMD_NOP; c.op = OP_WRITE; c.row = 7'd30;
      do_cmd(c, {{(C-8){1'b0}}, 8'hA5}, '1);
      check(dut.mem[30] == {{(C-8){1'b0}}, 8'hA5}, "column-masked write");
      @(negedge clk);
      en = 0; cmd = c; col_en = '1; wdata = '1;
      @(negedge clk);
      cmd = CMD_NOP;
      check(dut.mem[30] == {{(C-8){1'b0}}, 8'hA5}, "disabled tile unchanged");
    end
    // linked-tile inputs
    for (int w = 0; w < C / 32; w++) v[w*32 +: 32] = $urandom;
    wr(40, '0);
    begin
      cram_cmd_t c;
      c = CMD_NOP; c.op = OP_GATE; c.gate = G_INV; c.in_row[0] = 7'd10; c.in_ext = 5'b00001;
      c.row = 7'd40;
      @(negedge clk);
      en = 1; cmd = c; col_en = '1; ext_in[0] = v;
      @(negedge clk);
      en = 0; cmd = CMD_NOP; ext_in = '0;
      check(dut.mem[40] == ~v, "gate on linked-tile input");
    end
    // read latency
    for (int w = 0; w < C / 32; w++) v[w*32 +: 32] = $urandom;
    wr(50, v);
    begin
      cram_cmd_t c;
      c = CMD_NOP; c.op = OP_READ; c.row = 7'd50;
      @(negedge clk);
      en = 1; cmd = c;
      @(posedge clk); #1;
      check(rdata == v, "read data one cycle after the command");
      @(negedge clk) en = 0;
    end
    // XOR sequence
    for (int w = 0; w < C / 32; w++) begin in[0][w*32 +: 32] = $urandom; in[1][w*32 +: 32] = $urandom; end
    wr(60, in[0]); wr(61, in[1]);
    wr(62, '0); gate(G_NOR, 60, 61, 0, 0, 0, 62);
    wr(63, '1); gate(G_COPY, 62, 0, 0, 0, 0, 63);
    wr(64, '1); gate(G_COPY, 62, 0, 0, 0, 0, 64);
    wr(65, '0); gate(G_TH, 60, 61, 63, 64, 0, 65);
    check(dut.mem[65] == (in[0] ^ in[1]), "XOR sequence");
    // full adder sequence
    for (int w = 0; w < C / 32; w++) in[2][w*32 +: 32] = $urandom;
    wr(70, in[0]); wr(71, in[1]); wr(72, in[2]);
    wr(73, '1); gate(G_MAJ3, 70, 71, 72, 0, 0, 73);
    wr(74, '0); gate(G_INV, 73, 0, 0, 0, 0, 74);
    wr(75, '0); gate(G_INV, 73, 0, 0, 0, 0, 75);
    wr(76, '1); gate(G_MAJ5, 70, 71, 72, 74, 75, 76);
    for (int c = 0; c < C; c++) begin
      logic [1:0] s;
      s = 2'(in[0][c]) + 2'(in[1][c]) + 2'(in[2][c]);
      v[c] = s[1];
      in[3][c] = s[0];
    end
    check(dut.mem[73] == v, "full adder carry");
    check(dut.mem[76] == in[3], "full adder sum");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
