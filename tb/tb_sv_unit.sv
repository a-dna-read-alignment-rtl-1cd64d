// tb_sv_unit: self-checking test of the suffix-vector unit with 300 vectors
// (three tiles). It loads random vectors, then checks random bit positions
// and every bit of a few vectors: resp_hit must equal the stored bit and
// resp_vec the stored vector, with the fixed latency of 7 cycles from the
// accepted request to resp_valid.
module tb_sv_unit;
  import bwa_pkg::*;
  localparam int VEC_W = 128, NVEC = 300, SV_LEN = NVEC * VEC_W;
  localparam int IDXW = $clog2(SV_LEN), VW = $clog2(NVEC);
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic             ld_valid, req_valid, req_ready, resp_valid, resp_ready, resp_hit;
  logic [VW-1:0]    ld_vec;
  logic [VEC_W-1:0] ld_data, resp_vec;
  logic [IDXW-1:0]  req_idx;

  sv_unit #(.SV_LEN(SV_LEN), .VEC_W(VEC_W)) dut (.*);

  logic [VEC_W-1:0] sv [NVEC];
  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic query(int j);
    int t0;
    @(negedge clk);
    req_valid = 1; req_idx = IDXW'(j);
    @(posedge clk);
    while (!req_ready) @(posedge clk);
    t0 = cyc;
    @(negedge clk) req_valid = 0;
    while (!resp_valid) @(posedge clk);
    checks++;
    if (resp_hit !== sv[j / VEC_W][j % VEC_W] || resp_vec !== sv[j / VEC_W] || cyc - t0 != 7) begin
      failures++;
      $display("FAIL idx %0d: hit=%0d exp %0d, latency %0d", j, resp_hit,
               sv[j / VEC_W][j % VEC_W], cyc - t0);
    end
    @(negedge clk) resp_ready = 1;
    @(negedge clk) resp_ready = 0;
  endtask

  initial begin
    ld_valid = 0; req_valid = 0; resp_ready = 0; ld_vec = '0; ld_data = '0; req_idx = '0;
    for (int v = 0; v < NVEC; v++)
      for (int w = 0; w < VEC_W / 32; w++) sv[v][w*32 +: 32] = $urandom & $urandom;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int v = 0; v < NVEC; v++) begin
      @(negedge clk);
      ld_valid = 1; ld_vec = VW'(v); ld_data = sv[v];
    end
    @(negedge clk) ld_valid = 0;
    for (int n = 0; n < 200; n++) query(int'($urandom % SV_LEN));
    for (int b = 0; b < VEC_W; b++) query((NVEC - 1) * VEC_W + b);
    for (int b = 0; b < VEC_W; b += 7) query(125 * VEC_W + b);
    for (int b = 0; b < VEC_W; b += 5) query(126 * VEC_W + b);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
