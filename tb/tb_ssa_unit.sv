// tb_ssa_unit: self-checking test of the sampled-suffix-array unit.
// It builds a random suffix vector (about one bit in 32 set), stores random
// SSA values in row order and the per-vector base addresses, then queries
// random set bits with random step counts: the answer must be the stored
// value of that row plus the steps, two cycles after the request.
module tb_ssa_unit;
  import bwa_pkg::*;
  localparam int VEC_W = 128, NVEC = 64, SV_LEN = NVEC * VEC_W;
  localparam int NSSA = SV_LEN / 32, AW = $clog2(NSSA + 1), VW = $clog2(NVEC);
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic             ld_ssa_valid, ld_base_valid, req_valid, req_ready, resp_valid, resp_ready;
  logic [AW-1:0]    ld_ssa_addr, ld_base_data;
  logic [31:0]      ld_ssa_data, req_steps, resp_pos;
  logic [VW-1:0]    ld_base_vec, req_vec;
  logic [6:0]       req_bit;
  logic [VEC_W-1:0] req_bits;

  ssa_unit #(.SV_LEN(SV_LEN), .SA_STEP(32), .VEC_W(VEC_W), .POS_W(32)) dut (.*);

  logic [VEC_W-1:0] sv [NVEC];
  int               val [SV_LEN];
  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int kept;
    ld_ssa_valid = 0; ld_base_valid = 0; req_valid = 0; resp_ready = 0;
    ld_ssa_addr = '0; ld_ssa_data = '0; ld_base_vec = '0; ld_base_data = '0;
    req_vec = '0; req_bit = '0; req_bits = '0; req_steps = '0;
    kept = 0;
    for (int j = 0; j < SV_LEN; j++) begin
      sv[j / VEC_W][j % VEC_W] = ($urandom % 32 == 0) && kept < NSSA;
      if (sv[j / VEC_W][j % VEC_W]) kept++;
      val[j] = int'($urandom % 1000000);
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    kept = 0;
    for (int v = 0; v < NVEC; v++) begin
      @(negedge clk);
      ld_base_valid = 1; ld_base_vec = VW'(v); ld_base_data = AW'(kept);
      for (int b = 0; b < VEC_W; b++)
        if (sv[v][b]) begin
          @(negedge clk);
          ld_base_valid = 0;
          ld_ssa_valid = 1; ld_ssa_addr = AW'(kept); ld_ssa_data = 32'(val[v * VEC_W + b]);
          kept++;
        end
      @(negedge clk);
      ld_base_valid = 0; ld_ssa_valid = 0;
    end
    for (int n = 0; n < 300; n++) begin
      int j, st, t0;
      do j = int'($urandom % SV_LEN); while (!sv[j / VEC_W][j % VEC_W]);
      st = int'($urandom % 32);
      @(negedge clk);
      req_valid = 1; req_vec = VW'(j / VEC_W); req_bit = 7'(j % VEC_W);
      req_bits = sv[j / VEC_W]; req_steps = 32'(st);
      @(posedge clk);
      t0 = cyc;
      @(negedge clk) req_valid = 0;
      while (!resp_valid) @(posedge clk);
      checks++;
      if (resp_pos !== 32'(val[j] + st) || cyc - t0 != 2) begin
        failures++;
        $display("FAIL row %0d: %0d exp %0d latency %0d", j, resp_pos, val[j] + st, cyc - t0);
      end
      @(negedge clk) resp_ready = 1;
      @(negedge clk) resp_ready = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
