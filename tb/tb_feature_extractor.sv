// tb_feature_extractor: 5 filters of 64 taps, loaded with random
// coefficients; random regions of several lengths (longer and shorter than
// the filter) are written into BANK 0 and processed. Each feature must equal
// max(min(|f| >> 15, 65535)) over the direct convolution of the region, done
// must pulse once, (PIX_W + 1) * len + a few clocks after start.
module tb_feature_extractor;
  import face_pkg::*;

  localparam int NF = 5, NT = 64, D = 256, K = DA_K;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                       wr_en = 1'b0, coef_we = 1'b0, start = 1'b0;
  logic [$clog2(D)-1:0]       wr_addr = '0;
  logic [PIX_W-1:0]           wr_data = '0;
  logic [$clog2(NF)-1:0]      coef_filt = '0;
  logic [$clog2(NT/K)-1:0]    coef_grp = '0;
  logic [K-1:0][COEF_W-1:0]   coef_data = '0;
  logic [$clog2(D):0]         len = '0;
  logic                       busy, done;
  logic [NF-1:0][FEAT_W-1:0]  feat;

  feature_extractor #(.NF(NF), .NTAPS(NT), .DEPTH(D)) dut (.*);

  int checks = 0, failures = 0;
  int h [NF][NT];

  task automatic run(int n, int scale);
    int xs [];
    int cycles = 0;
    xs = new[n];
    for (int i = 0; i < n; i++) begin
      xs[i] = $urandom_range(0, 255);
      @(negedge clk) wr_en = 1'b1; wr_addr = $bits(wr_addr)'(i); wr_data = PIX_W'(xs[i]);
    end
    @(negedge clk) wr_en = 1'b0;
    len = $bits(len)'(n); start = 1'b1;
    @(negedge clk) start = 1'b0;
    while (!done) begin @(negedge clk); cycles++; end
    for (int f = 0; f < NF; f++) begin
      longint best = 0;
      for (int m = 0; m < n; m++) begin
        longint s = 0;
        for (int k = 0; k < NT; k++) if (m - k >= 0) s += longint'(h[f][k] * scale) * xs[m-k];
        if (s < 0) s = -s;
        s = s >>> OUT_SHIFT;
        if (s > 65535) s = 65535;
        if (s > best) best = s;
      end
      checks++;
      if (longint'(feat[f]) != best) begin
        failures++;
        $display("FAIL len %0d filter %0d: %0d expected %0d", n, f, feat[f], best);
      end
    end
    checks++;
    if (cycles < (PIX_W + 1) * n || cycles > (PIX_W + 1) * n + 6) begin
      failures++;
      $display("FAIL len %0d took %0d clocks", n, cycles);
    end
    @(negedge clk);
    checks++;
    if (busy || done) begin failures++; $display("FAIL not idle after done"); end
  endtask

  task automatic load(int scale);
    for (int f = 0; f < NF; f++)
      for (int g = 0; g < NT / K; g++) begin
        @(negedge clk);
        coef_we = 1'b1; coef_filt = $bits(coef_filt)'(f); coef_grp = $bits(coef_grp)'(g);
        for (int i = 0; i < K; i++) coef_data[i] = COEF_W'(h[f][g*K + i] * scale);
      end
    @(negedge clk) coef_we = 1'b0;
  endtask

  initial begin
    for (int f = 0; f < NF; f++)
      for (int k = 0; k < NT; k++) h[f][k] = $urandom_range(0, 2000) - 1000;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    load(1);
    run(200, 1);
    run(37, 1);
    run(1, 1);
    load(32);       // larger coefficients, larger responses
    run(150, 32);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
