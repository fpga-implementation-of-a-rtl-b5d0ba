// tb_nn_classifier: loads 100 random training vectors of 40 features, then
// classifies random test vectors (some equal to a stored vector, some with a
// partly filled database) and checks the nearest index and its City Block
// distance against a direct evaluation, plus the start-to-done time.
module tb_nn_classifier;
  import face_pkg::*;

  localparam int N = N_TRAIN, L = FEAT_LEN;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                     db_we = 1'b0, start = 1'b0, busy, done;
  logic [$clog2(N)-1:0]     db_vec = '0, match_idx;
  logic [$clog2(L)-1:0]     db_idx = '0;
  logic [FEAT_W-1:0]        db_data = '0;
  logic [$clog2(N):0]       n_valid = '0;
  logic [L-1:0][FEAT_W-1:0] x = '0;
  logic [DIST_W-1:0]        match_dist;

  nn_classifier dut (.*);

  int checks = 0, failures = 0;
  int db [N][L];

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int j = 0; j < N; j++)
      for (int i = 0; i < L; i++) begin
        @(negedge clk);
        db[j][i] = $urandom_range(0, 4000);
        db_we = 1'b1; db_vec = $bits(db_vec)'(j); db_idx = $bits(db_idx)'(i); db_data = FEAT_W'(db[j][i]);
      end
    @(negedge clk) db_we = 1'b0;
    for (int t = 0; t < 30; t++) begin
      automatic int nv = (t % 3 == 1) ? $urandom_range(1, N) : N;
      automatic int src = $urandom_range(0, N - 1), bi = 0, cycles = 0;
      automatic longint bd = -1;
      for (int i = 0; i < L; i++)
        x[i] = (t % 2 == 0) ? FEAT_W'(db[src][i] + $urandom_range(0, 20)) : FEAT_W'($urandom_range(0, 4000));
      for (int j = 0; j < nv; j++) begin
        automatic longint s = 0;
        for (int i = 0; i < L; i++) s += ((db[j][i] > int'(x[i])) ? longint'(db[j][i]) - longint'(x[i]) : longint'(x[i]) - longint'(db[j][i]));
        if (bd < 0 || s < bd) begin bd = s; bi = j; end
      end
      n_valid = $bits(n_valid)'(nv);
      start = 1'b1;
      @(negedge clk) start = 1'b0;
      while (!done) begin @(negedge clk); cycles++; end
      checks++;
      if (int'(match_idx) != bi || longint'(match_dist) != bd) begin
        failures++;
        $display("FAIL run %0d: %0d/%0d expected %0d/%0d", t, match_idx, match_dist, bi, bd);
      end
      checks++;
      if (cycles > L + nv + 8) begin failures++; $display("FAIL took %0d clocks", cycles); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
