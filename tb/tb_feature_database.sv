// tb_feature_database: writes random features into every vector, then reads
// each feature index and checks that the word of every vector arrives one
// clock after rd_en.
module tb_feature_database;
  import face_pkg::*;

  localparam int N = N_TRAIN, L = FEAT_LEN;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic                     we = 1'b0, rd_en = 1'b0;
  logic [$clog2(N)-1:0]     wr_vec = '0;
  logic [$clog2(L)-1:0]     wr_idx = '0, rd_idx = '0;
  logic [FEAT_W-1:0]        wr_data = '0;
  logic [N-1:0][FEAT_W-1:0] rd_data;

  feature_database dut (.*);

  int checks = 0, failures = 0;
  int model [N][L];

  initial begin
    for (int j = 0; j < N; j++)
      for (int i = 0; i < L; i++) begin
        @(negedge clk);
        model[j][i] = $urandom_range(0, 65535);
        we = 1'b1; wr_vec = $bits(wr_vec)'(j); wr_idx = $bits(wr_idx)'(i); wr_data = FEAT_W'(model[j][i]);
      end
    @(negedge clk) we = 1'b0;
    for (int r = 0; r < 3 * L; r++) begin
      automatic int i = $urandom_range(0, L - 1);
      rd_en = 1'b1; rd_idx = $bits(rd_idx)'(i);
      @(negedge clk) rd_en = 1'b0;
      for (int j = 0; j < N; j++) begin
        checks++;
        if (int'(rd_data[j]) != model[j][i]) begin
          failures++;
          $display("FAIL vec %0d idx %0d: %0d expected %0d", j, i, rd_data[j], model[j][i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
