// tb_cityblock_array: a random test vector against 100 random training
// vectors, fed one feature per clock; every distance is compared with a
// direct City Block evaluation. Repeated for several vectors.
module tb_cityblock_array;
  import face_pkg::*;

  localparam int N = N_TRAIN, L = FEAT_LEN;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                     clr = 1'b0, en = 1'b0;
  logic [FEAT_W-1:0]        a = '0;
  logic [N-1:0][FEAT_W-1:0] b = '0;
  logic [N-1:0][DIST_W-1:0] d;

  cityblock_array dut (.*);

  int checks = 0, failures = 0;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 5; t++) begin
      automatic longint s [N];
      clr = 1'b1;
      @(negedge clk) clr = 1'b0;
      for (int j = 0; j < N; j++) s[j] = 0;
      for (int i = 0; i < L; i++) begin
        automatic int x = $urandom_range(0, 65535);
        en = 1'b1; a = FEAT_W'(x);
        for (int j = 0; j < N; j++) begin
          automatic int y = $urandom_range(0, 65535);
          b[j] = FEAT_W'(y);
          s[j] += ((x > y) ? longint'(x) - longint'(y) : longint'(y) - longint'(x));
        end
        @(negedge clk);
      end
      en = 1'b0;
      @(negedge clk);
      for (int j = 0; j < N; j++) begin
        checks++;
        if (longint'(d[j]) != s[j]) begin
          failures++;
          $display("FAIL path %0d: %0d expected %0d", j, d[j], s[j]);
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
