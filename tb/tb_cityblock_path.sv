// tb_cityblock_path: accumulates random vector pairs (including extremes)
// and checks d = sum |a_i - b_i| after every term, that en low holds d and
// that clr zeroes it.
module tb_cityblock_path;
  import face_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic              clr = 1'b0, en = 1'b0;
  logic [FEAT_W-1:0] a = '0, b = '0;
  logic [DIST_W-1:0] d;

  cityblock_path dut (.*);

  int checks = 0, failures = 0;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int v = 0; v < 50; v++) begin
      automatic longint s = 0;
      clr = 1'b1;
      @(negedge clk) clr = 1'b0;
      for (int i = 0; i < FEAT_LEN; i++) begin
        automatic int x = (v == 0) ? 65535 : $urandom_range(0, 65535);
        automatic int y = (v == 0) ? 0 : $urandom_range(0, 65535);
        en = ($urandom_range(0, 3) != 0);
        a = FEAT_W'(x); b = FEAT_W'(y);
        if (en) s += ((x > y) ? longint'(x) - longint'(y) : longint'(y) - longint'(x));
        @(negedge clk);
        checks++;
        if (longint'(d) != s) begin
          failures++;
          $display("FAIL vec %0d term %0d: d %0d expected %0d", v, i, d, s);
        end
      end
      en = 1'b0;
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
