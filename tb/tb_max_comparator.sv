// tb_max_comparator: random signed filter outputs (small, large, negative,
// saturating) with random valid gaps and clears; the held value must equal
// the maximum of min(|x| >> 15, 65535) since the last clear.
module tb_max_comparator;
  import face_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                    clr = 1'b0, x_valid = 1'b0;
  logic signed [ACC_W-1:0] x = '0;
  logic [FEAT_W-1:0]       y;

  max_comparator dut (.*);

  int checks = 0, failures = 0;
  longint m = 0;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 4000; n++) begin
      longint v, mag;
      case ($urandom_range(0, 3))
        0: v = longint'($urandom_range(0, 1 << 20));
        1: v = -longint'($urandom_range(0, 1 << 30));
        2: v = longint'($urandom) << $urandom_range(0, 3);
        default: v = -(longint'($urandom) << 3);
      endcase
      clr     = ($urandom_range(0, 99) == 0);
      x_valid = ($urandom_range(0, 3) != 0);
      x       = ACC_W'(v);
      mag = (v < 0) ? -v : v;
      mag = mag >>> OUT_SHIFT;
      if (mag > 65535) mag = 65535;
      if (clr) m = 0;
      else if (x_valid && mag > m) m = mag;
      @(negedge clk);
      checks++;
      if (longint'(y) != m) begin
        failures++;
        $display("FAIL step %0d: y %0d expected %0d", n, y, m);
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
