// tb_pixel_register: random load/take sequences (take only while a pixel is
// held) compared against a reference model of the valid flag and the held
// pixel.
module tb_pixel_register;
  import face_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic             load = 1'b0, take = 1'b0, valid;
  logic [PIX_W-1:0] d = '0, q;

  pixel_register dut (.*);

  int checks = 0, failures = 0;
  bit mv = 0;
  int mq = 0;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    checks++;
    if (valid) begin failures++; $display("FAIL valid after reset"); end
    for (int n = 0; n < 2000; n++) begin
      load = ($urandom_range(0, 2) == 0);
      take = mv && ($urandom_range(0, 1) == 0);
      d    = PIX_W'($urandom);
      if (load) begin mv = 1; mq = int'(d); end
      else if (take) mv = 0;
      @(negedge clk);
      checks++;
      if (valid != mv || (mv && int'(q) != mq)) begin
        failures++;
        $display("FAIL step %0d: valid %0b q %0d expected %0b %0d", n, valid, q, mv, mq);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
