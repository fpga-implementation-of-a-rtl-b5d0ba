// tb_bank0_buffer: fills the region buffer with random pixels, reads every
// word back in random order and checks data and the one-clock read latency;
// also checks that rd_data holds while rd_en is low.
module tb_bank0_buffer;
  import face_pkg::*;

  localparam int D = BANK_DEPTH;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic                 wr_en = 1'b0, rd_en = 1'b0;
  logic [$clog2(D)-1:0] wr_addr = '0, rd_addr = '0;
  logic [PIX_W-1:0]     wr_data = '0, rd_data;

  bank0_buffer dut (.*);

  int checks = 0, failures = 0;
  int model [D];

  initial begin
    for (int a = 0; a < D; a++) begin
      @(negedge clk);
      model[a] = $urandom_range(0, 255);
      wr_en = 1'b1; wr_addr = $bits(wr_addr)'(a); wr_data = PIX_W'(model[a]);
    end
    @(negedge clk) wr_en = 1'b0;
    for (int n = 0; n < 3000; n++) begin
      automatic int a = $urandom_range(0, D - 1);
      rd_en = 1'b1; rd_addr = $bits(rd_addr)'(a);
      @(negedge clk);
      rd_en = 1'b0; rd_addr = '0;
      checks++;
      if (int'(rd_data) != model[a]) begin
        failures++;
        $display("FAIL addr %0d: %0d expected %0d", a, rd_data, model[a]);
      end
      @(negedge clk);
      checks++;
      if (int'(rd_data) != model[a]) begin failures++; $display("FAIL hold"); end
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
