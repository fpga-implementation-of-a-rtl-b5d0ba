// tb_region_extractor: streams a 112x92 test image (pixel value derived from
// its position) with random gaps and checks, for each facial window, every
// buffer write (address and pixel, row-major from address 0), the number of
// pixels written, and the single done pulse after the last image pixel.
module tb_region_extractor;
  import face_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic             start = 1'b0, pix_valid = 1'b0;
  region_e          region_sel = REG_EYE;
  logic [PIX_W-1:0] pix = '0;
  logic             wr_en, done, armed;
  logic [BANK_AW-1:0] wr_addr;
  logic [PIX_W-1:0] wr_data;
  logic [BANK_AW:0] region_len;

  region_extractor dut (.*);

  int checks = 0, failures = 0;
  int exp_q [$];
  int nwr = 0, ndone = 0;

  function automatic int pixval(int r, int c);
    return (r * 13 + c * 7) & 255;
  endfunction

  always @(posedge clk) begin
    if (rst_n && wr_en) begin
      int e;
      checks++;
      e = (exp_q.size() > 0) ? exp_q.pop_front() : -1;
      if (int'(wr_data) != e || int'(wr_addr) != nwr) begin
        failures++;
        $display("FAIL write %0d: addr %0d data %0d expected %0d", nwr, wr_addr, wr_data, e);
      end
      nwr++;
    end
    if (rst_n && done) ndone++;
  end

  task automatic run(region_e r, int r0, int r1, int c0, int c1);
    exp_q.delete();
    for (int y = r0; y <= r1; y++)
      for (int x = c0; x <= c1; x++) exp_q.push_back(pixval(y-1, x-1));
    nwr = 0; ndone = 0;
    @(negedge clk) start = 1'b1; region_sel = r;
    @(negedge clk) start = 1'b0;
    for (int y = 0; y < IMG_ROWS; y++)
      for (int x = 0; x < IMG_COLS; x++) begin
        pix_valid = 1'b1; pix = PIX_W'(pixval(y, x));
        @(negedge clk);
        pix_valid = 1'b0;
        if ($urandom_range(0, 4) == 0) @(negedge clk);
      end
    repeat (3) @(negedge clk);
    checks++;
    if (exp_q.size() != 0 || ndone != 1 || int'(region_len) != (r1-r0+1)*(c1-c0+1) || armed) begin
      failures++;
      $display("FAIL region %s: left %0d done %0d len %0d", r.name(), exp_q.size(), ndone, region_len);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // windows: eye I(40:60,5:90), nose I(60:80,21:77), mouth I(80:98,19:77)
    run(REG_EYE,   40, 60, 5, 90);
    run(REG_NOSE,  60, 80, 21, 77);
    run(REG_MOUTH, 80, 98, 19, 77);
    // pixels while not armed are ignored
    nwr = 0;
    repeat (20) begin @(negedge clk) pix_valid = 1'b1; end
    @(negedge clk) pix_valid = 1'b0;
    checks++;
    if (nwr != 0) begin failures++; $display("FAIL writes while idle"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
