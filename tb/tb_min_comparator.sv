// tb_min_comparator: random distance vectors (some with ties, some with a
// partly filled database) must yield the first minimum over entries
// 0..n_valid-1 and its index; the scan time n_valid + 1 clocks is checked.
module tb_min_comparator;
  import face_pkg::*;

  localparam int N = N_TRAIN;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                     start = 1'b0, busy, done;
  logic [$clog2(N):0]       n_valid = '0;
  logic [N-1:0][DIST_W-1:0] d = '0;
  logic [$clog2(N)-1:0]     min_idx;
  logic [DIST_W-1:0]        min_val;

  min_comparator dut (.*);

  int checks = 0, failures = 0;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 200; t++) begin
      automatic int nv = (t % 3 == 0) ? N : $urandom_range(1, N);
      automatic int bi = 0, cycles = 0;
      automatic longint bv = -1;
      for (int j = 0; j < N; j++) begin
        d[j] = (t % 2 == 0) ? DIST_W'($urandom_range(0, 30)) : DIST_W'($urandom);
        if (j < nv && (bv < 0 || longint'(d[j]) < bv)) begin bv = longint'(d[j]); bi = j; end
      end
      n_valid = $bits(n_valid)'(nv);
      start = 1'b1;
      @(negedge clk) start = 1'b0;
      while (!done) begin @(negedge clk); cycles++; end
      checks++;
      if (int'(min_idx) != bi || longint'(min_val) != bv) begin
        failures++;
        $display("FAIL run %0d: idx %0d val %0d expected %0d %0d", t, min_idx, min_val, bi, bv);
      end
      checks++;
      if (cycles != nv + 1) begin failures++; $display("FAIL scan took %0d clocks, n_valid %0d", cycles, nv); end
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
