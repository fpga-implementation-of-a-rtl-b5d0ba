// da_fir_check: stimulus and checker for one da_fir instance, used by
// tb_da_fir. A 64-tap filter with BPC bits per clock is loaded with random
// signed coefficients (including the extremes), then fed two frames of
// random pixels with random idle gaps; clr separates the frames. Every
// output is compared with a direct evaluation of f[n] = sum_k h[k] x[n-k]
// (zero history at the start of a frame), and the time from the accepting
// clock to rdy is checked against PIX_W/BPC + 1. finished rises at the end;
// checks and failures count the comparisons.
module da_fir_check
  import face_pkg::*;
#(
  parameter int unsigned BPC = 1
) (
  input  logic clk,
  input  logic rst_n,
  output logic finished,
  output int   checks,
  output int   failures
);

  localparam int NT = 64;
  localparam int K  = 4;
  localparam int NS = 150;
  localparam int STEPS = int'(PIX_W / BPC);

  logic                         clr = 1'b0, lut_we = 1'b0, nd = 1'b0;
  logic [$clog2(NT/K)-1:0]      lut_grp = '0;
  logic [K-1:0][COEF_W-1:0]     lut_coefs = '0;
  logic [PIX_W-1:0]             din = '0;
  logic                         rfd, rdy;
  logic signed [ACC_W-1:0]      dout;

  da_fir #(.NTAPS(NT), .K(K), .BPC(BPC)) dut (.*);

  initial begin checks = 0; failures = 0; finished = 1'b0; end
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic signed [COEF_W-1:0] h [NT];
  int     xs [$];
  longint acc_cyc [$];
  longint exp_q [$];
  int     frame_start;

  function automatic longint ref_out(int n);
    longint s = 0;
    for (int k = 0; k < NT; k++)
      if (n - k >= frame_start) s += longint'(h[k]) * longint'(xs[n-k]);
    return s;
  endfunction

  // Output checker.
  always @(posedge clk) begin
    if (rst_n && rdy) begin
      longint e, t;
      checks++;
      e = exp_q.pop_front();
      t = acc_cyc.pop_front();
      if (longint'(dout) != e) begin
        failures++;
        $display("FAIL dout=%0d expected %0d", dout, e);
      end
      checks++;
      if (cyc - t != longint'(STEPS) + 1) begin
        failures++;
        $display("FAIL latency %0d", cyc - t);
      end
    end
  end

  task automatic send_frame(int n);
    frame_start = xs.size();
    @(negedge clk) clr = 1'b1;
    @(negedge clk) clr = 1'b0;
    for (int i = 0; i < n; i++) begin
      int p = $urandom_range(0, 255);
      while (!rfd) @(negedge clk);
      nd = 1'b1; din = PIX_W'(p);
      xs.push_back(p);
      exp_q.push_back(ref_out(xs.size() - 1));
      @(posedge clk) acc_cyc.push_back(cyc);
      @(negedge clk) nd = 1'b0;
      repeat ($urandom_range(0, 3)) @(negedge clk);
    end
    while (exp_q.size() != 0) @(negedge clk);
  endtask

  initial begin
    for (int k = 0; k < NT; k++) h[k] = COEF_W'($urandom);
    h[0] = 16'sh7fff; h[1] = -16'sh8000;   // extremes
    @(posedge rst_n);
    for (int g = 0; g < NT / K; g++) begin
      @(negedge clk);
      lut_we = 1'b1; lut_grp = $bits(lut_grp)'(g);
      for (int i = 0; i < K; i++) lut_coefs[i] = h[g*K + i];
    end
    @(negedge clk) lut_we = 1'b0;
    send_frame(NS);
    send_frame(NS / 2);
    checks++;
    if (!rfd) begin failures++; $display("FAIL rfd low when idle"); end
    finished = 1'b1;
  end
endmodule
