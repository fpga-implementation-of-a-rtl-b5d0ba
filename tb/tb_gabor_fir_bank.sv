// tb_gabor_fir_bank: 6 filters of 32 taps, each loaded with its own random
// coefficients through the shared port, fed one random pixel stream; every
// filter's output is compared with its own direct convolution, and rfd/rdy
// timing is checked (one output PIX_W + 1 clocks after each accepted pixel).
module tb_gabor_fir_bank;
  import face_pkg::*;

  localparam int NF = 6, NT = 32, K = DA_K, NS = 120;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                      clr = 1'b0, coef_we = 1'b0, nd = 1'b0;
  logic [$clog2(NF)-1:0]     coef_filt = '0;
  logic [$clog2(NT/K)-1:0]   coef_grp = '0;
  logic [K-1:0][COEF_W-1:0]  coef_data = '0;
  logic [PIX_W-1:0]          din = '0;
  logic                      rfd, rdy;
  logic [NF-1:0][ACC_W-1:0]  dout;

  gabor_fir_bank #(.NF(NF), .NTAPS(NT)) dut (.*);

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  int h [NF][NT];
  int xs [$];
  int nout = 0;
  longint t_acc [$];

  always @(posedge clk) begin
    if (rst_n && rdy) begin
      automatic longint t = t_acc.pop_front();
      for (int f = 0; f < NF; f++) begin
        automatic longint s = 0;
        for (int k = 0; k < NT; k++) if (nout - k >= 0) s += longint'(h[f][k]) * xs[nout-k];
        checks++;
        if (longint'(signed'(dout[f])) != s) begin
          failures++;
          $display("FAIL filter %0d sample %0d: %0d expected %0d", f, nout, signed'(dout[f]), s);
        end
      end
      checks++;
      if (cyc - t != longint'(PIX_W) + 1) begin failures++; $display("FAIL latency %0d", cyc - t); end
      nout++;
    end
  end

  initial begin
    for (int f = 0; f < NF; f++)
      for (int k = 0; k < NT; k++) h[f][k] = int'($signed(COEF_W'($urandom)));
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int f = 0; f < NF; f++)
      for (int g = 0; g < NT / K; g++) begin
        @(negedge clk);
        coef_we = 1'b1; coef_filt = $bits(coef_filt)'(f); coef_grp = $bits(coef_grp)'(g);
        for (int i = 0; i < K; i++) coef_data[i] = COEF_W'(h[f][g*K + i]);
      end
    @(negedge clk) coef_we = 1'b0; clr = 1'b1;
    @(negedge clk) clr = 1'b0;
    for (int n = 0; n < NS; n++) begin
      while (!rfd) @(negedge clk);
      nd = 1'b1; din = PIX_W'($urandom);
      xs.push_back(int'(din));
      @(posedge clk) t_acc.push_back(cyc);
      @(negedge clk) nd = 1'b0;
    end
    while (nout < NS) @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
