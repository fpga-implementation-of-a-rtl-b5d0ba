// da_fir: bit-serial distributed-arithmetic FIR filter holding one Gabor
// kernel, f[n] = sum_k h[k] * x[n-k], k = 0..TAPS-1.
//
// The kernel (32 x 32 = 1024 coefficients) is applied as a 1-D filter of
// order TAPS-1 to the row-major stream of region pixels, so the output
// sequence has the same length as the input. Instead of TAPS multipliers the
// filter uses distributed arithmetic: the taps are split into groups of K,
// and each group owns a look-up table whose 2^K entries are the sums of
// every subset of its K coefficients. With unsigned pixels,
//   f = sum_b 2^b * sum_g LUT_g[ bit b of the K pixels of group g ],
// so BPC bit planes are evaluated per clock, most significant first, and the
// accumulator is shifted left by BPC before the new planes are added. BPC = 1
// is the bit-serial arrangement (the default); BPC = PW evaluates the whole
// word in one clock (full-parallel), at BPC times the table read ports.
//
// Coefficients are written one group at a time (lut_we, lut_grp, the K
// coefficients of taps K*g .. K*g+K-1 on lut_coefs); the block forms the
// 2^K subset sums of that group in the same clock. This table is the only
// coefficient store. clr zeroes the delay line (start of a region).
//
// Handshake (names as on the FIR core it replaces): rfd high means a new
// pixel is accepted when nd is high. The accepting clock shifts din into the
// delay line; the next PW/BPC clocks evaluate the bit planes; in the last of
// them dout is registered and rdy is high for the following clock, together
// with rfd. One output every PW/BPC + 1 clocks, latency PW/BPC clocks from
// the accepting edge to the edge that registers dout.
//
// The distributed-arithmetic structure and the tap count follow the design;
// the choice of the bit-serial arrangement as default, K = 4, the fixed-point
// widths and the run-time loading are this design's. PW must be a multiple
// of BPC.
module da_fir
  import face_pkg::*;
#(
  parameter int unsigned NTAPS = TAPS,
  parameter int unsigned PW    = PIX_W,
  parameter int unsigned CW    = COEF_W,
  parameter int unsigned K     = DA_K,
  parameter int unsigned OW    = ACC_W,
  parameter int unsigned BPC   = DA_BPC,
  localparam int unsigned GROUPS = NTAPS / K,
  localparam int unsigned GW     = (GROUPS > 1) ? $clog2(GROUPS) : 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  clr,
  // coefficient load
  input  logic                  lut_we,
  input  logic [GW-1:0]         lut_grp,
  input  logic [K-1:0][CW-1:0]  lut_coefs,
  // data stream
  input  logic [PW-1:0]         din,
  input  logic                  nd,
  output logic                  rfd,
  output logic signed [OW-1:0]  dout,
  output logic                  rdy
);

  localparam int unsigned LW = CW + $clog2(K);            // one table entry
  localparam int unsigned SW = LW + GW;                   // sum over the groups
  localparam int unsigned STEPS = PW / BPC;             // clocks per output
  localparam int unsigned BW    = (STEPS > 1) ? $clog2(STEPS) : 1;

  logic [PW-1:0]        line [NTAPS];
  logic signed [LW-1:0] lut  [GROUPS][2**K];

  logic                 busy;
  logic [BW-1:0]        bsel;
  logic signed [OW-1:0] acc;
  logic signed [SW-1:0] plane_sum [BPC];
  logic signed [OW-1:0] acc_next;

  assign rfd = !busy;

  // Sum of the table outputs for each bit plane of the current step: plane
  // j of step bsel is pixel bit bsel*BPC + j.
  always_comb begin
    logic [K-1:0] addr;
    for (int j = 0; j < int'(BPC); j++) begin
      plane_sum[j] = '0;
      for (int g = 0; g < int'(GROUPS); g++) begin
        for (int i = 0; i < int'(K); i++) addr[i] = line[g*K + i][int'(bsel)*int'(BPC) + j];
        plane_sum[j] += SW'(lut[g][addr]);
      end
    end
  end

  always_comb begin
    acc_next = acc <<< BPC;
    for (int j = 0; j < int'(BPC); j++) acc_next += OW'(plane_sum[j]) <<< j;
  end

  // Table load: entry a of the group is the sum of the coefficients whose
  // bit is set in a.
  always_ff @(posedge clk) begin
    if (lut_we) begin
      for (int a = 0; a < (1 << K); a++) begin
        logic signed [LW-1:0] s;
        s = '0;
        for (int i = 0; i < int'(K); i++)
          if (a[i]) s += LW'(signed'(lut_coefs[i]));
        lut[lut_grp][a] <= s;
      end
    end
  end

  // Delay line: x[n-k] sits in line[k].
  always_ff @(posedge clk) begin
    if (clr) begin
      for (int k = 0; k < int'(NTAPS); k++) line[k] <= '0;
    end else if (nd && rfd) begin
      line[0] <= din;
      for (int k = 1; k < int'(NTAPS); k++) line[k] <= line[k-1];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      bsel <= '0;
      acc  <= '0;
      dout <= '0;
      rdy  <= 1'b0;
    end else begin
      rdy <= 1'b0;
      if (clr) begin
        busy <= 1'b0;
      end else if (!busy) begin
        if (nd) begin
          busy <= 1'b1;
          bsel <= BW'(STEPS - 1);
          acc  <= '0;
        end
      end else begin
        acc <= acc_next;
        if (bsel == '0) begin
          busy <= 1'b0;
          dout <= acc_next;
          rdy  <= 1'b1;
        end else begin
          bsel <= bsel - 1'b1;
        end
      end
    end
  end

endmodule
