// gabor_fir_bank: NF distributed-arithmetic FIR filters in parallel, one per
// Gabor kernel (5 scales x 8 orientations = 40), all fed by the same pixel
// stream.
//
// Every filter sees the same din/nd and therefore runs in lock step: rfd is
// the AND of the filters' rfd and rdy is filter 0's rdy (an assertion checks
// that all of them agree). dout[f] is filter f's output. Coefficients are
// written through one shared port: coef_filt picks the filter, coef_grp the
// group of K taps within it. Timing is that of da_fir.
module gabor_fir_bank
  import face_pkg::*;
#(
  parameter int unsigned NF    = NUM_FILTERS,
  parameter int unsigned NTAPS = TAPS,
  parameter int unsigned PW    = PIX_W,
  parameter int unsigned CW    = COEF_W,
  parameter int unsigned K     = DA_K,
  parameter int unsigned OW    = ACC_W,
  parameter int unsigned BPC   = DA_BPC,
  localparam int unsigned FW_SEL = (NF > 1) ? $clog2(NF) : 1,
  localparam int unsigned GROUPS = NTAPS / K,
  localparam int unsigned GW     = (GROUPS > 1) ? $clog2(GROUPS) : 1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   clr,
  input  logic                   coef_we,
  input  logic [FW_SEL-1:0]      coef_filt,
  input  logic [GW-1:0]          coef_grp,
  input  logic [K-1:0][CW-1:0]   coef_data,
  input  logic [PW-1:0]          din,
  input  logic                   nd,
  output logic                   rfd,
  output logic [NF-1:0][OW-1:0]  dout,
  output logic                   rdy
);

  logic [NF-1:0] rfd_f, rdy_f;

  for (genvar f = 0; f < int'(NF); f++) begin : g_fir
    da_fir #(.NTAPS(NTAPS), .PW(PW), .CW(CW), .K(K), .OW(OW), .BPC(BPC)) u_fir (
      .clk       (clk),
      .rst_n     (rst_n),
      .clr       (clr),
      .lut_we    (coef_we && (coef_filt == FW_SEL'(f))),
      .lut_grp   (coef_grp),
      .lut_coefs (coef_data),
      .din       (din),
      .nd        (nd),
      .rfd       (rfd_f[f]),
      .dout      (dout[f]),
      .rdy       (rdy_f[f])
    );
  end

  assign rfd = &rfd_f;
  assign rdy = rdy_f[0];

  // The filters share one stream, so they must finish together.
  assert property (@(posedge clk) disable iff (!rst_n) (rdy_f == '0) || (rdy_f == '1));

endmodule
