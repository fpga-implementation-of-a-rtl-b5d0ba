// face_recognition_top: Gabor-filter / nearest-neighbour face recognition
// datapath for a door access controller.
//
// A 112x92 grey-scale face image streams in row-major. The region extractor
// copies the selected facial window (eye, nose or mouth) into BANK 0. The
// feature extractor then filters the window with 40 Gabor kernels
// (distributed-arithmetic FIR filters, 1024 taps each) and keeps the
// maximum intensity of each response: the 40-value feature vector. The
// nearest-neighbour classifier computes the City Block distance from that
// vector to every enrolled training vector in parallel and reports the
// nearest one.
//
// Use: load the Gabor coefficients (coef_*) and the training vectors (db_*)
// while idle. Pulse start with region_sel while busy is low, then stream the
// whole image on img_valid/img_pix. When the last image pixel has been
// seen, filtering starts on its own; feat_valid pulses when the feature
// vector is ready (feat holds it), and match_valid pulses when match_idx /
// match_dist are ready. busy stays high from start until match_valid.
// Timing is dominated by the filters: (PIX_W+1) clocks per region pixel.
module face_recognition_top
  import face_pkg::*;
#(
  parameter int unsigned NF    = NUM_FILTERS,
  parameter int unsigned NTAPS = TAPS,
  parameter int unsigned N     = N_TRAIN,
  localparam int unsigned L      = NF,
  localparam int unsigned AW     = BANK_AW,
  localparam int unsigned FW_SEL = (NF > 1) ? $clog2(NF) : 1,
  localparam int unsigned GW     = (NTAPS / DA_K > 1) ? $clog2(NTAPS / DA_K) : 1,
  localparam int unsigned VW     = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned IW     = (L > 1) ? $clog2(L) : 1
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // image
  input  logic                        start,
  input  region_e                     region_sel,
  input  logic                        img_valid,
  input  logic [PIX_W-1:0]            img_pix,
  // Gabor coefficients
  input  logic                        coef_we,
  input  logic [FW_SEL-1:0]           coef_filt,
  input  logic [GW-1:0]               coef_grp,
  input  logic [DA_K-1:0][COEF_W-1:0] coef_data,
  // training database
  input  logic                        db_we,
  input  logic [VW-1:0]               db_vec,
  input  logic [IW-1:0]               db_idx,
  input  logic [FEAT_W-1:0]           db_data,
  input  logic [VW:0]                 n_valid,
  // results
  output logic                        busy,
  output logic                        feat_valid,
  output logic [L-1:0][FEAT_W-1:0]    feat,
  output logic                        match_valid,
  output logic [VW-1:0]               match_idx,
  output logic [DIST_W-1:0]           match_dist
);

  logic          rx_armed, rx_done;
  logic          wr_en;
  logic [AW-1:0] wr_addr;
  logic [PIX_W-1:0] wr_data;
  logic [AW:0]   region_len;
  logic          fe_busy, nn_busy;

  assign busy = rx_armed || rx_done || fe_busy || feat_valid || nn_busy;

  region_extractor u_rx (
    .clk        (clk),
    .rst_n      (rst_n),
    .start      (start && !busy),
    .region_sel (region_sel),
    .pix_valid  (img_valid),
    .pix        (img_pix),
    .wr_en      (wr_en),
    .wr_addr    (wr_addr),
    .wr_data    (wr_data),
    .done       (rx_done),
    .region_len (region_len),
    .armed      (rx_armed)
  );

  feature_extractor #(.NF(NF), .NTAPS(NTAPS)) u_fe (
    .clk       (clk),
    .rst_n     (rst_n),
    .wr_en     (wr_en),
    .wr_addr   (wr_addr),
    .wr_data   (wr_data),
    .coef_we   (coef_we && !busy),
    .coef_filt (coef_filt),
    .coef_grp  (coef_grp),
    .coef_data (coef_data),
    .start     (rx_done),
    .len       (region_len),
    .busy      (fe_busy),
    .done      (feat_valid),
    .feat      (feat)
  );

  nn_classifier #(.N(N), .L(L)) u_nn (
    .clk        (clk),
    .rst_n      (rst_n),
    .db_we      (db_we && !busy),
    .db_vec     (db_vec),
    .db_idx     (db_idx),
    .db_data    (db_data),
    .n_valid    (n_valid),
    .start      (feat_valid),
    .x          (feat),
    .busy       (nn_busy),
    .done       (match_valid),
    .match_idx  (match_idx),
    .match_dist (match_dist)
  );

endmodule
