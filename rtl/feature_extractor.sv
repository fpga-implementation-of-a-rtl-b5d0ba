// feature_extractor: turns one facial region into the feature vector
// V = {v_1 .. v_NF}, the maximum intensity of each of the NF Gabor responses.
//
// Structure: BANK 0 (bank0_buffer) holds the region, written from outside
// through wr_*. A Register (pixel_register) takes the pixels from BANK 0 in
// order and broadcasts each one to the NF distributed-arithmetic FIR filters
// (gabor_fir_bank); the output of filter f feeds max comparator f.
//
// Operation: start (while idle) with the region length len zeroes the FIR
// delay lines and the comparators, then streams BANK 0 words 0..len-1. A
// read is issued whenever the register is empty and no read is in flight;
// the register hands its pixel to the filters when they are ready (rfd).
// Each filter output updates its comparator. When the len-th output has been
// compared, done pulses for one clock and feat holds V until the next start.
// The pixel rate is set by the filters: one pixel per PIX_W/DA_BPC + 1 clocks
// (9 with the default bit-serial filters). done
// also marks BANK 0 as free for the next region. The read sequencing is this
// design's own.
module feature_extractor
  import face_pkg::*;
#(
  parameter int unsigned NF    = NUM_FILTERS,
  parameter int unsigned NTAPS = TAPS,
  parameter int unsigned DEPTH = BANK_DEPTH,
  localparam int unsigned AW     = $clog2(DEPTH),
  localparam int unsigned FW_SEL = (NF > 1) ? $clog2(NF) : 1,
  localparam int unsigned GW     = (NTAPS / DA_K > 1) ? $clog2(NTAPS / DA_K) : 1
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // BANK 0 write port
  input  logic                       wr_en,
  input  logic [AW-1:0]              wr_addr,
  input  logic [PIX_W-1:0]           wr_data,
  // coefficient load
  input  logic                       coef_we,
  input  logic [FW_SEL-1:0]          coef_filt,
  input  logic [GW-1:0]              coef_grp,
  input  logic [DA_K-1:0][COEF_W-1:0] coef_data,
  // control
  input  logic                       start,
  input  logic [AW:0]                len,
  output logic                       busy,
  output logic                       done,
  output logic [NF-1:0][FEAT_W-1:0]  feat
);

  logic                    clr;
  logic [AW:0]             rd_ptr, out_cnt;
  logic                    rd_en, rd_pending;
  logic [PIX_W-1:0]        rd_data;
  logic                    reg_valid;
  logic [PIX_W-1:0]        reg_q;
  logic                    take;
  logic                    fir_rfd, fir_rdy;
  logic [NF-1:0][ACC_W-1:0] fir_dout;

  assign clr   = start && !busy;
  assign rd_en = busy && (rd_ptr < len) && !reg_valid && !rd_pending;
  assign take  = busy && reg_valid && fir_rfd;

  bank0_buffer #(.DEPTH(DEPTH), .W(PIX_W)) u_bank0 (
    .clk     (clk),
    .wr_en   (wr_en),
    .wr_addr (wr_addr),
    .wr_data (wr_data),
    .rd_en   (rd_en),
    .rd_addr (rd_ptr[AW-1:0]),
    .rd_data (rd_data)
  );

  pixel_register #(.W(PIX_W)) u_reg (
    .clk   (clk),
    .rst_n (rst_n),
    .load  (rd_pending),
    .d     (rd_data),
    .take  (take),
    .valid (reg_valid),
    .q     (reg_q)
  );

  gabor_fir_bank #(.NF(NF), .NTAPS(NTAPS)) u_bank (
    .clk       (clk),
    .rst_n     (rst_n),
    .clr       (clr),
    .coef_we   (coef_we),
    .coef_filt (coef_filt),
    .coef_grp  (coef_grp),
    .coef_data (coef_data),
    .din       (reg_q),
    .nd        (take),
    .rfd       (fir_rfd),
    .dout      (fir_dout),
    .rdy       (fir_rdy)
  );

  for (genvar f = 0; f < int'(NF); f++) begin : g_cmp
    max_comparator u_cmp (
      .clk     (clk),
      .rst_n   (rst_n),
      .clr     (clr),
      .x_valid (fir_rdy),
      .x       (signed'(fir_dout[f])),
      .y       (feat[f])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy       <= 1'b0;
      done       <= 1'b0;
      rd_ptr     <= '0;
      out_cnt    <= '0;
      rd_pending <= 1'b0;
    end else begin
      done       <= 1'b0;
      rd_pending <= rd_en;
      if (clr) begin
        busy    <= 1'b1;
        rd_ptr  <= '0;
        out_cnt <= '0;
        if (len == '0) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end else if (busy) begin
        if (rd_en) rd_ptr <= rd_ptr + 1'b1;
        if (fir_rdy) begin
          out_cnt <= out_cnt + 1'b1;
          if (out_cnt + 1'b1 == len) begin
            busy <= 1'b0;
            done <= 1'b1;
          end
        end
      end
    end
  end

endmodule
