// region_extractor: cuts the eye, nose or mouth window out of a face image
// stream and writes it into the region buffer (BANK 0).
//
// The image arrives row-major, one pixel per pix_valid, IMG_ROWS x IMG_COLS
// pixels. A row and a column counter follow the stream; a pixel whose
// position lies inside the window chosen by region_sel (captured at start)
// is written to the buffer at consecutive addresses from 0, so the buffer
// ends up holding the window itself, row-major. The window bounds are the
// fixed facial windows of face_pkg::region_window; the streaming hardware
// form of the cut is this design's own.
//
// Timing: start arms the block (ignored while armed). Each accepted pixel
// produces its buffer write in the same clock (wr_* are combinational from
// the inputs). After the last pixel of the image, done pulses for one clock
// and region_len holds the number of pixels written until the next start.
module region_extractor
  import face_pkg::*;
#(
  parameter int unsigned ROWS = IMG_ROWS,
  parameter int unsigned COLS = IMG_COLS,
  parameter int unsigned AW   = BANK_AW
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  region_e          region_sel,
  input  logic             pix_valid,
  input  logic [PIX_W-1:0] pix,
  output logic             wr_en,
  output logic [AW-1:0]    wr_addr,
  output logic [PIX_W-1:0] wr_data,
  output logic             done,
  output logic [AW:0]      region_len,
  output logic             armed
);

  logic [7:0] row, col;
  window_t    win;
  logic [AW:0] count;
  logic       in_win, last_pix;

  assign in_win   = (row >= win.row_lo) && (row <= win.row_hi) &&
                    (col >= win.col_lo) && (col <= win.col_hi);
  assign last_pix = (row == 8'(ROWS - 1)) && (col == 8'(COLS - 1));

  assign wr_en      = armed && pix_valid && in_win;
  assign wr_addr    = count[AW-1:0];
  assign wr_data    = pix;
  assign region_len = count;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      armed <= 1'b0;
      row   <= '0;
      col   <= '0;
      count <= '0;
      win   <= region_window(REG_EYE);
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!armed) begin
        if (start) begin
          armed <= 1'b1;
          row   <= '0;
          col   <= '0;
          count <= '0;
          win   <= region_window(region_sel);
        end
      end else if (pix_valid) begin
        if (in_win) count <= count + 1'b1;
        if (last_pix) begin
          armed <= 1'b0;
          done  <= 1'b1;
        end else if (col == 8'(COLS - 1)) begin
          col <= '0;
          row <= row + 1'b1;
        end else begin
          col <= col + 1'b1;
        end
      end
    end
  end

endmodule
