// pixel_register: the one-pixel register that broadcasts the current pixel
// from BANK 0 to all Gabor FIR filters.
//
// load captures d and sets valid; take (the filters accepting the pixel)
// clears valid. A load in the same clock as take replaces the pixel and
// keeps valid set. q is the held pixel. The valid/take handshake is this
// design's choice.
module pixel_register
  import face_pkg::*;
#(
  parameter int unsigned W = PIX_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [W-1:0] d,
  input  logic         take,
  output logic         valid,
  output logic [W-1:0] q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid <= 1'b0;
      q     <= '0;
    end else begin
      if (load) begin
        valid <= 1'b1;
        q     <= d;
      end else if (take) begin
        valid <= 1'b0;
      end
    end
  end

  // The filters may only take a pixel that is held.
  assert property (@(posedge clk) disable iff (!rst_n) take |-> valid);

endmodule
