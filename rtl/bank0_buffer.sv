// bank0_buffer: the region buffer (BANK 0) between the region extractor and
// the Gabor filter bank.
//
// A simple dual-port memory of DEPTH pixels: one write port filled by the
// region extractor, one read port drained in order by the feature
// extractor. The read is registered: rd_data holds the word addressed in the
// clock where rd_en was high, from the next clock on. Depth and the
// registered read are this design's choices; the depth holds the largest
// facial window (21 x 86 pixels).
module bank0_buffer
  import face_pkg::*;
#(
  parameter int unsigned DEPTH = BANK_DEPTH,
  parameter int unsigned W     = PIX_W,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  logic [W-1:0]  wr_data,
  input  logic          rd_en,
  input  logic [AW-1:0] rd_addr,
  output logic [W-1:0]  rd_data
);

  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    if (rd_en) rd_data <= mem[rd_addr];
  end

endmodule
