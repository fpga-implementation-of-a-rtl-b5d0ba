// cityblock_path: one City Block distance path, d = sum_i |a_i - b_i|.
//
// An AddSub stage forms a - b for the current pair of features (a from the
// test vector, b from one training vector) and takes its magnitude; an
// Accumulator adds it to d. One pair per clock while en is high; clr zeroes
// d. d is registered: it includes a pair from the clock after that pair's
// en. DW must hold L times the largest feature.
module cityblock_path
  import face_pkg::*;
#(
  parameter int unsigned FW = FEAT_W,
  parameter int unsigned DW = DIST_W
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clr,
  input  logic          en,
  input  logic [FW-1:0] a,
  input  logic [FW-1:0] b,
  output logic [DW-1:0] d
);

  logic [FW-1:0] absdiff;

  // AddSub: |a - b|
  assign absdiff = (a >= b) ? (a - b) : (b - a);

  // Accumulator: d += |a - b|
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   d <= '0;
    else if (clr) d <= '0;
    else if (en)  d <= d + DW'(absdiff);
  end

endmodule
