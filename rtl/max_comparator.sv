// max_comparator: reduces one Gabor filter's output sequence to its maximum
// intensity, one element v_i of the feature vector.
//
// Each valid FIR output x is turned into an intensity: its magnitude |x|,
// shifted right by SHIFT to drop the coefficient fraction, then saturated
// to FW bits. A two-input maximum y = max(x1, x2) compares it (x1) with the
// value held so far (x2) and keeps the larger. clr zeroes the held value at
// the start of a region. y is registered and changes in the clock after
// x_valid. Using the magnitude, the shift and the saturating cast are this
// design's reading of "maximum intensity" for a signed filter output.
module max_comparator
  import face_pkg::*;
#(
  parameter int unsigned XW    = ACC_W,
  parameter int unsigned FW    = FEAT_W,
  parameter int unsigned SHIFT = OUT_SHIFT
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 clr,
  input  logic                 x_valid,
  input  logic signed [XW-1:0] x,
  output logic [FW-1:0]        y
);

  function automatic logic [FW-1:0] max2(logic [FW-1:0] x1, logic [FW-1:0] x2);
    return (x1 > x2) ? x1 : x2;
  endfunction

  logic [XW-1:0] mag, scaled;
  logic [FW-1:0] intensity;

  assign mag       = x[XW-1] ? XW'(-x) : XW'(x);
  assign scaled    = mag >> SHIFT;
  assign intensity = (scaled > XW'({FW{1'b1}})) ? {FW{1'b1}} : FW'(scaled);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       y <= '0;
    else if (clr)     y <= '0;
    else if (x_valid) y <= max2(intensity, y);
  end

endmodule
