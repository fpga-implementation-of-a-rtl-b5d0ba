// cityblock_array: N City Block paths in parallel, one per training vector.
//
// All paths receive the same test feature a and their own training feature
// b[j]; after L enabled clocks d[j] is the distance between the test vector
// and training vector j. Timing is that of cityblock_path.
module cityblock_array
  import face_pkg::*;
#(
  parameter int unsigned N  = N_TRAIN,
  parameter int unsigned FW = FEAT_W,
  parameter int unsigned DW = DIST_W
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 clr,
  input  logic                 en,
  input  logic [FW-1:0]        a,
  input  logic [N-1:0][FW-1:0] b,
  output logic [N-1:0][DW-1:0] d
);

  for (genvar j = 0; j < int'(N); j++) begin : g_path
    cityblock_path #(.FW(FW), .DW(DW)) u_path (
      .clk   (clk),
      .rst_n (rst_n),
      .clr   (clr),
      .en    (en),
      .a     (a),
      .b     (b[j]),
      .d     (d[j])
    );
  end

endmodule
