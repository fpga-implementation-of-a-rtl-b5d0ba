// feature_database: memory of the enrolled (training) feature vectors.
//
// N vectors of L features, FW bits each. Written one feature at a time
// (we, wr_vec, wr_idx, wr_data). For the parallel distance paths the read
// port returns feature rd_idx of every vector at once: rd_data[j] is feature
// rd_idx of vector j, registered, valid in the clock after rd_en. It is
// organised as N memories of L words, one per distance path; the
// organisation and the 16-bit word are this design's choices.
module feature_database
  import face_pkg::*;
#(
  parameter int unsigned N  = N_TRAIN,
  parameter int unsigned L  = FEAT_LEN,
  parameter int unsigned FW = FEAT_W,
  localparam int unsigned VW = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned IW = (L > 1) ? $clog2(L) : 1
) (
  input  logic                 clk,
  input  logic                 we,
  input  logic [VW-1:0]        wr_vec,
  input  logic [IW-1:0]        wr_idx,
  input  logic [FW-1:0]        wr_data,
  input  logic                 rd_en,
  input  logic [IW-1:0]        rd_idx,
  output logic [N-1:0][FW-1:0] rd_data
);

  for (genvar j = 0; j < int'(N); j++) begin : g_vec
    logic [FW-1:0] mem [L];
    always_ff @(posedge clk) begin
      if (we && (wr_vec == VW'(j))) mem[wr_idx] <= wr_data;
      if (rd_en) rd_data[j] <= mem[rd_idx];
    end
  end

endmodule
