// min_comparator: finds the smallest City Block distance and the index of
// the training vector it belongs to.
//
// A two-input minimum y = min(x1, x2) compares one distance per clock (x1 =
// d[j]) with the smallest so far (x2); on a strict improvement the index is
// kept, so ties resolve to the lower index. start (while idle) scans
// entries 0 .. n_valid-1 of d, which must stay stable during the scan; done
// pulses n_valid+1 clocks after start with min_idx / min_val valid until the
// next start. With n_valid = 0, min_val is all ones. The serial scan and the
// index output are this design's choices.
module min_comparator
  import face_pkg::*;
#(
  parameter int unsigned N  = N_TRAIN,
  parameter int unsigned DW = DIST_W,
  localparam int unsigned VW = (N > 1) ? $clog2(N) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic [VW:0]          n_valid,
  input  logic [N-1:0][DW-1:0] d,
  output logic                 busy,
  output logic                 done,
  output logic [VW-1:0]        min_idx,
  output logic [DW-1:0]        min_val
);

  function automatic logic [DW-1:0] min2(logic [DW-1:0] x1, logic [DW-1:0] x2);
    return (x1 < x2) ? x1 : x2;
  endfunction

  logic [VW:0]   j;
  logic [DW-1:0] x1, y;

  assign x1 = d[j[VW-1:0]];
  assign y  = min2(x1, min_val);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy    <= 1'b0;
      done    <= 1'b0;
      j       <= '0;
      min_idx <= '0;
      min_val <= '1;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy    <= 1'b1;
          j       <= '0;
          min_idx <= '0;
          min_val <= '1;
        end
      end else if (j >= n_valid || j >= (VW+1)'(N)) begin
        busy <= 1'b0;
        done <= 1'b1;
      end else begin
        if (x1 < min_val) min_idx <= j[VW-1:0];
        min_val <= y;
        j       <= j + 1'b1;
      end
    end
  end

endmodule
