// nn_classifier: nearest-neighbour classifier (K = 1) with the City Block
// distance.
//
// start (while idle) captures the test vector x and clears the distance
// paths. The database is then read one feature index per clock, i = 0 ..
// L-1; one clock later (registered read) feature i of every training vector
// and x[i] enter the N parallel distance paths (cityblock_array). When all
// L terms are in, the minimum finder scans the first n_valid distances.
// done pulses with match_idx (the nearest training vector) and match_dist
// (its distance) valid until the next start. Latency from start to done is
// L + n_valid + 6 clocks. The training vectors are written beforehand
// through the db_* port. The sequencing is this design's own.
module nn_classifier
  import face_pkg::*;
#(
  parameter int unsigned N  = N_TRAIN,
  parameter int unsigned L  = FEAT_LEN,
  parameter int unsigned FW = FEAT_W,
  parameter int unsigned DW = DIST_W,
  localparam int unsigned VW = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned IW = (L > 1) ? $clog2(L) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // database load
  input  logic                 db_we,
  input  logic [VW-1:0]        db_vec,
  input  logic [IW-1:0]        db_idx,
  input  logic [FW-1:0]        db_data,
  input  logic [VW:0]          n_valid,
  // classification
  input  logic                 start,
  input  logic [L-1:0][FW-1:0] x,
  output logic                 busy,
  output logic                 done,
  output logic [VW-1:0]        match_idx,
  output logic [DW-1:0]        match_dist
);

  typedef enum logic [1:0] {S_IDLE, S_DIST, S_MIN} state_e;

  state_e               state;
  logic [L-1:0][FW-1:0] x_q;
  logic [IW:0]          i;
  logic                 rd_en, acc_en;
  logic [IW-1:0]        i_d;
  logic [N-1:0][FW-1:0] train;
  logic [N-1:0][DW-1:0] dvec;
  logic                 clr, min_start, min_busy, min_done;

  assign clr   = (state == S_IDLE) && start;
  assign rd_en = (state == S_DIST) && (i < (IW+1)'(L));
  assign busy  = (state != S_IDLE);

  feature_database #(.N(N), .L(L), .FW(FW)) u_db (
    .clk     (clk),
    .we      (db_we),
    .wr_vec  (db_vec),
    .wr_idx  (db_idx),
    .wr_data (db_data),
    .rd_en   (rd_en),
    .rd_idx  (i[IW-1:0]),
    .rd_data (train)
  );

  cityblock_array #(.N(N), .FW(FW), .DW(DW)) u_dist (
    .clk   (clk),
    .rst_n (rst_n),
    .clr   (clr),
    .en    (acc_en),
    .a     (x_q[i_d]),
    .b     (train),
    .d     (dvec)
  );

  min_comparator #(.N(N), .DW(DW)) u_min (
    .clk     (clk),
    .rst_n   (rst_n),
    .start   (min_start),
    .n_valid (n_valid),
    .d       (dvec),
    .busy    (min_busy),
    .done    (min_done),
    .min_idx (match_idx),
    .min_val (match_dist)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      x_q       <= '0;
      i         <= '0;
      i_d       <= '0;
      acc_en    <= 1'b0;
      min_start <= 1'b0;
      done      <= 1'b0;
    end else begin
      acc_en    <= rd_en;
      i_d       <= i[IW-1:0];
      min_start <= 1'b0;
      done      <= 1'b0;
      case (state)
        S_IDLE: if (start) begin
          x_q   <= x;
          i     <= '0;
          state <= S_DIST;
        end
        S_DIST: begin
          if (rd_en) i <= i + 1'b1;
          else if (!acc_en) begin
            min_start <= 1'b1;
            state     <= S_MIN;
          end
        end
        S_MIN: if (min_done) begin
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // While the classifier waits in S_MIN the minimum finder is being started,
  // scanning, or finishing.
  assert property (@(posedge clk) disable iff (!rst_n)
                   (state == S_MIN) |-> (min_start || min_busy || min_done));

endmodule
