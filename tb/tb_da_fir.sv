// tb_da_fir: self-checking test of the distributed-arithmetic FIR filter in
// three arrangements: bit-serial (1 bit per clock, the default), 4 bits per
// clock, and full-parallel (all 8 bits in one clock). Each arrangement is
// driven and checked by its own da_fir_check instance.
module tb_da_fir;
  import face_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic fin [3];
  int   chk [3], fl [3];

  da_fir_check #(.BPC(1)) u_serial   (.clk, .rst_n, .finished(fin[0]), .checks(chk[0]), .failures(fl[0]));
  da_fir_check #(.BPC(4)) u_four     (.clk, .rst_n, .finished(fin[1]), .checks(chk[1]), .failures(fl[1]));
  da_fir_check #(.BPC(8)) u_parallel (.clk, .rst_n, .finished(fin[2]), .checks(chk[2]), .failures(fl[2]));

  int checks, failures;
  always_comb begin
    checks = chk[0] + chk[1] + chk[2];
    failures = fl[0] + fl[1] + fl[2];
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    wait (fin[0] && fin[1] && fin[2]);
    @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
