// tb_sg_workloads: the two smaller filter configurations shown alongside the
// main use case, each run end to end on a kernel built for its window:
//   - window 15, polynomial order 4, 5000 samples (a 20 KB series);
//   - window 10, polynomial order 3, 200 samples.
// Each case (sg_tb_case) checks every output against a reference
// convolution and checks that its filter reproduces a polynomial of its
// order. The counts of both are summed here.
module tb_sg_workloads;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic fin15, fin10;
  int   chk15, chk10, fail15, fail10;

  sg_tb_case #(.W(15), .ORDER(4), .N(5000)) case15 (
    .clk, .rst_n, .finished(fin15), .checks(chk15), .failures(fail15));
  sg_tb_case #(.W(10), .ORDER(3), .N(200)) case10 (
    .clk, .rst_n, .finished(fin10), .checks(chk10), .failures(fail10));

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    wait (fin15 && fin10);
    $display("TB_RESULT checks=%0d failures=%0d", chk15 + chk10, fail15 + fail10);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", chk15 + chk10, fail15 + fail10 + 1);
    $finish;
  end
endmodule
