// sg_tb_case: one filter configuration run end to end, for testbenches.
//
// Builds the kernel with a W-tap window, computes the Savitzky-Golay
// coefficients for polynomial order ORDER, and filters one series of N
// samples held in a global-memory model that stalls at random. The series
// is a polynomial of degree ORDER plus a small random walk. Every output word
// is compared with a 128-bit reference convolution; in addition, without the
// random part a filter of that order must reproduce the polynomial, which is
// checked with a second run. It raises finished when both runs are over and
// reports its check and failure counts on its ports.
module sg_tb_case
  import sg_pkg::*;
#(
  parameter int unsigned W     = 15,
  parameter int          ORDER = 4,
  parameter int          N     = 5000
) (
  input  logic clk,
  input  logic rst_n,
  output logic finished,
  output int   checks,
  output int   failures
);

  `include "sg_tb_coef.svh"

  localparam int unsigned WORDS = 1 << 15;
  localparam int          DST   = 1 << 14;

  logic    start, busy, done;
  addr_t   src_addr, dst_addr;
  len_t    n_samples;
  coef_t   coef [W];
  logic    rd_req_valid, rd_req_ready, rd_rsp_valid, rd_rsp_ready;
  addr_t   rd_req_addr;
  sample_t rd_rsp_data;
  logic    wr_valid, wr_ready;
  addr_t   wr_addr;
  sample_t wr_data;

  sg_kernel #(.W(W)) dut (.*);
  sg_mem_model #(.WORDS(WORDS), .LAT_MIN(2), .LAT_MAX(16), .STALL_PCT(15)) mem (.*);

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL (W=%0d): %s (t=%0t)", W, msg, $time);
    end
  endtask

  sample_t x [N];
  real     c [64];
  real     poly [8];

  function automatic sample_t ref_out(input int k);
    logic signed [127:0] acc = 0;
    logic signed [127:0] q;
    for (int j = 0; j < int'(W); j++)
      acc += 128'(signed'(coef[j])) * 128'(signed'(x[k + j]));
    q = (acc + (128'sd1 <<< (COEF_FRAC - 1))) >>> COEF_FRAC;
    if (q > 128'sd2147483647) return 32'sh7FFF_FFFF;
    if (q < -128'sd2147483648) return 32'sh8000_0000;
    return sample_t'(q);
  endfunction

  function automatic real p_at(input real t);
    real v = 0.0;
    for (int k = ORDER; k >= 0; k--) v = v * t + poly[k];
    return v;
  endfunction

  task automatic run(input bit noisy);
    int n_out = N - int'(W) + 1;
    int bad = 0, bad_poly = 0;
    automatic int walk = 0;
    for (int i = 0; i < N; i++) begin
      if (noisy) walk += $urandom_range(0, 200) - 100;
      x[i] = sample_t'(longint'(p_at(real'(i) / 100.0)) + longint'(walk));
      mem.words[i] = x[i];
    end
    mem.words[DST + n_out] = 32'hA5A5_A5A5;
    @(negedge clk);
    start = 1'b1;
    src_addr = '0;
    dst_addr = addr_t'(DST) << 2;
    n_samples = len_t'(N);
    @(negedge clk);
    start = 1'b0;
    while (!done) @(negedge clk);
    @(negedge clk);
    for (int k = 0; k < n_out; k++) begin
      if (mem.words[DST + k] != ref_out(k)) bad++;
      if (!noisy) begin
        // centre of window k, halfway between samples for an even W
        real t = (real'(k) + real'(W - 1) / 2.0) / 100.0;
        real d = real'(signed'(mem.words[DST + k])) - p_at(t);
        if (d > 3.0 || d < -3.0) bad_poly++;
      end
    end
    check(bad == 0, $sformatf("%0d outputs match the reference", n_out));
    if (!noisy) check(bad_poly == 0, $sformatf("polynomial of order %0d reproduced", ORDER));
    check(mem.words[DST + n_out] == 32'hA5A5_A5A5, "nothing written past the output");
  endtask

  initial begin
    finished = 1'b0; checks = 0; failures = 0;
    start = 1'b0; src_addr = '0; dst_addr = '0; n_samples = '0;
    // a slowly varying polynomial of degree ORDER with a positive offset
    poly[0] = 150000.0;
    for (int k = 1; k <= ORDER; k++) poly[k] = ((k % 2) ? 900.0 : -35.0) / real'(k * k);
    sg_coefs(W, ORDER, c);
    foreach (coef[j]) coef[j] = coef_t'(sg_quant(c[j], COEF_FRAC));
    @(posedge rst_n);
    run(1'b1);
    run(1'b0);
    finished = 1'b1;
  end
endmodule
