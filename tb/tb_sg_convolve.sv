// tb_sg_convolve: self-checking testbench of the convolve sub-unit.
//
// The coefficients are the Savitzky-Golay smoothing weights for an 11-point
// window and a cubic polynomial, computed here in double precision (checked
// against the tabulated values -36, 9, 44, 69, 84, 89 over 429) and rounded
// to the kernel's fixed-point format. Four series are filtered:
//   1. random price-like data with random input and output stalls: every
//      output is compared with a 128-bit reference convolution;
//   2. a cubic polynomial without stalls: the smoothed values must equal the
//      polynomial itself (a Savitzky-Golay filter reproduces polynomials up
//      to its order), and the run must take one cycle per sample; the first
//      output must appear 3 cycles after its window is complete;
//   3. alternating extreme values: the outputs must saturate;
//   4. a series shorter than the window: no output, done still pulses.
module tb_sg_convolve;
  import sg_pkg::*;

  `include "sg_tb_coef.svh"

  localparam int unsigned W = 11;
  localparam int ORDER = 3;

  logic clk = 1'b0;
  logic rst_n;
  always #5 clk = ~clk;

  logic    start, busy, done;
  len_t    len;
  coef_t   coef [W];
  logic    s_valid, s_ready, m_valid, m_ready;
  sample_t s_data, m_data;

  sg_convolve #(.W(W)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL: %s (t=%0t)", msg, $time);
    end
  endtask

  sample_t x [4096];
  int      n_in, sent, got, in_stall, out_stall, done_cnt;
  longint  cyc, t_wth_accept, t_first_out;

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

  // stimulus and consumer, changed between clock edges
  always_ff @(negedge clk) begin
    s_valid <= rst_n && (sent < n_in) && ($urandom_range(0, 99) >= in_stall);
    s_data  <= x[sent];
    m_ready <= ($urandom_range(0, 99) >= out_stall);
  end

  int sat_hi, sat_lo;
  always @(posedge clk) begin
    cyc++;
    if (rst_n) begin
      if (s_valid && s_ready) begin
        sent++;
        if (sent == int'(W)) t_wth_accept = cyc;
      end
      if (m_valid && t_first_out < 0) t_first_out = cyc;
      if (m_valid && m_ready) begin
        automatic sample_t e = ref_out(got);
        check(m_data == e, $sformatf("output %0d: %0d, expected %0d", got, m_data, e));
        if (m_data == 32'sh7FFF_FFFF) sat_hi++;
        if (m_data == 32'sh8000_0000) sat_lo++;
        got++;
      end
      if (done) done_cnt++;
    end
  end

  task automatic run(input int n, input int stall, output longint cycles);
    longint t0;
    n_in = n; sent = 0; got = 0; done_cnt = 0;
    in_stall = stall; out_stall = stall;
    t_wth_accept = -1; t_first_out = -1;
    @(negedge clk);
    start = 1'b1;
    len = len_t'(n);
    t0 = cyc;
    @(negedge clk);
    start = 1'b0;
    while (!done) @(negedge clk);
    cycles = cyc - t0;
    @(negedge clk);
    check(sent == n, "all samples consumed");
    check(got == ((n >= int'(W)) ? n - int'(W) + 1 : 0), $sformatf("output count %0d", got));
    check(done_cnt == 1, "one done pulse");
    check(!busy, "idle after done");
  endtask

  real    c [64];
  longint cycles;
  initial begin
    cyc = 0;
    rst_n = 1'b0; start = 1'b0; len = '0;
    n_in = 0; sent = 0; in_stall = 0; out_stall = 0;
    sg_coefs(W, ORDER, c);
    foreach (coef[j]) coef[j] = coef_t'(sg_quant(c[j], COEF_FRAC));
    check(rabs(c[0] * 429.0 + 36.0) < 1e-9 && rabs(c[1] * 429.0 - 9.0) < 1e-9 &&
          rabs(c[2] * 429.0 - 44.0) < 1e-9 && rabs(c[3] * 429.0 - 69.0) < 1e-9 &&
          rabs(c[4] * 429.0 - 84.0) < 1e-9 && rabs(c[5] * 429.0 - 89.0) < 1e-9 &&
          rabs(c[10] - c[0]) < 1e-12, "reference coefficients");
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;

    // 1. random walk of prices (cents), random stalls
    x[0] = 32'sd1_000_000;
    for (int i = 1; i < 3000; i++) x[i] = x[i-1] + sample_t'($urandom_range(0, 2000)) - 32'sd1000;
    run(3000, 30, cycles);

    // 2. cubic polynomial, no stalls: output equals the centre sample
    for (int i = 0; i < 1000; i++) begin
      automatic real t = real'(i - 500) / 10.0;
      x[i] = sample_t'(longint'(3.0 * t * t * t - 40.0 * t * t + 7.0 * t + 12345.0));
    end
    run(1000, 0, cycles);
    for (int k = 0; k + int'(W) <= 1000; k++) begin
      automatic real t = real'(k + 5 - 500) / 10.0;
      automatic real p = 3.0 * t * t * t - 40.0 * t * t + 7.0 * t + 12345.0;
      check(rabs(real'(ref_out(k)) - p) <= 2.0, $sformatf("polynomial preserved at %0d", k));
    end
    check(cycles <= 1000 + 6, $sformatf("one sample per cycle: %0d cycles", cycles));
    // m_valid rises on the 3rd edge after the accepting one, so the edge
    // sampler first sees it high at the 4th
    check(t_first_out - t_wth_accept == 4,
          $sformatf("latency %0d cycles", t_first_out - t_wth_accept));

    // 3. extremes of alternating sign follow the coefficient signs: saturate
    sat_hi = 0; sat_lo = 0;
    for (int i = 0; i < 200; i++) begin
      automatic int ph = i % int'(W);
      x[i] = (c[ph] < 0.0) ? 32'sh8000_0000 : 32'sh7FFF_FFFF;
      if ((i / int'(W)) % 2 == 1) x[i] = (c[ph] < 0.0) ? 32'sh7FFF_FFFF : 32'sh8000_0000;
    end
    run(200, 10, cycles);
    check(sat_hi > 0 && sat_lo > 0, $sformatf("saturation seen (%0d high, %0d low)", sat_hi, sat_lo));

    // 4. shorter than the window
    run(int'(W) - 1, 0, cycles);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
