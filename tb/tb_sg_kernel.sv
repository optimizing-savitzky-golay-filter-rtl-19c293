// tb_sg_kernel: end-to-end testbench of the filter kernel at its default
// parameters (11-tap window, FIFO depth 2).
//
// It runs the evaluated use case: ten assets, each a series of 20000 32-bit
// closing prices, smoothed one after the other with the Savitzky-Golay
// filter of polynomial order 3 and window 11. The coefficients are computed
// here in double precision and rounded to the kernel's fixed-point format.
// The prices are random walks generated here. Every output word is compared
// with a reference convolution, and the words around each output series
// must stay untouched. The global-memory model stalls at random with a
// random latency, except for one asset that runs on an ideal memory to
// check that the kernel then processes one sample per clock cycle.
// Before the assets, short series exercise the edges: shorter than the
// window, exactly one window, and a start request while the kernel is busy,
// which must be ignored.
//
// The testbench counts how often each mechanism of the dataflow happened:
// read, response and write stalls of the memory, the outstanding-read limit,
// a full and an empty input FIFO, a full output FIFO stalling convolve,
// window fill, the short series and the ignored start. One that never
// happened counts as a failure.
module tb_sg_kernel;
  import sg_pkg::*;

  `include "sg_tb_coef.svh"

  localparam int unsigned W       = WINDOW_DEFAULT;
  localparam int          ORDER   = 3;
  localparam int          ASSETS  = 10;
  localparam int          N       = 20000;
  localparam int unsigned WORDS   = 1 << 19;
  localparam int          DST_OFF = 1 << 18;   // output region, in words

  logic clk = 1'b0;
  logic rst_n;
  always #5 clk = ~clk;

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

  sg_kernel dut (.*);
  sg_mem_model #(.WORDS(WORDS), .LAT_MIN(2), .LAT_MAX(24), .STALL_PCT(15)) mem (.*);

  int checks = 0, failures = 0;
  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL: %s (t=%0t)", msg, $time);
    end
  endtask

  // mechanism counters
  int in_fifo_full = 0, in_fifo_empty = 0, out_fifo_full = 0, cv_stall = 0;
  int outstanding_limit = 0, window_fills = 0, short_series = 0, start_ignored = 0;
  int done_cnt = 0;
  bit filled = 1'b0;
  longint cyc = 0;

  always @(posedge clk) begin
    cyc++;
    if (rst_n) begin
      if (dut.in_level == 2'd2) in_fifo_full++;
      if (dut.u_convolve.busy && dut.u_convolve.in_left != 0 && dut.in_level == 2'd0)
        in_fifo_empty++;
      if (dut.out_level == 2'd2) out_fifo_full++;
      if (dut.u_convolve.m_valid && !dut.u_convolve.m_ready) cv_stall++;
      if (dut.u_read.busy && dut.u_read.req_left != 0 &&
          dut.u_read.outstanding == dut.u_read.OUT_W'(dut.MAX_OUTSTANDING))
        outstanding_limit++;
      // the first window of a run is complete when its W-th sample enters
      if (dut.go) filled = 1'b0;
      if (dut.u_convolve.accept && dut.u_convolve.full_after && !filled) begin
        window_fills++;
        filled = 1'b1;
      end
      if (done) done_cnt++;
    end
  end

  sample_t x [N];

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

  // Filter series x[0..n-1] stored at word src, results to word dst.
  task automatic run(input int src, input int dst, input int n, input bit poke_start,
                     output longint cycles);
    longint t0;
    int     n_out = (n >= int'(W)) ? n - int'(W) + 1 : 0;
    for (int i = 0; i < n; i++) mem.words[src + i] = x[i];
    for (int i = -1; i <= n_out; i++) mem.words[dst + i] = 32'hA5A5_A5A5;
    done_cnt = 0;
    @(negedge clk);
    start = 1'b1;
    src_addr = addr_t'(src) << 2;
    dst_addr = addr_t'(dst) << 2;
    n_samples = len_t'(n);
    t0 = cyc;
    @(negedge clk);
    start = 1'b0;
    check(busy, "busy after start");
    if (poke_start && busy) begin
      // a second start while busy, with other arguments, must be ignored
      start = 1'b1;
      src_addr = '0;
      n_samples = len_t'(3);
      @(negedge clk);
      start = 1'b0;
      src_addr = addr_t'(src) << 2;
      n_samples = len_t'(n);
      start_ignored++;
    end
    while (!done) @(negedge clk);
    cycles = cyc - t0;
    @(negedge clk);
    check(!busy && done_cnt == 1, "one done pulse, then idle");
    for (int k = 0; k < n_out; k++) begin
      sample_t e = ref_out(k);
      check(mem.words[dst + k] == e, $sformatf("output %0d of a %0d-sample series: %0d, expected %0d",
                                                k, n, signed'(mem.words[dst + k]), e));
    end
    check(mem.words[dst - 1] == 32'hA5A5_A5A5 && mem.words[dst + n_out] == 32'hA5A5_A5A5,
          "nothing written outside the output series");
    if (n < int'(W)) short_series++;
  endtask

  task automatic make_prices(input int n);
    x[0] = sample_t'($urandom_range(5_000, 500_000));   // price in cents
    for (int i = 1; i < n; i++) begin
      x[i] = x[i-1] + sample_t'($urandom_range(0, 400)) - 32'sd200;
      if (x[i] < 1) x[i] = 1;
    end
  endtask

  real    c [64];
  longint cycles, total_cycles;
  initial begin
    rst_n = 1'b0; start = 1'b0; src_addr = '0; dst_addr = '0; n_samples = '0;
    sg_coefs(W, ORDER, c);
    foreach (coef[j]) coef[j] = coef_t'(sg_quant(c[j], COEF_FRAC));
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;

    // edges
    make_prices(64);
    run(16, DST_OFF + 16, int'(W) - 3, 0, cycles);
    run(16, DST_OFF + 16, int'(W), 1, cycles);
    run(16, DST_OFF + 16, 64, 1, cycles);

    // the use case: ASSETS series of N samples; asset 3 on an ideal memory
    total_cycles = 0;
    for (int a = 0; a < ASSETS; a++) begin
      make_prices(N);
      if (a == 3) begin
        mem.stall_pct = 0; mem.lat_min = 2; mem.lat_max = 2;
      end else begin
        mem.stall_pct = 15; mem.lat_min = 2; mem.lat_max = 24;
      end
      run(1024 + a * N, DST_OFF + 1024 + a * N, N, 0, cycles);
      total_cycles += cycles;
      if (a == 3)
        check(cycles <= N + 12, $sformatf("ideal memory: %0d cycles for %0d samples", cycles, N));
      $display("asset %0d: %0d samples in %0d cycles", a, N, cycles);
    end
    $display("%0d assets: %0d cycles in total", ASSETS, total_cycles);

    $display("mechanisms: rd_stall=%0d rsp_backpressure=%0d wr_stall=%0d outstanding_limit=%0d",
             mem.req_stalls, mem.rsp_backpressure, mem.wr_stalls, outstanding_limit);
    $display("            in_fifo_full=%0d in_fifo_empty=%0d out_fifo_full=%0d convolve_stall=%0d",
             in_fifo_full, in_fifo_empty, out_fifo_full, cv_stall);
    $display("            window_fills=%0d short_series=%0d start_ignored=%0d bad_addr=%0d",
             window_fills, short_series, start_ignored, mem.bad_addr);
    check(mem.req_stalls > 0, "memory read-request stall happened");
    check(mem.rsp_backpressure > 0, "read-response backpressure happened");
    check(mem.wr_stalls > 0, "memory write stall happened");
    check(outstanding_limit > 0, "outstanding-read limit reached");
    check(in_fifo_full > 0, "input FIFO full");
    check(in_fifo_empty > 0, "input FIFO empty while convolve waits");
    check(out_fifo_full > 0, "output FIFO full");
    check(cv_stall > 0, "convolve stalled by the output FIFO");
    check(window_fills == ASSETS + 2, "window filled once per long-enough series");
    check(short_series > 0, "series shorter than the window");
    check(start_ignored > 0, "start while busy");
    check(mem.bad_addr == 0, "all addresses inside memory");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
