// sg_convolve: the "convolve" sub-unit of the filter kernel.
//
// It keeps the most recent W input samples in a local array and, for every
// new sample once the array is full, multiplies all W samples by their filter
// coefficients in parallel and sums the products. The result for window k is
//
//     y[k] = round( sum_{j=0}^{W-1} coef[j] * x[k+j] / 2**COEF_FRAC ),
//
// saturated to DATA_W bits, for k = 0 .. len-W. A series of len samples thus
// gives len-W+1 outputs (none when len < W). Savitzky-Golay smoothing
// coefficients are symmetric, so y[k] is the smoothed value of sample
// x[k+(W-1)/2].
//
// How it works: the local array is a shift register. Each accepted sample
// moves every element one place towards index 0 and enters at index W-1, so
// the array always holds the latest window. Work starts once the first W
// samples are in. The products, their sum and the rounded result are three
// registered pipeline stages behind the array, so one window is finished per
// clock cycle. The whole pipeline advances together and holds still while the
// output register is full and m_ready is low; no input is then accepted.
// The coefficients are latched at start and held for the whole series.
//
// Following the original: the window of W samples, W multiplications in
// parallel per window, the shift-in of one sample per window and the start
// after the first W samples. This design's choices: fixed-point arithmetic
// (the original does not give its number format), round-half-up, saturation,
// the three-stage pipeline, and "valid" convolution without padding at the
// two ends of the series.
//
// Interface: start (sampled while idle) with len and coef; input and output
// are valid/ready streams. busy is high from the edge after start until the
// last output has been taken; done pulses on that edge.
// Latency: an output is valid 3 cycles after the edge that accepted the last
// sample of its window; throughput one sample per cycle.
module sg_convolve
  import sg_pkg::*;
#(
  parameter int unsigned W = WINDOW_DEFAULT
) (
  input  logic    clk,
  input  logic    rst_n,
  // control
  input  logic    start,
  input  len_t    len,
  input  coef_t   coef [W],
  output logic    busy,
  output logic    done,
  // input stream (from the input FIFO)
  input  logic    s_valid,
  output logic    s_ready,
  input  sample_t s_data,
  // output stream (to the output FIFO)
  output logic    m_valid,
  input  logic    m_ready,
  output sample_t m_data
);

  localparam int unsigned PROD_W = DATA_W + COEF_W;
  localparam int unsigned SUM_W  = PROD_W + $clog2(W);
  localparam int unsigned FILL_W = $clog2(W + 1);

  typedef logic signed [PROD_W-1:0] prod_t;
  typedef logic signed [SUM_W-1:0]  sum_t;

  coef_t   coef_q [W];     // coefficients latched at start
  sample_t win    [W];     // local window array, index W-1 newest
  logic    win_valid;      // win holds a complete window not yet multiplied
  prod_t   prod   [W];
  logic    prod_valid;
  sum_t    sum_q;
  logic    sum_valid;
  sample_t out_q;
  logic    out_valid;

  len_t              in_left;  // samples still to accept
  logic [FILL_W-1:0] fill;     // samples taken, saturates at W-1

  logic adv;                   // the pipeline moves on this edge
  logic accept;                // an input sample is taken on this edge
  logic full_after;            // W-1 samples in: the next one completes a window

  assign adv        = !out_valid || m_ready;
  assign s_ready    = busy && (in_left != '0) && adv;
  assign accept     = s_valid && s_ready;
  assign full_after = (fill >= FILL_W'(W - 1));

  assign m_valid = out_valid;
  assign m_data  = out_q;

  // Sum of the products (adder tree, written as a loop).
  sum_t sum_d;
  always_comb begin
    sum_d = '0;
    for (int j = 0; j < int'(W); j++) sum_d = sum_d + sum_t'(prod[j]);
  end

  // Round half up, drop the fractional bits, saturate to the sample range.
  localparam sum_t ROUND  = sum_t'(1) <<< (COEF_FRAC - 1);
  localparam sum_t MAXV   = sum_t'({1'b0, {(DATA_W-1){1'b1}}});
  localparam sum_t MINV   = -MAXV - sum_t'(1);
  sum_t    scaled;
  sample_t result;
  always_comb begin
    scaled = (sum_q + ROUND) >>> COEF_FRAC;
    if (scaled > MAXV)      result = sample_t'(MAXV);
    else if (scaled < MINV) result = sample_t'(MINV);
    else                    result = sample_t'(scaled);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy       <= 1'b0;
      done       <= 1'b0;
      in_left    <= '0;
      fill       <= '0;
      win_valid  <= 1'b0;
      prod_valid <= 1'b0;
      sum_valid  <= 1'b0;
      out_valid  <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy    <= 1'b1;
          in_left <= len;
          fill    <= '0;
        end
      end else begin
        if (accept) begin
          in_left <= in_left - 1'b1;
          if (!full_after) fill <= fill + 1'b1;
        end
        if (adv) begin
          win_valid  <= accept && full_after;
          prod_valid <= win_valid;
          sum_valid  <= prod_valid;
          out_valid  <= sum_valid;
        end
        // Finished: every sample taken, pipeline empty, last output popped.
        if (in_left == '0 && !win_valid && !prod_valid && !sum_valid &&
            (!out_valid || m_ready)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  // Datapath registers (no reset needed: guarded by the valid flags).
  always_ff @(posedge clk) begin
    if (!busy && start) coef_q <= coef;
    if (accept) begin
      for (int j = 0; j < int'(W) - 1; j++) win[j] <= win[j+1];
      win[W-1] <= s_data;
    end
    if (adv) begin
      for (int j = 0; j < int'(W); j++) prod[j] <= prod_t'(win[j]) * prod_t'(coef_q[j]);
      sum_q <= sum_d;
      out_q <= result;
    end
  end

  // The output holds still while it waits for m_ready.
  assert property (@(posedge clk) disable iff (!rst_n)
                   m_valid && !m_ready |=> m_valid && $stable(m_data))
    else $error("sg_convolve: output changed while stalled");

endmodule
