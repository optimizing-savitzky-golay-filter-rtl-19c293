// sg_pkg: types and constants shared by the Savitzky-Golay filter kernel.
//
// The kernel streams a time series of 32-bit samples from global memory,
// smooths it with a W-tap Savitzky-Golay FIR filter and writes the result
// back. Samples are 32-bit signed two's complement numbers, as are the
// filter coefficients, which carry COEF_FRAC fractional bits. The 32-bit
// sample width and the default window of 11 taps follow the evaluated use
// case (a polynomial of order 3 over an 11-point window, 20000 samples per
// series); the fixed-point number format and the 64-bit byte address are
// this design's own choices.
package sg_pkg;

  // Width of one sample of the time series, in bits.
  localparam int unsigned DATA_W    = 32;
  // Width of one filter coefficient, in bits (signed fixed point).
  localparam int unsigned COEF_W    = 32;
  // Fractional bits of a coefficient: real value = coef / 2**COEF_FRAC.
  localparam int unsigned COEF_FRAC = 24;
  // Byte address width of the global-memory ports.
  localparam int unsigned ADDR_W    = 64;
  // Width of a sample count (series length).
  localparam int unsigned LEN_W     = 32;
  // Bytes per sample in global memory.
  localparam int unsigned BYTES_PER_SAMPLE = DATA_W / 8;
  // Default window size (filter taps).
  localparam int unsigned WINDOW_DEFAULT = 11;

  typedef logic signed [DATA_W-1:0] sample_t;
  typedef logic signed [COEF_W-1:0] coef_t;
  typedef logic        [ADDR_W-1:0] addr_t;
  typedef logic        [LEN_W-1:0]  len_t;

endpackage
