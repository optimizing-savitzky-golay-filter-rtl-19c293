// sg_tb_coef.svh: Savitzky-Golay coefficients for testbenches.
//
// sg_coefs(w, order, c) fills c[0..w-1] with the least-squares smoothing
// coefficients of a window of w points and a polynomial of the given order:
// with m = (w-1)/2 and the w x (order+1) matrix A[i][k] = (i-m)**k, c is the
// first row of (A^T A)^-1 A^T, i.e. the weights that give the value at the
// window centre of the polynomial fitted to the window. For an even w the
// centre lies halfway between the two middle samples. The normal
// equations are solved by Gauss-Jordan elimination in double precision.
// sg_quant(x, frac) rounds a real to a fixed-point integer with frac
// fractional bits; rabs(x) is the absolute value of a real.

function automatic real rabs(input real x);
  return (x < 0.0) ? -x : x;
endfunction

function automatic void sg_coefs(input int w, input int order, output real c [64]);
  real ata [8][8];
  real inv [8][8];
  real m = real'(w - 1) / 2.0;
  int  n = order + 1;
  for (int r = 0; r < n; r++)
    for (int k = 0; k < n; k++) begin
      ata[r][k] = 0.0;
      for (int i = 0; i < w; i++) ata[r][k] += $pow(real'(i) - m, real'(r + k));
      inv[r][k] = (r == k) ? 1.0 : 0.0;
    end
  for (int p = 0; p < n; p++) begin
    int  best = p;
    real t;
    for (int r = p + 1; r < n; r++) if (rabs(ata[r][p]) > rabs(ata[best][p])) best = r;
    for (int k = 0; k < n; k++) begin
      t = ata[p][k]; ata[p][k] = ata[best][k]; ata[best][k] = t;
      t = inv[p][k]; inv[p][k] = inv[best][k]; inv[best][k] = t;
    end
    t = ata[p][p];
    for (int k = 0; k < n; k++) begin
      ata[p][k] /= t;
      inv[p][k] /= t;
    end
    for (int r = 0; r < n; r++) if (r != p) begin
      real f = ata[r][p];
      for (int k = 0; k < n; k++) begin
        ata[r][k] -= f * ata[p][k];
        inv[r][k] -= f * inv[p][k];
      end
    end
  end
  for (int i = 0; i < 64; i++) c[i] = 0.0;
  for (int i = 0; i < w; i++)
    for (int k = 0; k < n; k++) c[i] += inv[0][k] * $pow(real'(i) - m, real'(k));
endfunction

function automatic longint sg_quant(input real x, input int frac);
  real s = x * $pow(2.0, real'(frac));
  return (s >= 0.0) ? longint'($floor(s + 0.5)) : -longint'($floor(-s + 0.5));
endfunction
