// coeff_ref_pkg: reference twiddle factors for the testbenches.
//
// ref_coeff computes W_m = exp(-j*2*pi*m/N) directly from its definition with
// $cos/$sin, not through the block relations the design uses, and quantises
// each part to W bits: a value v = (2^(W-1)-1)*x rounds to round(v) when
// positive, to ~round(-v) (one's complement of the magnitude) when negative and
// to 0 when it rounds to zero. TABLE32 is the published 32-point coefficient
// table, m = 0..15, as {real, imaginary} 16-bit words.
package coeff_ref_pkg;

  localparam real PI = 3.14159265358979323846;

  function automatic logic [31:0] quant(real x, int unsigned w);
    real         v;
    logic [31:0] r;
    v = real'((64'd1 << (w - 1)) - 64'd1) * x;
    if (v < 0.5 && v > -0.5) r = '0;
    else if (v > 0.0)        r = 32'($rtoi(v + 0.5));
    else                     r = ~32'($rtoi(-v + 0.5));
    return r & ((32'd1 << w) - 32'd1);
  endfunction

  // {re, im}, each in the low w bits of a 32-bit half.
  function automatic logic [63:0] ref_coeff(int unsigned m, int unsigned n, int unsigned w);
    real ang;
    ang = 2.0 * PI * real'(m) / real'(n);
    return {quant($cos(ang), w), quant(-$sin(ang), w)};
  endfunction

  localparam logic [31:0] TABLE32 [16] = '{
    32'h7fff_0000, 32'h7d89_e706, 32'h7641_cf04, 32'h6a6d_b8e3,
    32'h5a82_a57d, 32'h471c_9592, 32'h30fb_89be, 32'h18f9_8276,
    32'h0000_8000, 32'he706_8276, 32'hcf04_89be, 32'hb8e3_9592,
    32'ha57d_a57d, 32'h9592_b8e3, 32'h89be_cf04, 32'h8276_e706
  };

endpackage
