// fft_coeff_pkg: types and helpers shared by the reduced coefficient memory.
//
// The N/2 twiddle factors W_m = exp(-j*2*pi*m/N), m = 0..N/2-1, are split into
// four blocks by the address m. Only Block I (m = 0..N/8) is stored; the other
// three are rebuilt from it by swapping and complementing the real and
// imaginary parts. coeff_block_e names the block an address belongs to; it
// is produced by block_addr_mapper and consumed by coeff_transform.
package fft_coeff_pkg;

  // Block of the coefficient address space:
  //   BLK_I   : 0       <= m <= N/8      stored as is
  //   BLK_II  : N/8+1   <= m <= N/4-1    (~I, ~R) at Block I index N/4-m
  //   BLK_III : N/4     <= m <= 3N/8     ( I, ~R) at Block I index m-N/4
  //   BLK_IV  : 3N/8+1  <= m <= N/2-1    (~R,  I) at Block I index N/2-m
  typedef enum logic [1:0] {
    BLK_I   = 2'd0,
    BLK_II  = 2'd1,
    BLK_III = 2'd2,
    BLK_IV  = 2'd3
  } coeff_block_e;

endpackage
