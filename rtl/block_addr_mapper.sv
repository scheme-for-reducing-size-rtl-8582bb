// block_addr_mapper: block identification and Block I address generation.
//
// The coefficient address m is n = log2(N/2) bits wide. Its two top bits,
// together with a test of the remaining n-2 bits for all zeros, name the block
// m falls in:
//   top bits 00                 -> Block I
//   top bits 01, rest all zero  -> Block I   (m = N/8, the last stored word)
//   top bits 01, rest non-zero  -> Block II
//   top bits 10                 -> Block III
//   top bits 11, rest all zero  -> Block III (m = 3N/8)
//   top bits 11, rest non-zero  -> Block IV
// The Block I address is n-1 bits wide. For Blocks I and III it is the low n-1
// bits of m; for Blocks II and IV it is their two's complement, which walks
// the stored block backwards (m = N/8+1+g reads index N/8-1-g).
// Block rules and address equations follow the scheme as published; the
// choice to make this unit purely combinational is this design's own.
//
// Interface: m in, blk and rom_addr out, no clock. N must be a power of two
// of at least 16 so that the "remaining bits" field exists.
module block_addr_mapper
  import fft_coeff_pkg::*;
#(
  parameter int unsigned N = 8192
) (
  input  logic [$clog2(N)-2:0] m,         // coefficient address, n bits
  output coeff_block_e         blk,       // block that m falls in
  output logic [$clog2(N)-3:0] rom_addr   // Block I address, n-1 bits
);

  localparam int unsigned NB = $clog2(N) - 1;  // n

  initial assert (N >= 16 && (N & (N - 1)) == 0)
    else $error("block_addr_mapper: N=%0d must be a power of two >= 16", N);

  logic [1:0]    top2;
  logic          rest_zero;
  logic [NB-2:0] low;

  always_comb begin
    top2      = m[NB-1 -: 2];
    rest_zero = (m[NB-3:0] == '0);
    low       = m[NB-2:0];

    unique case (top2)
      2'b00:   blk = BLK_I;
      2'b01:   blk = rest_zero ? BLK_I : BLK_II;
      2'b10:   blk = BLK_III;
      default: blk = rest_zero ? BLK_III : BLK_IV;
    endcase

    // Blocks II and IV read the stored block in reverse order.
    if (blk == BLK_II || blk == BLK_IV) rom_addr = ~low + 1'b1;
    else                                rom_addr = low;
  end

endmodule
