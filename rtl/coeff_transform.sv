// coeff_transform: rebuilds a coefficient of any block from a Block I word.
//
// With (R, I) the real and imaginary parts read from Block I, the output is
//   Block I   : ( R,  I)
//   Block II  : (~I, ~R)
//   Block III : ( I, ~R)
//   Block IV  : (~R,  I)
// where ~ is a bitwise (one's) complement. The relations are exact because the
// stored negative values are themselves the one's complement of the rounded
// positive magnitude (e.g. -sin(2*pi/32) is stored as ~0x18f9 = 0xe706), as in
// the published 32-point coefficient table. The swap/complement rules are the
// scheme's; the unit is combinational, a choice of this design.
//
// Interface: blk, re_in, im_in in; re_out, im_out out; no clock.
module coeff_transform
  import fft_coeff_pkg::*;
#(
  parameter int unsigned W = 16   // coefficient width, each of real and imaginary
) (
  input  coeff_block_e  blk,
  input  logic [W-1:0]  re_in,
  input  logic [W-1:0]  im_in,
  output logic [W-1:0]  re_out,
  output logic [W-1:0]  im_out
);

  always_comb begin
    unique case (blk)
      BLK_I:   begin re_out =  re_in; im_out =  im_in; end
      BLK_II:  begin re_out = ~im_in; im_out = ~re_in; end
      BLK_III: begin re_out =  im_in; im_out = ~re_in; end
      default: begin re_out = ~re_in; im_out =  im_in; end  // BLK_IV
    endcase
  end

endmodule
