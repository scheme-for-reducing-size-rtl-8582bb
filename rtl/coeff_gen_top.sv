// coeff_gen_top: twiddle-factor source with a quarter-size coefficient memory.
//
// For a coefficient address m (0..N/2-1) it returns W_m = exp(-j*2*pi*m/N) as
// W-bit real and imaginary parts, while storing only the N/8+1 words of Block
// I instead of N/2 (conventional) or N/4 (half-size schemes). The address m is
// mapped to its block and to a Block I address (block_addr_mapper), that word
// is read (coeff_rom) and the stored parts are swapped and complemented as the
// block requires (coeff_transform).
//
// Timing: one pipeline register, the synchronous ROM read. A request
// (in_valid, m) in cycle t gives out_valid with re/im in cycle t+1. Cycles
// without in_valid do not read the memory and leave re/im at their last value;
// out_valid then drops. There is no back-pressure. The mapping, storage and
// reconstruction are the scheme's; the valid flag, reset and one-cycle latency
// are this design's choices.
module coeff_gen_top
  import fft_coeff_pkg::*;
#(
  parameter int unsigned N = 8192,  // FFT length (power of two, >= 16)
  parameter int unsigned W = 16     // coefficient width per part
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic [$clog2(N)-2:0] m,        // coefficient address A_m
  output logic                 out_valid,
  output logic [W-1:0]         re,       // Re(W_m), two's complement
  output logic [W-1:0]         im        // Im(W_m), two's complement
);

  coeff_block_e         blk, blk_q;
  logic [$clog2(N)-3:0] rom_addr;
  logic [W-1:0]         rom_re, rom_im;

  block_addr_mapper #(.N(N)) u_map (
    .m        (m),
    .blk      (blk),
    .rom_addr (rom_addr)
  );

  coeff_rom #(.N(N), .W(W)) u_rom (
    .clk  (clk),
    .en   (in_valid),
    .addr (rom_addr),
    .re   (rom_re),
    .im   (rom_im)
  );

  // The block travels alongside the memory read.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      blk_q     <= BLK_I;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) blk_q <= blk;
    end
  end

  coeff_transform #(.W(W)) u_xform (
    .blk    (blk_q),
    .re_in  (rom_re),
    .im_in  (rom_im),
    .re_out (re),
    .im_out (im)
  );

endmodule
