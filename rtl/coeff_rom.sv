// coeff_rom: the Block I coefficient memory, the only coefficients stored.
//
// Holds N/8+1 words, index g = 0..N/8, each the pair (R_g, I_g) of
// W_g = exp(-j*2*pi*g/N) quantised to W bits:
//   R_g = round((2^(W-1)-1) * cos(2*pi*g/N))
//   I_g = ~round((2^(W-1)-1) * sin(2*pi*g/N)), except I_0 = 0
// so that 1.0 is 0x7fff and a negative value is the one's complement of its
// rounded magnitude, matching the published 32-point table (g = 1 gives
// 0x7d89, 0xe706). The contents are computed at elaboration, so any N works
// without a data file.
//
// The address is n-1 = log2(N/4) bits wide; indices above N/8 are never
// addressed and read as zero. The read is synchronous: when en is high, the
// word at addr appears on re/im after the next rising clock edge; with en low
// the outputs hold. The storage size is the scheme's; the quantisation formula
// is taken from the table's values and the synchronous read port is this
// design's choice.
module coeff_rom #(
  parameter int unsigned N = 8192,  // FFT length
  parameter int unsigned W = 16     // bits of each of real and imaginary part
) (
  input  logic                 clk,
  input  logic                 en,
  input  logic [$clog2(N)-3:0] addr,
  output logic [W-1:0]         re,
  output logic [W-1:0]         im
);

  localparam int unsigned DEPTH = N / 8 + 1;
  localparam real         PI    = 3.14159265358979323846;

  // All DEPTH words packed {R, I}, word g at bits [g*2W +: 2W].
  function automatic logic [DEPTH*2*W-1:0] gen_contents();
    logic [DEPTH*2*W-1:0] bits;
    real                  amp;
    real                  ang;
    logic [W-1:0]         c;
    logic [W-1:0]         s;
    amp  = real'((64'd1 << (W - 1)) - 64'd1);
    for (int unsigned g = 0; g < DEPTH; g++) begin
      ang = 2.0 * PI * real'(g) / real'(N);
      c   = W'($rtoi(amp * $cos(ang) + 0.5));
      s   = W'($rtoi(amp * $sin(ang) + 0.5));
      bits[g*2*W +: 2*W] = {c, (s == '0) ? s : ~s};
    end
    return bits;
  endfunction

  localparam logic [DEPTH*2*W-1:0] CONTENTS = gen_contents();

  logic [2*W-1:0] word;

  always_comb begin
    if (32'(addr) < DEPTH) word = CONTENTS[32'(addr)*2*W +: 2*W];
    else                   word = '0;
  end

  always_ff @(posedge clk) begin
    if (en) {re, im} <= word;
  end

endmodule
