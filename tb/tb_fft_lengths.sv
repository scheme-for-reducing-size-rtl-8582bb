// tb_fft_lengths: the coefficient source built for each FFT length the
// scheme is evaluated at, 32 (the worked example) and 64 to 8192, each swept
// over all N/2 coefficient addresses.
//
// One coeff_gen_top per length runs in parallel on one clock; every address
// is requested once and the result one cycle later is compared with W_m from
// its definition. The stored word count N/8+1 per length is printed. For
// N = 32 the results are also compared with the published table.
module tb_fft_lengths;
  import coeff_ref_pkg::*;

  localparam int NLEN = 9;
  localparam int unsigned LENS [NLEN] = '{32, 64, 128, 256, 512, 1024, 2048, 4096, 8192};

  int checks = 0, failures = 0, done = 0;
  logic clk = 1'b0;
  logic rst_n = 1'b0;

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar i = 0; i < NLEN; i++) begin : g_len
    localparam int unsigned N = LENS[i];
    logic                 in_valid;
    logic [$clog2(N)-2:0] m;
    logic                 out_valid;
    logic [15:0]          re, im;

    coeff_gen_top #(.N(N), .W(16)) dut (.*);

    initial begin
      logic [63:0] r;
      int          bad;
      bad = 0;
      in_valid = 1'b0; m = '0;
      @(posedge rst_n);
      @(negedge clk);
      for (int unsigned a = 0; a < N / 2; a++) begin
        in_valid = 1'b1;
        m        = ($clog2(N) - 1)'(a);
        @(negedge clk);
        r = ref_coeff(a, N, 16);
        checks++;
        if (out_valid !== 1'b1 || {re, im} !== {r[47:32], r[15:0]}) begin
          bad++;
          if (bad < 5) $display("N=%0d m=%0d: got (%h,%h) want (%h,%h)",
                                N, a, re, im, r[47:32], r[15:0]);
        end
        if (N == 32) begin
          checks++;
          if ({re, im} !== TABLE32[a]) begin
            bad++;
            $display("N=32 m=%0d differs from the published table", a);
          end
        end
      end
      in_valid = 1'b0;
      failures += bad;
      $display("N=%0d: %0d addresses, %0d stored words, %0d mismatches",
               N, N / 2, N / 8 + 1, bad);
      done++;
    end
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    wait (done == NLEN);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
