// tb_coeff_gen_top: end-to-end test of the coefficient source at its default
// size, an 8192-point FFT with 16-bit coefficients.
//
// Every address m = 0..4095 is requested once in order with random idle
// cycles in between, then 3000 random addresses are requested back to back.
// Each result is compared with W_m computed from its definition; out_valid
// must rise exactly one cycle after the request and re/im must hold through
// idle cycles. Finally the 32-point table is read through the 8192-point
// memory with the scaled addresses m = 256*k.
// Mechanisms counted, each of which must occur: a request in each of Blocks
// I-IV, the two addresses on a block edge that the all-zero test keeps in the
// stored block (m = N/8 and m = 3N/8), an idle cycle holding the output, and
// the reset clearing out_valid.
module tb_coeff_gen_top;
  import coeff_ref_pkg::*;

  localparam int unsigned N = 8192;
  localparam int unsigned W = 16;

  int checks = 0, failures = 0;
  int n_blk [4];
  int n_edge_n8 = 0, n_edge_3n8 = 0, n_hold = 0, n_reset = 0;

  logic          clk = 1'b0;
  logic          rst_n;
  logic          in_valid;
  logic [11:0]   m;
  logic          out_valid;
  logic [W-1:0]  re, im;

  always #5 clk = ~clk;

  coeff_gen_top dut (.*);

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(string msg);
    failures++;
    if (failures < 20) $display("%s", msg);
  endtask

  function automatic int unsigned block_of(int unsigned a);
    if (a <= N / 8)          return 0;
    else if (a < N / 4)      return 1;
    else if (a <= 3 * N / 8) return 2;
    else                     return 3;
  endfunction

  // Request address a (or idle if !v) and check the cycle's result.
  logic [2*W-1:0] last_out;
  task automatic step(bit v, int unsigned a, logic [2*W-1:0] want);
    in_valid = v;
    m        = 12'(a);
    @(negedge clk);
    checks++;
    if (out_valid !== v) fail($sformatf("out_valid=%0d for in_valid=%0d", out_valid, v));
    if (v) begin
      checks++;
      if ({re, im} !== want)
        fail($sformatf("m=%0d: got (%h,%h) want (%h,%h)", a, re, im,
                       want[2*W-1:W], want[W-1:0]));
      n_blk[block_of(a)]++;
      if (a == N / 8)     n_edge_n8++;
      if (a == 3 * N / 8) n_edge_3n8++;
    end else begin
      checks++;
      if ({re, im} !== last_out) fail("output changed during an idle cycle");
      n_hold++;
    end
    last_out = {re, im};
  endtask

  function automatic logic [2*W-1:0] want_of(int unsigned a);
    logic [63:0] r;
    r = ref_coeff(a, N, W);
    return {r[32+W-1:32], r[W-1:0]};
  endfunction

  initial begin
    int unsigned a;
    foreach (n_blk[i]) n_blk[i] = 0;
    rst_n = 1'b0; in_valid = 1'b0; m = '0;
    repeat (2) @(negedge clk);
    checks++;
    if (out_valid !== 1'b0) fail("out_valid set during reset");
    else n_reset++;
    rst_n = 1'b1;
    @(negedge clk);
    last_out = {re, im};

    for (int unsigned k = 0; k < N / 2; k++) begin
      if ($urandom_range(3) == 0) step(1'b0, 0, '0);
      step(1'b1, k, want_of(k));
    end
    repeat (3000) begin
      a = $urandom_range(N / 2 - 1);
      step(1'b1, a, want_of(a));
    end
    for (int unsigned k = 0; k < 16; k++)
      step(1'b1, k * (N / 32), TABLE32[k]);
    step(1'b0, 0, '0);

    $display("requests per block I..IV: %0d %0d %0d %0d; m=N/8: %0d; m=3N/8: %0d; idle holds: %0d; resets: %0d",
             n_blk[0], n_blk[1], n_blk[2], n_blk[3], n_edge_n8, n_edge_3n8, n_hold, n_reset);
    foreach (n_blk[i]) begin
      checks++;
      if (n_blk[i] == 0) fail($sformatf("block %0d never requested", i + 1));
    end
    checks += 4;
    if (n_edge_n8 == 0)  fail("m = N/8 never requested");
    if (n_edge_3n8 == 0) fail("m = 3N/8 never requested");
    if (n_hold == 0)     fail("no idle cycle");
    if (n_reset == 0)    fail("reset never checked");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
