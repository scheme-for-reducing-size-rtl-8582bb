// tb_block_addr_mapper: exhaustive check of block identification and Block I
// address generation for N = 32 (the worked example) and N = 8192.
//
// The expected block comes from range comparisons on m (I: m <= N/8,
// II: m < N/4, III: m <= 3N/8, IV: otherwise) and the expected address from
// the index each block reads (m, N/4-m, m-N/4, N/2-m), not from bit fields.
// The example from the scheme's description, m = 5 of a 32-point FFT mapping
// to Block II address 3, is checked by name.
module tb_block_addr_mapper;
  import fft_coeff_pkg::*;

  int checks = 0, failures = 0;

  logic [3:0]    m32;
  coeff_block_e  blk32;
  logic [2:0]    a32;
  logic [11:0]   m8k;
  coeff_block_e  blk8k;
  logic [10:0]   a8k;

  block_addr_mapper #(.N(32))   u32  (.m(m32), .blk(blk32), .rom_addr(a32));
  block_addr_mapper #(.N(8192)) u8k  (.m(m8k), .blk(blk8k), .rom_addr(a8k));

  function automatic void expect_map(int unsigned m, int unsigned n,
                                     output coeff_block_e b, output int unsigned a);
    if (m <= n / 8)          begin b = BLK_I;   a = m;         end
    else if (m < n / 4)      begin b = BLK_II;  a = n / 4 - m; end
    else if (m <= 3 * n / 8) begin b = BLK_III; a = m - n / 4; end
    else                     begin b = BLK_IV;  a = n / 2 - m; end
  endfunction

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    coeff_block_e eb;
    int unsigned  ea;
    for (int unsigned m = 0; m < 16; m++) begin
      m32 = 4'(m);
      #1;
      expect_map(m, 32, eb, ea);
      checks++;
      if (blk32 !== eb || 32'(a32) !== ea) begin
        failures++;
        $display("N=32 m=%0d: got blk=%0d addr=%0d, want blk=%0d addr=%0d",
                 m, blk32, a32, eb, ea);
      end
    end
    m32 = 4'd5;
    #1;
    checks++;
    if (blk32 !== BLK_II || a32 !== 3'b011) begin
      failures++;
      $display("worked example m=5 failed: blk=%0d addr=%b", blk32, a32);
    end
    for (int unsigned m = 0; m < 4096; m++) begin
      m8k = 12'(m);
      #1;
      expect_map(m, 8192, eb, ea);
      checks++;
      if (blk8k !== eb || 32'(a8k) !== ea) begin
        failures++;
        if (failures < 10)
          $display("N=8192 m=%0d: got blk=%0d addr=%0d, want blk=%0d addr=%0d",
                   m, blk8k, a8k, eb, ea);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
