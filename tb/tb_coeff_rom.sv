// tb_coeff_rom: checks the Block I memory contents and its read timing.
//
// N = 32: the five stored words must equal the published table's Block I.
// N = 8192: all 1025 words must equal W_g quantised from $cos/$sin.
// Timing: a word appears one clock edge after the address with en high, not
// before, and the output holds while en is low.
module tb_coeff_rom;
  import coeff_ref_pkg::*;

  int checks = 0, failures = 0;

  logic        clk = 1'b0;
  logic        en32, en8k;
  logic [2:0]  a32;
  logic [10:0] a8k;
  logic [15:0] re32, im32, re8k, im8k;

  always #5 clk = ~clk;

  coeff_rom #(.N(32))   u32 (.clk(clk), .en(en32), .addr(a32), .re(re32), .im(im32));
  coeff_rom #(.N(8192)) u8k (.clk(clk), .en(en8k), .addr(a8k), .re(re8k), .im(im8k));

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic [31:0] got, logic [31:0] want, string what);
    checks++;
    if (got !== want) begin
      failures++;
      if (failures < 20) $display("%s: got %h want %h", what, got, want);
    end
  endtask

  initial begin
    logic [31:0] held;
    logic [63:0] r;
    en32 = 1'b0; en8k = 1'b0; a32 = '0; a8k = '0;
    @(negedge clk);
    // 32-point table, one word per cycle.
    for (int unsigned g = 0; g <= 4; g++) begin
      a32 = 3'(g); en32 = 1'b1;
      @(negedge clk);
      check({re32, im32}, TABLE32[g], $sformatf("N=32 g=%0d", g));
    end
    // Latency: the new word is not visible before the clock edge.
    a32 = 3'd1; en32 = 1'b1;
    #1;
    check({re32, im32}, TABLE32[4], "N=32 output changed before the clock edge");
    @(negedge clk);
    check({re32, im32}, TABLE32[1], "N=32 read after one edge");
    // Hold with en low.
    held = {re32, im32};
    en32 = 1'b0; a32 = 3'd3;
    repeat (3) @(negedge clk);
    check({re32, im32}, held, "N=32 hold with en low");
    // Full 8192-point Block I.
    for (int unsigned g = 0; g <= 1024; g++) begin
      a8k = 11'(g); en8k = 1'b1;
      @(negedge clk);
      r = ref_coeff(g, 8192, 16);
      check({re8k, im8k}, {r[47:32], r[15:0]}, $sformatf("N=8192 g=%0d", g));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
