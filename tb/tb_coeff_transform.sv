// tb_coeff_transform: checks the swap/complement unit two ways.
//
// 1. Against the published 32-point table: for every m the Block I word the
//    scheme names is fed in with the block of m, and the output must equal
//    the table's entry for m.
// 2. With random words for every block against the four rules
//    (R,I), (~I,~R), (I,~R), (~R,I).
module tb_coeff_transform;
  import fft_coeff_pkg::*;
  import coeff_ref_pkg::*;

  int checks = 0, failures = 0;

  coeff_block_e blk;
  logic [15:0]  re_in, im_in, re_out, im_out;

  coeff_transform #(.W(16)) dut (.*);

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic [15:0] wr, logic [15:0] wi, string what);
    checks++;
    if (re_out !== wr || im_out !== wi) begin
      failures++;
      $display("%s: blk=%0d in=(%h,%h) got (%h,%h) want (%h,%h)",
               what, blk, re_in, im_in, re_out, im_out, wr, wi);
    end
  endtask

  initial begin
    int unsigned idx;
    for (int unsigned m = 0; m < 16; m++) begin
      if (m <= 4)       begin blk = BLK_I;   idx = m;      end
      else if (m < 8)   begin blk = BLK_II;  idx = 8 - m;  end
      else if (m <= 12) begin blk = BLK_III; idx = m - 8;  end
      else              begin blk = BLK_IV;  idx = 16 - m; end
      {re_in, im_in} = TABLE32[idx];
      #1;
      check(TABLE32[m][31:16], TABLE32[m][15:0], $sformatf("table m=%0d", m));
    end
    repeat (400) begin
      blk   = coeff_block_e'($urandom_range(3));
      re_in = 16'($urandom);
      im_in = 16'($urandom);
      #1;
      case (blk)
        BLK_I:   check( re_in,  im_in, "random");
        BLK_II:  check(~im_in, ~re_in, "random");
        BLK_III: check( im_in, ~re_in, "random");
        default: check(~re_in,  im_in, "random");
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
