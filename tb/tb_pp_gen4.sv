// Self-checking testbench for pp_gen4.
// Applies all 256 operand pairs. Checks each partial product against the AND
// of its operand bits. Also checks that the partial products, each weighted by
// the column it sits in, add up to a*b.
module tb_pp_gen4;
  logic [3:0]  a, b;
  logic [15:0] pp;
  int checks = 0, failures = 0;

  pp_gen4 dut (.a(a), .b(b), .pp(pp));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int ia = 0; ia < 16; ia++) begin
      for (int ib = 0; ib < 16; ib++) begin
        int weighted;
        a = 4'(ia);
        b = 4'(ib);
        #1;
        weighted = 0;
        for (int k = 1; k <= 16; k++) begin
          int row, col;
          row = (k - 1) / 4;           // multiplier bit
          col = (k - 1) % 4;           // multiplicand bit
          checks++;
          if (pp[k-1] !== (((ia >> col) & 1) == 1 && ((ib >> row) & 1) == 1)) begin
            failures++;
            $display("FAIL a=%0d b=%0d pp%0d=%0b", ia, ib, k, pp[k-1]);
          end
          weighted += int'(pp[k-1]) << (row + col);
        end
        checks++;
        if (weighted != ia * ib) begin
          failures++;
          $display("FAIL a=%0d b=%0d weighted sum %0d", ia, ib, weighted);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
