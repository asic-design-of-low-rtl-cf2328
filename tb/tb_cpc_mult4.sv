// Self-checking testbench for cpc_mult4.
// Applies all 256 pairs of 4-bit operands and compares the product with a*b.
module tb_cpc_mult4;
  logic [3:0] a, b;
  logic [7:0] product;
  int checks = 0, failures = 0;

  cpc_mult4 dut (.a(a), .b(b), .product(product));

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
        a = 4'(ia);
        b = 4'(ib);
        #1;
        checks++;
        if (int'(product) != ia * ib) begin
          failures++;
          $display("FAIL %0d * %0d = %0d", ia, ib, product);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
