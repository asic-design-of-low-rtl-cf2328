// Self-checking testbench for od_csa, N = 8.
// For every operand pair (x, y), it forms the decomposed words and their two
// products with ordinary arithmetic and drives them in. The combined result
// must equal x*y. Counts the pairs where A*B exceeds C*D, so that the
// subtraction goes through zero, and fails if none occurs.
module tb_od_csa;
  localparam int unsigned N = 8;
  logic [2*N-1:0] prod_ab, prod_cd, product;
  logic [N-1:0]   b_op;
  int checks = 0, failures = 0;
  int negative_diff = 0;

  od_csa #(.N(N)) dut (.prod_ab(prod_ab), .prod_cd(prod_cd), .b_op(b_op), .product(product));

  initial begin : watchdog
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int ix = 0; ix < 256; ix++) begin
      for (int iy = 0; iy < 256; iy++) begin
        int oa, ob, oc, od;
        oa = ~ix & ~iy & 255;
        ob = ix & iy;
        oc = ~ix & iy & 255;
        od = ix & ~iy & 255;
        prod_ab = 16'(oa * ob);
        prod_cd = 16'(oc * od);
        b_op    = 8'(ob);
        #1;
        checks++;
        if (int'(product) != ix * iy) begin
          failures++;
          if (failures < 10) $display("FAIL x=%0d y=%0d -> %0d", ix, iy, product);
        end
        if (oa * ob > oc * od) negative_diff++;
      end
    end
    checks++;
    if (negative_diff == 0) begin
      failures++;
      $display("FAIL A*B never exceeded C*D");
    end
    $display("pairs with A*B > C*D: %0d", negative_diff);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
