// Self-checking testbench for xor_logic.
// Drives random partial products and random carries, and compares each product
// bit with the parity of its column, computed with integer addition.
module tb_xor_logic;
  import cpc_pkg::*;
  logic [15:0] pp;
  precarry_t   c;
  logic [7:0]  product;
  int checks = 0, failures = 0;

  xor_logic dut (.pp(pp), .c(c), .product(product));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int p(input int k);
    return int'(pp[k-1]);
  endfunction

  initial begin
    for (int n = 0; n < 20000; n++) begin
      int col [8];
      pp = 16'($urandom);
      c  = precarry_t'($urandom);
      #1;
      col[0] = p(1);
      col[1] = p(2) + p(5);
      col[2] = p(3) + p(6) + p(9) + int'(c.c2);
      col[3] = p(4) + p(7) + p(10) + p(13) + int'(c.c31);
      col[4] = p(8) + p(11) + p(14) + int'(c.c32) + int'(c.c41);
      col[5] = p(12) + p(15) + int'(c.c42) + int'(c.c51);
      col[6] = p(16) + int'(c.c52) + int'(c.c61);
      col[7] = int'(c.c62) + int'(c.c71);
      for (int i = 0; i < 8; i++) begin
        checks++;
        if (product[i] !== col[i][0]) begin
          failures++;
          if (failures < 10) $display("FAIL pp=%h c=%b bit %0d", pp, c, i);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
