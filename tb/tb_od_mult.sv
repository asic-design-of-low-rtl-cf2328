// End-to-end testbench for od_mult, the operand-decomposition multiplier, at its
// default parameters (8-bit operands).
// Applies all 65536 operand pairs and compares the product with x*y. A
// reference model counts how often each mechanism of the design is exercised:
//   * the C*D - A*B difference going negative before the correction term;
//   * a nonzero (2^8 - 1)*B correction term;
//   * a carry from the middle window into the upper nibble inside one of the
//     two 8-bit carry pre-computation multipliers (a carry of two cannot occur
//     here: the two operands of each multiplier share no set bit);
//   * a decomposed product of zero (x and y share no bit, or one operand's
//     bits are a subset of the other's).
// A mechanism that never happens counts as a failure. The design is
// combinational, so each result is checked one time step after the operands
// are applied.
module tb_od_mult;
  logic [7:0]  x, y;
  logic [15:0] product;
  int checks = 0, failures = 0;
  int n_negative = 0, n_correction = 0, n_upper_carry = 0, n_zero_product = 0;

  od_mult dut (.x(x), .y(y), .product(product));

  initial begin : watchdog
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // does the 8-bit split multiplier carry out of its middle window?
  function automatic bit window_carries(input int u, input int v);
    int hh, hl, lh, ll;
    hh = (u >> 4) * (v >> 4);
    hl = (u >> 4) * (v & 15);
    lh = (u & 15) * (v >> 4);
    ll = (u & 15) * (v & 15);
    return (((hh & 15) << 4) + (ll >> 4) + hl + lh) >= 256;
  endfunction

  initial begin
    for (int ix = 0; ix < 256; ix++) begin
      for (int iy = 0; iy < 256; iy++) begin
        int oa, ob, oc, od;
        x = 8'(ix);
        y = 8'(iy);
        #1;
        checks++;
        if (int'(product) != ix * iy) begin
          failures++;
          if (failures < 10) $display("FAIL %0d * %0d = %0d", ix, iy, product);
        end
        oa = ~ix & ~iy & 255;
        ob = ix & iy;
        oc = ~ix & iy & 255;
        od = ix & ~iy & 255;
        if (oa * ob > oc * od) n_negative++;
        if (ob != 0) n_correction++;
        if (window_carries(oa, ob) || window_carries(oc, od)) n_upper_carry++;
        if (oa * ob == 0 || oc * od == 0) n_zero_product++;
      end
    end
    $display("negative C*D-A*B: %0d, correction used: %0d, upper-nibble carry: %0d, zero sub-product: %0d",
             n_negative, n_correction, n_upper_carry, n_zero_product);
    checks += 4;
    if (n_negative == 0)     begin failures++; $display("FAIL no negative difference"); end
    if (n_correction == 0)   begin failures++; $display("FAIL correction term never used"); end
    if (n_upper_carry == 0) begin failures++; $display("FAIL no upper-nibble carry"); end
    if (n_zero_product == 0) begin failures++; $display("FAIL no zero sub-product"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
