// Self-checking testbench for cpc_mult at its default width of 8 bits.
// Applies all 65536 operand pairs and compares the product with a*b. It also
// counts the cases where the middle window (the sum of the two cross products
// and the overlapping halves of the outer products) reaches 2^9, so that a
// carry of two enters the upper nibble, and fails if none occurs.
module tb_cpc_mult;
  localparam int unsigned N = 8;
  logic [N-1:0]   a, b;
  logic [2*N-1:0] product;
  int checks = 0, failures = 0;
  int double_carry = 0;

  cpc_mult #(.N(N)) dut (.a(a), .b(b), .product(product));

  initial begin : watchdog
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int ia = 0; ia < 256; ia++) begin
      for (int ib = 0; ib < 256; ib++) begin
        int hh, hl, lh, ll, window;
        a = 8'(ia);
        b = 8'(ib);
        #1;
        checks++;
        if (int'(product) != ia * ib) begin
          failures++;
          if (failures < 10) $display("FAIL %0d * %0d = %0d", ia, ib, product);
        end
        hh = (ia >> 4) * (ib >> 4);
        hl = (ia >> 4) * (ib & 15);
        lh = (ia & 15) * (ib >> 4);
        ll = (ia & 15) * (ib & 15);
        window = ((hh & 15) << 4) + (ll >> 4) + hl + lh;
        if (window >= 512) double_carry++;
      end
    end
    checks++;
    if (double_carry == 0) begin
      failures++;
      $display("FAIL the middle window never carried two into the upper part");
    end
    $display("middle-window carries of two: %0d", double_carry);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
