// Self-checking testbench for cla (carry look-ahead adder), W = 8.
// Exhaustive: all 2^17 combinations of a, b and the carry-in, compared with
// integer addition. Counts carries that cross a look-ahead group boundary, and
// fails if there are none.
module tb_cla;
  localparam int unsigned W = 8;
  logic [W-1:0] a, b, sum;
  logic         cin, cout;
  int checks = 0, failures = 0;
  int group_crossings = 0;

  cla #(.W(W)) dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  initial begin : watchdog
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int ia = 0; ia < (1 << W); ia++) begin
      for (int ib = 0; ib < (1 << W); ib++) begin
        for (int ic = 0; ic < 2; ic++) begin
          int total;
          a   = W'(ia);
          b   = W'(ib);
          cin = 1'(ic);
          #1;
          total = ia + ib + ic;
          checks++;
          if ({cout, sum} !== (W+1)'(total)) begin
            failures++;
            if (failures < 10) $display("FAIL %0d+%0d+%0d = %0d", ia, ib, ic, {cout, sum});
          end
          // carry into bit 4 (first group's carry-out) with a full ripple
          // through the second group: (a+b) of the low nibble carries and
          // the high nibble propagates
          if (((ia & 15) + (ib & 15) + ic) >= 16 && ((ia ^ ib) >> 4) == 15)
            group_crossings++;
        end
      end
    end
    checks++;
    if (group_crossings == 0) begin
      failures++;
      $display("FAIL no carry crossed a group boundary");
    end
    $display("group carries propagated through a whole group: %0d", group_crossings);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
