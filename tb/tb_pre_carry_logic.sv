// Self-checking testbench for pre_carry_logic.
// Applies all 65536 patterns of the 16 partial products, not only those a
// multiplier can produce. Compares every carry with a model that adds each
// column as an integer: carry _1 is bit 1 of the column sum and carry _2 is
// bit 2. Counts how often each carry multiplexer selects its "carry in = 1"
// input, and fails if one of them never does.
module tb_pre_carry_logic;
  import cpc_pkg::*;
  logic [15:0] pp;
  precarry_t   c;
  int checks = 0, failures = 0;
  int sel_hits [4];   // previous-column carry = 1 at columns 3, 4, 5, 6

  pre_carry_logic dut (.pp(pp), .c(c));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int bitk(input logic [15:0] v, input int k);
    return int'(v[k-1]);
  endfunction

  initial begin
    foreach (sel_hits[i]) sel_hits[i] = 0;
    for (int v = 0; v < 65536; v++) begin
      int s2, s3, s4, s5, s6, s7;
      precarry_t e;
      pp = 16'(v);
      #1;
      s2 = bitk(pp, 2) + bitk(pp, 5);
      e.c2  = s2[1];
      s3 = bitk(pp, 3) + bitk(pp, 6) + bitk(pp, 9) + int'(e.c2);
      e.c31 = s3[1];
      e.c32 = s3[2];
      s4 = bitk(pp, 4) + bitk(pp, 7) + bitk(pp, 10) + bitk(pp, 13) + int'(e.c31);
      e.c41 = s4[1];
      e.c42 = s4[2];
      s5 = bitk(pp, 8) + bitk(pp, 11) + bitk(pp, 14) + int'(e.c32) + int'(e.c41);
      e.c51 = s5[1];
      e.c52 = s5[2];
      s6 = bitk(pp, 12) + bitk(pp, 15) + int'(e.c42) + int'(e.c51);
      e.c61 = s6[1];
      e.c62 = s6[2];
      s7 = bitk(pp, 16) + int'(e.c52) + int'(e.c61);
      e.c71 = s7[1];
      checks++;
      if (c !== e) begin
        failures++;
        if (failures < 10) $display("FAIL pp=%h carries=%b expected=%b", pp, c, e);
      end
      if (e.c2)  sel_hits[0]++;
      if (e.c31) sel_hits[1]++;
      if (e.c41) sel_hits[2]++;
      if (e.c51) sel_hits[3]++;
    end
    foreach (sel_hits[i]) begin
      checks++;
      if (sel_hits[i] == 0) begin
        failures++;
        $display("FAIL carry multiplexer %0d never selected its carry-in=1 input", i);
      end
    end
    $display("mux select=1 counts: col3 %0d col4 %0d col5 %0d col6 %0d",
             sel_hits[0], sel_hits[1], sel_hits[2], sel_hits[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
