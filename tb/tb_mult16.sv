// 16-bit testbench: the carry pre-computation multiplier and the
// operand-decomposition multiplier, both instantiated with 16-bit operands.
// Drives corner cases and random operand pairs to both and compares each
// 32-bit product with x*y computed in 64-bit arithmetic.
module tb_mult16;
  localparam int unsigned N = 16;
  logic [N-1:0]   x, y;
  logic [2*N-1:0] p_cpc, p_od;
  int checks = 0, failures = 0;

  cpc_mult #(.N(N)) u_cpc (.a(x), .b(y), .product(p_cpc));
  od_mult  #(.N(N)) u_od  (.x(x), .y(y), .product(p_od));

  initial begin : watchdog
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one();
    longint unsigned want;
    #1;
    want = longint'(x) * longint'(y);
    checks += 2;
    if (64'(p_cpc) != want) begin
      failures++;
      if (failures < 10) $display("FAIL cpc %0d * %0d = %0d", x, y, p_cpc);
    end
    if (64'(p_od) != want) begin
      failures++;
      if (failures < 10) $display("FAIL od %0d * %0d = %0d", x, y, p_od);
    end
  endtask

  initial begin
    x = '1;        y = '1;        check_one();
    x = '0;        y = '1;        check_one();
    x = 16'h8000;  y = 16'h8000;  check_one();
    x = 16'h6f6f;  y = 16'hdede;  check_one();
    x = 16'haaaa;  y = 16'h5555;  check_one();
    for (int n = 0; n < 200000; n++) begin
      x = N'($urandom);
      y = N'($urandom);
      check_one();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
