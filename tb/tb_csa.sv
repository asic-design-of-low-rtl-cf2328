// Self-checking testbench for csa (3:2 carry save adder row), W = 8.
// Random and corner operands. Checks sum + 2*carry == x + y + z. Also checks
// each bit against a full adder computed with integer addition.
module tb_csa;
  localparam int unsigned W = 8;
  logic [W-1:0] x, y, z, sum, carry;
  int checks = 0, failures = 0;

  csa #(.W(W)) dut (.x(x), .y(y), .z(z), .sum(sum), .carry(carry));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one();
    int total;
    #1;
    total = int'(x) + int'(y) + int'(z);
    checks++;
    if (int'(sum) + 2 * int'(carry) != total) begin
      failures++;
      $display("FAIL %h+%h+%h: sum=%h carry=%h", x, y, z, sum, carry);
    end
    for (int i = 0; i < int'(W); i++) begin
      int col;
      col = int'(x[i]) + int'(y[i]) + int'(z[i]);
      checks++;
      if (sum[i] !== col[0] || carry[i] !== col[1]) begin
        failures++;
        $display("FAIL bit %0d of %h+%h+%h", i, x, y, z);
      end
    end
  endtask

  initial begin
    x = '1; y = '1; z = '1; check_one();
    x = '0; y = '0; z = '0; check_one();
    x = '1; y = '0; z = '1; check_one();
    for (int n = 0; n < 5000; n++) begin
      x = W'($urandom);
      y = W'($urandom);
      z = W'($urandom);
      check_one();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
