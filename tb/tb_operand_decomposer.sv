// Self-checking testbench for operand_decomposer, N = 8.
// Applies all 65536 operand pairs and checks every output bit against its
// truth table: for each bit position exactly one of a, b, c, d is 1, chosen
// by the pair (x bit, y bit) = (0,0) -> a, (1,1) -> b, (0,1) -> c, (1,0) -> d.
module tb_operand_decomposer;
  localparam int unsigned N = 8;
  logic [N-1:0] x, y, a, b, c, d;
  int checks = 0, failures = 0;

  operand_decomposer #(.N(N)) dut (.x(x), .y(y), .a(a), .b(b), .c(c), .d(d));

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
        x = 8'(ix);
        y = 8'(iy);
        #1;
        for (int i = 0; i < int'(N); i++) begin
          logic [3:0] got, want;
          got = {a[i], b[i], c[i], d[i]};
          case ({x[i], y[i]})
            2'b00:   want = 4'b1000;
            2'b11:   want = 4'b0100;
            2'b01:   want = 4'b0010;
            default: want = 4'b0001;
          endcase
          checks++;
          if (got !== want) begin
            failures++;
            if (failures < 10) $display("FAIL x=%h y=%h bit %0d abcd=%b", x, y, i, got);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
