// tb_mult4_accurate: exhaustive check of the exact 4x4 multiplier (SMA4_4b)
// against a * b for all 256 operand pairs.
module tb_mult4_accurate;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic [3:0] a, b;
  logic [7:0] p;

  mult4_accurate dut (.a(a), .b(b), .p(p));

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = '0; b = '0;
    for (int i = 0; i < 16; i++) begin
      for (int j = 0; j < 16; j++) begin
        @(negedge clk);
        a = 4'(i); b = 4'(j);
        @(posedge clk);
        checks++;
        if (int'(p) != i * j) begin
          failures++;
          $display("%0d x %0d = %0d, expected %0d", i, j, p, i * j);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
