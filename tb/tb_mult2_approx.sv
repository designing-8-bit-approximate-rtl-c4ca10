// tb_mult2_approx: exhaustive check of the five 2x2 multiplier kinds M1..M5
// against their behaviour tables (all 16 operand pairs per kind).
module tb_mult2_approx;
  import ish_pkg::*;
  import ish_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic [1:0] a, b;
  logic [3:0] p [5];

  mult2_approx #(.KIND(M1)) u_m1 (.a(a), .b(b), .p(p[0]));
  mult2_approx #(.KIND(M2)) u_m2 (.a(a), .b(b), .p(p[1]));
  mult2_approx #(.KIND(M3)) u_m3 (.a(a), .b(b), .p(p[2]));
  mult2_approx #(.KIND(M4)) u_m4 (.a(a), .b(b), .p(p[3]));
  mult2_approx              u_m5 (.a(a), .b(b), .p(p[4]));  // default: exact

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = '0; b = '0;
    for (int i = 0; i < 4; i++) begin
      for (int j = 0; j < 4; j++) begin
        @(negedge clk);
        a = 2'(i); b = 2'(j);
        @(posedge clk);
        for (int k = 0; k < 5; k++) begin
          checks++;
          if (int'(p[k]) != m2_ref(k + 1, i, j)) begin
            failures++;
            $display("M%0d: %0d x %0d = %0d, expected %0d", k + 1, i, j, p[k], m2_ref(k + 1, i, j));
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
