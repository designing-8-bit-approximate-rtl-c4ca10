// tb_mult4_recursive: exhaustive check of the recursive 4x4 multipliers R_abcd
// of the design space (the four power-optimized and four area-optimized ones)
// against the reference built from the 2x2 behaviour tables and the weights
// 16, 4, 4, 1. The first instance uses the module's default parameters.
module tb_mult4_recursive;
  import ish_pkg::*;
  import ish_ref_pkg::*;

  localparam int N = 8;
  localparam int CODES [N] = '{4335, 1311, 1315, 1555, 5421, 3511, 3311, 5155};

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;
  int approx_seen = 0;  // results that differ from the exact product

  logic [3:0] a, b;
  logic [8:0] p [N];

  mult4_recursive u_default (.a(a), .b(b), .p(p[0]));

  for (genvar k = 1; k < N; k++) begin : g_r
    mult4_recursive #(
      .HH(m2_kind_e'(CODES[k] / 1000)),
      .HL(m2_kind_e'((CODES[k] / 100) % 10)),
      .LH(m2_kind_e'((CODES[k] / 10) % 10)),
      .LL(m2_kind_e'(CODES[k] % 10))
    ) u_r (.a(a), .b(b), .p(p[k]));
  end

  initial begin
    repeat (5000) @(posedge clk);
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
        for (int k = 0; k < N; k++) begin
          checks++;
          if (int'(p[k]) != m4_ref(CODES[k], i, j)) begin
            failures++;
            $display("R%0d: %0d x %0d = %0d, expected %0d", CODES[k], i, j, p[k],
                     m4_ref(CODES[k], i, j));
          end
          if (int'(p[k]) != i * j) approx_seen++;
        end
      end
    end
    // Every design of the set is approximate somewhere except via M5 only.
    checks++;
    if (approx_seen == 0) begin
      failures++;
      $display("no approximate result seen");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
