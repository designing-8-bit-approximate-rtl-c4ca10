// tb_name_workload: evaluates the error metric of the design space on the RTL
// and compares it with the published figures.
//
// Metric: NAME = |mean(y - x)| / 2^(2n), the absolute value of the signed
// mean error over the input distribution, divided by 2^(2n) for an n-bit
// multiplier. Operands are independent and normally distributed, discretized
// to the integers 0 .. 2^n - 1: mu = 8, sigma = 1.5 for 4-bit and mu = 128,
// sigma = 22.5 for 8-bit. Instead of drawing a random sample, every operand
// pair is applied and weighted by its probability, so the result is the exact
// expectation and the run is deterministic. The published values were
// measured on random samples (1000 pairs for 4-bit, 100000 for 8-bit), so a
// tolerance is allowed:
//  * 8-bit power-optimized designs (ish_mult8_top.p_power): within a factor
//    of 1.5 for the four designs with NAME above 1e-6, below 1e-6 for the
//    fifth, and strictly decreasing from the first design to the last.
//  * 4-bit R_abcd: within a factor of 2 where the expectation is above 4e-5
//    (a 1000-pair sample sees too few of the rare error cases below that);
//    below 2e-4 otherwise.
module tb_name_workload;
  import ish_pkg::*;

  localparam int N4 = 8;
  localparam int CODES [N4] = '{1311, 1315, 4335, 1555, 5421, 3511, 3311, 5155};
  localparam real PUBLISHED4 [N4] = '{6.02e-4, 1.25e-4, 1.88e-4, 0.0, 4.55e-3, 5.76e-4, 5.35e-4, 4.05e-5};
  localparam real PUBLISHED8 [N_POWER] = '{7.19e-4, 1.18e-4, 3.47e-5, 2.47e-6, 5.74e-7};

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic [3:0] a4, b4;
  logic [8:0] p4 [N4];

  for (genvar k = 0; k < N4; k++) begin : g_r
    mult4_recursive #(
      .HH(m2_kind_e'(CODES[k] / 1000)),
      .HL(m2_kind_e'((CODES[k] / 100) % 10)),
      .LH(m2_kind_e'((CODES[k] / 10) % 10)),
      .LL(m2_kind_e'(CODES[k] % 10))
    ) u_r (.a(a4), .b(b4), .p(p4[k]));
  end

  logic [7:0]                  a8, b8;
  logic [N_AREA-1:0][3:0][7:0] ext_p_area;
  logic [N_POWER-1:0][16:0]    p_power;
  logic [N_AREA-1:0][16:0]     p_area;

  ish_mult8_top u_top (.a(a8), .b(b8), .ext_p_area(ext_p_area), .p_power(p_power), .p_area(p_area));

  real w4 [16];
  real w8 [256];

  initial begin
    repeat (80000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real rabs(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  initial begin
    real s;
    real err4 [N4];
    real err8 [N_POWER];
    real name4 [N4];
    real name8 [N_POWER];

    a4 = '0; b4 = '0; a8 = '0; b8 = '0; ext_p_area = '0;

    // Discretized normal weights.
    s = 0.0;
    for (int i = 0; i < 16; i++) begin
      w4[i] = $exp(-((i - 8.0) ** 2) / (2.0 * 1.5 * 1.5));
      s += w4[i];
    end
    for (int i = 0; i < 16; i++) w4[i] /= s;
    s = 0.0;
    for (int i = 0; i < 256; i++) begin
      w8[i] = $exp(-((i - 128.0) ** 2) / (2.0 * 22.5 * 22.5));
      s += w8[i];
    end
    for (int i = 0; i < 256; i++) w8[i] /= s;

    foreach (err4[k]) err4[k] = 0.0;
    foreach (err8[k]) err8[k] = 0.0;

    for (int x = 0; x < 16; x++) begin
      for (int y = 0; y < 16; y++) begin
        @(negedge clk);
        a4 = 4'(x); b4 = 4'(y);
        @(posedge clk);
        for (int k = 0; k < N4; k++)
          err4[k] += w4[x] * w4[y] * real'(int'(p4[k]) - x * y);
      end
    end

    for (int x = 0; x < 256; x++) begin
      for (int y = 0; y < 256; y++) begin
        @(negedge clk);
        a8 = 8'(x); b8 = 8'(y);
        @(posedge clk);
        for (int d = 0; d < N_POWER; d++)
          err8[d] += w8[x] * w8[y] * real'(int'(p_power[d]) - x * y);
      end
    end

    for (int k = 0; k < N4; k++) begin
      name4[k] = rabs(err4[k]) / 256.0;
      $display("R%0d       NAME %e (published %e)", CODES[k], name4[k], PUBLISHED4[k]);
      checks++;
      if (name4[k] > 4.0e-5) begin
        if (name4[k] > 2.0 * PUBLISHED4[k] || name4[k] < 0.5 * PUBLISHED4[k]) begin
          failures++;
          $display("  outside a factor of 2");
        end
      end else if (name4[k] >= 2.0e-4) begin
        failures++;
        $display("  above 2e-4");
      end
    end

    for (int d = 0; d < N_POWER; d++) begin
      name8[d] = rabs(err8[d]) / 65536.0;
      $display("power design %0d NAME %e (published %e)", d, name8[d], PUBLISHED8[d]);
      checks++;
      if (PUBLISHED8[d] > 1.0e-6) begin
        if (name8[d] > 1.5 * PUBLISHED8[d] || name8[d] < PUBLISHED8[d] / 1.5) begin
          failures++;
          $display("  outside a factor of 1.5");
        end
      end else if (name8[d] >= 1.0e-6) begin
        failures++;
        $display("  above 1e-6");
      end
      if (d > 0) begin
        checks++;
        if (!(name8[d] < name8[d-1])) begin
          failures++;
          $display("  not below the previous design");
        end
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
