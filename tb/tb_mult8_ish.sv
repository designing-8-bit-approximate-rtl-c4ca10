// tb_mult8_ish: checks the 8x8 recursive ISH multiplier.
//  * u_default (default parameters, R4335 R1315 R1315 R1315): all 65536
//    operand pairs against the reference model.
//  * u_mixed (SMA4 accurate, external, R3311, R5421): all operand pairs, with
//    the external slot's product driven by a stand-in that returns a random
//    value per operand pair, so that the wiring of the external port and of
//    each weight is checked.
//  * bit 16 of the product: an all-M3 configuration whose 4x4 slots can exceed
//    255 is driven with a = b = 255 (exact 65025, this design 79475).
module tb_mult8_ish;
  import ish_pkg::*;
  import ish_ref_pkg::*;

  localparam mult4_cfg_t R3333 = '{kind: SLOT_RECURSIVE, hh: M3, hl: M3, lh: M3, ll: M3};

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic [7:0]      a, b;
  logic [3:0][7:0] ext_p;
  logic [16:0]     p_def, p_mix, p_big;

  mult8_ish u_default (.a(a), .b(b), .ext_p('0), .p(p_def));

  mult8_ish #(.CFG_HH(SMA4), .CFG_HL(SMA2), .CFG_LH(R3311), .CFG_LL(R5421))
    u_mixed (.a(a), .b(b), .ext_p(ext_p), .p(p_mix));

  mult8_ish #(.CFG_HH(R3333), .CFG_HL(R3333), .CFG_LH(R3333), .CFG_LL(R3333))
    u_big (.a(a), .b(b), .ext_p('0), .p(p_big));

  initial begin
    repeat (70000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_def, exp_mix;
    a = '0; b = '0; ext_p = '0;
    for (int i = 0; i < 256; i++) begin
      for (int j = 0; j < 256; j++) begin
        @(negedge clk);
        a = 8'(i); b = 8'(j);
        ext_p = '0;
        ext_p[SUB_HL] = 8'($urandom);
        @(posedge clk);
        exp_def = m8_ref(4335, 1315, 1315, 1315, i, j);
        exp_mix = m8_combine((i / 16) * (j / 16), int'(ext_p[SUB_HL]),
                             m4_ref(3311, i % 16, j / 16), m4_ref(5421, i % 16, j % 16));
        checks += 2;
        if (int'(p_def) != exp_def) begin
          failures++;
          if (failures < 10) $display("default: %0d x %0d = %0d, expected %0d", i, j, p_def, exp_def);
        end
        if (int'(p_mix) != exp_mix) begin
          failures++;
          if (failures < 10) $display("mixed: %0d x %0d = %0d, expected %0d", i, j, p_mix, exp_mix);
        end
      end
    end
    @(negedge clk);
    a = 8'd255; b = 8'd255;
    @(posedge clk);
    checks++;
    if (int'(p_big) != m8_ref(3333, 3333, 3333, 3333, 255, 255) || p_big[16] != 1'b1) begin
      failures++;
      $display("all-M3: 255 x 255 = %0d, expected %0d", p_big, m8_ref(3333, 3333, 3333, 3333, 255, 255));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
