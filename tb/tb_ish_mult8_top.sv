// tb_ish_mult8_top: end-to-end check of all ten 8-bit ISH designs held by the
// top, over every one of the 65536 operand pairs.
//
// The SMApproxLib Approx2/Approx3 slots of the area-optimized designs are fed
// by a stand-in that returns a fresh random 8-bit value for every slot and
// operand pair; the check then confirms that each external product is picked
// up by the right slot with the right weight. All other products are compared
// with the reference model built from the 2x2 behaviour tables.
//
// Mechanisms counted (each must occur at least once):
//   m1_err, m3_err, m4_err  a 2x2 multiplier of kind M1, M3 or M4 receives
//                           3 x 3, the one input pair it gets wrong
//   heal                    a product where one 4x4 slot is too high and
//                           another too low, so their errors partly cancel
//   heal_exact              such a product whose errors cancel completely
//                           (reported only: the weights of the slot errors
//                           in these ten designs never sum to zero)
//   ext_slot, acc_slot      a product that uses an external slot / an exact
//                           SMA4 slot
module tb_ish_mult8_top;
  import ish_pkg::*;
  import ish_ref_pkg::*;

  // Slot codes per design, [design][slot HH, HL, LH, LL]: a four-digit R_abcd
  // code, 0 for the exact SMA4 slot, -1 for an external slot.
  localparam int POWER_CODES [5][4] = '{
    '{1311, 1311, 1311, 1311},
    '{1315, 1311, 1311, 1311},
    '{4335, 1315, 1311, 1311},
    '{4335, 1315, 1315, 1311},
    '{4335, 1315, 1315, 1315}
  };
  localparam int AREA_CODES [5][4] = '{
    '{-1, -1, -1,   -1},
    '{ 0, -1, -1,   -1},
    '{ 0, -1,  0,   -1},
    '{ 0,  0,  0,   -1},
    '{ 0,  0, 3311, -1}
  };

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;
  int m1_err = 0, m3_err = 0, m4_err = 0;
  int heal = 0, heal_exact = 0, ext_slot = 0, acc_slot = 0;

  logic [7:0]                  a, b;
  logic [N_AREA-1:0][3:0][7:0] ext_p_area;
  logic [N_POWER-1:0][16:0]    p_power;
  logic [N_AREA-1:0][16:0]     p_area;

  ish_mult8_top dut (.*);

  initial begin
    repeat (70000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Operand nibbles of a slot.
  function automatic int slot_a(int s, int x);
    return (s == SUB_HH || s == SUB_HL) ? x / 16 : x % 16;
  endfunction
  function automatic int slot_b(int s, int y);
    return (s == SUB_HH || s == SUB_LH) ? y / 16 : y % 16;
  endfunction

  // Count 3 x 3 inputs reaching approximate 2x2 multipliers of an R_abcd.
  task automatic count_m2_events(int code, int x4, int y4);
    int kinds [4];
    int xa [4], yb [4];
    kinds = '{code / 1000, (code / 100) % 10, (code / 10) % 10, code % 10};
    xa = '{x4 / 4, x4 / 4, x4 % 4, x4 % 4};
    yb = '{y4 / 4, y4 % 4, y4 / 4, y4 % 4};
    for (int k = 0; k < 4; k++) begin
      if (xa[k] == 3 && yb[k] == 3) begin
        if (kinds[k] == 1) m1_err++;
        if (kinds[k] == 3) m3_err++;
        if (kinds[k] == 4) m4_err++;
      end
    end
  endtask

  initial begin
    a = '0; b = '0; ext_p_area = '0;
    for (int x = 0; x < 256; x++) begin
      for (int y = 0; y < 256; y++) begin
        @(negedge clk);
        a = 8'(x); b = 8'(y);
        for (int d = 0; d < N_AREA; d++)
          for (int s = 0; s < 4; s++)
            ext_p_area[d][s] = 8'($urandom);
        @(posedge clk);

        for (int d = 0; d < N_POWER; d++) begin
          int sp [4];
          int up, down;
          up = 0; down = 0;
          for (int s = 0; s < 4; s++) begin
            int ea, eb, err;
            ea = slot_a(s, x); eb = slot_b(s, y);
            sp[s] = m4_ref(POWER_CODES[d][s], ea, eb);
            err = sp[s] - ea * eb;
            if (err > 0) up++;
            if (err < 0) down++;
            count_m2_events(POWER_CODES[d][s], ea, eb);
          end
          if (up > 0 && down > 0) begin
            heal++;
            if (m8_combine(sp[0], sp[1], sp[2], sp[3]) == x * y) heal_exact++;
          end
          checks++;
          if (int'(p_power[d]) != m8_combine(sp[0], sp[1], sp[2], sp[3])) begin
            failures++;
            if (failures < 10)
              $display("power %0d: %0d x %0d = %0d, expected %0d", d, x, y, p_power[d],
                       m8_combine(sp[0], sp[1], sp[2], sp[3]));
          end
        end

        for (int d = 0; d < N_AREA; d++) begin
          int sp [4];
          for (int s = 0; s < 4; s++) begin
            int ea, eb;
            ea = slot_a(s, x); eb = slot_b(s, y);
            if (AREA_CODES[d][s] < 0) begin
              sp[s] = int'(ext_p_area[d][s]);
              ext_slot++;
            end else begin
              sp[s] = m4_ref(AREA_CODES[d][s], ea, eb);
              if (AREA_CODES[d][s] == 0) acc_slot++;
              else count_m2_events(AREA_CODES[d][s], ea, eb);
            end
          end
          checks++;
          if (int'(p_area[d]) != m8_combine(sp[0], sp[1], sp[2], sp[3])) begin
            failures++;
            if (failures < 10)
              $display("area %0d: %0d x %0d = %0d, expected %0d", d, x, y, p_area[d],
                       m8_combine(sp[0], sp[1], sp[2], sp[3]));
          end
        end
      end
    end

    $display("events: m1_err=%0d m3_err=%0d m4_err=%0d heal=%0d heal_exact=%0d ext_slot=%0d acc_slot=%0d",
             m1_err, m3_err, m4_err, heal, heal_exact, ext_slot, acc_slot);
    checks += 6;
    if (m1_err == 0)     begin failures++; $display("M1 approximation never exercised"); end
    if (m3_err == 0)     begin failures++; $display("M3 approximation never exercised"); end
    if (m4_err == 0)     begin failures++; $display("M4 approximation never exercised"); end
    if (heal == 0)       begin failures++; $display("error cancellation never seen"); end
    if (ext_slot == 0)   begin failures++; $display("external slot never used"); end
    if (acc_slot == 0)   begin failures++; $display("accurate slot never used"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
