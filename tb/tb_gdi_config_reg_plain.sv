// tb_gdi_config_reg_plain: the same end-to-end test as tb_gdi_config_reg, run
// on the plain build (IMPROVED = 0: eight bare GDI cells, 8 pMOS + 8 nMOS).
//
// The logic behaviour must be identical to the improved build in all four
// modes. What differs is the output strength. In the plain build Q reaches
// the output through the pMOS of the output cell (weak when 0) from the slave
// stage, whose 1 came through the master's nMOS (weak when 1), so with no
// overwrite active Q is always a degraded level; while an overwrite is active
// the output cell's nMOS drives a strong 0. The expected strength is therefore
// exactly "overwrite active". The test counts the weak outputs it saw and
// fails if there were none.
module tb_gdi_config_reg_plain;
  import gdi_pkg::*;

  logic clk = 1'b0, d = 1'b0, x = 1'b0, y = 1'b1, z = 1'b0, r = 1'b0;
  logic q, q_strong;
  int   checks = 0, failures = 0;

  // reference state
  logic mref, qref, prev_q;

  // mechanism counters
  int n_latch_pass = 0, n_latch_hold = 0, n_fall_capture = 0, n_rise_nocap = 0;
  int n_weak = 0;
  int n_sync_ovw = 0, n_sync_blocked = 0, n_async_ovw = 0, n_mode_switch = 0;

  gdi_config_reg #(.IMPROVED(1'b0)) dut (.clk(clk), .d(d), .x(x), .y(y), .z(z), .r(r), .q(q), .q_strong(q_strong));

  localparam int STEPS_PER_MODE = 400;

  initial begin : watchdog
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic ovw_active();
    return !y && r && x && (z || clk);
  endfunction

  // Update the reference after one input change and compare.
  task automatic step(input logic was_clk, input logic was_d);
    logic exp_q;
    prev_q = qref;
    if (clk) mref = d;
    if (y ? clk : !clk) qref = mref;
    #1;
    exp_q = ovw_active() ? 1'b0 : qref;
    checks++;
    if (q !== exp_q || q_strong !== ovw_active()) begin
      failures++;
      $display("FAIL t=%0t y=%b z=%b r=%b clk=%b d=%b x=%b q=%b/%b exp=%b",
               $time, y, z, r, clk, d, x, q, q_strong, exp_q);
    end
    // mechanism coverage
    if (!q_strong) n_weak++;
    if (y && clk && (d != was_d) && q == d) n_latch_pass++;
    if (y && !clk && !was_clk && (d != was_d) && q != d) n_latch_hold++;
    if (!y && was_clk && !clk && (qref != prev_q) && !ovw_active()) n_fall_capture++;
    if (!y && !was_clk && clk && (d != qref) && !ovw_active() && q == qref) n_rise_nocap++;
    if (!y && r && !z && clk && x && qref) n_sync_ovw++;
    if (!y && r && !z && !clk && x && qref && q) n_sync_blocked++;
    if (!y && r && z && !clk && x && qref && !q) n_async_ovw++;
  endtask

  task automatic random_steps(input int n);
    logic was_clk, was_d;
    for (int i = 0; i < n; i++) begin
      was_clk = clk;
      was_d   = d;
      case ($urandom_range(0, 3))
        0, 1: clk = ~clk;
        2:    d   = ~d;
        default: x = ~x;
      endcase
      step(was_clk, was_d);
    end
  endtask

  task automatic set_mode(input logic ny, input logic nz, input logic nr);
    if ({y, z, r} != {ny, nz, nr}) n_mode_switch++;
    y = ny; z = nz; r = nr;
    step(clk, d);
  endtask

  initial begin
    // Transistor tally of the improved build.
    checks += 2;
    if (reg_pmos(1'b0) != 8) begin failures++; $display("FAIL pMOS count %0d", reg_pmos(1'b0)); end
    if (reg_nmos(1'b0) != 8) begin failures++; $display("FAIL nMOS count %0d", reg_nmos(1'b0)); end

    // Initialise the storage nodes through D: latch mode, clock high.
    y = 1'b1; z = 1'b0; r = 1'b0; x = 1'b0; d = 1'b0; clk = 1'b1;
    mref = 1'b0; qref = 1'b0;
    #1;
    clk = 1'b0; step(1'b1, d);

    // Each mode with random stimulus, then in a different order.
    for (int pass = 0; pass < 2; pass++) begin
      set_mode(1'b1, 1'b0, 1'b0); random_steps(STEPS_PER_MODE);   // latch
      set_mode(1'b0, 1'b0, 1'b0); random_steps(STEPS_PER_MODE);   // register
      set_mode(1'b0, 1'b0, 1'b1); random_steps(STEPS_PER_MODE);   // synchronous overwrite
      set_mode(1'b0, 1'b1, 1'b1); random_steps(STEPS_PER_MODE);   // asynchronous overwrite
      set_mode(1'b0, 1'b1, 1'b0); random_steps(STEPS_PER_MODE);   // register, Z don't care
      set_mode(1'b1, 1'b1, 1'b1); random_steps(STEPS_PER_MODE);   // latch, Z and R don't care
    end

    $display("mechanisms: latch_pass=%0d latch_hold=%0d fall_capture=%0d rise_nocapture=%0d",
             n_latch_pass, n_latch_hold, n_fall_capture, n_rise_nocap);
    $display("            sync_overwrite=%0d sync_held_off=%0d async_overwrite=%0d mode_switches=%0d",
             n_sync_ovw, n_sync_blocked, n_async_ovw, n_mode_switch);
    if (n_latch_pass == 0)   begin failures++; $display("FAIL no latch transparency seen"); end
    if (n_latch_hold == 0)   begin failures++; $display("FAIL no latch hold seen"); end
    if (n_fall_capture == 0) begin failures++; $display("FAIL no falling-edge capture seen"); end
    if (n_rise_nocap == 0)   begin failures++; $display("FAIL no rising-edge hold seen"); end
    if (n_sync_ovw == 0)     begin failures++; $display("FAIL no synchronous overwrite seen"); end
    if (n_sync_blocked == 0) begin failures++; $display("FAIL no held-off synchronous overwrite seen"); end
    if (n_async_ovw == 0)    begin failures++; $display("FAIL no asynchronous overwrite seen"); end
    $display("            weak_outputs=%0d", n_weak);
    if (n_weak == 0)         begin failures++; $display("FAIL no weak output level seen"); end
    if (n_mode_switch == 0)  begin failures++; $display("FAIL no mode switch seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
