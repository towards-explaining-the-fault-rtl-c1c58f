// tb_set_campaign: single-event-transient injection campaign comparing the
// buffer styles on the pipelined multiplier at the two data widths of the
// study.
//
// Twenty-four injection environments (tb_set_env) run side by side: each of
// the five single-channel buffer styles and the doubled-up double-checking
// (DD) version, at 4 bits once with a slow source (token-limited pipeline)
// and once with a slow sink (bubble-limited pipeline), and at 8 bits with
// the slow sink, once with one and once with two operations per stage.
// Every environment makes one fault-free reference run and then RUNS runs
// with one inverted internal signal each, and reports how many runs showed
// each effect class.  The table is printed at the end.
//
// Checks, per environment: the reference run shows no effect; for the DD
// version, no injection into one copy shows any effect at the output (its
// purpose); for the plain WCHB, injections do show effects (the
// environment can see faults at all); for the deadlocking WCHB, some
// injection ends in a deadlock (the behaviour that style is built for).
// The counts themselves are printed, not checked: they depend on the
// zero-delay simulation and on this environment's choices.
module tb_set_campaign;
  import qdi_pkg::*;

  localparam int unsigned NENV = 24;
  localparam int unsigned RUNS = 150;
  localparam buf_style_e  STY [6] = '{BUF_WCHB, BUF_INTERLOCKING,
      BUF_DEADLOCKING, BUF_DUALCD, BUF_MTD, BUF_WCHB};
  localparam bit          ISDD [6] = '{0, 0, 0, 0, 0, 1};
  localparam string       NAME [6] = '{"WCHB", "Interlocking", "Deadlocking",
      "DualCD", "MTDLatchHB", "DD WCHB"};

  logic fin [NENV];
  int   g_eff [NENV], i_d [NENV], i_c [NENV], e_d [NENV], e_c [NENV];
  int   n_v [NENV], n_co [NENV], n_g [NENV], n_dl [NENV], n_tc [NENV];
  int   checks, failures;

  for (genvar e = 0; e < NENV; e++) begin : g_env
    // e < 6: 4 bits, slow source (token-limited); 6 <= e < 12: 4 bits, slow
    // sink (bubble-limited); e >= 12: 8 bits, slow sink, with one (e < 18)
    // or two (e >= 18) operations per stage.
    tb_set_env #(
      .N       ((e < 12) ? 4 : 8),
      .OPS     ((e < 18) ? 1 : 2),
      .STYLE   (STY[e % 6]),
      .DD      (ISDD[e % 6]),
      .RUNS    (RUNS),
      .TOKENS  (6),
      .SRC_DLY ((e < 6) ? 8 : 1),
      .SNK_DLY ((e < 6) ? 1 : 8),
      .PW      (1),
      .SEED    (100 + e)
    ) u_env (
      .finished (fin[e]), .golden_effects (g_eff[e]),
      .inj_data (i_d[e]), .inj_ctrl (i_c[e]),
      .eff_data (e_d[e]), .eff_ctrl (e_c[e]),
      .n_value (n_v[e]), .n_code (n_co[e]), .n_glitch (n_g[e]),
      .n_deadlock (n_dl[e]), .n_tokcnt (n_tc[e]));
  end

  initial begin
    checks = 0; failures = 0;
    #10;   // let every environment clear its finished flag first
    for (int e = 0; e < NENV; e++) wait (fin[e]);
    $display("style         bits  ops  load      data inj/eff  ctrl inj/eff  value  code  glitch  deadlock  tokcnt");
    for (int e = 0; e < NENV; e++) begin
      $display("%-12s  %4d  %3d  %-8s  %4d/%-4d     %4d/%-4d     %5d  %4d  %6d  %8d  %6d",
               NAME[e % 6], (e < 12) ? 4 : 8, (e < 18) ? 1 : 2, (e < 6) ? "token" : "bubble",
               i_d[e], e_d[e], i_c[e], e_c[e], n_v[e], n_co[e], n_g[e], n_dl[e], n_tc[e]);
      checks++;
      if (g_eff[e] != 0) begin
        failures++;
        $display("FAIL: reference run of environment %0d shows an effect", e);
      end
      if (ISDD[e % 6]) begin
        checks++;
        if (e_d[e] + e_c[e] != 0) begin
          failures++;
          $display("FAIL: DD version let an injection through (environment %0d)", e);
        end
      end
      if (e % 6 == 0) begin
        checks++;
        if (e_d[e] + e_c[e] == 0) begin
          failures++;
          $display("FAIL: no injection into the WCHB showed an effect (environment %0d)", e);
        end
      end
      if (e % 6 == 2) begin
        checks++;
        if (n_dl[e] == 0) begin
          failures++;
          $display("FAIL: deadlocking WCHB never deadlocked (environment %0d)", e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5000000;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
