// tb_soi_tpt_scan_body.svh -- circuit under test and test sequence shared by
// tb_soi_tpt_scan_top and tb_soi_tpt_scan_top_full.
//
// Included inside a testbench module that defines N_IN, N_OUT, ENH and ROUNDS
// and instantiates soi_tpt_scan_top as "dut" with .*. Capture cell j observes
// launch cell j mod N_IN through a soi_path_model with the default (c432)
// delays. See the including files for the test plan.
`include "tb_soi_tpt_scan_tasks.svh"

  // circuit under test
  for (genvar j = 0; j < N_OUT; j++) begin : g_cut
    soi_path_model u_path1 (.a(s1_launch_out[j % N_IN]), .y(s1_capture_in[j]));
    soi_path_model u_path2 (.a(s2_launch_out[j % N_IN]), .y(s2_capture_in[j]));
  end

  initial begin
    logic [N_OUT-1:0] cap, exp;
    logic p;
    int i;
    s1_clk = '0; s2_clk = '0;
    s1_sys_in = '0; s2_sys_in = '0;
    s1_scan_in_a = 0; s1_scan_in_b = 0; s2_scan_in = 0;
    for (int r = 0; r < ROUNDS; r++) begin
      for (int scheme = 1; scheme <= 2; scheme++) begin
        p = r[0];
        // 1. three-pattern test, tight window: slow return edge is caught
        run_test(scheme, 1'b1, p, p ? T_TIGHT_R : T_TIGHT_F, cap);
        for (int j = 0; j < N_OUT; j++) begin
          i = j % N_IN;
          exp[j] = ENH[i] ? ~p : p;
          if (ENH[i] && cap[j] === ~p) cnt_slow_caught++;
          if (!ENH[i] && cap[j] === p) cnt_plain_held++;
        end
        check_eq($sformatf("scheme %0d three-pattern tight p=%0b", scheme, p), W'(cap), W'(exp));
        // 2. three-pattern test, relaxed window: every path passes
        run_test(scheme, 1'b1, p, T_LOOSE, cap);
        exp = {N_OUT{p}};
        if (cap === exp) cnt_loose_pass++;
        check_eq($sformatf("scheme %0d three-pattern loose p=%0b", scheme, p), W'(cap), W'(exp));
        // 3. two-pattern test, tight window: the fast first edge passes
        run_test(scheme, 1'b0, p, p ? T_TIGHT_R : T_TIGHT_F, cap);
        for (int j = 0; j < N_OUT; j++) begin
          i = j % N_IN;
          exp[j] = ENH[i] ? p : ~p;
          if (ENH[i] && cap[j] === p) cnt_two_pattern_pass++;
        end
        check_eq($sformatf("scheme %0d two-pattern tight p=%0b", scheme, p), W'(cap), W'(exp));
        system_mode(scheme);
      end
    end
    require("scan path A shift (scheme 1)", cnt_scan_a);
    require("scan path B shift (scheme 1)", cnt_scan_b);
    require("scan shift (scheme 2)", cnt_scan_2);
    require("V2 applied by C3", cnt_v2_apply);
    require("V3 launched by C2", cnt_v3_launch);
    require("capture by C1", cnt_capture);
    require("slow path caught (3-pattern)", cnt_slow_caught);
    require("path passes relaxed window", cnt_loose_pass);
    require("fast edge passes (2-pattern)", cnt_two_pattern_pass);
    require("system mode cycle", cnt_system);
    if (ENH != '1) require("plain LSSD launch cell held", cnt_plain_held);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(ROUNDS * 2 * 3 * (T_PRE + 20ns * W + 20us) + 100us);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
