// tb_table2_paths -- three-pattern tests of six benchmark critical paths.
//
// Workload test for soi_tpt_scan_top. Six launch cells drive six PD-SOI path
// models whose worst-case and fast-case delays are the critical-path delays of
// the benchmarks c432, c499, c1355, c2670, c3540 and c5315 in a 0.18 um PD-SOI
// process (rising and falling output, worst/fast switching history, 7.3 % to
// 13 % apart). Six LSSD capture cells observe them.
//
// For every path r, both transition directions and both schemes, the tester
// sets the capture window halfway between path r's fast and worst delay for
// that direction and runs
//   * a three-pattern test (precondition V1, V2 for one clock, launch V3 = V1):
//     every path whose worst-case delay exceeds the window must be captured
//     stale -- path r always is, so the history-induced slowdown is detected;
//   * a two-pattern test from the same preconditioned state: only paths whose
//     fast delay exceeds the window fail -- path r passes, i.e. without the
//     third pattern its worst case goes unseen.
// Expected results are computed from the delay table, independently of the
// scan hardware.
module tb_table2_paths;
  timeunit 1ns; timeprecision 1ps;
  import tpt_scan_pkg::*;

  localparam int N_IN  = 6;
  localparam int N_OUT = 6;
  localparam logic [N_IN-1:0] ENH = '1;
`include "tb_soi_tpt_scan_tasks.svh"

  // delay table, ps: {Tplh worst, Tplh fast, Tphl worst, Tphl fast}
  function automatic realtime tdel(input int row, input int col);
    int t[6][4] = '{
      '{1522, 1404, 1243, 1148},   // c432,  20 gates
      '{1773, 1614, 1602, 1479},   // c499,  13 gates
      '{1683, 1559, 1985, 1817},   // c1355, 24 gates
      '{3092, 2820, 2494, 2207},   // c2670, 32 gates
      '{4231, 3679, 3410, 3108},   // c3540, 42 gates
      '{3110, 2848, 3103, 2812}    // c5315, 48 gates
    };
    return t[row][col] * 1ps;
  endfunction

  for (genvar j = 0; j < N_OUT; j++) begin : g_cut
    soi_path_model #(
      .T_RISE_WORST(tdel(j, 0)), .T_RISE_FAST(tdel(j, 1)),
      .T_FALL_WORST(tdel(j, 2)), .T_FALL_FAST(tdel(j, 3))
    ) u_path1 (.a(s1_launch_out[j]), .y(s1_capture_in[j]));
    soi_path_model #(
      .T_RISE_WORST(tdel(j, 0)), .T_RISE_FAST(tdel(j, 1)),
      .T_FALL_WORST(tdel(j, 2)), .T_FALL_FAST(tdel(j, 3))
    ) u_path2 (.a(s2_launch_out[j]), .y(s2_capture_in[j]));
  end

  soi_tpt_scan_top #(.N_IN(N_IN), .N_OUT(N_OUT), .LAUNCH_ENHANCED(ENH)) dut (.*);

  int detected[6];
  int missed_by_two_pattern[6];

  initial begin
    logic [N_OUT-1:0] cap, exp;
    realtime window, worst, fast;
    int cw, cf;
    s1_clk = '0; s2_clk = '0;
    s1_sys_in = '0; s2_sys_in = '0;
    s1_scan_in_a = 0; s1_scan_in_b = 0; s2_scan_in = 0;
    for (int r = 0; r < 6; r++) begin
      detected[r] = 0; missed_by_two_pattern[r] = 0;
      for (int pi = 0; pi < 2; pi++) begin
        // p = 1: tested edge rises (Tplh); p = 0: it falls (Tphl)
        logic p = pi[0];
        cw = p ? 0 : 2;
        cf = p ? 1 : 3;
        window = (tdel(r, cw) + tdel(r, cf)) / 2.0;
        for (int scheme = 1; scheme <= 2; scheme++) begin
          run_test(scheme, 1'b1, p, window, cap);
          for (int j = 0; j < N_OUT; j++) exp[j] = (tdel(j, cw) > window) ? ~p : p;
          check_eq($sformatf("row %0d scheme %0d three-pattern p=%0b", r, scheme, p), W'(cap), W'(exp));
          if (cap[r] === ~p) detected[r]++;
          run_test(scheme, 1'b0, p, window, cap);
          for (int j = 0; j < N_OUT; j++) exp[j] = (tdel(j, cf) > window) ? ~p : p;
          check_eq($sformatf("row %0d scheme %0d two-pattern p=%0b", r, scheme, p), W'(cap), W'(exp));
          if (cap[r] === p) missed_by_two_pattern[r]++;
        end
      end
      $display("path %0d: rise %0.1f%% fall %0.1f%% variation; three-pattern caught %0d of 4, two-pattern passed %0d of 4",
               r, 100.0 * (tdel(r, 0) - tdel(r, 1)) / tdel(r, 0),
               100.0 * (tdel(r, 2) - tdel(r, 3)) / tdel(r, 2), detected[r], missed_by_two_pattern[r]);
      checks++;
      if (detected[r] != 4 || missed_by_two_pattern[r] != 4) begin
        failures++;
        $display("FAIL path %0d: worst case not separated from fast case", r);
      end
    end
    require("scan path A shift (scheme 1)", cnt_scan_a);
    require("scan path B shift (scheme 1)", cnt_scan_b);
    require("scan shift (scheme 2)", cnt_scan_2);
    require("V2 applied by C3", cnt_v2_apply);
    require("V3 launched by C2", cnt_v3_launch);
    require("capture by C1", cnt_capture);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
