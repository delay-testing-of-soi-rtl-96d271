// tb_soi_tpt_scan_tasks.svh -- signals and tester tasks shared by the
// end-to-end testbenches of soi_tpt_scan_top.
//
// Included inside a testbench module that defines N_IN, N_OUT and ENH (the
// launch cells that are enhanced) and instantiates soi_tpt_scan_top as "dut"
// with .*. Provides the top's signals, check/mechanism counters, and tasks
// that scan test vectors in and captured values out for both schemes, apply a
// preconditioned three-pattern or two-pattern test with a given capture
// window, and run system-mode cycles. The circuit under test is supplied by
// the including file.

  localparam int      W         = N_IN + N_OUT;
  localparam realtime T_PRE     = 500ns;   // precondition hold (model needs 300 ns)
  localparam realtime T_V2      = 10ns;    // V2 applied for one clock period
  localparam realtime T_TIGHT_R = 1.46ns;  // between fast (1.404) and worst (1.522) rise
  localparam realtime T_TIGHT_F = 1.20ns;  // between fast (1.148) and worst (1.243) fall
  localparam realtime T_LOOSE   = 3.0ns;   // longer than any path delay

  se1_clk_t           s1_clk;
  logic [N_IN-1:0]    s1_sys_in, s1_launch_out;
  logic [N_OUT-1:0]   s1_capture_in, s1_capture_out;
  logic               s1_scan_in_a, s1_scan_out_a, s1_scan_in_b, s1_scan_out_b;
  se2_clk_t           s2_clk;
  logic [N_IN-1:0]    s2_sys_in, s2_launch_out;
  logic [N_OUT-1:0]   s2_capture_in, s2_capture_out;
  logic               s2_scan_in, s2_scan_out;

  int checks = 0, failures = 0;
  // mechanism counters
  int cnt_scan_a = 0, cnt_scan_b = 0, cnt_scan_2 = 0, cnt_v2_apply = 0;
  int cnt_v3_launch = 0, cnt_capture = 0, cnt_slow_caught = 0;
  int cnt_two_pattern_pass = 0, cnt_loose_pass = 0, cnt_system = 0, cnt_plain_held = 0;

  typedef enum {P_C1, P_C2, P_C3, P_ACLK, P_B1, P_B2} clk_e;

  task automatic set1(input clk_e k, input logic v);
    case (k)
      P_C1: s1_clk.c1 = v;  P_C2: s1_clk.c2 = v;  P_C3: s1_clk.c3 = v;
      P_ACLK: s1_clk.aclk = v; P_B1: s1_clk.b1clk = v; P_B2: s1_clk.b2clk = v;
    endcase
  endtask

  task automatic set2(input clk_e k, input logic v);
    case (k)
      P_C1: s2_clk.c1 = v;  P_C2: s2_clk.c2 = v;  P_C3: s2_clk.c3 = v;
      P_ACLK: s2_clk.aclk = v;
      default: ;
    endcase
  endtask

  task automatic pulse(input int scheme, input clk_e k);
    #1;
    if (scheme == 1) set1(k, 1'b1); else set2(k, 1'b1);
    #2;
    if (scheme == 1) set1(k, 1'b0); else set2(k, 1'b0);
    #1;
  endtask

  task automatic check_eq(input string what, input logic [W-1:0] got, input logic [W-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // ---------------------------------------------------------------- scan-in
  task automatic scan_in1(input logic [N_IN-1:0] v1, input logic [N_IN-1:0] v2);
    // path B through the enhanced launch cells, last one first
    for (int i = N_IN - 1; i >= 0; i--)
      if (ENH[i]) begin
        s1_scan_in_b = v2[i]; pulse(1, P_B1); pulse(1, P_B2); cnt_scan_b++;
      end
    // path A through every cell, last one first; capture cells get 0
    for (int i = W - 1; i >= 0; i--) begin
      s1_scan_in_a = (i < N_IN) ? v1[i] : 1'b0;
      pulse(1, P_ACLK); pulse(1, P_C2); cnt_scan_a++;
    end
    check_eq("scheme 1 launch after scan-in", W'(s1_launch_out), W'(v1));
  endtask

  task automatic shift2(input logic b);
    s2_scan_in = b;
    pulse(2, P_C1); pulse(2, P_ACLK); pulse(2, P_C3); pulse(2, P_C2); cnt_scan_2++;
  endtask

  task automatic scan_in2(input logic [N_IN-1:0] v1, input logic [N_IN-1:0] v2);
    // positions from the far end: cell W-1 ... cell 0; an enhanced cell
    // has its second position (V2) after its first (V1/V3)
    for (int i = W - 1; i >= 0; i--) begin
      if (i < N_IN && ENH[i]) shift2(v2[i]);
      shift2((i < N_IN) ? v1[i] : 1'b0);
    end
    check_eq("scheme 2 launch after scan-in", W'(s2_launch_out), W'(v1));
  endtask

  // --------------------------------------------------------------- scan-out
  task automatic scan_out1(output logic [N_OUT-1:0] cap);
    for (int i = W - 1; i >= N_IN; i--) begin
      cap[i - N_IN] = s1_scan_out_a;
      s1_scan_in_a = 1'b0; pulse(1, P_ACLK); pulse(1, P_C2); cnt_scan_a++;
    end
  endtask

  task automatic scan_out2(output logic [N_OUT-1:0] cap);
    for (int i = W - 1; i >= N_IN; i--) begin
      cap[i - N_IN] = s2_scan_out;
      shift2(1'b0);
    end
  endtask

  // ------------------------------------------------ precondition and launch
  // three = 1: C3 applies V2, C2 launches V3, C1 captures.
  // three = 0: C3 launches directly (two-pattern test from a held V1).
  // The capture latch closes 'window' after the launching clock rises.
  task automatic apply_test(input int scheme, input bit three, input realtime window);
    #(T_PRE);
    if (three) begin
      if (scheme == 1) set1(P_C3, 1'b1); else set2(P_C3, 1'b1);
      #2;
      if (scheme == 1) set1(P_C3, 1'b0); else set2(P_C3, 1'b0);
      cnt_v2_apply++;
      #(T_V2 - 2ns);
    end
    // launch edge
    if (scheme == 1) set1(three ? P_C2 : P_C3, 1'b1); else set2(three ? P_C2 : P_C3, 1'b1);
    #0.2;
    if (scheme == 1) set1(three ? P_C2 : P_C3, 1'b0); else set2(three ? P_C2 : P_C3, 1'b0);
    if (three) cnt_v3_launch++; else cnt_v2_apply++;
    #0.2;
    if (scheme == 1) set1(P_C1, 1'b1); else set2(P_C1, 1'b1);
    #(window - 0.4ns);
    if (scheme == 1) set1(P_C1, 1'b0); else set2(P_C1, 1'b0);
    cnt_capture++;
    #2;
    pulse(scheme, P_C2);   // move captured values into the capture slaves
  endtask

  // one complete test on one scheme; returns the captured word
  task automatic run_test(input int scheme, input bit three, input logic p,
                          input realtime window, output logic [N_OUT-1:0] cap);
    logic [N_IN-1:0] v1, v2;
    v1 = three ? {N_IN{p}} : {N_IN{~p}};
    v2 = ~v1;
    if (scheme == 1) scan_in1(v1, v2); else scan_in2(v1, v2);
    apply_test(scheme, three, window);
    if (scheme == 1) scan_out1(cap); else scan_out2(cap);
  endtask

  task automatic system_mode(input int scheme);
    logic [N_IN-1:0] d, prev;
    for (int k = 0; k < 4; k++) begin
      d = N_IN'($urandom);
      if (scheme == 1) s1_sys_in = d; else s2_sys_in = d;
      pulse(scheme, P_C1); pulse(scheme, P_C2);
      check_eq("system mode launch", W'(scheme == 1 ? s1_launch_out : s2_launch_out), W'(d));
      if (k > 0)
        for (int j = 0; j < N_OUT; j++) begin
          checks++;
          if ((scheme == 1 ? s1_capture_out[j] : s2_capture_out[j]) !== prev[j % N_IN]) begin
            failures++;
            $display("FAIL system mode capture %0d", j);
          end
        end
      prev = d;
      cnt_system++;
    end
  endtask

  task automatic require(input string what, input int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end else $display("mechanism %-34s %0d", what, n);
  endtask

