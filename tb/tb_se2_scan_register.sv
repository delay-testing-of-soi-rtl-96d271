// tb_se2_scan_register -- self-checking test of a mixed scheme-2 scan register.
//
// Six cells, cells 0, 2 and 3 enhanced (scan element 2, two scan positions
// each), the others LSSD: nine scan positions. The testbench keeps its own
// list of positions (cell, first or second position) in scan order and builds
// the serial stream from it. Each round draws random V1 and V2, shifts nine
// steps (C1, ACLK, C3, C2), then checks:
//   * Data Out = V1 everywhere
//   * after C3: enhanced cells show V2, LSSD cells keep V1
//   * after C2: V1 (= V3) again
//   * C1 capture of random Data In, C2, and a nine-step scan-out: first
//     positions return the captured data, second positions still hold V2
//     (L4 is written only by C3)
// The number of shift steps is checked against WIDTH + enhanced cells.
module tb_se2_scan_register;
  timeunit 1ns; timeprecision 1ps;
  import tpt_scan_pkg::*;

  localparam int W = 6;
  localparam logic [W-1:0] ENH = 6'b001101;
  localparam int NPOS = W + $countones(ENH);

  se2_clk_t clk;
  logic [W-1:0] data_in, data_out;
  logic scan_in, scan_out;
  int checks = 0, failures = 0;
  int pos_cell[NPOS];
  bit pos_second[NPOS];

  se2_scan_register #(.WIDTH(W), .ENHANCED(ENH)) dut (.*);

  typedef enum {P_C1, P_C2, P_C3, P_ACLK} clk_e;

  task automatic pulse(input clk_e k);
    #1;
    case (k)
      P_C1: clk.c1 = 1; P_C2: clk.c2 = 1; P_C3: clk.c3 = 1; P_ACLK: clk.aclk = 1;
    endcase
    #2;
    clk = '0;
    #1;
  endtask

  task automatic shift(input logic b);
    scan_in = b;
    data_in = W'($urandom);
    pulse(P_C1); pulse(P_ACLK); pulse(P_C3); pulse(P_C2);
  endtask

  task automatic check(input string what, input logic [W-1:0] got, input logic [W-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b", what, got, exp);
    end
  endtask

  initial begin
    logic [W-1:0] v1, v2, d, got_first, got_second;
    int p, steps;
    p = 0;
    for (int i = 0; i < W; i++) begin
      pos_cell[p] = i; pos_second[p] = 0; p++;
      if (ENH[i]) begin pos_cell[p] = i; pos_second[p] = 1; p++; end
    end
    clk = '0; data_in = '0; scan_in = 0;
    for (int n = 0; n < 50; n++) begin
      v1 = W'($urandom); v2 = W'($urandom);
      steps = 0;
      for (int q = NPOS - 1; q >= 0; q--) begin
        shift(pos_second[q] ? v2[pos_cell[q]] : v1[pos_cell[q]]);
        steps++;
      end
      checks++;
      if (steps != 9) begin failures++; $display("FAIL scan length"); end
      check("V1 after scan-in", data_out, v1);
      pulse(P_C3);
      check("C3 applies V2", data_out, (v2 & ENH) | (v1 & ~ENH));
      pulse(P_C2);
      check("C2 launches V3", data_out, v1);
      d = W'($urandom); data_in = d;
      pulse(P_C1); data_in = ~d; pulse(P_C2);
      check("captured", data_out, d);
      got_first = '0; got_second = '0;
      for (int q = NPOS - 1; q >= 0; q--) begin
        if (pos_second[q]) got_second[pos_cell[q]] = scan_out;
        else               got_first[pos_cell[q]]  = scan_out;
        shift(1'($urandom));
      end
      check("scan-out first positions", got_first, d);
      check("scan-out second positions", got_second, v2 & ENH);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
