// tb_se1_scan_register -- self-checking test of a mixed scheme-1 scan register.
//
// Six cells, cells 1, 3 and 4 enhanced (scan element 1), the others LSSD.
// Each round draws random V1 (all cells) and V2 (enhanced cells), shifts V2
// over scan path B (it passes only the enhanced cells, so three B steps) and
// V1 over scan path A (six A steps), then checks:
//   * Data Out = V1 on every cell and Scan Out B = V2 of the last enhanced cell
//   * after C3: enhanced cells show V2, LSSD cells keep V1
//   * after C2: every cell shows V1 (= V3) again
//   * after C1 capture of random Data In and a C2: Data Out = captured data,
//     and the captured word comes out of scan path A in the right order
//   * shifting scan path B out returns the V2 values in order
// Scan-step counts are checked against the path lengths (6 for A, 3 for B).
module tb_se1_scan_register;
  timeunit 1ns; timeprecision 1ps;
  import tpt_scan_pkg::*;

  localparam int W = 6;
  localparam logic [W-1:0] ENH = 6'b011010;
  localparam int NE = 3;

  se1_clk_t clk;
  logic [W-1:0] data_in, data_out;
  logic scan_in_a, scan_out_a, scan_in_b, scan_out_b;
  int checks = 0, failures = 0;
  int steps_a, steps_b;

  se1_scan_register #(.WIDTH(W), .ENHANCED(ENH)) dut (.*);

  typedef enum {P_C1, P_C2, P_C3, P_ACLK, P_B1, P_B2} clk_e;

  task automatic pulse(input clk_e k);
    #1;
    case (k)
      P_C1: clk.c1 = 1; P_C2: clk.c2 = 1; P_C3: clk.c3 = 1;
      P_ACLK: clk.aclk = 1; P_B1: clk.b1clk = 1; P_B2: clk.b2clk = 1;
    endcase
    #2;
    clk = '0;
    #1;
  endtask

  task automatic check(input string what, input logic [W-1:0] got, input logic [W-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b", what, got, exp);
    end
  endtask

  // index of the k-th enhanced cell
  function automatic int enh_cell(input int k);
    int n = 0;
    for (int i = 0; i < W; i++)
      if (ENH[i]) begin
        if (n == k) return i;
        n++;
      end
    return -1;
  endfunction

  initial begin
    logic [W-1:0] v1, v2, d, got;
    clk = '0; data_in = '0; scan_in_a = 0; scan_in_b = 0;
    for (int n = 0; n < 50; n++) begin
      v1 = W'($urandom); v2 = W'($urandom) & ENH;
      // path B: last enhanced cell's value first
      steps_b = 0;
      for (int k = NE - 1; k >= 0; k--) begin
        scan_in_b = v2[enh_cell(k)]; pulse(P_B1); pulse(P_B2); steps_b++;
      end
      // path A: last cell's value first
      steps_a = 0;
      for (int i = W - 1; i >= 0; i--) begin
        scan_in_a = v1[i]; pulse(P_ACLK); pulse(P_C2); steps_a++;
      end
      checks++;
      if (steps_a != W || steps_b != NE) begin failures++; $display("FAIL scan lengths"); end
      check("V1 after scan-in", data_out, v1);
      check("scan out A", {5'b0, scan_out_a}, {5'b0, v1[W-1]});
      check("scan out B", {5'b0, scan_out_b}, {5'b0, v2[enh_cell(NE-1)]});
      pulse(P_C3);
      check("C3 applies V2", data_out, (v2 & ENH) | (v1 & ~ENH));
      pulse(P_C2);
      check("C2 launches V3", data_out, v1);
      // capture and scan out over path A
      d = W'($urandom); data_in = d;
      pulse(P_C1); data_in = ~d; pulse(P_C2);
      check("captured", data_out, d);
      for (int i = W - 1; i >= 0; i--) begin
        got[i] = scan_out_a;
        scan_in_a = 1'($urandom); pulse(P_ACLK); pulse(P_C2);
      end
      check("scan-out path A", got, d);
      // path B still holds V2: shift it out
      got = '0;
      for (int k = NE - 1; k >= 0; k--) begin
        got[enh_cell(k)] = scan_out_b;
        scan_in_b = 1'($urandom); pulse(P_B1); pulse(P_B2);
      end
      check("scan-out path B", got, v2);
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
