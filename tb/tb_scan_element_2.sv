// tb_scan_element_2 -- self-checking test of scan element 2.
//
// For random (V1, V2) pairs: shifts V2 and then V1 into the element with two
// scan steps (C1, ACLK, C3, C2 each), with Data In set to random values so that
// the C1 of each step would show up if it leaked into the scan path. Checks
// Data Out = V1 and Scan Out = V2; then C3 must show V2 and the next C2 must
// relaunch V3 = V1. Also runs system-mode cycles and checks a scan-through:
// a bit entering Scan In appears at Scan Out after two steps.
module tb_scan_element_2;
  timeunit 1ns; timeprecision 1ps;

  logic c1, aclk, c2, c3, data_in, scan_in, data_out, scan_out;
  int checks = 0, failures = 0;

  scan_element_2 dut (.*);

  typedef enum {P_C1, P_C2, P_C3, P_ACLK} clk_e;

  task automatic pulse(input clk_e k);
    #1;
    case (k)
      P_C1: c1 = 1; P_C2: c2 = 1; P_C3: c3 = 1; P_ACLK: aclk = 1;
    endcase
    #2;
    {c1, c2, c3, aclk} = '0;
    #1;
  endtask

  task automatic shift(input logic bit_in);
    scan_in = bit_in;
    data_in = 1'($urandom);
    pulse(P_C1); pulse(P_ACLK); pulse(P_C3); pulse(P_C2);
  endtask

  task automatic expect_bit(input string what, input logic got, input logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b", what, got, exp);
    end
  endtask

  initial begin
    logic v1, v2, d, b0, b1;
    {c1, c2, c3, aclk} = '0;
    data_in = 0; scan_in = 0;
    for (int n = 0; n < 100; n++) begin
      v1 = 1'($urandom); v2 = 1'($urandom);
      shift(v2); shift(v1);
      expect_bit("data out holds V1", data_out, v1);
      expect_bit("scan out holds V2", scan_out, v2);
      pulse(P_C3);
      expect_bit("C3 applies V2", data_out, v2);
      pulse(P_C2);
      expect_bit("C2 launches V3", data_out, v1);
      // system mode
      for (int k = 0; k < 3; k++) begin
        d = 1'($urandom); data_in = d;
        pulse(P_C1); pulse(P_C2);
        expect_bit("system cycle", data_out, d);
      end
      // scan-through: two positions per element
      b0 = 1'($urandom); b1 = 1'($urandom);
      shift(b0); shift(b1);
      expect_bit("first position", data_out, b1);
      expect_bit("second position", scan_out, b0);
      shift(1'($urandom));
      expect_bit("shifted out", scan_out, b1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
