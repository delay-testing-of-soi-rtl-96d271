// tb_scan_element_1 -- self-checking test of scan element 1.
//
// For random (V1, V2) pairs: shifts V2 in over scan path B (B1 CLK, B2 CLK),
// then V1 over scan path A (ACLK, C2), and checks that Data Out shows V1 and
// Scan Out B still holds V2. Then applies the three-pattern sequence: C3 must
// put V2 on Data Out, and the next C2 must put V3 = V1 back. Also runs system
// mode cycles (C1, C2) and checks that they leave L3 (Scan Out B) alone.
// Expected values come from the test sequence itself, not from the design.
module tb_scan_element_1;
  timeunit 1ns; timeprecision 1ps;

  logic c1, aclk, b1clk, c2, c3, b2clk;
  logic data_in, scan_in_a, scan_in_b;
  logic data_out, scan_out_a, scan_out_b;
  int checks = 0, failures = 0;

  scan_element_1 dut (.*);

  typedef enum {P_C1, P_C2, P_C3, P_ACLK, P_B1, P_B2} clk_e;

  task automatic pulse(input clk_e k);
    #1;
    case (k)
      P_C1: c1 = 1; P_C2: c2 = 1; P_C3: c3 = 1;
      P_ACLK: aclk = 1; P_B1: b1clk = 1; P_B2: b2clk = 1;
    endcase
    #2;
    {c1, c2, c3, aclk, b1clk, b2clk} = '0;
    #1;
  endtask

  task automatic expect_bit(input string what, input logic got, input logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b", what, got, exp);
    end
  endtask

  initial begin
    logic v1, v2, d, prev;
    {c1, c2, c3, aclk, b1clk, b2clk} = '0;
    data_in = 0; scan_in_a = 0; scan_in_b = 0;
    for (int n = 0; n < 100; n++) begin
      v1 = 1'($urandom); v2 = 1'($urandom);
      // scan path B: V2 into L3
      scan_in_b = v2; pulse(P_B1); pulse(P_B2);
      expect_bit("scan out B after path B", scan_out_b, v2);
      // scan path A: V1/V3 into L1 and L2
      scan_in_a = v1; pulse(P_ACLK); pulse(P_C2);
      expect_bit("data out holds V1", data_out, v1);
      expect_bit("scan out A holds V1", scan_out_a, v1);
      expect_bit("path A keeps V2", scan_out_b, v2);
      // three-pattern sequence
      pulse(P_C3);
      expect_bit("C3 applies V2", data_out, v2);
      pulse(P_C2);
      expect_bit("C2 launches V3", data_out, v1);
      // system mode
      for (int k = 0; k < 3; k++) begin
        prev = data_out;
        d = 1'($urandom); data_in = d;
        pulse(P_C1);
        expect_bit("C1 alone keeps output", data_out, prev);
        pulse(P_C2);
        expect_bit("system cycle", data_out, d);
        expect_bit("system mode keeps L3", scan_out_b, v2);
      end
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
