// tb_lssd_scan_element -- self-checking test of the standard LSSD scan element.
//
// Drives random data through system mode (C1 then C2), scan mode (ACLK then
// C2) and a capture followed by a slave transfer, and checks Data Out against
// a two-variable reference model of the master and slave latches. Also checks
// that a master clock alone does not disturb Data Out and that C2 alone keeps
// the stored value. All clocks are non-overlapping 2 ns pulses.
module tb_lssd_scan_element;
  timeunit 1ns; timeprecision 1ps;

  logic c1, aclk, c2, data_in, scan_in, data_out;
  int checks = 0, failures = 0;
  logic ref_l1, ref_l2;

  lssd_scan_element dut (.*);

  typedef enum {P_C1, P_ACLK, P_C2} clk_e;

  task automatic pulse(input clk_e k);
    #1;
    case (k)
      P_C1:   c1 = 1'b1;
      P_ACLK: aclk = 1'b1;
      P_C2:   c2 = 1'b1;
    endcase
    #2;
    case (k)
      P_C1:   begin c1 = 1'b0;   ref_l1 = data_in; end
      P_ACLK: begin aclk = 1'b0; ref_l1 = scan_in; end
      P_C2:   begin c2 = 1'b0;   ref_l2 = ref_l1;  end
    endcase
    #1;
  endtask

  task automatic check(input string what);
    checks++;
    if (data_out !== ref_l2) begin
      failures++;
      $display("FAIL %s: data_out=%b expected %b", what, data_out, ref_l2);
    end
  endtask

  initial begin
    c1 = 0; aclk = 0; c2 = 0; data_in = 0; scan_in = 0;
    // initialise through the system port
    #1 pulse(P_C1); pulse(P_C2);
    for (int n = 0; n < 200; n++) begin
      data_in = 1'($urandom); scan_in = 1'($urandom);
      case ($urandom_range(0, 3))
        0: begin pulse(P_C1);   check("master only (C1)"); pulse(P_C2); check("system cycle"); end
        1: begin pulse(P_ACLK); check("master only (ACLK)"); pulse(P_C2); check("scan shift"); end
        2: begin pulse(P_C2);   check("slave only"); end
        default: begin
          pulse(P_C1); data_in = ~data_in; scan_in = ~scan_in; #1;
          pulse(P_C2); check("capture then transfer");
        end
      endcase
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
