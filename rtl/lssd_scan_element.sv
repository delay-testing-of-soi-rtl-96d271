// lssd_scan_element -- standard level-sensitive scan design (LSSD) element.
//
// Two latches form a master/slave pair. The master L1 has two write ports:
// the system port (Data In, clocked by C1) and the scan port (Scan In,
// clocked by ACLK). The slave L2 copies L1 while C2 is high and drives both
// Data Out and the next element's Scan In.
//
//   system mode : pulse C1 then C2 alternately, ACLK held low -> a flip-flop
//   scan mode   : pulse ACLK then C2 alternately -> one shift position
//   capture     : one C1 pulse samples Data In into L1; a C2 pulse then moves
//                 it into L2, from where it is scanned out
//
// In the three-pattern delay test this element serves as the capture latch at
// the end of a tested path and as every scan cell that does not launch a
// tested path. The latch structure and clocking follow the standard LSSD
// element; priority of C1 over ACLK when both are (illegally) high is this
// implementation's choice, and the assertions flag such overlap.
//
// Interface: all inputs are level-sensitive, active-high clocks or data.
// Timing: L1 and L2 are transparent latches; the clocks must not overlap, and
// Data In / Scan In must be stable around the falling edge of C1 / ACLK.
// Tools report L1 and L2 as latches: they are the intended storage.
module lssd_scan_element (
  input  logic c1,        // C1 CLK: L1 <- data_in
  input  logic aclk,      // ACLK:   L1 <- scan_in
  input  logic c2,        // C2 CLK: L2 <- L1
  input  logic data_in,
  input  logic scan_in,
  output logic data_out   // L2; also the scan output
);

  logic l1, l2;

  always_latch begin
    if (c1)        l1 = data_in;
    else if (aclk) l1 = scan_in;
  end

  always_latch begin
    if (c2) l2 = l1;
  end

  assign data_out = l2;

  // The two writers of L1 never open together, and L1 is never written while
  // L2 is transparent (that would make the pair flow through).
  a_l1_ports_exclusive: assert property (@(posedge c1) !aclk)
    else $error("lssd_scan_element: C1 rose while ACLK high");
  a_master_slave_c1: assert property (@(posedge c2) !(c1 || aclk))
    else $error("lssd_scan_element: C2 rose while a master clock is high");

endmodule
