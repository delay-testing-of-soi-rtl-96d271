// scan_element_1 -- three-latch scan element for three-pattern SOI delay tests.
//
// A three-pattern test preconditions a path with V1, applies V2 for at most
// one clock period, then launches V3 (= V1) so that the return edge of the
// short pulse -- the slow edge under the PD-SOI history effect -- is timed.
// This element stores all three values in three latches:
//
//   L1  master, three write ports: Data In on C1, Scan In A on ACLK,
//       Scan In B on B1 CLK.                           holds V3 during a test
//   L2  output latch: L1 on C2, L3 on C3.              holds V1, drives Data Out
//   L3  second slave: L1 on B2 CLK.                    holds V2
//
// Operation
//   system mode  : C1/C2 two-phase, other clocks low -> a flip-flop.
//   scan path B  : B1, B2 alternately -> shifts V2 into L3 (Scan Out B = L3).
//   scan path A  : ACLK, C2 alternately -> shifts V1/V3 into L1 and L2
//                  (Scan Out A = L2); L3 keeps V2.
//   test         : hold V1 (precondition); pulse C3 -> V2 at Data Out;
//                  pulse C2 -> V3 from L1 at Data Out (launch);
//                  C1 at the capture latch samples the path.
// The tested interval runs from the rise of C2 to the fall of C1.
//
// The latch structure, clocks and pulse orders follow the published element.
// The port priority inside a latch when two of its clocks are high at once is
// this implementation's choice; the assertions flag such overlaps.
// Timing: transparent latches, non-overlapping clocks. Tools report L1, L2 and
// L3 as latches: they are the intended storage.
module scan_element_1 (
  input  logic c1,          // C1 CLK: L1 <- data_in
  input  logic aclk,        // ACLK:   L1 <- scan_in_a
  input  logic b1clk,       // B1 CLK: L1 <- scan_in_b
  input  logic c2,          // C2 CLK: L2 <- L1
  input  logic c3,          // C3 CLK: L2 <- L3
  input  logic b2clk,       // B2 CLK: L3 <- L1
  input  logic data_in,
  input  logic scan_in_a,
  input  logic scan_in_b,
  output logic data_out,    // L2
  output logic scan_out_a,  // L2
  output logic scan_out_b   // L3
);

  logic l1, l2, l3;

  always_latch begin
    if (c1)         l1 = data_in;
    else if (aclk)  l1 = scan_in_a;
    else if (b1clk) l1 = scan_in_b;
  end

  always_latch begin
    if (c2)      l2 = l1;
    else if (c3) l2 = l3;
  end

  always_latch begin
    if (b2clk) l3 = l1;
  end

  assign data_out   = l2;
  assign scan_out_a = l2;
  assign scan_out_b = l3;

  a_l1_ports_exclusive: assert property (@(posedge c1) !(aclk || b1clk))
    else $error("scan_element_1: C1 overlaps another L1 clock");
  a_l1_scan_exclusive: assert property (@(posedge aclk) !b1clk)
    else $error("scan_element_1: ACLK overlaps B1 CLK");
  a_l2_ports_exclusive: assert property (@(posedge c2) !(c3 || c1 || aclk || b1clk))
    else $error("scan_element_1: C2 overlaps C3 or a master clock");
  a_c3_exclusive: assert property (@(posedge c3) !(b2clk || c2))
    else $error("scan_element_1: C3 overlaps B2 CLK or C2");
  a_b2_exclusive: assert property (@(posedge b2clk) !(c1 || aclk || b1clk))
    else $error("scan_element_1: B2 CLK overlaps a master clock");

endmodule
