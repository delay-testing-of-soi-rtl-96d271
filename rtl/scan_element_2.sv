// scan_element_2 -- four-latch scan element for three-pattern SOI delay tests.
//
// Same goal as scan element 1 (precondition with V1, apply V2 for at most one
// clock, launch V3 = V1), but with fewer and simpler test clocks: the scan
// path runs through two master/slave pairs, L1-L2 and L3-L4, so each element
// occupies two scan positions and needs no second scan path. L3 and L4 reuse
// C1 and C3, the clocks that already write L1 and L2, so C3 is the only clock
// beyond those of a standard LSSD element.
//
//   L1  master: Data In on C1, Scan In on ACLK.        holds V3 during a test
//   L2  output latch: L1 on C2, L4 on C3.              holds V1, drives Data Out
//   L3  second master: L2 on C1.
//   L4  second slave: L3 on C3; drives Scan Out.       holds V2
//
// Operation
//   system mode : C1/C2 two-phase, ACLK and C3 low -> a flip-flop at Data Out
//                 (C1 also copies Data Out into L3, which nothing reads).
//   scan shift  : C1, ACLK, C3, C2 per shift step. C1 copies L2 into L3;
//                 ACLK loads Scan In -- the previous cell's old L4 -- into L1,
//                 overwriting what C1 put there; C3 copies L3 into L4, and L4
//                 back into L2, which leaves L2 unchanged; C2 moves L1 into
//                 L2. ACLK must precede C3 so that the next cell reads L4
//                 before it changes, and C3 must precede C2 or it would
//                 overwrite the new L2. The last bit shifted in lands in L1/L2
//                 (V1/V3), the one before it in L3/L4 (V2).
//   test        : hold V1 (precondition); pulse C3 -> V2 from L4 at Data Out;
//                 pulse C2 -> V3 from L1 at Data Out (launch); C1 at the
//                 capture latch samples the path.
//
// The latches, what each holds, the L2 ports, the clocks of L3 (C1) and L4
// (C3) and the use of C3 follow the published element. The published description gives no
// pulse order for scanning this element; the four-pulse shift step above is
// this implementation's.
// Timing: transparent latches, non-overlapping clocks. Tools report L1..L4 as
// latches: they are the intended storage. L2 -> L3 -> L4 -> L2 is a ring of
// transparent latches that lint and synthesis report as a combinational loop.
// It stands because it is the element's structure: C1 opens L3, C3 opens L4
// and the L4 port of L2, and the assertions below keep C1 and C3 apart, so the
// ring never conducts all the way round. While C3 is high, L3 flows through L4
// into L2; that is the intended V2 transfer.
module scan_element_2 (
  input  logic c1,        // C1 CLK: L1 <- data_in, L3 <- L2
  input  logic aclk,      // ACLK:   L1 <- scan_in
  input  logic c2,        // C2 CLK: L2 <- L1
  input  logic c3,        // C3 CLK: L2 <- L4, L4 <- L3
  input  logic data_in,
  input  logic scan_in,
  output logic data_out,  // L2
  output logic scan_out   // L4
);

  logic l1, l2, l3, l4;

  always_latch begin
    if (c1)        l1 = data_in;
    else if (aclk) l1 = scan_in;
  end

  always_latch begin
    if (c2)      l2 = l1;
    else if (c3) l2 = l4;
  end

  always_latch begin
    if (c1) l3 = l2;
  end

  always_latch begin
    if (c3) l4 = l3;
  end

  assign data_out = l2;
  assign scan_out = l4;

  a_l1_ports_exclusive: assert property (@(posedge c1) !(aclk || c2 || c3))
    else $error("scan_element_2: C1 overlaps another clock");
  a_aclk_exclusive: assert property (@(posedge aclk) !(c2 || c3))
    else $error("scan_element_2: ACLK overlaps C2 or C3");
  a_c2_exclusive: assert property (@(posedge c2) !(c1 || aclk || c3))
    else $error("scan_element_2: C2 overlaps C1, ACLK or C3");
  a_c3_exclusive: assert property (@(posedge c3) !(c1 || aclk || c2))
    else $error("scan_element_2: C3 overlaps C1, ACLK or C2");

endmodule
