// tpt_scan_pkg -- types shared by the three-pattern delay-test scan registers.
//
// Both scan schemes are driven entirely by non-overlapping, level-sensitive
// clock pulses that a tester supplies; there is no free-running clock and no
// reset. The clocks of each scheme are bundled here in a packed struct so that
// a scan register and the top level take them as one port.
//
//   scheme 1 (scan element 1): C1, C2, C3, ACLK, B1 CLK, B2 CLK
//   scheme 2 (scan element 2): C1, C2, C3, ACLK
//
// The clock names are the ones of the scan elements; grouping them into
// structs is a choice of this implementation.
package tpt_scan_pkg;

  // Clocks of a scheme-1 scan register. All are active high; at most one of
  // the clocks that write the same latch may be high at a time.
  typedef struct packed {
    logic c1;     // system master clock: L1 <- Data In (also captures)
    logic c2;     // slave clock: L2 <- L1 (system slave, scan path A, launch of V3)
    logic c3;     // test clock: L2 <- L3 (applies V2)
    logic aclk;   // scan path A master clock: L1 <- Scan In A
    logic b1clk;  // scan path B master clock: L1 <- Scan In B
    logic b2clk;  // scan path B slave clock: L3 <- L1
  } se1_clk_t;

  // Clocks of a scheme-2 scan register.
  typedef struct packed {
    logic c1;     // system master clock: L1 <- Data In; also L3 <- L2
    logic c2;     // slave clock: L2 <- L1
    logic c3;     // test clock: L4 <- L3 and L2 <- L4 (applies V2)
    logic aclk;   // scan master clock: L1 <- Scan In
  } se2_clk_t;

endpackage
