// se2_scan_register -- scan register for three-pattern tests with scan element 2.
//
// WIDTH scan cells in a row, cell 0 nearest scan_in. Cells whose bit is set in
// ENHANCED are scan element 2 and take two positions on the scan path (L1/L2,
// then L3/L4); the others are standard LSSD elements with one position. The
// scan path is therefore WIDTH + (number of enhanced cells) positions long.
//
// One scan path, shifted one position per C1, ACLK, C3, C2 sequence. In an
// enhanced cell the first position (L1/L2) ends up holding V1/V3 and the
// second (L3/L4) V2, so the serial stream carries, per enhanced cell, its V2
// and then its V1. LSSD cells see C1 as a harmless system load that the
// following ACLK overwrites, and do not use C3. After scan-in: C3 applies V2, C2 launches V3, C1 captures
// at the LSSD cells; a C2 pulse then moves the captured values into L2 before
// they are shifted out.
// Mixing the two kinds of cell follows the selective-replacement idea; the cell
// order and the shift sequence are this implementation's choices.
// Interface: clk bundles C1, C2, C3, ACLK (tpt_scan_pkg). data_in/data_out are
// the cells' Data In / Data Out, bit i = cell i.
module se2_scan_register
  import tpt_scan_pkg::*;
#(
  parameter int unsigned       WIDTH    = 8,
  parameter logic [WIDTH-1:0]  ENHANCED = '1
) (
  input  se2_clk_t           clk,
  input  logic [WIDTH-1:0]   data_in,
  output logic [WIDTH-1:0]   data_out,
  input  logic               scan_in,
  output logic               scan_out
);

  logic [WIDTH:0] chain;

  assign chain[0] = scan_in;

  for (genvar i = 0; i < WIDTH; i++) begin : g_cell
    if (ENHANCED[i]) begin : g_se2
      scan_element_2 u_cell (
        .c1       (clk.c1),
        .aclk     (clk.aclk),
        .c2       (clk.c2),
        .c3       (clk.c3),
        .data_in  (data_in[i]),
        .scan_in  (chain[i]),
        .data_out (data_out[i]),
        .scan_out (chain[i+1])
      );
    end else begin : g_lssd
      lssd_scan_element u_cell (
        .c1       (clk.c1),
        .aclk     (clk.aclk),
        .c2       (clk.c2),
        .data_in  (data_in[i]),
        .scan_in  (chain[i]),
        .data_out (data_out[i])
      );
      assign chain[i+1] = data_out[i];
    end
  end

  assign scan_out = chain[WIDTH];

endmodule
