// se1_scan_register -- scan register for three-pattern tests with scan element 1.
//
// WIDTH scan cells in a row, cell 0 nearest the scan inputs. Cells whose bit is
// set in ENHANCED are scan element 1 (they launch paths that get a
// three-pattern delay test); the others are standard LSSD elements (capture
// latches and cells that launch no tested path). Only the cells that source
// tested paths need the larger element.
//
//   scan path A : scan_in_a -> every cell's L1/L2 -> scan_out_a
//                 (ACLK, C2 alternately; one position per cell)
//   scan path B : scan_in_b -> L1/L3 of the enhanced cells only -> scan_out_b
//                 (B1 CLK, B2 CLK alternately; one position per enhanced cell)
//
// A test scans V2 in over path B first, then V1/V3 over path A (path A
// overwrites L1, which both paths share, so the two cannot shift together).
// Then C3 applies V2, C2 launches V3 and C1 captures at the LSSD cells.
// The mix of element kinds follows the selective-replacement idea; the ring of
// path B through the enhanced cells only, and the cell order, are this
// implementation's choices. With no enhanced cell scan_out_b is scan_in_b.
// Interface: clk bundles the six level-sensitive clocks (tpt_scan_pkg).
// data_in/data_out are the cells' Data In / Data Out, bit i = cell i.
module se1_scan_register
  import tpt_scan_pkg::*;
#(
  parameter int unsigned       WIDTH    = 8,
  parameter logic [WIDTH-1:0]  ENHANCED = '1
) (
  input  se1_clk_t           clk,
  input  logic [WIDTH-1:0]   data_in,
  output logic [WIDTH-1:0]   data_out,
  input  logic               scan_in_a,
  output logic               scan_out_a,
  input  logic               scan_in_b,
  output logic               scan_out_b
);

  // chain_a[i] feeds cell i on path A; chain_b[i] is the path B signal that
  // reaches cell i (passed on unchanged by LSSD cells).
  logic [WIDTH:0] chain_a;
  logic [WIDTH:0] chain_b;

  assign chain_a[0] = scan_in_a;
  assign chain_b[0] = scan_in_b;

  for (genvar i = 0; i < WIDTH; i++) begin : g_cell
    if (ENHANCED[i]) begin : g_se1
      scan_element_1 u_cell (
        .c1         (clk.c1),
        .aclk       (clk.aclk),
        .b1clk      (clk.b1clk),
        .c2         (clk.c2),
        .c3         (clk.c3),
        .b2clk      (clk.b2clk),
        .data_in    (data_in[i]),
        .scan_in_a  (chain_a[i]),
        .scan_in_b  (chain_b[i]),
        .data_out   (data_out[i]),
        .scan_out_a (chain_a[i+1]),
        .scan_out_b (chain_b[i+1])
      );
    end else begin : g_lssd
      lssd_scan_element u_cell (
        .c1       (clk.c1),
        .aclk     (clk.aclk),
        .c2       (clk.c2),
        .data_in  (data_in[i]),
        .scan_in  (chain_a[i]),
        .data_out (data_out[i])
      );
      assign chain_a[i+1] = data_out[i];
      assign chain_b[i+1] = chain_b[i];
    end
  end

  assign scan_out_a = chain_a[WIDTH];
  assign scan_out_b = chain_b[WIDTH];

endmodule
