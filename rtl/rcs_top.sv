// Top of the reconfigurable computing system: the multi-FPGA image-
// processing board (pci_mfcu) and the IP library (ip_library) side by side.
//
// The board part is the working system: a host on the local bus loads image
// quarters into four FPGA nodes, starts the chosen filter and reads the
// results (see pci_mfcu). The library part holds one instance of each reusable
// component, the building blocks from which such user designs are assembled;
// its ports are the lib_in / lib_out bundles and it shares the clock and
// reset. Parameters pass the board's size through.
module rcs_top
  import ip_lib_pkg::*;
#(
  parameter int unsigned NODES = 4,
  parameter int unsigned QW    = 8,
  parameter int unsigned QH    = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        lb_cs,
  input  logic        lb_wr,
  input  logic        lb_rd,
  input  logic [1:0]  lb_addr,
  input  logic [15:0] lb_wdata,
  output logic [15:0] lb_rdata,
  output logic        lb_ready,
  input  lib_in_t     lib_in,
  output lib_out_t    lib_out
);

  pci_mfcu #(.NODES(NODES), .QW(QW), .QH(QH)) u_board (
    .clk     (clk),
    .rst_n   (rst_n),
    .lb_cs   (lb_cs),
    .lb_wr   (lb_wr),
    .lb_rd   (lb_rd),
    .lb_addr (lb_addr),
    .lb_wdata(lb_wdata),
    .lb_rdata(lb_rdata),
    .lb_ready(lb_ready)
  );

  ip_library u_lib (
    .clk  (clk),
    .rst_n(rst_n),
    .li   (lib_in),
    .lo   (lib_out)
  );

endmodule
