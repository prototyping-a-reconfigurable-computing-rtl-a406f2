// Reconfigurable image-processing board: a host on the PCI bus, a main FPGA
// bridging the PCI controller's local bus, and four FPGAs, each filtering one
// quarter of an image with the nine-cell window.
//
// The host splits an image into quarters, writes each quarter into its node
// through the bridge's auto-incrementing DATA register, starts the nodes with
// one CTRL write (all four run at once), polls STATUS until every done bit is
// set, and reads the filtered quarters back. Node 0 stands for the main FPGA's
// own share, nodes 1..3 for the three other FPGAs. The PCI controller chip,
// the configuration memories and the oscillators are outside this RTL: the
// local bus appears as the lb_* ports and the clock as clk.
//
// Timing: a register access completes with lb_ready one cycle after the
// strobe (three for a DATA read); filtering a QW x QH quarter takes
// 11*QW*QH cycles. The board structure and the quartering are the original design's;
// the register map and the link between FPGAs are this design's choices.
module pci_mfcu
  import mfcu_pkg::*;
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
  output logic        lb_ready
);

  link_req_t req [NODES];
  link_rsp_t rsp [NODES];

  local_bus_bridge #(.NODES(NODES)) u_bridge (
    .clk     (clk),
    .rst_n   (rst_n),
    .lb_cs   (lb_cs),
    .lb_wr   (lb_wr),
    .lb_rd   (lb_rd),
    .lb_addr (lb_addr),
    .lb_wdata(lb_wdata),
    .lb_rdata(lb_rdata),
    .lb_ready(lb_ready),
    .req_o   (req),
    .rsp_i   (rsp)
  );

  for (genvar n = 0; n < NODES; n++) begin : g_node
    fpga_node #(.QW(QW), .QH(QH)) u_node (
      .clk  (clk),
      .rst_n(rst_n),
      .req_i(req[n]),
      .rsp_o(rsp[n])
    );
  end

endmodule
