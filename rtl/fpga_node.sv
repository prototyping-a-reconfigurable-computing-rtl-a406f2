// Image node: the work one FPGA of the board does on its quarter of an image.
//
// It holds the quarter (QW x QH gray pixels) in an input memory, a result
// memory of the same size, and the nine-cell window scanner with the four
// image-processing IPs. The main FPGA reaches it over one link:
//   link address bit LINK_AW-1 = 0 : input memory, = 1 : result memory,
//   lower bits = row*QW + column.
// A write stores a pixel at once; a read returns rdata with rvalid one cycle
// after the request. A start pulse (with a mode) filters the stored quarter;
// busy is high while it runs and done rises when the result memory is full.
// The split of the image into quarters, one per FPGA, is the original design's; the
// memories, the link format and its timing are this design's choices. While
// busy the scanner owns the input memory's read port, so the input memory
// must not be read over the link then (an assertion checks this).
module fpga_node
  import mfcu_pkg::*;
#(
  parameter int unsigned QW = 8,
  parameter int unsigned QH = 8
) (
  input  logic      clk,
  input  logic      rst_n,
  input  link_req_t req_i,
  output link_rsp_t rsp_o
);

  localparam int unsigned AW = (QW*QH > 1) ? $clog2(QW*QH) : 1;

  logic          scan_busy, scan_done;
  logic          scan_rd_en, scan_wr_en;
  logic [AW-1:0] scan_rd_addr, scan_wr_addr;
  pixel_t        scan_wr_data, in_rdata, out_rdata;

  logic          link_wr_in, link_rd_in, link_rd_out;
  logic          rd_pending, rd_sel_out;

  always_comb begin
    link_wr_in  = req_i.req &&  req_i.we && !req_i.addr[LINK_AW-1];
    link_rd_in  = req_i.req && !req_i.we && !req_i.addr[LINK_AW-1];
    link_rd_out = req_i.req && !req_i.we &&  req_i.addr[LINK_AW-1];
  end

  dp_ram #(.WIDTH(PIX_W), .DEPTH(QW*QH)) u_in_ram (
    .clk  (clk),
    .we   (link_wr_in),
    .waddr(req_i.addr[AW-1:0]),
    .wdata(req_i.wdata),
    .re   (scan_busy ? scan_rd_en : link_rd_in),
    .raddr(scan_busy ? scan_rd_addr : req_i.addr[AW-1:0]),
    .rdata(in_rdata)
  );

  dp_ram #(.WIDTH(PIX_W), .DEPTH(QW*QH)) u_out_ram (
    .clk  (clk),
    .we   (scan_wr_en),
    .waddr(scan_wr_addr),
    .wdata(scan_wr_data),
    .re   (link_rd_out),
    .raddr(req_i.addr[AW-1:0]),
    .rdata(out_rdata)
  );

  window_scan #(.QW(QW), .QH(QH)) u_scan (
    .clk    (clk),
    .rst_n  (rst_n),
    .start  (req_i.start),
    .mode   (req_i.mode),
    .busy   (scan_busy),
    .done   (scan_done),
    .rd_en  (scan_rd_en),
    .rd_addr(scan_rd_addr),
    .rd_data(in_rdata),
    .wr_en  (scan_wr_en),
    .wr_addr(scan_wr_addr),
    .wr_data(scan_wr_data)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_pending <= 1'b0;
      rd_sel_out <= 1'b0;
    end else begin
      rd_pending <= req_i.req && !req_i.we;
      rd_sel_out <= req_i.addr[LINK_AW-1];
    end
  end

  always_comb begin
    rsp_o.rvalid = rd_pending;
    rsp_o.rdata  = rd_sel_out ? out_rdata : in_rdata;
    rsp_o.busy   = scan_busy;
    rsp_o.done   = scan_done;
  end

  initial begin
    assert (AW <= LINK_AW - 1) else $error("quarter too large for the link address");
  end

  a_no_input_read_while_busy: assert property (@(posedge clk) disable iff (!rst_n)
    !(scan_busy && link_rd_in));
  a_no_input_write_while_busy: assert property (@(posedge clk) disable iff (!rst_n)
    !(scan_busy && link_wr_in));

endmodule
