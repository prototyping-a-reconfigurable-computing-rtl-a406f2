// Local-bus bridge of the main FPGA: the host's only way into the board.
//
// The host reaches the board through a PCI controller that presents a simple
// 16-bit local bus; this block decodes four registers on it and drives one
// link per image node (see fpga_node). Register map (lb_addr):
//   0 PTR    write: [15:14] node, [LINK_AW-1:0] link address; read: same
//   1 DATA   write: [7:0] written to the selected node at PTR, PTR += 1
//            read:  [7:0] read from the selected node at PTR, PTR += 1
//   2 CTRL   write: [1:0] filter mode, [7:4] start pulse per node
//            read:  [1:0] last mode written
//   3 STATUS read:  [3:0] done per node, [7:4] busy per node
// An access is a one-cycle lb_cs with lb_wr or lb_rd; lb_ready pulses when it
// is complete (one cycle later, three for a DATA read) and lb_rdata is valid
// with it. The host starts no access before the last one is ready. The
// auto-incrementing pointer lets the host stream a quarter with one address.
// The PCI controller and the 16-bit data path are the original design's; the
// registers, the handshake and their timing are this design's choices.
module local_bus_bridge
  import mfcu_pkg::*;
#(
  parameter int unsigned NODES = 4
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
  output link_req_t   req_o [NODES],
  input  link_rsp_t   rsp_i [NODES]
);

  typedef enum logic [1:0] {
    R_PTR    = 2'd0,
    R_DATA   = 2'd1,
    R_CTRL   = 2'd2,
    R_STATUS = 2'd3
  } reg_e;

  logic [1:0]         node_sel;
  logic [LINK_AW-1:0] ptr;
  filter_mode_e       mode_q;
  logic               rd_wait;      // DATA read in flight
  logic [NODES-1:0]   done_v, busy_v;
  logic               wr_acc, rd_acc;
  reg_e               reg_sel;

  always_comb begin
    wr_acc  = lb_cs && lb_wr;
    rd_acc  = lb_cs && lb_rd && !lb_wr;
    reg_sel = reg_e'(lb_addr);
    for (int n = 0; n < NODES; n++) begin
      done_v[n] = rsp_i[n].done;
      busy_v[n] = rsp_i[n].busy;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      node_sel <= '0;
      ptr      <= '0;
      mode_q   <= MODE_EDGE;
      rd_wait  <= 1'b0;
      lb_ready <= 1'b0;
      lb_rdata <= '0;
      for (int n = 0; n < NODES; n++) req_o[n] <= '0;
    end else begin
      lb_ready <= 1'b0;
      for (int n = 0; n < NODES; n++) begin
        req_o[n].req   <= 1'b0;
        req_o[n].start <= 1'b0;
      end
      if (wr_acc) begin
        lb_ready <= 1'b1;
        unique case (reg_sel)
          R_PTR: begin
            node_sel <= lb_wdata[15:14];
            ptr      <= lb_wdata[LINK_AW-1:0];
          end
          R_DATA: begin
            for (int n = 0; n < NODES; n++) begin
              if (node_sel == 2'(n)) begin
                req_o[n].req   <= 1'b1;
                req_o[n].we    <= 1'b1;
                req_o[n].addr  <= ptr;
                req_o[n].wdata <= lb_wdata[7:0];
              end
            end
            ptr <= ptr + 1'b1;
          end
          R_CTRL: begin
            mode_q <= filter_mode_e'(lb_wdata[1:0]);
            for (int n = 0; n < NODES; n++) begin
              req_o[n].mode  <= filter_mode_e'(lb_wdata[1:0]);
              req_o[n].start <= lb_wdata[4+n];
            end
          end
          R_STATUS: ;  // read-only
        endcase
      end else if (rd_acc) begin
        unique case (reg_sel)
          R_PTR: begin
            lb_rdata <= 16'({node_sel, 14'(ptr)});
            lb_ready <= 1'b1;
          end
          R_DATA: begin
            for (int n = 0; n < NODES; n++) begin
              if (node_sel == 2'(n)) begin
                req_o[n].req  <= 1'b1;
                req_o[n].we   <= 1'b0;
                req_o[n].addr <= ptr;
              end
            end
            ptr     <= ptr + 1'b1;
            rd_wait <= 1'b1;
          end
          R_CTRL: begin
            lb_rdata <= {14'd0, mode_q};
            lb_ready <= 1'b1;
          end
          R_STATUS: begin
            lb_rdata <= 16'({8'(busy_v) << 4 | 8'(done_v)});
            lb_ready <= 1'b1;
          end
        endcase
      end
      if (rd_wait) begin
        for (int n = 0; n < NODES; n++) begin
          if (node_sel == 2'(n) && rsp_i[n].rvalid) begin
            lb_rdata <= {8'd0, rsp_i[n].rdata};
            lb_ready <= 1'b1;
            rd_wait  <= 1'b0;
          end
        end
      end
    end
  end

  initial begin
    assert (NODES >= 1 && NODES <= 4) else $error("NODES must be 1..4");
  end

  a_one_access_at_a_time: assert property (@(posedge clk) disable iff (!rst_n)
    rd_wait |-> !lb_cs);
  a_no_read_and_write: assert property (@(posedge clk) disable iff (!rst_n)
    lb_cs |-> !(lb_wr && lb_rd));

endmodule
