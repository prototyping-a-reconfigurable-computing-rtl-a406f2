// Nine-cell window scanner with its filter bank: filters one stored image
// quarter pixel by pixel.
//
// On a start pulse it samples the filter mode and walks the QW x QH quarter in
// raster order. For each pixel it reads the nine window pixels P1..P9 from the
// input memory one per cycle (the memory answers one cycle after the
// request), then writes the selected IP's result for that pixel to the result
// memory. A pixel therefore takes 11 cycles: nine reads, one cycle for the
// last read data, one write; a quarter takes 11*QW*QH cycles after start.
// Window cells outside the quarter take the nearest pixel inside it (edge
// replication), so every quarter is filtered on its own, as the original design
// requires; the border rule itself is this design's choice. The four IPs
// (edge enhancement, expansion, erosion, negative of P5) are the original design's;
// the serial window fetch is the simplest scheme that fits one block RAM port.
//
// Interface: start/mode in, busy high while scanning, done set at the end and
// cleared by the next start; rd_* is the input memory's read port, wr_* the
// result memory's write port. Addresses are row*QW + column.
module window_scan
  import mfcu_pkg::*;
#(
  parameter int unsigned QW = 8,
  parameter int unsigned QH = 8,
  localparam int unsigned AW = (QW*QH > 1) ? $clog2(QW*QH) : 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  filter_mode_e mode,
  output logic         busy,
  output logic         done,
  output logic         rd_en,
  output logic [AW-1:0] rd_addr,
  input  pixel_t       rd_data,
  output logic         wr_en,
  output logic [AW-1:0] wr_addr,
  output pixel_t       wr_data
);

  localparam int unsigned CW = (QW > 1) ? $clog2(QW) : 1;
  localparam int unsigned RW = (QH > 1) ? $clog2(QH) : 1;

  typedef enum logic [1:0] {S_IDLE, S_FETCH, S_WRITE} state_e;

  state_e       state;
  filter_mode_e mode_q;
  logic [CW-1:0] col;
  logic [RW-1:0] row;
  logic [3:0]   k;          // window cell being requested (0..8), 9 = last data
  window_t      win;

  // Clamped coordinates of window cell k around (row, col).
  logic [CW-1:0] wcol;
  logic [RW-1:0] wrow;
  always_comb begin
    wcol = col;
    wrow = row;
    case (k)
      4'd0, 4'd3, 4'd6: wcol = (col == '0) ? col : col - 1'b1;
      4'd2, 4'd5, 4'd8: wcol = (32'(col) == QW-1) ? col : col + 1'b1;
      default: ;
    endcase
    case (k)
      4'd0, 4'd1, 4'd2: wrow = (row == '0) ? row : row - 1'b1;
      4'd6, 4'd7, 4'd8: wrow = (32'(row) == QH-1) ? row : row + 1'b1;
      default: ;
    endcase
  end

  always_comb begin
    rd_en   = (state == S_FETCH) && (k < 4'd9);
    rd_addr = AW'(32'(wrow) * QW + 32'(wcol));
  end

  // Filter bank: the four image-processing IPs side by side.
  pixel_t px_edge, px_expand, px_erosion;
  pixel_t [0:0] px_neg;
  edge_enhance   u_edge    (.win(win), .pix_out(px_edge));
  image_expand   u_expand  (.win(win), .pix_out(px_expand));
  image_erosion  u_erosion (.win(win), .pix_out(px_erosion));
  image_negative #(.CHANNELS(1)) u_negative (.pix_in(win[4]), .pix_out(px_neg));

  always_comb begin
    wr_en   = (state == S_WRITE);
    wr_addr = AW'(32'(row) * QW + 32'(col));
    unique case (mode_q)
      MODE_EDGE:     wr_data = px_edge;
      MODE_EXPAND:   wr_data = px_expand;
      MODE_EROSION:  wr_data = px_erosion;
      MODE_NEGATIVE: wr_data = px_neg[0];
    endcase
  end

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      mode_q <= MODE_EDGE;
      col    <= '0;
      row    <= '0;
      k      <= '0;
      win    <= '0;
      done   <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE: begin
          if (start) begin
            mode_q <= mode;
            col    <= '0;
            row    <= '0;
            k      <= '0;
            done   <= 1'b0;
            state  <= S_FETCH;
          end
        end
        S_FETCH: begin
          if (k != 4'd0) win[k-1] <= rd_data;
          if (k == 4'd9) state <= S_WRITE;
          else           k <= k + 1'b1;
        end
        S_WRITE: begin
          k <= '0;
          if (32'(col) == QW-1) begin
            col <= '0;
            if (32'(row) == QH-1) begin
              row   <= '0;
              done  <= 1'b1;
              state <= S_IDLE;
            end else begin
              row   <= row + 1'b1;
              state <= S_FETCH;
            end
          end else begin
            col   <= col + 1'b1;
            state <= S_FETCH;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
