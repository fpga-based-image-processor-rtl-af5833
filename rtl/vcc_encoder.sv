// vcc_encoder -- turns a raster stream of 8-bit intensities into a raster
// stream of 4-bit vector codes, one code per pixel clock.
//
// How it works (after the document's encoder module): four row buffers are
// written in turn, one row each (selector 1). While a row is written, the
// other three hold the three rows above it; selector 2 reads one pixel from
// each of them per clock and shifts that column into a 3x3 register window.
// The window feeds an x filter (right column minus left column, /6) and a y
// filter (bottom row minus top row, /6). Each gradient is compared with Th1
// and Th2 and coded as 01 (positive, gradient > Th1), 10 (negative, gradient
// < Th2) or 00 (neutral). The code is {x code, y code}.
//
// Design choices not fixed by the document:
//  * the /6 is not computed; the raw 3-pixel sums are compared with 6*Th,
//    which gives the same result as comparing sum/6 with Th exactly;
//  * Th1 and Th2 are signed gradient values (Th2 <= Th1 expected; should
//    both hold, positive wins);
//  * the buffers are read one column ahead (column x+1; at the end of a row,
//    column 0 of the rows the next row needs), so the window is
//    centred on column x of row y-2 while pixel (x,y) is written: the code
//    stream is the pixel stream delayed by exactly two rows plus 3 clocks,
//    and the codes of the last two rows of a frame come out during the first
//    two rows of the next frame;
//  * pixels on the frame border (first/last row and column) get code 0000;
//  * out_valid stays low until two whole rows have been received.
//
// Interface: in_valid/in_sof/in_pix, in_sof marks pixel (0,0). Outputs
// out_valid, out_sof (code of (0,0)), out_x/out_y (position of the code)
// and out_code, three clocks after the input pixel that completes them.
module vcc_encoder
  import vcc_pkg::*;
#(
  parameter int unsigned W  = IMG_W,
  parameter int unsigned H  = IMG_H,
  parameter int unsigned XW = $clog2(W),
  parameter int unsigned YW = $clog2(H)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic                in_sof,
  input  logic [PIX_W-1:0]    in_pix,
  input  logic signed [7:0]   th1,
  input  logic signed [7:0]   th2,
  output logic                out_valid,
  output logic                out_sof,
  output logic [XW-1:0]       out_x,
  output logic [YW-1:0]       out_y,
  output vcode_t              out_code
);

  // ---------------- input position and row buffer selection --------------
  logic [XW-1:0] x_cnt;
  logic [YW-1:0] y_cnt;
  logic [1:0]    wsel;          // buffer written by the current row
  logic [1:0]    rows_seen;     // saturating count of complete rows

  // position of the pixel now presented
  logic [XW-1:0] cur_x;
  logic [YW-1:0] cur_y;
  assign cur_x = in_sof ? '0 : x_cnt;
  assign cur_y = in_sof ? '0 : y_cnt;

  logic row_end;
  assign row_end = in_valid && (cur_x == XW'(W - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_cnt     <= '0;
      y_cnt     <= '0;
      wsel      <= '0;
      rows_seen <= '0;
    end else if (in_valid) begin
      if (row_end) begin
        x_cnt <= '0;
        y_cnt <= (cur_y == YW'(H - 1)) ? '0 : cur_y + 1'b1;
        wsel  <= wsel + 2'd1;
        if (rows_seen != 2'd3) rows_seen <= rows_seen + 2'd1;
      end else begin
        x_cnt <= cur_x + 1'b1;
        y_cnt <= cur_y;
      end
    end
  end

  // ---------------- four row buffers (selector 1 / selector 2) ------------
  logic [PIX_W-1:0] row_buf [4][W];
  logic [PIX_W-1:0] rd [4];
  logic [XW-1:0]    rd_addr;

  // one column ahead; the last pixel of a row already fetches column 0 of the
  // three rows the next row will use
  assign rd_addr = (cur_x == XW'(W - 1)) ? '0 : cur_x + 1'b1;

  always_ff @(posedge clk) begin
    if (in_valid) begin
      row_buf[wsel][cur_x] <= in_pix;
      for (int k = 0; k < 4; k++) rd[k] <= row_buf[k][rd_addr];
    end
  end

  // tags of stage 1 (buffer read)
  logic          v1, sof1;
  logic [XW-1:0] x1;
  logic [YW-1:0] y1;
  logic [1:0]    sel1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1   <= 1'b0;
      sof1 <= 1'b0;
      x1   <= '0;
      y1   <= '0;
      sel1 <= '0;
    end else begin
      v1   <= in_valid && (rows_seen >= 2'd2);
      sof1 <= in_valid && (cur_x == '0) && (cur_y == YW'(2));
      x1   <= cur_x;
      // centre row is two rows above the row being written
      y1   <= (cur_y >= YW'(2)) ? cur_y - YW'(2) : cur_y + YW'(H - 2);
      sel1 <= (cur_x == XW'(W - 1)) ? wsel + 2'd1 : wsel;
    end
  end

  // ---------------- 3x3 shift register window ---------------------------
  // win[r][c]: r = 0 top row, c = 2 newest (rightmost) column
  logic [PIX_W-1:0] win [3][3];
  logic [PIX_W-1:0] col [3];

  always_comb begin
    col[0] = rd[sel1 + 2'd1];   // oldest row  (y-3)
    col[1] = rd[sel1 + 2'd2];   // centre row  (y-2)
    col[2] = rd[sel1 + 2'd3];   // newest row  (y-1)
  end

  logic          v2, sof2;
  logic [XW-1:0] x2;
  logic [YW-1:0] y2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < 3; r++)
        for (int c = 0; c < 3; c++) win[r][c] <= '0;
      v2   <= 1'b0;
      sof2 <= 1'b0;
      x2   <= '0;
      y2   <= '0;
    end else begin
      if (v1) begin
        for (int r = 0; r < 3; r++) begin
          win[r][0] <= win[r][1];
          win[r][1] <= win[r][2];
          win[r][2] <= col[r];
        end
      end
      v2   <= v1;
      sof2 <= sof1;
      x2   <= x1;
      y2   <= y1;
    end
  end

  // ---------------- gradient filters and comparators ---------------------
  logic signed [11:0] gx, gy;     // 6 x gradient
  logic signed [11:0] lim1, lim2; // 6 x threshold
  dcode_t             cx, cy;
  logic               border;

  always_comb begin
    gx = 12'(win[0][2]) + 12'(win[1][2]) + 12'(win[2][2])
       - 12'(win[0][0]) - 12'(win[1][0]) - 12'(win[2][0]);
    gy = 12'(win[2][0]) + 12'(win[2][1]) + 12'(win[2][2])
       - 12'(win[0][0]) - 12'(win[0][1]) - 12'(win[0][2]);
    lim1 = (12'(th1) <<< 2) + (12'(th1) <<< 1);
    lim2 = (12'(th2) <<< 2) + (12'(th2) <<< 1);
    cx = (gx > lim1) ? CODE_POS : (gx < lim2) ? CODE_NEG : CODE_NEU;
    cy = (gy > lim1) ? CODE_POS : (gy < lim2) ? CODE_NEG : CODE_NEU;
    border = (x2 == '0) || (x2 == XW'(W - 1)) || (y2 == '0) || (y2 == YW'(H - 1));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_sof   <= 1'b0;
      out_x     <= '0;
      out_y     <= '0;
      out_code  <= '0;
    end else begin
      out_valid <= v2;
      out_sof   <= v2 && sof2;
      out_x     <= x2;
      out_y     <= y2;
      out_code  <= border ? vcode_t'(0) : {cx, cy};
    end
  end

endmodule
