// region_detect -- region detection module: bounding box of the "object"
// pixels of a frame.
//
// As in the document: an X counter and a Y counter follow the position of
// each subtraction value. Four comparisons test the counters against the
// minimum-x, maximum-x, minimum-y and maximum-y registers; where a value is
// 1 (object) and the counter lies outside the stored range, the selector
// loads the counter into that register. After the last value of the frame
// the four coordinates go to the output register ("region") and res_valid
// pulses for one clock.
//
// Design choices: the range restarts at the first value of each frame;
// res_found tells whether any object value was seen (if not, the minima read
// all ones and the maxima zero). Coordinates are those of the subtraction
// stream (lower-right code of each window).
module region_detect
  import vcc_pkg::*;
#(
  parameter int unsigned W  = IMG_W,
  parameter int unsigned H  = IMG_H,
  parameter int unsigned XW = $clog2(W),
  parameter int unsigned YW = $clog2(H)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic          in_sof,
  input  logic          in_sub,
  output logic          res_valid,
  output logic          res_found,
  output logic [XW-1:0] res_min_x,
  output logic [XW-1:0] res_max_x,
  output logic [YW-1:0] res_min_y,
  output logic [YW-1:0] res_max_y
);
  logic [XW-1:0] x_cnt, cur_x, min_x, max_x;
  logic [YW-1:0] y_cnt, cur_y, min_y, max_y;
  logic          found;

  assign cur_x = in_sof ? '0 : x_cnt;
  assign cur_y = in_sof ? '0 : y_cnt;

  logic [XW-1:0] b_min_x, b_max_x, n_min_x, n_max_x;
  logic [YW-1:0] b_min_y, b_max_y, n_min_y, n_max_y;
  logic          b_found, n_found, last;

  always_comb begin
    // a new frame starts from an empty range
    b_min_x = in_sof ? '1 : min_x;
    b_max_x = in_sof ? '0 : max_x;
    b_min_y = in_sof ? '1 : min_y;
    b_max_y = in_sof ? '0 : max_y;
    b_found = in_sof ? 1'b0 : found;
    // comparisons and selectors
    n_min_x = (in_sub && cur_x < b_min_x) ? cur_x : b_min_x;
    n_max_x = (in_sub && cur_x > b_max_x) ? cur_x : b_max_x;
    n_min_y = (in_sub && cur_y < b_min_y) ? cur_y : b_min_y;
    n_max_y = (in_sub && cur_y > b_max_y) ? cur_y : b_max_y;
    n_found = b_found || in_sub;
    last    = (cur_x == XW'(W - 1)) && (cur_y == YW'(H - 1));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_cnt     <= '0;
      y_cnt     <= '0;
      min_x     <= '1;
      max_x     <= '0;
      min_y     <= '1;
      max_y     <= '0;
      found     <= 1'b0;
      res_valid <= 1'b0;
      res_found <= 1'b0;
      res_min_x <= '0;
      res_max_x <= '0;
      res_min_y <= '0;
      res_max_y <= '0;
    end else begin
      res_valid <= 1'b0;
      if (in_valid) begin
        if (cur_x == XW'(W - 1)) begin
          x_cnt <= '0;
          y_cnt <= (cur_y == YW'(H - 1)) ? '0 : cur_y + 1'b1;
        end else begin
          x_cnt <= cur_x + 1'b1;
          y_cnt <= cur_y;
        end
        min_x <= n_min_x;
        max_x <= n_max_x;
        min_y <= n_min_y;
        max_y <= n_max_y;
        found <= n_found;
        if (last) begin
          res_valid <= 1'b1;
          res_found <= n_found;
          res_min_x <= n_min_x;
          res_max_x <= n_max_x;
          res_min_y <= n_min_y;
          res_max_y <= n_max_y;
        end
      end
    end
  end
endmodule
