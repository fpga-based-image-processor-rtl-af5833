// match_compare -- comparison module for template matching: finds the
// smallest correlation value of a frame and where it occurred.
//
// As in the document: an X counter and a Y counter follow the position of
// each incoming correlation value. Register 1 takes the first value of the
// frame; after that the comparator raises "comp" whenever a new value is
// smaller than register 1, and selectors 1-3 then load the value into
// register 1 and the counters into registers 2 (x) and 3 (y). After the last
// value of the frame the three are copied into register 4, the matching
// result, and res_valid pulses for one clock.
//
// Design choices: only positions where the N x N window lies wholly inside
// the frame (x >= N-1, y >= N-1) take part; the position reported is that of
// the window's lower-right code, so the matched partial image spans
// (x-N+1 .. x, y-N+1 .. y); on equal values the earliest position is kept.
// Register 4 is updated on the clock after the last value (the frame's
// position (W-1, H-1)).
module match_compare
  import vcc_pkg::*;
#(
  parameter int unsigned N  = TM_N,
  parameter int unsigned W  = IMG_W,
  parameter int unsigned H  = IMG_H,
  parameter int unsigned CW = $clog2(4 * N * N + 1),
  parameter int unsigned XW = $clog2(W),
  parameter int unsigned YW = $clog2(H)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic          in_sof,
  input  logic [CW-1:0] in_value,
  output logic          res_valid,
  output logic [CW-1:0] res_value,
  output logic [XW-1:0] res_x,
  output logic [YW-1:0] res_y
);
  logic [XW-1:0] x_cnt;
  logic [YW-1:0] y_cnt;
  logic [XW-1:0] cur_x;
  logic [YW-1:0] cur_y;
  logic [CW-1:0] reg1;
  logic [XW-1:0] reg2;
  logic [YW-1:0] reg3;

  assign cur_x = in_sof ? '0 : x_cnt;
  assign cur_y = in_sof ? '0 : y_cnt;

  logic full, first, comp, take, last;
  logic [CW-1:0] nxt1;
  logic [XW-1:0] nxt2;
  logic [YW-1:0] nxt3;

  always_comb begin
    full  = (cur_x >= XW'(N - 1)) && (cur_y >= YW'(N - 1));
    first = (cur_x == XW'(N - 1)) && (cur_y == YW'(N - 1));
    comp  = in_value < reg1;                  // comp signal
    take  = full && (first || comp);
    last  = (cur_x == XW'(W - 1)) && (cur_y == YW'(H - 1));
    nxt1  = take ? in_value : reg1;           // selector 1
    nxt2  = take ? cur_x    : reg2;           // selector 2
    nxt3  = take ? cur_y    : reg3;           // selector 3
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_cnt     <= '0;
      y_cnt     <= '0;
      reg1      <= '0;
      reg2      <= '0;
      reg3      <= '0;
      res_valid <= 1'b0;
      res_value <= '0;
      res_x     <= '0;
      res_y     <= '0;
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
        reg1 <= nxt1;
        reg2 <= nxt2;
        reg3 <= nxt3;
        if (last) begin                       // register 4
          res_valid <= 1'b1;
          res_value <= nxt1;
          res_x     <= nxt2;
          res_y     <= nxt3;
        end
      end
    end
  end
endmodule
