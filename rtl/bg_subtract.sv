// bg_subtract -- subtraction module for background subtraction.
//
// As in the document: the vector codes of the input image and of the
// background image shift through two N x N register windows, SR1 and SR2,
// each with N-1 row FIFOs of W-N codes (vcc_window), so both hold the
// partial image at the same location. Each clock the pairs are XORed into
// the RR register, the SUM operators count the ones (vcc_xor_sum), and the
// comparator outputs subtraction value 1 ("object") when the count is equal
// to or greater than the threshold and 0 ("background") when it is smaller.
//
// Design choices: a pair of position counters marks where the window lies
// wholly inside the frame (x >= N-1, y >= N-1); elsewhere the subtraction
// value is forced to 0. The value belongs to the window whose lower-right
// code is the one that entered with it. Latency: 2 + log2(N*N) clocks;
// out_valid/out_sof repeat in_valid/in_sof.
module bg_subtract
  import vcc_pkg::*;
#(
  parameter int unsigned N  = BS_N,
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
  input  vcode_t        in_code,
  input  vcode_t        bg_code,
  input  logic [CW-1:0] threshold,
  output logic          out_valid,
  output logic          out_sof,
  output logic          out_sub
);
  vcode_t sr1 [N][N];
  vcode_t sr2 [N][N];

  vcc_window #(.N(N), .W(W)) u_sr1 (
    .clk(clk), .rst_n(rst_n), .en(in_valid), .din(in_code), .win(sr1)
  );
  vcc_window #(.N(N), .W(W)) u_sr2 (
    .clk(clk), .rst_n(rst_n), .en(in_valid), .din(bg_code), .win(sr2)
  );

  // position of the code entering now
  logic [XW-1:0] x_cnt, cur_x;
  logic [YW-1:0] y_cnt, cur_y;
  assign cur_x = in_sof ? '0 : x_cnt;
  assign cur_y = in_sof ? '0 : y_cnt;

  logic v_d, sof_d, full_d;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_cnt  <= '0;
      y_cnt  <= '0;
      v_d    <= 1'b0;
      sof_d  <= 1'b0;
      full_d <= 1'b0;
    end else begin
      if (in_valid) begin
        if (cur_x == XW'(W - 1)) begin
          x_cnt <= '0;
          y_cnt <= (cur_y == YW'(H - 1)) ? '0 : cur_y + 1'b1;
        end else begin
          x_cnt <= cur_x + 1'b1;
          y_cnt <= cur_y;
        end
      end
      v_d    <= in_valid;
      sof_d  <= in_valid && in_sof;
      full_d <= (cur_x >= XW'(N - 1)) && (cur_y >= YW'(N - 1));
    end
  end

  vcode_t a_flat [N*N];
  vcode_t b_flat [N*N];
  always_comb begin
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) begin
        a_flat[r*N + c] = sr1[r][c];
        b_flat[r*N + c] = sr2[r][c];
      end
  end

  logic [CW-1:0] corr;
  logic [1:0]    tag;

  vcc_xor_sum #(.NUM(N*N), .TAG_W(2), .SW(CW)) u_sum (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (v_d),
    .in_tag   ({full_d, sof_d}),
    .a        (a_flat),
    .b        (b_flat),
    .out_valid(out_valid),
    .out_tag  (tag),
    .out_sum  (corr)
  );

  // comparator against the threshold
  assign out_sof = tag[0];
  assign out_sub = tag[1] && (corr >= threshold);
endmodule
