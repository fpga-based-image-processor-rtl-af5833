// vcc_window -- N x N shift-register window over a raster stream of vector
// codes whose rows are W codes long.
//
// As in the document's SR1 cluster, codes enter row 0 at column 0 and shift
// right; the code leaving the end of a row goes through a FIFO of W-N codes
// and enters the next row, so there are N-1 FIFOs. After a code of position
// (x,y) has been shifted in, win[r][c] holds the code of (x-c, y-r): the
// newest code sits at win[0][0] and the upper-left code of the partial image
// at win[N-1][N-1]. The window is meaningful once x >= N-1 and y >= N-1;
// that check is left to the user. One shift per clock with `en` high.
module vcc_window
  import vcc_pkg::*;
#(
  parameter int unsigned N = TM_N,
  parameter int unsigned W = IMG_W
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   en,
  input  vcode_t din,
  output vcode_t win [N][N]
);
  vcode_t fifo_q [N];   // index r: output of the FIFO feeding row r (r >= 1)

  assign fifo_q[0] = din;

  for (genvar r = 0; r < N; r++) begin : g_row
    always_ff @(posedge clk) begin
      if (en) begin
        win[r][0] <= fifo_q[r];
        for (int c = 1; c < N; c++) win[r][c] <= win[r][c-1];
      end
    end
    if (r < N - 1) begin : g_fifo
      code_delay #(.DEPTH(W - N), .DW(4)) u_fifo (
        .clk  (clk),
        .rst_n(rst_n),
        .en   (en),
        .d    (win[r][N-1]),
        .q    (fifo_q[r+1])
      );
    end
  end
endmodule
