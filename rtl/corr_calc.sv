// corr_calc -- correlation calculation module for template matching.
//
// Following the document: the vector codes of the input image shift through
// SR1, an N x N register window whose rows are linked by N-1 FIFOs of W-N
// codes (vcc_window), so that at every pixel clock SR1 holds the N x N
// partial image whose lower-right pixel is the newest code. SR2 is an N x N
// register chain without FIFOs holding the template codes. Each clock the
// N*N code pairs at the same register positions are XORed into the RR
// register and the ones are counted by the SUM operators (vcc_xor_sum); the
// count is the correlation value (0 = identical, smaller = more similar).
//
// SR2 is loaded by shifting the template codes in raster order with
// tmpl_shift high (N*N shifts); it then holds them. How the template reaches
// SR2 is not detailed in the document; a separate shift enable is this
// design's choice. Template position (i,j) is compared with image position
// (x-N+1+i, y-N+1+j) when the newest code is (x,y).
//
// Timing: one correlation value per valid input code, LAT = 2 + log2(N*N)
// clocks after that code (1 for SR1, 1 for RR, log2(N*N) adder levels).
// out_valid/out_sof repeat in_valid/in_sof with the same latency; values
// are meaningful only for x >= N-1 and y >= N-1, which the comparison
// module checks with its own counters.
module corr_calc
  import vcc_pkg::*;
#(
  parameter int unsigned N  = TM_N,
  parameter int unsigned W  = IMG_W,
  parameter int unsigned CW = $clog2(4 * N * N + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic          in_sof,
  input  vcode_t        in_code,
  input  logic          tmpl_shift,
  input  vcode_t        tmpl_code,
  output logic          out_valid,
  output logic          out_sof,
  output logic [CW-1:0] out_value
);
  // SR1: partial image of the input
  vcode_t sr1 [N][N];

  vcc_window #(.N(N), .W(W)) u_sr1 (
    .clk  (clk),
    .rst_n(rst_n),
    .en   (in_valid),
    .din  (in_code),
    .win  (sr1)
  );

  // SR2: template
  vcode_t sr2 [N][N];

  always_ff @(posedge clk) begin
    if (tmpl_shift) begin
      for (int r = 0; r < N; r++) begin
        sr2[r][0] <= (r == 0) ? tmpl_code : sr2[r-1][N-1];
        for (int c = 1; c < N; c++) sr2[r][c] <= sr2[r][c-1];
      end
    end
  end

  // the window in SR1 is one clock behind in_valid
  logic v_d, sof_d;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_d   <= 1'b0;
      sof_d <= 1'b0;
    end else begin
      v_d   <= in_valid;
      sof_d <= in_valid && in_sof;
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

  vcc_xor_sum #(.NUM(N*N), .TAG_W(1), .SW(CW)) u_sum (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (v_d),
    .in_tag   (sof_d),
    .a        (a_flat),
    .b        (b_flat),
    .out_valid(out_valid),
    .out_tag  (out_sof),
    .out_sum  (out_value)
  );
endmodule
