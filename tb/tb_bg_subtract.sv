// tb_bg_subtract -- self-checking testbench of bg_subtract (reduced: 4x4
// window, 16x10 frame).
//
// The background is a random code image; the input equals it except for a
// changed rectangle. Every subtraction value is compared with the reference
// (1 where the window lies inside the frame and the number of differing
// bits is at least the threshold), over two frames, the second with idle
// clocks. It also checks that values of 0 and 1 both occur, that a count
// exactly equal to the threshold gives 1, and the latency 2 + log2(N*N).
module tb_bg_subtract;
  import vcc_pkg::*;
  import tb_vcc_ref_pkg::*;

  localparam int N = 4;
  localparam int W = 16;
  localparam int H = 10;
  localparam int TH = 6;
  localparam int LAT = 2 + $clog2(N * N);
  localparam int CW = $clog2(4 * N * N + 1);

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_sof = 0;
  vcode_t in_code = 0, bg_code = 0;
  logic [CW-1:0] threshold = CW'(TH);
  logic out_valid, out_sof, out_sub;

  bg_subtract #(.N(N), .W(W), .H(H)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int bg [], img [];
  longint in_cycle [$];
  longint cycle = 0;
  int nout = 0, n_obj = 0, n_bg = 0, n_eq = 0;

  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      int p, x, y, c;
      bit exp;
      p = nout % (W * H);
      x = p % W;
      y = p / W;
      exp = 0;
      if (x >= N - 1 && y >= N - 1) begin
        c = ref_corr2(img, bg, W, N, x, y);
        exp = (c >= TH);
        if (c == TH) n_eq++;
      end
      check(out_sub == exp, $sformatf("(%0d,%0d) got %0d exp %0d", x, y, out_sub, exp));
      check(out_sof == (p == 0), "sof");
      if (nout < W * H) check(cycle == in_cycle[nout] + LAT + 1, $sformatf("latency %0d", nout));
      if (exp) n_obj++; else n_bg++;
      nout++;
    end
  end

  initial begin
    bg = new[W * H];
    img = new[W * H];
    foreach (bg[i]) bg[i] = $urandom_range(0, 15);
    foreach (img[i]) img[i] = bg[i];
    for (int y = 3; y < 7; y++)
      for (int x = 6; x < 11; x++) img[y * W + x] = $urandom_range(0, 15);
    // one lone changed code: a 1-bit difference (count 1) and a 6-bit one
    img[8 * W + 2] = bg[8 * W + 2] ^ 1;
    img[1 * W + 14] = bg[1 * W + 14] ^ 4'hf;
    img[2 * W + 14] = bg[2 * W + 14] ^ 4'h3;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int f = 0; f < 2; f++)
      for (int i = 0; i < W * H; i++) begin
        if (f > 0) repeat ($urandom_range(0, 1)) begin
          in_valid <= 0;
          @(posedge clk);
        end
        in_valid <= 1;
        in_sof   <= (i == 0);
        in_code  <= vcode_t'(img[i]);
        bg_code  <= vcode_t'(bg[i]);
        in_cycle.push_back(cycle);
        @(posedge clk);
      end
    in_valid <= 0;
    repeat (LAT + 5) @(posedge clk);
    check(nout == 2 * W * H, "output count");
    check(n_obj > 0 && n_bg > 0 && n_eq > 0, $sformatf("object %0d background %0d equal-to-threshold %0d", n_obj, n_bg, n_eq));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
