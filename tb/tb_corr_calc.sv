// tb_corr_calc -- self-checking testbench of corr_calc (reduced size:
// 8x8 template, 20-code rows).
//
// Shifts a random template into SR2, then streams two random code frames
// (the second with idle clocks between codes) into SR1. The second frame
// holds an exact copy of the template at a known place. For every output
// whose window lies inside the frame the value is compared with the
// reference correlation; the latency (2 + log2(N*N) clocks) is checked on
// the first frame, which has no gaps.
module tb_corr_calc;
  import vcc_pkg::*;
  import tb_vcc_ref_pkg::*;

  localparam int N = 8;
  localparam int W = 20;
  localparam int H = 14;
  localparam int LAT = 2 + $clog2(N * N);
  localparam int CW = $clog2(4 * N * N + 1);

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_sof = 0, tmpl_shift = 0;
  vcode_t in_code = 0, tmpl_code = 0;
  logic out_valid, out_sof;
  logic [CW-1:0] out_value;

  corr_calc #(.N(N), .W(W)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int tmpl [];
  int img [2][];
  longint in_cycle [$];
  longint cycle = 0;
  int nout = 0, zero_hits = 0;

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
      int f, p, x, y, exp;
      f = nout / (W * H);
      p = nout % (W * H);
      x = p % W;
      y = p / W;
      if (f < 2) begin
        check(out_sof == (p == 0), $sformatf("sof %0d", nout));
        if (x >= N - 1 && y >= N - 1) begin
          exp = ref_corr(img[f], W, tmpl, N, x, y);
          check(int'(out_value) == exp, $sformatf("f%0d (%0d,%0d) got %0d exp %0d", f, x, y, out_value, exp));
          if (exp == 0) zero_hits++;
        end
        if (f == 0) check(cycle == in_cycle[nout] + LAT + 1, $sformatf("latency %0d", nout));
      end
      nout++;
    end
  end

  initial begin
    tmpl = new[N * N];
    foreach (tmpl[i]) tmpl[i] = $urandom_range(0, 15);
    for (int f = 0; f < 2; f++) begin
      img[f] = new[W * H];
      foreach (img[f][i]) img[f][i] = $urandom_range(0, 15);
    end
    // paste the template into frame 1 at (5,3)
    for (int j = 0; j < N; j++)
      for (int i = 0; i < N; i++) img[1][(3 + j) * W + 5 + i] = tmpl[j * N + i];
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int i = 0; i < N * N; i++) begin
      tmpl_shift <= 1;
      tmpl_code  <= vcode_t'(tmpl[i]);
      @(posedge clk);
    end
    tmpl_shift <= 0;
    for (int f = 0; f < 2; f++)
      for (int i = 0; i < W * H; i++) begin
        if (f > 0) repeat ($urandom_range(0, 1)) begin
          in_valid <= 0;
          @(posedge clk);
        end
        in_valid <= 1;
        in_sof   <= (i == 0);
        in_code  <= vcode_t'(img[f][i]);
        in_cycle.push_back(cycle);
        @(posedge clk);
      end
    in_valid <= 0;
    repeat (LAT + 5) @(posedge clk);
    check(nout == 2 * W * H, $sformatf("output count %0d", nout));
    check(zero_hits >= 1, "exact template copy found with value 0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
