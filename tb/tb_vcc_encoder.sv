// tb_vcc_encoder -- self-checking testbench of vcc_encoder.
//
// Sends three random frames (the first without gaps, the others with random
// idle clocks between pixels) and two more rows to flush, then compares every
// output code and its position with the reference coder. Also checks the
// latency: with no gaps the code is registered on the third clock edge
// after the one that takes in the pixel two rows below it; the monitor,
// which samples on clock edges, sees it 4 counted clocks after the pixel
// was driven (output k against input k + 2W).
module tb_vcc_encoder;
  import vcc_pkg::*;
  import tb_vcc_ref_pkg::*;

  localparam int W = 16;
  localparam int H = 10;
  localparam int NF = 3;
  localparam int TH1 = 3;
  localparam int TH2 = -2;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_sof = 0;
  logic [7:0] in_pix = 0;
  logic out_valid, out_sof;
  logic [$clog2(W)-1:0] out_x;
  logic [$clog2(H)-1:0] out_y;
  vcode_t out_code;

  vcc_encoder #(.W(W), .H(H)) dut (
    .clk, .rst_n, .in_valid, .in_sof, .in_pix,
    .th1(8'(TH1)), .th2(8'(TH2)),
    .out_valid, .out_sof, .out_x, .out_y, .out_code
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int img [NF][];
  int codes [NF][];
  longint in_cycle [$];
  longint cycle = 0;
  int nout = 0;
  int seen_pos = 0, seen_neg = 0, seen_neu = 0;

  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  // output monitor
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      int f, p, exp;
      f = nout / (W * H);
      p = nout % (W * H);
      if (f < NF) begin
        exp = codes[f][p];
        check(out_x == p % W && out_y == p / W, $sformatf("pos out %0d: got (%0d,%0d)", nout, out_x, out_y));
        check(out_sof == (p == 0), $sformatf("sof out %0d", nout));
        check(int'(out_code) == exp, $sformatf("code f%0d (%0d,%0d) got %h exp %h", f, p % W, p / W, out_code, exp));
        if (exp[1:0] == 1) seen_pos++;
        if (exp[1:0] == 2) seen_neg++;
        if (exp[1:0] == 0 && exp[3:2] == 0) seen_neu++;
        if (f == 0 && nout + 2 * W < in_cycle.size())
          check(cycle == in_cycle[nout + 2 * W] + 4, $sformatf("latency out %0d: %0d", nout, cycle - in_cycle[nout + 2 * W]));
      end
      nout++;
    end
  end

  initial begin
    for (int f = 0; f < NF; f++) begin
      img[f] = new[W * H];
      foreach (img[f][i]) img[f][i] = $urandom_range(0, 60);
      ref_encode(img[f], W, H, TH1, TH2, codes[f]);
    end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int f = 0; f <= NF; f++) begin
      for (int i = 0; i < W * H; i++) begin
        if (f == NF && i >= 2 * W + 4) break;
        if (f > 0) repeat ($urandom_range(0, 2)) begin
          in_valid <= 0;
          @(posedge clk);
        end
        in_valid <= 1;
        in_sof   <= (i == 0);
        in_pix   <= (f < NF) ? 8'(img[f][i]) : 8'(0);
        in_cycle.push_back(cycle);
        @(posedge clk);
      end
    end
    in_valid <= 0;
    repeat (10) @(posedge clk);
    check(nout >= NF * W * H, $sformatf("output count %0d", nout));
    check(seen_pos > 0 && seen_neg > 0 && seen_neu > 0, "all three codes exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
