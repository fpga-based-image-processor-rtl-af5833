// tb_image_proc_block -- self-checking testbench of image_proc_block
// (reduced: 24x16 code frames, 4x4 template, 4x4 subtraction window).
//
// Frame 0 (MODE_LOAD_TMPL): the template is cut out of the stored code
// stream at (5,6); tmpl_loaded must pulse once. Frame 1 (MODE_RUN): the
// stored stream is a background, the input is that background with a
// changed rectangle and a copy of the template pasted in; the matching
// result (minimum and first position) and the region are compared with the
// reference models. Frame 2: input equal to the background, so no region is
// found, and the template is still matched. Idle clocks appear in frame 2.
module tb_image_proc_block;
  import vcc_pkg::*;
  import tb_vcc_ref_pkg::*;

  localparam int W = 24;
  localparam int H = 16;
  localparam int TM = 4;
  localparam int BS = 4;
  localparam int XW = $clog2(W);
  localparam int YW = $clog2(H);
  localparam int CW = $clog2(4 * TM * TM + 1);
  localparam int SW = $clog2(4 * BS * BS + 1);
  localparam int TX = 5, TY = 6, SUBTH = 5;

  logic clk = 0, rst_n = 0;
  logic c_valid = 0, c_sof = 0;
  logic [XW-1:0] c_x = 0;
  logic [YW-1:0] c_y = 0;
  vcode_t c_in = 0, c_sto = 0;
  mode_e mode = MODE_RUN;
  logic [XW-1:0] tmpl_x = XW'(TX);
  logic [YW-1:0] tmpl_y = YW'(TY);
  logic [SW-1:0] sub_th = SW'(SUBTH);
  logic tmpl_loaded, match_valid, region_valid, region_found;
  logic [CW-1:0] match_value;
  logic [XW-1:0] match_x, region_min_x, region_max_x;
  logic [YW-1:0] match_y, region_min_y, region_max_y;

  image_proc_block #(.W(W), .H(H), .TM(TM), .BS(BS)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_loaded = 0;
  int n_match = 0, n_region = 0;
  int exp_mv [3], exp_mx [3], exp_my [3];
  bit exp_found [3];
  int exp_box [3][4];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  always @(posedge clk) begin
    if (rst_n && tmpl_loaded) n_loaded++;
    if (rst_n && match_valid) begin
      if (n_match >= 1)
        check(int'(match_value) == exp_mv[n_match] && int'(match_x) == exp_mx[n_match] && int'(match_y) == exp_my[n_match],
              $sformatf("match frame %0d: %0d at (%0d,%0d), exp %0d at (%0d,%0d)", n_match, match_value, match_x, match_y,
                        exp_mv[n_match], exp_mx[n_match], exp_my[n_match]));
      n_match++;
    end
    if (rst_n && region_valid) begin
      if (n_region >= 1) begin
        check(region_found == exp_found[n_region], $sformatf("region found frame %0d", n_region));
        if (exp_found[n_region])
          check(int'(region_min_x) == exp_box[n_region][0] && int'(region_max_x) == exp_box[n_region][1] &&
                int'(region_min_y) == exp_box[n_region][2] && int'(region_max_y) == exp_box[n_region][3],
                $sformatf("region frame %0d: x %0d..%0d y %0d..%0d exp x %0d..%0d y %0d..%0d", n_region,
                          region_min_x, region_max_x, region_min_y, region_max_y,
                          exp_box[n_region][0], exp_box[n_region][1], exp_box[n_region][2], exp_box[n_region][3]));
      end
      n_region++;
    end
  end

  task automatic send(const ref int inp[], const ref int sto[], input mode_e m, input bit gaps);
    for (int i = 0; i < W * H; i++) begin
      if (gaps) repeat ($urandom_range(0, 1)) begin
        c_valid <= 0;
        @(posedge clk);
      end
      c_valid <= 1;
      c_sof   <= (i == 0);
      c_x     <= XW'(i % W);
      c_y     <= YW'(i / W);
      c_in    <= vcode_t'(inp[i]);
      c_sto   <= vcode_t'(sto[i]);
      mode    <= m;
      @(posedge clk);
    end
    c_valid <= 0;
    repeat (3) @(posedge clk);
  endtask

  // reference results of one run frame
  function automatic void expect_frame(input int f, const ref int inp[], const ref int bg[], const ref int t[]);
    int c;
    exp_mv[f] = 1 << 30;
    for (int y = TM - 1; y < H; y++)
      for (int x = TM - 1; x < W; x++) begin
        c = ref_corr(inp, W, t, TM, x, y);
        if (c < exp_mv[f]) begin
          exp_mv[f] = c; exp_mx[f] = x; exp_my[f] = y;
        end
      end
    exp_found[f] = 0;
    exp_box[f] = '{1 << 30, -1, 1 << 30, -1};
    for (int y = BS - 1; y < H; y++)
      for (int x = BS - 1; x < W; x++)
        if (ref_corr2(inp, bg, W, BS, x, y) >= SUBTH) begin
          exp_found[f] = 1;
          if (x < exp_box[f][0]) exp_box[f][0] = x;
          if (x > exp_box[f][1]) exp_box[f][1] = x;
          if (y < exp_box[f][2]) exp_box[f][2] = y;
          if (y > exp_box[f][3]) exp_box[f][3] = y;
        end
  endfunction

  initial begin
    int s0 [], bg [], in0 [], in1 [], t [];
    s0 = new[W * H]; bg = new[W * H]; in0 = new[W * H]; in1 = new[W * H]; t = new[TM * TM];
    foreach (s0[i]) s0[i] = $urandom_range(0, 15);
    foreach (bg[i]) bg[i] = $urandom_range(0, 15);
    foreach (in0[i]) in0[i] = $urandom_range(0, 15);
    for (int j = 0; j < TM; j++)
      for (int i = 0; i < TM; i++) t[j * TM + i] = s0[(TY + j) * W + TX + i];
    foreach (in1[i]) in1[i] = bg[i];
    for (int y = 9; y < 13; y++)
      for (int x = 3; x < 9; x++) in1[y * W + x] = $urandom_range(0, 15);
    for (int j = 0; j < TM; j++)
      for (int i = 0; i < TM; i++) in1[(2 + j) * W + 15 + i] = t[j * TM + i];
    expect_frame(1, in1, bg, t);
    expect_frame(2, bg, bg, t);
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    send(in0, s0, MODE_LOAD_TMPL, 0);
    check(n_loaded == 1, "template loaded once");
    send(in1, bg, MODE_RUN, 0);
    send(bg, bg, MODE_RUN, 1);
    repeat (20) @(posedge clk);
    check(n_loaded == 1, "template not reloaded in run frames");
    check(n_match == 3 && n_region == 3, $sformatf("result counts %0d %0d", n_match, n_region));
    check(exp_mv[1] == 0 && exp_found[1] && !exp_found[2], "stimulus exercises match, object and empty frame");
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
