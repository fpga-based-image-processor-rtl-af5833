// Shared body of the end-to-end testbenches of vcc_image_processor. The
// including module declares W, H, TM, BS, TX, TY, PX, PY, TH1, TH2, SUBTH,
// the DUT signals, the DUT, the SRAM model u_sram and the clock.

  int checks = 0, failures = 0;
  longint cycle = 0;

  // mechanism counters
  int n_host_wr = 0, n_capture_wr = 0, n_tmpl = 0, n_match = 0;
  int n_found = 0, n_empty = 0, n_stall = 0, n_held = 0, n_refused = 0;

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n && sram_we && dut.u_cam.sram_own) n_capture_wr++;
    if (rst_n && dut.tmpl_loaded) n_tmpl++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  // host bus cycles, driven from the falling edge
  task automatic wr(input reg_e a, input logic [31:0] d);
    @(negedge clk);
    host_wr = 1; host_addr = 4'(a); host_wdata = d;
    @(negedge clk);
    host_wr = 0;
  endtask

  task automatic rd(input reg_e a, output logic [31:0] d);
    @(negedge clk);
    host_rd = 1; host_addr = 4'(a);
    @(negedge clk);
    host_rd = 0;
    d = host_rdata;
  endtask

  // one camera frame; with stalls, idle clocks are put between pixels. A
  // host action can be scheduled at pixel `act_at`.
  int act_at = -1;
  bit act_done = 0;

  task automatic camera_frame(const ref int img[], input bit stalls);
    for (int i = 0; i < W * H; i++) begin
      @(negedge clk);
      if (stalls && $urandom_range(0, 3) == 0) begin
        cam_valid = 0;
        n_stall++;
        @(negedge clk);
      end
      cam_valid = 1;
      cam_sof   = (i == 0);
      cam_pix   = 8'(img[i]);
      if (i == act_at) begin
        // ask for host mode and try an SRAM write in the middle of a frame
        host_wr = 1; host_addr = 4'(REG_MODE); host_wdata = 32'(MODE_HOST);
        @(negedge clk);
        cam_valid = 0;
        host_wr = 1; host_addr = 4'(REG_SRAM_DATA); host_wdata = 32'h55;
        @(negedge clk);
        host_wr = 0;
        act_done = 1;
      end
      if (act_done && dut.frame_mode == MODE_RUN && dut.mode == MODE_HOST) n_held++;
    end
    @(negedge clk);
    cam_valid = 0;
    cam_sof = 0;
    repeat (4) @(negedge clk);
  endtask

  int bgi [], scene [], c2 [];
  int cb [], cs [], cc2 [], tmpl [];
  int exp_v [2], exp_x [2], exp_y [2];
  bit exp_f [2];
  int exp_box [2][4];

  function automatic void expect_frame(input int k, const ref int ci[], const ref int cbg[]);
    int c;
    exp_v[k] = 1 << 30;
    for (int y = TM - 1; y < H; y++)
      for (int x = TM - 1; x < W; x++) begin
        c = ref_corr(ci, W, tmpl, TM, x, y);
        if (c < exp_v[k]) begin
          exp_v[k] = c; exp_x[k] = x; exp_y[k] = y;
        end
      end
    exp_f[k] = 0;
    exp_box[k] = '{1 << 30, -1, 1 << 30, -1};
    for (int y = BS - 1; y < H; y++)
      for (int x = BS - 1; x < W; x++)
        if (ref_corr2(ci, cbg, W, BS, x, y) >= SUBTH) begin
          exp_f[k] = 1;
          if (x < exp_box[k][0]) exp_box[k][0] = x;
          if (x > exp_box[k][1]) exp_box[k][1] = x;
          if (y < exp_box[k][2]) exp_box[k][2] = y;
          if (y > exp_box[k][3]) exp_box[k][3] = y;
        end
  endfunction

  task automatic check_results(input int k);
    logic [31:0] d;
    rd(REG_MATCH_VAL, d);
    check(int'(d) == exp_v[k], $sformatf("frame %0d match value %0d exp %0d", k + 2, d, exp_v[k]));
    if (int'(d) == exp_v[k]) n_match++;
    rd(REG_MATCH_XY, d);
    check(int'(d[15:0]) == exp_x[k] && int'(d[31:16]) == exp_y[k],
          $sformatf("frame %0d match at (%0d,%0d) exp (%0d,%0d)", k + 2, d[15:0], d[31:16], exp_x[k], exp_y[k]));
    rd(REG_STATUS, d);
    check(d[16] == exp_f[k], $sformatf("frame %0d region found %0d exp %0d", k + 2, d[16], exp_f[k]));
    if (d[16]) n_found++; else n_empty++;
    if (exp_f[k]) begin
      rd(REG_REGION_X, d);
      check(int'(d[15:0]) == exp_box[k][0] && int'(d[31:16]) == exp_box[k][1],
            $sformatf("frame %0d region x %0d..%0d exp %0d..%0d", k + 2, d[15:0], d[31:16], exp_box[k][0], exp_box[k][1]));
      rd(REG_REGION_Y, d);
      check(int'(d[15:0]) == exp_box[k][2] && int'(d[31:16]) == exp_box[k][3],
            $sformatf("frame %0d region y %0d..%0d exp %0d..%0d", k + 2, d[15:0], d[31:16], exp_box[k][2], exp_box[k][3]));
    end
  endtask

  initial begin
    logic [31:0] d;
    int patch [];
    bgi = new[W * H]; scene = new[W * H]; c2 = new[W * H];
    patch = new[(TM + 2) * (TM + 2)];
    // background: smooth ramps with a little texture; target: strong texture
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) bgi[y * W + x] = (x * 3 + y * 2) % 200 + $urandom_range(0, 20);
    foreach (patch[i]) patch[i] = $urandom_range(0, 255);
    foreach (bgi[i]) begin
      scene[i] = bgi[i];
      c2[i] = bgi[i];
    end
    for (int j = 0; j < TM + 2; j++)
      for (int i = 0; i < TM + 2; i++) begin
        scene[(TY - 1 + j) * W + TX - 1 + i] = patch[j * (TM + 2) + i];
        c2[(PY - 1 + j) * W + PX - 1 + i]    = patch[j * (TM + 2) + i];
      end
    ref_encode(bgi, W, H, TH1, TH2, cb);
    ref_encode(scene, W, H, TH1, TH2, cs);
    ref_encode(c2, W, H, TH1, TH2, cc2);
    tmpl = new[TM * TM];
    for (int j = 0; j < TM; j++)
      for (int i = 0; i < TM; i++) tmpl[j * TM + i] = cs[(TY + j) * W + TX + i];
    expect_frame(0, cc2, cb);
    expect_frame(1, cb, cb);
    check(exp_v[0] == 0 && exp_x[0] == PX + TM - 1 && exp_y[0] == PY + TM - 1, "stimulus: target is the unique best match");

    repeat (3) @(negedge clk);
    rst_n = 1;
    wr(REG_TH1, 32'(TH1));
    wr(REG_TH2, 32'(TH2));
    wr(REG_SUB_TH, 32'(SUBTH));
    wr(REG_TMPL_XY, {16'(TY), 16'(TX)});

    // host fill of the SRAM with the scene
    wr(REG_MODE, 32'(MODE_HOST));
    wr(REG_SRAM_ADDR, 0);
    for (int i = 0; i < W * H; i++) begin
      wr(REG_SRAM_DATA, 32'(scene[i]));
      n_host_wr++;
    end
    wr(REG_SRAM_ADDR, 32'(TY * W + TX));
    for (int i = 0; i < 8; i++) begin
      rd(REG_SRAM_DATA, d);
      check(int'(d) == scene[TY * W + TX + i], $sformatf("host SRAM read back %0d", i));
    end

    // frame 0: cut the template out of the stored scene
    wr(REG_MODE, 32'(MODE_LOAD_TMPL));
    camera_frame(bgi, 0);
    // frame 1: capture the background
    wr(REG_MODE, 32'(MODE_CAPTURE));
    camera_frame(bgi, 0);
    begin
      int bad = 0;
      for (int i = 0; i < W * H; i++) if (u_sram.mem[i] != 8'(bgi[i])) bad++;
      check(bad == 0, $sformatf("background captured into SRAM (%0d wrong)", bad));
    end
    rd(REG_STATUS, d);
    check(d[17], "template loaded");
    // frame 2: target moved
    wr(REG_MODE, 32'(MODE_RUN));
    camera_frame(c2, 0);
    // frame 3: background only, with stalls and a mid-frame mode request
    act_at = W * (H / 2);
    camera_frame(bgi, 1);
    act_at = -1;
    check_results(0);
    rd(REG_STATUS, d);
    check(d[18], "SRAM access refused during a run frame");
    if (d[18]) n_refused++;
    check(d[20:19] == 2'(MODE_HOST), "mode request applied after the frame");
    wr(REG_STATUS, 0);
    // frame 4: flush
    wr(REG_MODE, 32'(MODE_RUN));
    camera_frame(bgi, 0);
    check_results(1);

    check(n_host_wr > 0, "mechanism: host SRAM writes");
    check(n_capture_wr == W * H, $sformatf("mechanism: capture writes %0d", n_capture_wr));
    check(n_tmpl == 1, $sformatf("mechanism: template loads %0d", n_tmpl));
    check(n_match == 2, "mechanism: matching results");
    check(n_found == 1 && n_empty == 1, "mechanism: region found and region empty");
    check(n_stall > 0, "mechanism: camera stalls");
    check(n_held > 0, "mechanism: mode request held to the frame end");
    check(n_refused > 0, "mechanism: refused host SRAM access");
    $display("mechanisms: host_wr=%0d capture_wr=%0d tmpl=%0d match=%0d found=%0d empty=%0d stall=%0d held=%0d refused=%0d",
             n_host_wr, n_capture_wr, n_tmpl, n_match, n_found, n_empty, n_stall, n_held, n_refused);
    $display("cycles: %0d", cycle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (16 * W * H + 20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
