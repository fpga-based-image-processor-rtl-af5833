// tb_vcc_tracking -- target-tracking workload on the whole image processor
// (reduced size: 96x64 frames, 16x16 template, 8x8 subtraction window).
//
// After the template has been cut from a stored scene and the background
// captured, the camera sends a run of frames in which a textured target
// stands still, moves left in stages, moves right and stops again, as in a
// stage-driven tracking experiment. For every frame the reported best match
// must be the target's position (lower-right corner of the 16x16 patch) with
// correlation 0, and the region must equal the reference bounding box. The
// results of frame k are read while frame k+1 is being sent.
module tb_vcc_tracking;
  import vcc_pkg::*;
  import tb_vcc_ref_pkg::*;

  localparam int W = 96, H = 64, TM = 16, BS = 8;
  localparam int TX = 40, TY = 24;
  localparam int NRUN = 7;
  localparam int TH1 = 2, TH2 = -2, SUBTH = 32;
  localparam int AW = $clog2(W * H);
  localparam int XS [NRUN] = '{40, 40, 33, 26, 38, 52, 52};
  localparam int YS [NRUN] = '{24, 24, 25, 24, 23, 24, 24};

  logic clk = 0, rst_n = 0;
  logic cam_valid = 0, cam_sof = 0;
  logic [7:0] cam_pix = 0;
  logic [AW-1:0] sram_addr;
  logic [7:0] sram_wdata, sram_rdata;
  logic sram_we;
  logic host_wr = 0, host_rd = 0;
  logic [3:0] host_addr = 0;
  logic [31:0] host_wdata = 0, host_rdata;
  logic host_rvalid, frame_done;

  vcc_image_processor #(.W(W), .H(H), .TM(TM), .BS(BS)) dut (.*);

  tb_sram_model #(.DEPTH(W * H)) u_sram (
    .clk, .addr(sram_addr), .wdata(sram_wdata), .we(sram_we), .rdata(sram_rdata)
  );

  always #20 clk = ~clk;

  int checks = 0, failures = 0, n_frame_done = 0;

  always @(posedge clk) if (rst_n && frame_done) n_frame_done++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

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

  task automatic camera_frame(input int img[]);
    for (int i = 0; i < W * H; i++) begin
      @(negedge clk);
      cam_valid = 1;
      cam_sof   = (i == 0);
      cam_pix   = 8'(img[i]);
    end
    @(negedge clk);
    cam_valid = 0;
    cam_sof = 0;
    repeat (4) @(negedge clk);
  endtask

  int bgi [], patch [];
  int cb [], tmpl [];
  int frames [NRUN][];
  int ev [NRUN], ex [NRUN], ey [NRUN];
  int box [NRUN][4];

  // paste the target with its upper-left template pixel at (x, y)
  function automatic void paste(output int img[], input int bg[], input int pt[], input int x, input int y);
    img = new[W * H](bg);
    for (int j = 0; j < TM + 2; j++)
      for (int i = 0; i < TM + 2; i++) img[(y - 1 + j) * W + x - 1 + i] = pt[j * (TM + 2) + i];
  endfunction

  task automatic check_frame(input int k);
    logic [31:0] d;
    rd(REG_MATCH_VAL, d);
    check(int'(d) == ev[k], $sformatf("frame %0d value %0d exp %0d", k, d, ev[k]));
    rd(REG_MATCH_XY, d);
    check(int'(d[15:0]) == ex[k] && int'(d[31:16]) == ey[k],
          $sformatf("frame %0d match (%0d,%0d) exp (%0d,%0d)", k, d[15:0], d[31:16], ex[k], ey[k]));
    rd(REG_REGION_X, d);
    check(int'(d[15:0]) == box[k][0] && int'(d[31:16]) == box[k][1], $sformatf("frame %0d region x", k));
    rd(REG_REGION_Y, d);
    check(int'(d[15:0]) == box[k][2] && int'(d[31:16]) == box[k][3], $sformatf("frame %0d region y", k));
  endtask

  initial begin
    int scene [], cf [];
    int c;
    bgi = new[W * H];
    patch = new[(TM + 2) * (TM + 2)];
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) bgi[y * W + x] = (x * 2 + y * 3) % 180 + $urandom_range(0, 24);
    foreach (patch[i]) patch[i] = $urandom_range(0, 255);
    paste(scene, bgi, patch, TX, TY);
    ref_encode(bgi, W, H, TH1, TH2, cb);
    ref_encode(scene, W, H, TH1, TH2, cf);
    tmpl = new[TM * TM];
    for (int j = 0; j < TM; j++)
      for (int i = 0; i < TM; i++) tmpl[j * TM + i] = cf[(TY + j) * W + TX + i];
    for (int k = 0; k < NRUN; k++) begin
      paste(frames[k], bgi, patch, XS[k], YS[k]);
      ref_encode(frames[k], W, H, TH1, TH2, cf);
      ev[k] = 1 << 30;
      for (int y = TM - 1; y < H; y++)
        for (int x = TM - 1; x < W; x++) begin
          c = ref_corr(cf, W, tmpl, TM, x, y);
          if (c < ev[k]) begin ev[k] = c; ex[k] = x; ey[k] = y; end
        end
      check(ev[k] == 0 && ex[k] == XS[k] + TM - 1 && ey[k] == YS[k] + TM - 1, $sformatf("stimulus frame %0d", k));
      box[k] = '{1 << 30, -1, 1 << 30, -1};
      for (int y = BS - 1; y < H; y++)
        for (int x = BS - 1; x < W; x++)
          if (ref_corr2(cf, cb, W, BS, x, y) >= SUBTH) begin
            if (x < box[k][0]) box[k][0] = x;
            if (x > box[k][1]) box[k][1] = x;
            if (y < box[k][2]) box[k][2] = y;
            if (y > box[k][3]) box[k][3] = y;
          end
    end

    repeat (3) @(negedge clk);
    rst_n = 1;
    wr(REG_SUB_TH, 32'(SUBTH));
    wr(REG_TMPL_XY, {16'(TY), 16'(TX)});
    wr(REG_MODE, 32'(MODE_HOST));
    wr(REG_SRAM_ADDR, 0);
    for (int i = 0; i < W * H; i++) wr(REG_SRAM_DATA, 32'(scene[i]));
    wr(REG_MODE, 32'(MODE_LOAD_TMPL));
    camera_frame(bgi);
    wr(REG_MODE, 32'(MODE_CAPTURE));
    camera_frame(bgi);
    wr(REG_MODE, 32'(MODE_RUN));
    for (int k = 0; k < NRUN; k++) begin
      camera_frame(frames[k]);
      if (k > 0) check_frame(k - 1);
    end
    camera_frame(bgi);
    check_frame(NRUN - 1);
    // ten frames were sent; the last one's result needs a further frame
    check(n_frame_done == NRUN + 2, $sformatf("one result per frame (%0d)", n_frame_done));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (14 * W * H + 20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
