// tb_region_detect -- self-checking testbench of region_detect (reduced
// 20x12 frame).
//
// Four frames of subtraction values with idle clocks in between: a random
// sparse object, a single object pixel, an empty frame (found must be 0)
// and a frame whose object touches all four frame edges. The bounding box
// is compared with the reference after each frame; the result must pulse
// once, one clock after the last value.
module tb_region_detect;
  localparam int W = 20;
  localparam int H = 12;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_sof = 0, in_sub = 0;
  logic res_valid, res_found;
  logic [$clog2(W)-1:0] res_min_x, res_max_x;
  logic [$clog2(H)-1:0] res_min_y, res_max_y;

  region_detect #(.W(W), .H(H)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    bit s [];
    int mnx, mxx, mny, mxy;
    bit fnd;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int f = 0; f < 4; f++) begin
      s = new[W * H];
      foreach (s[i]) s[i] = 0;
      case (f)
        0: for (int y = 3; y < 9; y++) for (int x = 4; x < 15; x++) s[y * W + x] = ($urandom_range(0, 3) == 0);
        1: s[7 * W + 9] = 1;
        2: ;
        3: begin
          s[0 * W + 5] = 1;
          s[(H - 1) * W + 7] = 1;
          s[4 * W + 0] = 1;
          s[6 * W + W - 1] = 1;
        end
      endcase
      mnx = 1 << 30; mxx = -1; mny = 1 << 30; mxy = -1; fnd = 0;
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++)
          if (s[y * W + x]) begin
            fnd = 1;
            if (x < mnx) mnx = x;
            if (x > mxx) mxx = x;
            if (y < mny) mny = y;
            if (y > mxy) mxy = y;
          end
      for (int i = 0; i < W * H; i++) begin
        repeat ($urandom_range(0, 1)) begin
          in_valid <= 0;
          @(posedge clk);
        end
        in_valid <= 1;
        in_sof   <= (i == 0);
        in_sub   <= s[i];
        @(posedge clk);
        check(!res_valid || i == 0, "no result inside a frame");
      end
      in_valid <= 0;
      @(posedge clk);
      check(res_valid && res_found == fnd, $sformatf("frame %0d valid/found", f));
      if (fnd)
        check(int'(res_min_x) == mnx && int'(res_max_x) == mxx && int'(res_min_y) == mny && int'(res_max_y) == mxy,
              $sformatf("frame %0d box x %0d..%0d y %0d..%0d exp x %0d..%0d y %0d..%0d", f,
                        res_min_x, res_max_x, res_min_y, res_max_y, mnx, mxx, mny, mxy));
      @(posedge clk);
      check(!res_valid, "single pulse");
    end
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
