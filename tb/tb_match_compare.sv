// tb_match_compare -- self-checking testbench of match_compare (reduced
// frame 12x9, 4x4 windows).
//
// Streams three frames of random correlation values, with idle clocks in
// between, and checks register 4 after each frame against the reference:
// the smallest value over positions whose window lies inside the frame, and
// its first position. Frame 1 puts its minimum at a position outside the
// valid area (must be ignored) and frame 2 repeats its minimum (the first
// occurrence wins). The result must appear one clock after the last value.
module tb_match_compare;
  localparam int N = 4;
  localparam int W = 12;
  localparam int H = 9;
  localparam int CW = $clog2(4 * N * N + 1);

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_sof = 0;
  logic [CW-1:0] in_value = 0;
  logic res_valid;
  logic [CW-1:0] res_value;
  logic [$clog2(W)-1:0] res_x;
  logic [$clog2(H)-1:0] res_y;

  match_compare #(.N(N), .W(W), .H(H)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int nres = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    int v [];
    int bv, bx, by;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int f = 0; f < 3; f++) begin
      v = new[W * H];
      foreach (v[i]) v[i] = $urandom_range(10, 60);
      if (f == 1) v[2 * W + 1] = 0;                 // outside the valid area
      if (f == 2) begin
        v[5 * W + 6] = 3;
        v[7 * W + 4] = 3;
      end
      bv = 1 << 30;
      bx = -1;
      by = -1;
      for (int y = N - 1; y < H; y++)
        for (int x = N - 1; x < W; x++)
          if (v[y * W + x] < bv) begin
            bv = v[y * W + x];
            bx = x;
            by = y;
          end
      for (int i = 0; i < W * H; i++) begin
        if (f > 0) repeat ($urandom_range(0, 2)) begin
          in_valid <= 0;
          @(posedge clk);
        end
        in_valid <= 1;
        in_sof   <= (i == 0);
        in_value <= CW'(v[i]);
        @(posedge clk);
        check(!res_valid || i == 0, "result only after the last value");
      end
      in_valid <= 0;
      @(posedge clk);
      check(res_valid == 1'b1, $sformatf("frame %0d result valid one clock after last value", f));
      check(int'(res_value) == bv && int'(res_x) == bx && int'(res_y) == by,
            $sformatf("frame %0d got %0d at (%0d,%0d) exp %0d at (%0d,%0d)", f, res_value, res_x, res_y, bv, bx, by));
      @(posedge clk);
      check(res_valid == 1'b0, "result valid is a single pulse");
    end
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
