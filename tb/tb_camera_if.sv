// tb_camera_if -- self-checking testbench of camera_if (8x4 frames) with an
// SRAM model.
//
// Frame A in MODE_CAPTURE: every pixel must be written to SRAM at address
// y*W + x and repeated on the stored stream. Frame B in MODE_RUN: nothing is
// written and the stored stream must return frame A, aligned with the camera
// pixel; halfway through frame B the mode register is changed to MODE_HOST,
// which must wait until the frame ends. Between frames the new mode applies
// at once (SRAM released); frame C in MODE_HOST gives a zero stored stream.
module tb_camera_if;
  import vcc_pkg::*;

  localparam int W = 8;
  localparam int H = 4;
  localparam int AW = $clog2(W * H);

  logic clk = 0, rst_n = 0;
  mode_e mode = MODE_CAPTURE;
  logic cam_valid = 0, cam_sof = 0;
  logic [7:0] cam_pix = 0;
  logic sram_own, sram_we;
  logic [AW-1:0] sram_addr;
  logic [7:0] sram_wdata, sram_rdata;
  mode_e frame_mode;
  logic pix_valid, pix_sof;
  logic [7:0] pix_cam, pix_sto;

  camera_if #(.W(W), .H(H)) dut (.*);

  tb_sram_model #(.DEPTH(W * H)) u_sram (
    .clk, .addr(sram_addr), .wdata(sram_wdata), .we(sram_we && sram_own), .rdata(sram_rdata)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  int fa [W * H], fb [W * H];

  task automatic send_frame(input int f, input mode_e m);
    for (int i = 0; i < W * H; i++) begin
      int p;
      p = (f == 0) ? fa[i] : fb[i];
      if (i > 0 && $urandom_range(0, 2) == 0) begin
        cam_valid <= 0;
        @(posedge clk);
      end
      cam_valid <= 1;
      cam_sof   <= (i == 0);
      cam_pix   <= 8'(p);
      if (f == 1 && i == W * H / 2) mode <= MODE_HOST;
      #1;
      check(frame_mode == m, $sformatf("frame %0d pixel %0d mode", f, i));
      check(sram_addr == AW'(i), $sformatf("address %0d", i));
      check(sram_we == (m == MODE_CAPTURE), $sformatf("write enable %0d", i));
      check(sram_own == (m != MODE_HOST), "SRAM owner");
      @(posedge clk);
      #1;
      check(pix_valid && pix_sof == (i == 0) && pix_cam == 8'(p), $sformatf("camera stream %0d", i));
      case (m)
        MODE_CAPTURE: check(pix_sto == 8'(p), $sformatf("stored stream (capture) %0d", i));
        MODE_RUN:     check(pix_sto == 8'(fa[i]), $sformatf("stored stream (run) %0d: %0d vs %0d", i, pix_sto, fa[i]));
        default:      check(pix_sto == 8'd0, "stored stream (host)");
      endcase
    end
    cam_valid <= 0;
    @(posedge clk);
  endtask

  initial begin
    foreach (fa[i]) fa[i] = $urandom_range(0, 255);
    foreach (fb[i]) fb[i] = $urandom_range(0, 255);
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    send_frame(0, MODE_CAPTURE);
    for (int i = 0; i < W * H; i++) check(u_sram.mem[i] == 8'(fa[i]), $sformatf("SRAM word %0d", i));
    mode <= MODE_RUN;
    @(posedge clk);
    send_frame(1, MODE_RUN);
    #1;
    check(frame_mode == MODE_HOST && !sram_own, "mode applies between frames");
    for (int i = 0; i < W * H; i++) check(u_sram.mem[i] == 8'(fa[i]), "SRAM unchanged by run frame");
    send_frame(1, MODE_HOST);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
