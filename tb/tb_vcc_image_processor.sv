// tb_vcc_image_processor -- end-to-end testbench of the whole image processor
// (reduced size: 80x60 frames, 16x16 template, 8x8 subtraction window) with
// a behavioural SRAM and a host that uses the register bus.
//
// Sequence, all through the camera port and the host bus:
//   host fill : MODE_HOST, the host writes scene S (background B with a
//               textured target at the template position) into SRAM and
//               reads some of it back;
//   frame 0   : MODE_LOAD_TMPL, the template is cut from the stored scene;
//   frame 1   : MODE_CAPTURE, background B is stored into SRAM;
//   frame 2   : MODE_RUN, camera sees B with the target moved elsewhere;
//   frame 3   : MODE_RUN with camera stalls (idle clocks), camera sees B;
//               during it the host asks for MODE_HOST (must wait for the end
//               of the frame) and tries an SRAM write (must be refused);
//   frame 4   : MODE_RUN, flushes the results of frame 3.
// The matching result (minimum correlation and its position) and the region
// of frames 2 and 3 are compared with reference models computed from the
// intensity images. Each mechanism is counted and must happen at least once.
module tb_vcc_image_processor;
  import vcc_pkg::*;
  import tb_vcc_ref_pkg::*;

  localparam int W  = 80;
  localparam int H  = 60;
  localparam int TM = 16;
  localparam int BS = 8;
  localparam int TX = 30, TY = 20;     // template position in the scene
  localparam int PX = 50, PY = 33;     // target position in frame 2
  localparam int TH1 = 2, TH2 = -2, SUBTH = 32;
  localparam int AW = $clog2(W * H);

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

  always #20 clk = ~clk;               // 25 MHz pixel clock

  `include "tb_vcc_scenario.svh"
endmodule
