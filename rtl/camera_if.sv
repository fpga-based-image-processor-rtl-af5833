// camera_if -- camera interface: takes the camera's pixel stream, stores it
// into the external SRAM or reads the stored image back in step with it.
//
// The document names this block and its connections (camera in, SRAM and the
// input-image encoder out, stored image to the second encoder); the rest is
// this design's choice. The system clock is the camera's pixel clock. A
// pixel is presented with cam_valid; cam_sof marks pixel (0,0) of a frame.
// The SRAM address of pixel (x,y) is y*W + x, kept as a running counter.
//
// The mode register is applied at the start of each frame and held until the
// frame's last pixel; between frames it follows the register at once:
//   MODE_CAPTURE  - each pixel is written to SRAM; the stored stream repeats
//                   the camera pixel;
//   MODE_RUN, MODE_LOAD_TMPL - the SRAM is read at the same address
//                   (asynchronous SRAM, data back in the same clock), giving
//                   the stored image pixel aligned with the camera pixel;
//   MODE_HOST     - the SRAM is left to the host interface (sram_own low);
//                   the stored stream is 0.
// Outputs pix_valid/pix_sof/pix_cam/pix_sto are registered: one clock after
// the camera pixel.
module camera_if
  import vcc_pkg::*;
#(
  parameter int unsigned W  = IMG_W,
  parameter int unsigned H  = IMG_H,
  parameter int unsigned AW = $clog2(W * H)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  mode_e            mode,
  // camera
  input  logic             cam_valid,
  input  logic             cam_sof,
  input  logic [PIX_W-1:0] cam_pix,
  // SRAM
  output logic             sram_own,
  output logic [AW-1:0]    sram_addr,
  output logic [PIX_W-1:0] sram_wdata,
  output logic             sram_we,
  input  logic [PIX_W-1:0] sram_rdata,
  // to the encoders
  output mode_e            frame_mode,
  output logic             pix_valid,
  output logic             pix_sof,
  output logic [PIX_W-1:0] pix_cam,
  output logic [PIX_W-1:0] pix_sto
);
  logic [AW-1:0] addr_cnt, cur_addr;
  logic          in_frame;
  mode_e         held_mode, cur_mode;

  assign cur_addr = cam_sof ? '0 : addr_cnt;
  assign cur_mode = (cam_sof || !in_frame) ? mode : held_mode;
  assign frame_mode = cur_mode;

  logic last;
  assign last = (cur_addr == AW'(W * H - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      addr_cnt  <= '0;
      in_frame  <= 1'b0;
      held_mode <= MODE_RUN;
    end else if (cam_valid) begin
      addr_cnt  <= last ? '0 : cur_addr + 1'b1;
      in_frame  <= !last;
      held_mode <= cur_mode;
    end
  end

  always_comb begin
    sram_own   = (cur_mode != MODE_HOST);
    sram_addr  = cur_addr;
    sram_wdata = cam_pix;
    sram_we    = cam_valid && (cur_mode == MODE_CAPTURE);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pix_valid <= 1'b0;
      pix_sof   <= 1'b0;
      pix_cam   <= '0;
      pix_sto   <= '0;
    end else begin
      pix_valid <= cam_valid;
      pix_sof   <= cam_valid && cam_sof;
      pix_cam   <= cam_pix;
      unique case (cur_mode)
        MODE_CAPTURE: pix_sto <= cam_pix;
        MODE_HOST:    pix_sto <= '0;
        default:      pix_sto <= sram_rdata;
      endcase
    end
  end
endmodule
