// vcc_image_processor -- top level of the VCC image processor for a sensor
// node: a camera interface, two vector-code encoders (camera image and
// stored image), the combined image processing block (template matching and
// background subtraction with region detection) and the host communication
// interface, around an external asynchronous SRAM that holds one frame.
//
// Data flow (as the document draws it): camera -> camera interface -> SRAM
// and encoder 1; SRAM -> encoder 2; both code streams -> image processing
// block -> results -> host. Everything runs on the camera's pixel clock, one
// pixel per clock, so a frame is processed at the camera's frame rate.
//
// Ports (this design's choices): cam_valid/cam_sof/cam_pix from the camera;
// sram_* to an asynchronous SRAM of W*H bytes, whose read data must be
// valid in the same clock as the address; host_* register bus (see comm_if);
// frame_done pulses when a new matching result is available.
//
// Latency: the code of pixel (x,y) leaves the encoders two rows and four
// clocks after the pixel enters; the matching and region results of a frame
// follow its last code by a few clocks (log2 of the window size plus 3), so
// they appear while the camera sends the third row of the next frame. The
// camera is therefore expected to keep sending frames; after its last frame
// two more rows are needed to flush the results.
module vcc_image_processor
  import vcc_pkg::*;
#(
  parameter int unsigned W  = IMG_W,
  parameter int unsigned H  = IMG_H,
  parameter int unsigned TM = TM_N,
  parameter int unsigned BS = BS_N
) (
  input  logic             clk,
  input  logic             rst_n,
  // camera
  input  logic             cam_valid,
  input  logic             cam_sof,
  input  logic [PIX_W-1:0] cam_pix,
  // external SRAM
  output logic [$clog2(W*H)-1:0] sram_addr,
  output logic [PIX_W-1:0] sram_wdata,
  output logic             sram_we,
  input  logic [PIX_W-1:0] sram_rdata,
  // host
  input  logic             host_wr,
  input  logic             host_rd,
  input  logic [3:0]       host_addr,
  input  logic [31:0]      host_wdata,
  output logic [31:0]      host_rdata,
  output logic             host_rvalid,
  output logic             frame_done
);
  localparam int unsigned AW = $clog2(W * H);
  localparam int unsigned XW = $clog2(W);
  localparam int unsigned YW = $clog2(H);
  localparam int unsigned CW = $clog2(4 * TM * TM + 1);
  localparam int unsigned SW = $clog2(4 * BS * BS + 1);

  mode_e             mode, frame_mode;
  logic signed [7:0] th1, th2;
  logic [SW-1:0]     sub_th;
  logic [XW-1:0]     tmpl_x;
  logic [YW-1:0]     tmpl_y;

  // ---------------- camera interface and SRAM sharing --------------------
  logic             cam_own, cam_we, host_we;
  logic [AW-1:0]    cam_addr, host_sram_addr;
  logic [PIX_W-1:0] cam_wdata, host_sram_wdata;
  logic             pv, psof;
  logic [PIX_W-1:0] pcam, psto;

  camera_if #(.W(W), .H(H), .AW(AW)) u_cam (
    .clk       (clk),
    .rst_n     (rst_n),
    .mode      (mode),
    .cam_valid (cam_valid),
    .cam_sof   (cam_sof),
    .cam_pix   (cam_pix),
    .sram_own  (cam_own),
    .sram_addr (cam_addr),
    .sram_wdata(cam_wdata),
    .sram_we   (cam_we),
    .sram_rdata(sram_rdata),
    .frame_mode(frame_mode),
    .pix_valid (pv),
    .pix_sof   (psof),
    .pix_cam   (pcam),
    .pix_sto   (psto)
  );

  always_comb begin
    sram_addr  = cam_own ? cam_addr  : host_sram_addr;
    sram_wdata = cam_own ? cam_wdata : host_sram_wdata;
    sram_we    = cam_own ? cam_we    : host_we;
  end

  // ---------------- encoders ----------------------------------------------
  logic          e1_v, e1_sof, e2_v, e2_sof;
  logic [XW-1:0] e1_x, e2_x;
  logic [YW-1:0] e1_y, e2_y;
  vcode_t        e1_code, e2_code;

  vcc_encoder #(.W(W), .H(H), .XW(XW), .YW(YW)) u_enc_in (
    .clk(clk), .rst_n(rst_n),
    .in_valid(pv), .in_sof(psof), .in_pix(pcam), .th1(th1), .th2(th2),
    .out_valid(e1_v), .out_sof(e1_sof), .out_x(e1_x), .out_y(e1_y), .out_code(e1_code)
  );

  vcc_encoder #(.W(W), .H(H), .XW(XW), .YW(YW)) u_enc_sto (
    .clk(clk), .rst_n(rst_n),
    .in_valid(pv), .in_sof(psof), .in_pix(psto), .th1(th1), .th2(th2),
    .out_valid(e2_v), .out_sof(e2_sof), .out_x(e2_x), .out_y(e2_y), .out_code(e2_code)
  );

  // both encoders see the same timing, so their streams stay aligned
  property p_aligned;
    @(posedge clk) disable iff (!rst_n)
      (e1_v == e2_v) && (e1_sof == e2_sof) && (!e1_v || (e1_x == e2_x && e1_y == e2_y));
  endproperty
  a_aligned: assert property (p_aligned);

  // ---------------- image processing block --------------------------------
  logic          tmpl_loaded, match_valid, region_valid, region_found;
  logic [CW-1:0] match_value;
  logic [XW-1:0] match_x, rmin_x, rmax_x;
  logic [YW-1:0] match_y, rmin_y, rmax_y;

  image_proc_block #(.W(W), .H(H), .TM(TM), .BS(BS), .XW(XW), .YW(YW), .CW(CW), .SW(SW)) u_ipb (
    .clk         (clk),
    .rst_n       (rst_n),
    .c_valid     (e1_v),
    .c_sof       (e1_sof),
    .c_x         (e1_x),
    .c_y         (e1_y),
    .c_in        (e1_code),
    .c_sto       (e2_code),
    .mode        (frame_mode),
    .tmpl_x      (tmpl_x),
    .tmpl_y      (tmpl_y),
    .sub_th      (sub_th),
    .tmpl_loaded (tmpl_loaded),
    .match_valid (match_valid),
    .match_value (match_value),
    .match_x     (match_x),
    .match_y     (match_y),
    .region_valid(region_valid),
    .region_found(region_found),
    .region_min_x(rmin_x),
    .region_max_x(rmax_x),
    .region_min_y(rmin_y),
    .region_max_y(rmax_y)
  );

  assign frame_done = match_valid;

  // ---------------- communication interface -------------------------------
  comm_if #(.W(W), .H(H), .N(TM), .AW(AW), .XW(XW), .YW(YW), .CW(CW), .SW(SW)) u_comm (
    .clk         (clk),
    .rst_n       (rst_n),
    .host_wr     (host_wr),
    .host_rd     (host_rd),
    .host_addr   (reg_e'(host_addr)),
    .host_wdata  (host_wdata),
    .host_rdata  (host_rdata),
    .host_rvalid (host_rvalid),
    .mode        (mode),
    .th1         (th1),
    .th2         (th2),
    .sub_th      (sub_th),
    .tmpl_x      (tmpl_x),
    .tmpl_y      (tmpl_y),
    .frame_mode  (frame_mode),
    .sram_addr   (host_sram_addr),
    .sram_wdata  (host_sram_wdata),
    .sram_we     (host_we),
    .sram_rdata  (sram_rdata),
    .match_valid (match_valid),
    .match_value (match_value),
    .match_x     (match_x),
    .match_y     (match_y),
    .region_valid(region_valid),
    .region_found(region_found),
    .region_min_x(rmin_x),
    .region_max_x(rmax_x),
    .region_min_y(rmin_y),
    .region_max_y(rmax_y),
    .tmpl_loaded (tmpl_loaded)
  );
endmodule
