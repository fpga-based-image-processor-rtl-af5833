// vcc_pkg -- shared types and constants of the vector-code-correlation (VCC)
// image processor.
//
// A vector code is 4 bits per pixel: {x code, y code}, each 2 bits, with
// 01 = positive gradient, 10 = negative gradient, 00 = neutral. These codes,
// the 640x480 frame of an 8-bit camera, the 32x32 template and the 8x8
// subtraction window are the document's numbers. The operating modes and the
// register map of the host interface are this design's own choices.
package vcc_pkg;

  // Frame size of the camera (640x480, 8 bits per pixel)
  localparam int unsigned IMG_W = 640;
  localparam int unsigned IMG_H = 480;
  localparam int unsigned PIX_W = 8;

  // Template size for template matching and window size for background
  // subtraction
  localparam int unsigned TM_N = 32;
  localparam int unsigned BS_N = 8;

  typedef logic [3:0] vcode_t;     // {x[1:0], y[1:0]}
  typedef logic [1:0] dcode_t;     // one direction

  localparam dcode_t CODE_POS = 2'b01;
  localparam dcode_t CODE_NEG = 2'b10;
  localparam dcode_t CODE_NEU = 2'b00;

  // Operating mode, selected by the host and applied at the next frame start
  typedef enum logic [1:0] {
    MODE_RUN       = 2'd0,  // process camera frame against stored image
    MODE_CAPTURE   = 2'd1,  // store camera frame into SRAM
    MODE_LOAD_TMPL = 2'd2,  // copy a 32x32 template out of the stored image
    MODE_HOST      = 2'd3   // SRAM belongs to the host interface
  } mode_e;

  // Host register map (word addresses)
  typedef enum logic [3:0] {
    REG_MODE      = 4'd0,
    REG_TH1       = 4'd1,
    REG_TH2       = 4'd2,
    REG_SUB_TH    = 4'd3,
    REG_TMPL_XY   = 4'd4,
    REG_SRAM_ADDR = 4'd5,
    REG_SRAM_DATA = 4'd6,
    REG_MATCH_VAL = 4'd7,
    REG_MATCH_XY  = 4'd8,
    REG_REGION_X  = 4'd9,
    REG_REGION_Y  = 4'd10,
    REG_STATUS    = 4'd11
  } reg_e;

  // Number of ones in a 4-bit XOR result
  function automatic logic [2:0] popcount4(input vcode_t v);
    return 3'(v[0]) + 3'(v[1]) + 3'(v[2]) + 3'(v[3]);
  endfunction

endpackage
