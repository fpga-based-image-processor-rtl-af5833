// image_proc_block -- the image processing block in its combined
// configuration: template matching and background subtraction at once.
//
// Both vector-code streams (camera image and stored image, same position at
// the same clock) go to the correlation calculation module and to the
// subtraction module, as the document's combined architecture shows. The
// correlation values go to the comparison module (best match of the frame)
// and the subtraction values to the region detection module (bounding box
// of the object). Both give one result per frame.
//
// Template loading is this design's own: in a frame whose mode is
// MODE_LOAD_TMPL, the codes of the stored image inside the TM x TM square
// whose upper-left code is (tmpl_x, tmpl_y) are shifted, in raster order,
// into the template register SR2 of the correlation module; tmpl_loaded
// pulses when all TM*TM codes are in. The mode is sampled with the code of
// (0,0) and held for the frame. Outside that frame SR2 keeps its contents,
// so the stored image can later be replaced by a background image.
module image_proc_block
  import vcc_pkg::*;
#(
  parameter int unsigned W   = IMG_W,
  parameter int unsigned H   = IMG_H,
  parameter int unsigned TM  = TM_N,
  parameter int unsigned BS  = BS_N,
  parameter int unsigned XW  = $clog2(W),
  parameter int unsigned YW  = $clog2(H),
  parameter int unsigned CW  = $clog2(4 * TM * TM + 1),
  parameter int unsigned SW  = $clog2(4 * BS * BS + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  // vector code streams
  input  logic          c_valid,
  input  logic          c_sof,
  input  logic [XW-1:0] c_x,
  input  logic [YW-1:0] c_y,
  input  vcode_t        c_in,
  input  vcode_t        c_sto,
  // settings
  input  mode_e         mode,
  input  logic [XW-1:0] tmpl_x,
  input  logic [YW-1:0] tmpl_y,
  input  logic [SW-1:0] sub_th,
  // results
  output logic          tmpl_loaded,
  output logic          match_valid,
  output logic [CW-1:0] match_value,
  output logic [XW-1:0] match_x,
  output logic [YW-1:0] match_y,
  output logic          region_valid,
  output logic          region_found,
  output logic [XW-1:0] region_min_x,
  output logic [XW-1:0] region_max_x,
  output logic [YW-1:0] region_min_y,
  output logic [YW-1:0] region_max_y
);
  // ---------------- template loading -----------------------------------
  localparam int unsigned TCW = $clog2(TM * TM + 1);

  logic           load_q, load_on, in_sq, tmpl_shift;
  logic [TCW-1:0] tcount;

  assign load_on    = c_sof ? (mode == MODE_LOAD_TMPL) : load_q;
  assign in_sq      = ({1'b0, c_x} >= {1'b0, tmpl_x}) && ({1'b0, c_x} < {1'b0, tmpl_x} + (XW+1)'(TM)) &&
                      ({1'b0, c_y} >= {1'b0, tmpl_y}) && ({1'b0, c_y} < {1'b0, tmpl_y} + (YW+1)'(TM));
  assign tmpl_shift = c_valid && load_on && in_sq;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      load_q      <= 1'b0;
      tcount      <= '0;
      tmpl_loaded <= 1'b0;
    end else begin
      tmpl_loaded <= 1'b0;
      if (c_valid) begin
        load_q <= load_on;
        if (c_sof) tcount <= TCW'(tmpl_shift);
        else if (tmpl_shift) tcount <= tcount + 1'b1;
        if (tmpl_shift && ((c_sof ? '0 : tcount) == TCW'(TM * TM - 1))) tmpl_loaded <= 1'b1;
      end
    end
  end

  // ---------------- template matching -----------------------------------
  logic          cv, csof;
  logic [CW-1:0] cval;

  corr_calc #(.N(TM), .W(W), .CW(CW)) u_corr (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (c_valid),
    .in_sof    (c_sof),
    .in_code   (c_in),
    .tmpl_shift(tmpl_shift),
    .tmpl_code (c_sto),
    .out_valid (cv),
    .out_sof   (csof),
    .out_value (cval)
  );

  match_compare #(.N(TM), .W(W), .H(H), .CW(CW), .XW(XW), .YW(YW)) u_cmp (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (cv),
    .in_sof   (csof),
    .in_value (cval),
    .res_valid(match_valid),
    .res_value(match_value),
    .res_x    (match_x),
    .res_y    (match_y)
  );

  // ---------------- background subtraction ------------------------------
  logic sv, ssof, sub;

  bg_subtract #(.N(BS), .W(W), .H(H), .CW(SW), .XW(XW), .YW(YW)) u_sub (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (c_valid),
    .in_sof   (c_sof),
    .in_code  (c_in),
    .bg_code  (c_sto),
    .threshold(sub_th),
    .out_valid(sv),
    .out_sof  (ssof),
    .out_sub  (sub)
  );

  region_detect #(.W(W), .H(H), .XW(XW), .YW(YW)) u_region (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (sv),
    .in_sof   (ssof),
    .in_sub   (sub),
    .res_valid(region_valid),
    .res_found(region_found),
    .res_min_x(region_min_x),
    .res_max_x(region_max_x),
    .res_min_y(region_min_y),
    .res_max_y(region_max_y)
  );
endmodule
