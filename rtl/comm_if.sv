// comm_if -- communication interface between the image processor and the
// microprocessor (host).
//
// The document names this block and its job: images sent by the host are
// stored to the SRAM, and the matching and region results go back to the
// host. Its register map and bus are this design's own: a simple
// synchronous register bus, 16 word addresses of 32 bits (vcc_pkg::reg_e):
//   MODE       [1:0]  operating mode (mode_e), reset MODE_RUN
//   TH1, TH2   [7:0]  signed gradient thresholds of the encoders (reset +2, -2)
//   SUB_TH            threshold of the subtraction comparator (reset SUB_TH0)
//   TMPL_XY           upper-left corner of the template cut from the stored
//                     image: x in [15:0], y in [31:16] (reset: frame centre)
//   SRAM_ADDR         SRAM pointer for host transfers
//   SRAM_DATA  [7:0]  write: store a pixel at the pointer; read: fetch the
//                     pixel there; either way the pointer then increments.
//                     Only allowed while the frame mode is MODE_HOST;
//                     otherwise the access is dropped and STATUS[18] set.
//   MATCH_VAL, MATCH_XY        last template-matching result
//   REGION_X, REGION_Y         last region (min in [15:0], max in [31:16])
//   STATUS     [7:0] matching results seen, [15:8] regions seen,
//              [16] last region found an object, [17] template loaded,
//              [18] refused SRAM access (cleared by writing STATUS),
//              [20:19] mode of the current frame
// A write takes effect on the clock edge with host_wr high. A read with
// host_rd high returns host_rdata with host_rvalid on the next clock.
module comm_if
  import vcc_pkg::*;
#(
  parameter int unsigned W       = IMG_W,
  parameter int unsigned H       = IMG_H,
  parameter int unsigned N       = TM_N,
  parameter int unsigned AW      = $clog2(W * H),
  parameter int unsigned XW      = $clog2(W),
  parameter int unsigned YW      = $clog2(H),
  parameter int unsigned CW      = $clog2(4 * TM_N * TM_N + 1),
  parameter int unsigned SW      = $clog2(4 * BS_N * BS_N + 1),
  parameter int unsigned SUB_TH0 = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  // host bus
  input  logic             host_wr,
  input  logic             host_rd,
  input  reg_e             host_addr,
  input  logic [31:0]      host_wdata,
  output logic [31:0]      host_rdata,
  output logic             host_rvalid,
  // settings
  output mode_e            mode,
  output logic signed [7:0] th1,
  output logic signed [7:0] th2,
  output logic [SW-1:0]    sub_th,
  output logic [XW-1:0]    tmpl_x,
  output logic [YW-1:0]    tmpl_y,
  // SRAM port used while the host owns the SRAM
  input  mode_e            frame_mode,
  output logic [AW-1:0]    sram_addr,
  output logic [PIX_W-1:0] sram_wdata,
  output logic             sram_we,
  input  logic [PIX_W-1:0] sram_rdata,
  // results
  input  logic             match_valid,
  input  logic [CW-1:0]    match_value,
  input  logic [XW-1:0]    match_x,
  input  logic [YW-1:0]    match_y,
  input  logic             region_valid,
  input  logic             region_found,
  input  logic [XW-1:0]    region_min_x,
  input  logic [XW-1:0]    region_max_x,
  input  logic [YW-1:0]    region_min_y,
  input  logic [YW-1:0]    region_max_y,
  input  logic             tmpl_loaded
);
  logic [AW-1:0] ptr;
  logic [7:0]    n_match, n_region;
  logic          found_q, tmpl_q, refused;
  logic [CW-1:0] m_val;
  logic [XW-1:0] m_x, r_minx, r_maxx;
  logic [YW-1:0] m_y, r_miny, r_maxy;

  logic host_owns, data_acc;
  assign host_owns = (frame_mode == MODE_HOST);
  assign data_acc  = (host_wr || host_rd) && (host_addr == REG_SRAM_DATA);

  assign sram_addr  = ptr;
  assign sram_wdata = host_wdata[PIX_W-1:0];
  assign sram_we    = host_wr && (host_addr == REG_SRAM_DATA) && host_owns;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mode     <= MODE_RUN;
      th1      <= 8'sd2;
      th2      <= -8'sd2;
      sub_th   <= SW'(SUB_TH0);
      tmpl_x   <= XW'(W / 2 - N / 2);
      tmpl_y   <= YW'(H / 2 - N / 2);
      ptr      <= '0;
      refused  <= 1'b0;
      n_match  <= '0;
      n_region <= '0;
      found_q  <= 1'b0;
      tmpl_q   <= 1'b0;
      m_val    <= '0;
      m_x      <= '0;
      m_y      <= '0;
      r_minx   <= '0;
      r_maxx   <= '0;
      r_miny   <= '0;
      r_maxy   <= '0;
    end else begin
      if (host_wr) begin
        unique case (host_addr)
          REG_MODE:      mode   <= mode_e'(host_wdata[1:0]);
          REG_TH1:       th1    <= host_wdata[7:0];
          REG_TH2:       th2    <= host_wdata[7:0];
          REG_SUB_TH:    sub_th <= host_wdata[SW-1:0];
          REG_TMPL_XY: begin
            tmpl_x <= host_wdata[XW-1:0];
            tmpl_y <= host_wdata[16 +: YW];
          end
          REG_SRAM_ADDR: ptr    <= host_wdata[AW-1:0];
          REG_STATUS:    refused <= 1'b0;
          default: ;
        endcase
      end
      if (data_acc) begin
        if (host_owns) ptr <= ptr + 1'b1;
        else           refused <= 1'b1;
      end
      if (match_valid) begin
        n_match <= n_match + 1'b1;
        m_val   <= match_value;
        m_x     <= match_x;
        m_y     <= match_y;
      end
      if (region_valid) begin
        n_region <= n_region + 1'b1;
        found_q  <= region_found;
        r_minx   <= region_min_x;
        r_maxx   <= region_max_x;
        r_miny   <= region_min_y;
        r_maxy   <= region_max_y;
      end
      if (tmpl_loaded) tmpl_q <= 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      host_rdata  <= '0;
      host_rvalid <= 1'b0;
    end else begin
      host_rvalid <= host_rd;
      if (host_rd) begin
        unique case (host_addr)
          REG_MODE:      host_rdata <= 32'(mode);
          REG_TH1:       host_rdata <= 32'(th1);
          REG_TH2:       host_rdata <= 32'(th2);
          REG_SUB_TH:    host_rdata <= 32'(sub_th);
          REG_TMPL_XY:   host_rdata <= {16'(tmpl_y), 16'(tmpl_x)};
          REG_SRAM_ADDR: host_rdata <= 32'(ptr);
          REG_SRAM_DATA: host_rdata <= host_owns ? 32'(sram_rdata) : '0;
          REG_MATCH_VAL: host_rdata <= 32'(m_val);
          REG_MATCH_XY:  host_rdata <= {16'(m_y), 16'(m_x)};
          REG_REGION_X:  host_rdata <= {16'(r_maxx), 16'(r_minx)};
          REG_REGION_Y:  host_rdata <= {16'(r_maxy), 16'(r_miny)};
          REG_STATUS:    host_rdata <= {11'd0, frame_mode, refused, tmpl_q, found_q,
                                        n_region, n_match};
          default:       host_rdata <= '0;
        endcase
      end
    end
  end
endmodule
