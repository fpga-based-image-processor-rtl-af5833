// tb_comm_if -- self-checking testbench of comm_if with an SRAM model.
//
// Checks the reset values, writes and reads back every setting, writes a
// block of pixels to SRAM through SRAM_ADDR/SRAM_DATA while the frame mode
// is MODE_HOST and reads them back (pointer auto-increment), checks that an
// SRAM access outside MODE_HOST is refused and flagged in STATUS, and that
// matching, region and template-loaded results are captured and counted.
module tb_comm_if;
  import vcc_pkg::*;

  localparam int W = 16;
  localparam int H = 8;
  localparam int N = 4;
  localparam int AW = $clog2(W * H);
  localparam int XW = $clog2(W);
  localparam int YW = $clog2(H);
  localparam int CW = $clog2(4 * N * N + 1);
  localparam int SW = $clog2(4 * BS_N * BS_N + 1);

  logic clk = 0, rst_n = 0;
  logic host_wr = 0, host_rd = 0;
  reg_e host_addr = REG_MODE;
  logic [31:0] host_wdata = 0, host_rdata;
  logic host_rvalid;
  mode_e mode, frame_mode = MODE_RUN;
  logic signed [7:0] th1, th2;
  logic [SW-1:0] sub_th;
  logic [XW-1:0] tmpl_x;
  logic [YW-1:0] tmpl_y;
  logic [AW-1:0] sram_addr;
  logic [7:0] sram_wdata, sram_rdata;
  logic sram_we;
  logic match_valid = 0, region_valid = 0, region_found = 0, tmpl_loaded = 0;
  logic [CW-1:0] match_value = 0;
  logic [XW-1:0] match_x = 0, region_min_x = 0, region_max_x = 0;
  logic [YW-1:0] match_y = 0, region_min_y = 0, region_max_y = 0;

  comm_if #(.W(W), .H(H), .N(N), .CW(CW)) dut (.*);

  tb_sram_model #(.DEPTH(W * H)) u_sram (
    .clk, .addr(sram_addr), .wdata(sram_wdata), .we(sram_we), .rdata(sram_rdata)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // bus cycles are driven from the falling edge
  task automatic wr(input reg_e a, input logic [31:0] d);
    @(negedge clk);
    host_wr = 1; host_addr = a; host_wdata = d;
    @(negedge clk);
    host_wr = 0;
  endtask

  task automatic rd(input reg_e a, output logic [31:0] d);
    @(negedge clk);
    host_rd = 1; host_addr = a;
    @(negedge clk);
    host_rd = 0;
    check(host_rvalid, "read valid one clock after the request");
    d = host_rdata;
  endtask

  initial begin
    logic [31:0] d;
    int pix [10];
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    #1;
    check(mode == MODE_RUN && th1 == 2 && th2 == -2 && tmpl_x == XW'(W / 2 - N / 2) && tmpl_y == YW'(H / 2 - N / 2), "reset values");
    wr(REG_MODE, 32'(MODE_LOAD_TMPL));
    wr(REG_TH1, 32'd7);
    wr(REG_TH2, 32'hF9);            // -7
    wr(REG_SUB_TH, 32'd40);
    wr(REG_TMPL_XY, {16'd3, 16'd9});
    #1;
    check(mode == MODE_LOAD_TMPL && th1 == 7 && th2 == -7 && sub_th == 40 && tmpl_x == 9 && tmpl_y == 3, "settings drive outputs");
    rd(REG_TH2, d);      check(d == 32'hFFFF_FFF9, "TH2 read back sign-extended");
    rd(REG_TMPL_XY, d);  check(d == {16'd3, 16'd9}, "TMPL_XY read back");
    // SRAM block transfer while the host owns the SRAM
    frame_mode = MODE_HOST;
    wr(REG_SRAM_ADDR, 32'd20);
    foreach (pix[i]) begin
      pix[i] = $urandom_range(0, 255);
      wr(REG_SRAM_DATA, 32'(pix[i]));
    end
    foreach (pix[i]) check(u_sram.mem[20 + i] == 8'(pix[i]), $sformatf("SRAM write %0d", i));
    rd(REG_SRAM_ADDR, d); check(d == 30, $sformatf("pointer advanced by 10: %0d", d));
    wr(REG_SRAM_ADDR, 32'd20);
    foreach (pix[i]) begin
      rd(REG_SRAM_DATA, d);
      check(d == 32'(pix[i]), $sformatf("SRAM read %0d", i));
    end
    // access while the camera owns the SRAM
    frame_mode = MODE_RUN;
    wr(REG_SRAM_ADDR, 32'd5);
    wr(REG_SRAM_DATA, 32'hAA);
    check(u_sram.mem[5] == 8'd0, "refused write leaves SRAM alone");
    rd(REG_STATUS, d);   check(d[18] == 1'b1, "refused access flagged");
    wr(REG_STATUS, 0);
    rd(REG_STATUS, d);   check(d[18] == 1'b0, "flag cleared");
    // results
    match_value <= 17; match_x <= 11; match_y <= 6; match_valid <= 1;
    region_found <= 1; region_min_x <= 2; region_max_x <= 13; region_min_y <= 1; region_max_y <= 5;
    region_valid <= 1; tmpl_loaded <= 1;
    @(posedge clk);
    match_valid <= 0; region_valid <= 0; tmpl_loaded <= 0;
    rd(REG_MATCH_VAL, d); check(d == 17, "match value");
    rd(REG_MATCH_XY, d);  check(d == {16'd6, 16'd11}, "match position");
    rd(REG_REGION_X, d);  check(d == {16'd13, 16'd2}, "region x");
    rd(REG_REGION_Y, d);  check(d == {16'd5, 16'd1}, "region y");
    rd(REG_STATUS, d);    check(d[7:0] == 1 && d[15:8] == 1 && d[16] && d[17] && d[20:19] == 2'(MODE_RUN), $sformatf("status %h", d));
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
