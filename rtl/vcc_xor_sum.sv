// vcc_xor_sum -- the XOR operators, the RR register and the SUM operators
// shared by the correlation calculation and subtraction modules.
//
// Each clock, NUM pairs of 4-bit vector codes are XORed into the RR
// register; the number of ones in RR (the correlation value, 0..4*NUM) is
// then summed by a binary adder tree with one register per level. The
// result for the inputs of one clock appears LAT = 1 + log2(NUM) clocks
// later, together with the in_valid and in_tag given with those inputs.
// The document does not say how the SUM operators are pipelined; one
// register per tree level is this design's choice. NUM must be a power of 2.
module vcc_xor_sum
  import vcc_pkg::*;
#(
  parameter int unsigned NUM   = TM_N * TM_N,
  parameter int unsigned TAG_W = 1,
  parameter int unsigned SW    = $clog2(4 * NUM + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [TAG_W-1:0] in_tag,
  input  vcode_t           a [NUM],
  input  vcode_t           b [NUM],
  output logic             out_valid,
  output logic [TAG_W-1:0] out_tag,
  output logic [SW-1:0]    out_sum
);
  localparam int unsigned LEVELS = $clog2(NUM);
  localparam int unsigned LAT    = 1 + LEVELS;

  vcode_t rr [NUM];

  always_ff @(posedge clk) begin
    for (int i = 0; i < NUM; i++) rr[i] <= a[i] ^ b[i];
  end

  for (genvar l = 0; l <= LEVELS; l++) begin : lv
    logic [SW-1:0] s [NUM >> l];
    if (l == 0) begin : g_pop
      always_comb begin
        for (int i = 0; i < NUM; i++) s[i] = SW'(popcount4(rr[i]));
      end
    end else begin : g_add
      always_ff @(posedge clk) begin
        for (int i = 0; i < (NUM >> l); i++) s[i] <= lv[l-1].s[2*i] + lv[l-1].s[2*i+1];
      end
    end
  end

  assign out_sum = lv[LEVELS].s[0];

  // valid and tag travel alongside the data
  logic             vpipe [LAT];
  logic [TAG_W-1:0] tpipe [LAT];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < LAT; i++) begin
        vpipe[i] <= 1'b0;
        tpipe[i] <= '0;
      end
    end else begin
      vpipe[0] <= in_valid;
      tpipe[0] <= in_tag;
      for (int i = 1; i < LAT; i++) begin
        vpipe[i] <= vpipe[i-1];
        tpipe[i] <= tpipe[i-1];
      end
    end
  end

  assign out_valid = vpipe[LAT-1];
  assign out_tag   = tpipe[LAT-1];

  initial assert (NUM == (1 << LEVELS)) else $error("vcc_xor_sum: NUM must be a power of 2");
endmodule
