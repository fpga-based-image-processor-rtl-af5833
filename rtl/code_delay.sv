// code_delay -- FIFO delay line for vector codes: the row FIFO that links two
// rows of a shift-register window.
//
// It behaves exactly like a chain of DEPTH registers that all shift when `en`
// is high: after an enabled clock, q holds the value d had DEPTH enabled
// clocks earlier (counting the current one as the first). It is built, as an
// FPGA would build a long FIFO, from a RAM of DEPTH-1 words read and written
// at one circulating address, followed by an output register. DEPTH >= 2.
// The word width and the RAM style are this design's choices.
module code_delay #(
  parameter int unsigned DEPTH = 608,
  parameter int unsigned DW    = 4
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,
  input  logic [DW-1:0] d,
  output logic [DW-1:0] q
);
  localparam int unsigned N  = DEPTH - 1;
  localparam int unsigned AW = (N > 1) ? $clog2(N) : 1;

  logic [DW-1:0] mem [N];
  logic [AW-1:0] ptr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ptr <= '0;
    else if (en) ptr <= (ptr == AW'(N - 1)) ? '0 : ptr + 1'b1;
  end

  always_ff @(posedge clk) begin
    if (en) begin
      q        <= mem[ptr];
      mem[ptr] <= d;
    end
  end

  initial assert (DEPTH >= 2) else $error("code_delay: DEPTH must be at least 2");
endmodule
