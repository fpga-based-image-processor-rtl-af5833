// tb_sram_model -- behavioural model of the external asynchronous SRAM
// (one byte per address, W*H bytes) for the testbenches. Read data follows
// the address combinationally; a write happens on the clock edge with we
// high (the image processor drives the SRAM synchronously to its clock).
// Memory starts at zero.
module tb_sram_model #(
  parameter int unsigned DEPTH = 640 * 480,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  input  logic [7:0]    wdata,
  input  logic          we,
  output logic [7:0]    rdata
);
  logic [7:0] mem [DEPTH];

  initial foreach (mem[i]) mem[i] = '0;

  assign rdata = (int'(addr) < DEPTH) ? mem[addr] : '0;

  always @(posedge clk) if (we && int'(addr) < DEPTH) mem[addr] <= wdata;
endmodule
