// dram_lut: dual-port distributed-RAM look-up table of one tap group.
//
// A group covers M consecutive taps c[pM] .. c[pM+M-1]. Word a of the table
// holds the sum of the coefficients whose bit is set in a:
//   lut[a] = sum_{j=0}^{M-1} a[j] * c[pM+j]
// so a bit-slice of M input samples used as address yields their partial
// inner product with the coefficients directly. The contents are written from
// outside at run time (that is what makes the filter reconfigurable): one
// write port, synchronous. Two independent asynchronous read ports let two
// partial product generators, working on two different bit sections in the
// same cycle, share one table, which halves the LUT storage of the filter.
//
// Timing: a write on a rising edge is seen by the read ports from the next
// cycle; reads are combinational, as in FPGA distributed RAM. The array has
// no reset: its contents are undefined until written. Being static storage in
// the FPGA fabric, it needs no refresh.
module dram_lut #(
  parameter int unsigned M  = 2,   // address bits = taps per group
  parameter int unsigned DW = 9    // word width (coefficient width + log2 M)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [M-1:0]  waddr,
  input  logic [DW-1:0] wdata,
  input  logic [M-1:0]  raddr_a,
  output logic [DW-1:0] rdata_a,
  input  logic [M-1:0]  raddr_b,
  output logic [DW-1:0] rdata_b
);

  logic [DW-1:0] mem [2**M];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata_a = mem[raddr_a];
  assign rdata_b = mem[raddr_b];

endmodule
