// drppg: DRAM-based partial product generator for one bit section.
//
// The N-bit slice (one bit of each of the N samples in the delay line) is cut
// into P = N/M groups of M bits; group p addresses the read port of the DRAM
// LUT that holds the coefficient sums of taps pM .. pM+M-1. The P words read
// back are the partial products of this slice with the coefficients; they are
// captured in a register, so the generator delivers a whole slice's partial
// products one cycle after the slice is presented. The LUTs themselves sit
// outside the generator, because two generators share each dual-port LUT.
//
// Interface: slice/tag_in in, lut_raddr out to the LUT read ports, lut_rdata
// back, pp/tag_out registered out. The partial product register only loads
// for valid slices, so it does not toggle while the filter is idle.
module drppg
  import da_fir_pkg::*;
#(
  parameter int unsigned N  = 16,
  parameter int unsigned M  = 2,
  parameter int unsigned DW = 9,
  localparam int unsigned P = N / M
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [N-1:0]          slice,
  input  slice_tag_t            tag_in,
  output logic [P-1:0][M-1:0]   lut_raddr,
  input  logic [P-1:0][DW-1:0]  lut_rdata,
  output logic [P-1:0][DW-1:0]  pp,
  output slice_tag_t            tag_out
);

  initial assert (N % M == 0) else $error("drppg: N must be a multiple of M");

  always_comb begin
    for (int p = 0; p < P; p++) lut_raddr[p] = slice[p*M +: M];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      tag_out <= '0;
      pp      <= '0;
    end else begin
      tag_out <= tag_in;
      if (tag_in.valid) pp <= lut_rdata;
    end
  end

endmodule
