// shift_accumulator: bit-serial shift accumulator of one bit section.
//
// A section covers R bit positions of the input word. Each cycle it receives
// the sum S_r of the partial products of one bit-slice, most significant bit
// first, and updates
//   acc <= (first ? 0 : 2*acc) + (+/-) S_r
// so after R slices acc = sum_r 2^(R-1-r) * S_r, the section's share of the
// inner product in units of its lowest bit weight. For the section that holds
// the sign bit of the two's complement input (NEG_FIRST = 1) the first slice
// has weight -2^(R-1) and is subtracted. The result is captured in acc_out
// with a one-cycle out_valid pulse on the cycle after the last slice, so a
// new section result is available every R cycles and the next sample's first
// slice may follow the last one directly.
//
// MSB-first order with left shifts (exact integer arithmetic, no rounding) is
// this design's choice; the output grows by R bits over the input.
module shift_accumulator
  import da_fir_pkg::*;
#(
  parameter int unsigned IN_W      = 12,
  parameter int unsigned R         = 4,
  parameter bit          NEG_FIRST = 1'b0,
  localparam int unsigned OUT_W = IN_W + R
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [IN_W-1:0]         s,
  input  slice_tag_t              tag_in,
  output logic signed [OUT_W-1:0] acc_out,
  output logic                    out_valid
);

  logic signed [OUT_W-1:0] acc, term, acc_nxt;

  always_comb begin
    term = OUT_W'($signed(s));
    if (NEG_FIRST && tag_in.first) term = -term;
    acc_nxt = (tag_in.first ? '0 : (acc <<< 1)) + term;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      acc       <= '0;
      acc_out   <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= tag_in.valid && tag_in.last;
      if (tag_in.valid) acc <= acc_nxt;
      if (tag_in.valid && tag_in.last) acc_out <= acc_nxt;
    end
  end

endmodule
