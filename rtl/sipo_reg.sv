// sipo_reg: serial-in parallel-out input register of the DA FIR filter.
//
// It is a delay line of N words: when shift_en is high the new sample x_in
// enters tap 0 and every older sample moves one tap down, so taps[k] holds
// x(n-k). All N words are visible in parallel. From them the register also
// forms the bit-slices the partial product generators need: the L-bit input
// word is cut into Q = L/R sections of R bits, and for section q the slice at
// step r_idx holds, for every tap k, bit (q*R + R-1-r_idx) of taps[k]. The
// slices are therefore produced most significant bit first within each
// section, and all Q sections are produced in the same cycle.
//
// Timing: taps change on the clock edge at which shift_en is high; slice is
// combinational from taps and r_idx. Reset clears the delay line (the filter
// starts from an all-zero history).
//
// The register itself and its place in front of the partial product
// generators follow the filter architecture; the MSB-first slice order and
// the reset to zero are this design's choices.
module sipo_reg
  import da_fir_pkg::*;
#(
  parameter int unsigned N = 16,   // filter taps
  parameter int unsigned L = 8,    // input word length
  parameter int unsigned R = 4,    // bit-slices per section (cycles per sample)
  localparam int unsigned Q  = L / R,
  localparam int unsigned RW = idx_w(R)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  shift_en,
  input  logic [L-1:0]          x_in,
  input  logic [RW-1:0]         r_idx,
  output logic [N-1:0][L-1:0]   taps,
  output logic [Q-1:0][N-1:0]   slice
);

  initial assert (L % R == 0) else $error("sipo_reg: L must be a multiple of R");

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      taps <= '0;
    end else if (shift_en) begin
      taps[0] <= x_in;
      for (int k = 1; k < N; k++) taps[k] <= taps[k-1];
    end
  end

  always_comb begin
    for (int q = 0; q < Q; q++) begin
      for (int k = 0; k < N; k++) begin
        slice[q][k] = taps[k][q*R + (R - 1 - int'(r_idx))];
      end
    end
  end

endmodule
