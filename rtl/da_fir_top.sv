// da_fir_top: distributed-arithmetic (DA) FIR filter with run-time
// reconfigurable coefficients.
//
//   y(n) = sum_{k=0}^{N-1} c[k] * x(n-k)
//
// No multiplier is used. The N taps are split into P = N/M groups of M taps;
// for each group a 2^M-word LUT holds every possible sum of its M
// coefficients. The L-bit input word is split into Q = L/R sections of R bits.
// Per clock cycle, each section takes one bit position of all N samples in the
// input register (a bit-slice), looks the P group addresses up in the LUTs
// (partial product generator, DRPPG), sums the P partial products in a
// pipelined adder tree (PAT) and feeds a shift accumulator. After R cycles
// each section holds its part of the inner product, and the pipelined
// shift-adder tree (PSAT) combines the Q parts with weights 2^(qR):
//
//   y = sum_q 2^(qR) sum_r 2^(R-1-r) sum_p LUT_p[slice bits of group p]
//
// (with the sign bit's slice subtracted). One sample is accepted, and one
// output produced, every R cycles, so the input rate is f_clk/R. Each LUT is a
// dual-port RAM read by two sections at once; the Q sections therefore need
// only ceil(Q/2) copies of the LUT set.
//
// Reconfiguration: lut_we writes word lut_waddr of the LUT of group
// lut_wgroup (in every LUT copy). The word must be
//   sum_{j=0}^{M-1} lut_waddr[j] * c[lut_wgroup*M + j]
// (a W-bit signed coefficient sum, sign-extended to DW bits). A write is seen
// by slices read from the next cycle on, so a coefficient change should be
// written while no sample is in its R slice cycles (x_ready high with no
// x_valid), or the sample in flight mixes old and new coefficients. The input
// history is kept across a reconfiguration.
//
// Latency: a sample accepted in cycle t gives y_valid in cycle
// t + R + 2 + ceil(log2 P) + ceil(log2 Q) (10 cycles with the defaults).
//
// The architecture (SIPO register, DRPPG, shared dual-port LUTs, PAT, shift
// accumulators, PSAT) and R = 4, M = 2 follow the filter's description. N, L,
// W, the valid/ready input handshake, the MSB-first slice order, the LUT write
// port and the output width are this design's choices.
module da_fir_top
  import da_fir_pkg::*;
#(
  parameter int unsigned N = 16,   // taps
  parameter int unsigned L = 8,    // input word length
  parameter int unsigned W = 8,    // coefficient word length
  parameter int unsigned M = 2,    // taps per LUT (LUT has 2^M words)
  parameter int unsigned R = 4,    // bits per section = cycles per sample
  localparam int unsigned P   = N / M,
  localparam int unsigned Q   = L / R,
  localparam int unsigned NB  = (Q + 1) / 2,        // dual-port LUT copies
  localparam int unsigned DW  = W + grow_w(M),      // LUT word
  localparam int unsigned PW  = DW + grow_w(P),     // PAT output
  localparam int unsigned AW  = PW + R,             // section result
  localparam int unsigned SW  = AW + (Q - 1) * R + 1 + grow_w(Q), // PSAT output
  localparam int unsigned YW  = W + L + grow_w(N),  // filter output
  localparam int unsigned GW  = idx_w(P)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // input samples
  input  logic                 x_valid,
  output logic                 x_ready,
  input  logic [L-1:0]         x_in,
  // LUT (coefficient) writes
  input  logic                 lut_we,
  input  logic [GW-1:0]        lut_wgroup,
  input  logic [M-1:0]         lut_waddr,
  input  logic [DW-1:0]        lut_wdata,
  // filter output
  output logic                 y_valid,
  output logic signed [YW-1:0] y_out
);

  initial begin
    assert (N % M == 0) else $error("da_fir_top: N must be a multiple of M");
    assert (L % R == 0) else $error("da_fir_top: L must be a multiple of R");
    assert (SW >= YW)   else $error("da_fir_top: output wider than datapath");
  end

  // ---------------------------------------------------------------- control
  logic                 shift_en;
  logic [idx_w(R)-1:0]  r_idx;
  slice_tag_t           tag_s;

  da_fir_ctrl #(.R(R)) u_ctrl (
    .clk      (clk),
    .rst_n    (rst_n),
    .x_valid  (x_valid),
    .x_ready  (x_ready),
    .shift_en (shift_en),
    .r_idx    (r_idx),
    .tag      (tag_s)
  );

  // ------------------------------------------------------- input register
  logic [N-1:0][L-1:0] taps;
  logic [Q-1:0][N-1:0] slice;

  sipo_reg #(.N(N), .L(L), .R(R)) u_sipo (
    .clk      (clk),
    .rst_n    (rst_n),
    .shift_en (shift_en),
    .x_in     (x_in),
    .r_idx    (r_idx),
    .taps     (taps),
    .slice    (slice)
  );

  // ------------------------------------------------ shared dual-port LUTs
  logic [Q-1:0][P-1:0][M-1:0]  lut_raddr;
  logic [Q-1:0][P-1:0][DW-1:0] lut_rdata;

  for (genvar b = 0; b < NB; b++) begin : g_bank
    for (genvar p = 0; p < P; p++) begin : g_grp
      logic we_p;
      assign we_p = lut_we && (int'(lut_wgroup) == p);
      if (2 * b + 1 < Q) begin : g_pair
        dram_lut #(.M(M), .DW(DW)) u_lut (
          .clk     (clk),
          .we      (we_p),
          .waddr   (lut_waddr),
          .wdata   (lut_wdata),
          .raddr_a (lut_raddr[2*b][p]),
          .rdata_a (lut_rdata[2*b][p]),
          .raddr_b (lut_raddr[2*b+1][p]),
          .rdata_b (lut_rdata[2*b+1][p])
        );
      end else begin : g_single
        // Odd Q: the last section has a LUT copy to itself; port b unused.
        logic [DW-1:0] rdata_unused;
        dram_lut #(.M(M), .DW(DW)) u_lut (
          .clk     (clk),
          .we      (we_p),
          .waddr   (lut_waddr),
          .wdata   (lut_wdata),
          .raddr_a (lut_raddr[2*b][p]),
          .rdata_a (lut_rdata[2*b][p]),
          .raddr_b ('0),
          .rdata_b (rdata_unused)
        );
      end
    end
  end

  // ------------------------------------------------------- bit sections
  logic [Q-1:0][AW-1:0] sec_acc;
  logic [Q-1:0]         sec_valid;

  for (genvar q = 0; q < Q; q++) begin : g_sec
    logic [P-1:0][DW-1:0] pp;
    slice_tag_t           tag_pp, tag_sum;
    logic signed [PW-1:0] slice_sum;
    logic signed [AW-1:0] acc_out;

    drppg #(.N(N), .M(M), .DW(DW)) u_drppg (
      .clk       (clk),
      .rst_n     (rst_n),
      .slice     (slice[q]),
      .tag_in    (tag_s),
      .lut_raddr (lut_raddr[q]),
      .lut_rdata (lut_rdata[q]),
      .pp        (pp),
      .tag_out   (tag_pp)
    );

    pat #(.NUM(P), .IN_W(DW)) u_pat (
      .clk     (clk),
      .rst_n   (rst_n),
      .din     (pp),
      .tag_in  (tag_pp),
      .sum     (slice_sum),
      .tag_out (tag_sum)
    );

    shift_accumulator #(.IN_W(PW), .R(R), .NEG_FIRST(q == Q - 1)) u_sacc (
      .clk       (clk),
      .rst_n     (rst_n),
      .s         (slice_sum),
      .tag_in    (tag_sum),
      .acc_out   (acc_out),
      .out_valid (sec_valid[q])
    );

    assign sec_acc[q] = acc_out;
  end

  // ------------------------------------------------- shift-adder tree
  logic signed [SW-1:0] y_full;

  psat #(.Q(Q), .R(R), .IN_W(AW)) u_psat (
    .clk      (clk),
    .rst_n    (rst_n),
    .acc      (sec_acc),
    .in_valid (sec_valid[0]),
    .y        (y_full),
    .y_valid  (y_valid)
  );

  // For coefficient sums as described above the result fits YW bits.
  assign y_out = y_full[YW-1:0];

endmodule
