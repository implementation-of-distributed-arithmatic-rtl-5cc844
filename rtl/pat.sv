// pat: pipelined adder tree.
//
// Sums NUM signed words of IN_W bits. The tree is binary, padded with zeros to
// the next power of two, and every level of adders is followed by a register,
// so the sum of the words presented in cycle t appears in cycle t + LEVELS,
// where LEVELS = ceil(log2 NUM) (no register at all for NUM = 1). The result
// grows by LEVELS bits, so no sum can overflow. A slice tag is delayed by the
// same number of cycles so that control stays aligned with the data.
//
// In the filter it adds the P partial products of a generator; the pipelined
// shift-adder tree reuses it to add the weighted section results.
module pat
  import da_fir_pkg::*;
#(
  parameter int unsigned NUM  = 8,
  parameter int unsigned IN_W = 9,
  localparam int unsigned LEVELS = grow_w(NUM),
  localparam int unsigned LEAVES = 1 << LEVELS,
  localparam int unsigned OUT_W  = IN_W + LEVELS
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [NUM-1:0][IN_W-1:0] din,
  input  slice_tag_t               tag_in,
  output logic signed [OUT_W-1:0]  sum,
  output slice_tag_t               tag_out
);

  // cur[l] is the input of tree level l+1: the leaves for l = 0, the
  // registered partial sums of level l otherwise.
  logic signed [OUT_W-1:0] cur   [LEVELS+1][LEAVES];
  logic signed [OUT_W-1:0] sum_q [LEVELS+1][LEAVES];
  slice_tag_t              tag_q [LEVELS+1];

  always_comb begin
    for (int i = 0; i < LEAVES; i++) begin
      cur[0][i] = (i < NUM) ? OUT_W'($signed(din[i])) : '0;
    end
    for (int l = 1; l <= LEVELS; l++) begin
      for (int i = 0; i < LEAVES; i++) cur[l][i] = sum_q[l][i];
    end
  end

  always_ff @(posedge clk) begin
    for (int i = 0; i < LEAVES; i++) sum_q[0][i] <= '0;
    for (int l = 1; l <= LEVELS; l++) begin
      for (int i = 0; i < LEAVES; i++) begin
        sum_q[l][i] <= (i < (LEAVES >> l)) ? cur[l-1][2*i] + cur[l-1][2*i+1] : '0;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int l = 0; l <= LEVELS; l++) tag_q[l] <= '0;
    end else begin
      tag_q[0] <= '0;
      for (int l = 1; l <= LEVELS; l++) tag_q[l] <= (l == 1) ? tag_in : tag_q[l-1];
    end
  end

  assign sum     = cur[LEVELS][0];
  assign tag_out = (LEVELS == 0) ? tag_in : tag_q[LEVELS];

endmodule
