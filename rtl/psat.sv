// psat: pipelined shift-adder tree that merges the Q section results.
//
// Section q carries the input bits q*R .. q*R+R-1, so its result has the
// weight 2^(q*R):
//   y = sum_{q=0}^{Q-1} 2^(q*R) * acc[q]
// The shifts are wiring; the additions use the pipelined adder tree (one
// register per level, ceil(log2 Q) cycles). The weighted terms are widened
// by (Q-1)*R + 1 bits, and the tree adds ceil(log2 Q) more, so the result
// cannot overflow. in_valid is carried along and comes out with the sum.
module psat
  import da_fir_pkg::*;
#(
  parameter int unsigned Q    = 2,
  parameter int unsigned R    = 4,
  parameter int unsigned IN_W = 16,
  localparam int unsigned TW    = IN_W + (Q - 1) * R + 1,
  localparam int unsigned OUT_W = TW + grow_w(Q)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [Q-1:0][IN_W-1:0]  acc,
  input  logic                    in_valid,
  output logic signed [OUT_W-1:0] y,
  output logic                    y_valid
);

  logic [Q-1:0][TW-1:0] term;
  slice_tag_t           tag_in, tag_out;

  always_comb begin
    for (int q = 0; q < Q; q++) begin
      term[q] = TW'($signed(acc[q])) <<< (q * R);
    end
  end

  assign tag_in = '{valid: in_valid, first: 1'b0, last: 1'b0};

  pat #(.NUM(Q), .IN_W(TW)) u_tree (
    .clk     (clk),
    .rst_n   (rst_n),
    .din     (term),
    .tag_in  (tag_in),
    .sum     (y),
    .tag_out (tag_out)
  );

  assign y_valid = tag_out.valid;

endmodule
