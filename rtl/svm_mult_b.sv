// svm_mult_b: Multiplier B (Eq. 7), alpha_i * y_i.
//
// Reads the training coefficient alpha_i (unsigned, AW bits: alpha is never
// negative) and the class label of the same support vector, and forms the
// signed product alpha_i * y_i with y_i = +1 or -1. The label is one bit;
// this design stores y = -1 as 1 and y = +1 as 0 (the same convention as the
// decision block's output). The product is formed as a multiplication, as
// on a DSP block, and registered: out_* follow in_* by one clock, with the
// valid/first/last tags carried alongside.
module svm_mult_b
  import svm_pkg::*;
#(
  parameter int unsigned AW = 8
) (
  input  logic                 clk,
  input  logic                 rst,
  input  svm_tag_t             in_tag,
  input  logic [AW-1:0]        alpha,
  input  logic                 y_neg,
  output logic signed [AW:0]   b_out,
  output svm_tag_t             out_tag
);

  logic signed [AW:0] alpha_s;
  logic signed [1:0]  y_s;
  logic signed [AW:0]   prod;

  assign alpha_s = $signed({1'b0, alpha});
  assign y_s     = y_neg ? -2'sd1 : 2'sd1;
  assign prod    = alpha_s * y_s;

  always_ff @(posedge clk) begin
    if (rst) begin
      b_out   <= '0;
      out_tag <= '0;
    end else begin
      out_tag <= in_tag;
      if (in_tag.valid) b_out <= prod;
    end
  end

endmodule
