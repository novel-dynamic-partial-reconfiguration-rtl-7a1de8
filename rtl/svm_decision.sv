// svm_decision: decision-making block.
//
// The class of the query is the sign of the accumulated result (Eq. 5): the
// block looks at its most significant bit and outputs class 1 when it is 1
// (negative sum) and class 0 otherwise. The label and the score itself are
// registered: class_valid is a one-clock strobe in the clock after acc_valid.
module svm_decision #(
  parameter int unsigned ACCW = 41
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic signed [ACCW-1:0] acc_in,
  input  logic                   acc_valid,
  output logic                   class_label,
  output logic                   class_valid,
  output logic signed [ACCW-1:0] score
);

  always_ff @(posedge clk) begin
    if (rst) begin
      class_label <= 1'b0;
      class_valid <= 1'b0;
      score       <= '0;
    end else begin
      class_valid <= acc_valid;
      if (acc_valid) begin
        class_label <= acc_in[ACCW-1];
        score       <= acc_in;
      end
    end
  end

endmodule
