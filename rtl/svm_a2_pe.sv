// svm_a2_pe: kernel processing element of the A2 architecture.
//
// One PE per feature. PE j holds query feature Q_j (from the query
// registers) and every clock receives feature j of one support vector from
// its private memory. It adds x_ij * Q_j to the partial sum arriving from
// PE j-1 and registers the new partial sum for PE j+1, so the dot product of
// one support vector is built up as it travels down the chain (Eq. 6).
//
// Timing: one clock per PE; psum_out/valid_out follow psum_in/valid_in by one
// clock. Features are B-bit two's complement (assumed number format).
module svm_a2_pe #(
  parameter int unsigned B    = 8,
  parameter int unsigned AWID = 21
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic signed [B-1:0]    x_in,
  input  logic signed [B-1:0]    q_j,
  input  logic signed [AWID-1:0] psum_in,
  input  logic                   valid_in,
  output logic signed [AWID-1:0] psum_out,
  output logic                   valid_out
);

  logic signed [2*B-1:0] prod;
  assign prod = x_in * q_j;

  always_ff @(posedge clk) begin
    if (rst) begin
      psum_out  <= '0;
      valid_out <= 1'b0;
    end else begin
      valid_out <= valid_in;
      psum_out  <= valid_in ? psum_in + AWID'(prod) : '0;
    end
  end

endmodule
