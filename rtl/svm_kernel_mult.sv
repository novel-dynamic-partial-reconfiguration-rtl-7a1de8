// svm_kernel_mult: stage-2 multiplier of the kernel computation block (Eq. 8).
//
// Multiplies the dot product of support vector i (from Multiplier A) by
// alpha_i * y_i (from Multiplier B), both arriving in the same clock, giving
// the kernel term x_i . Q * alpha_i * y_i. One pipeline register: k_out and
// out_tag follow the inputs by one clock.
module svm_kernel_mult
  import svm_pkg::*;
#(
  parameter int unsigned AWID = 27,
  parameter int unsigned BWID = 9,
  localparam int unsigned KW  = AWID + BWID
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic signed [AWID-1:0] a_in,
  input  logic signed [BWID-1:0] b_in,
  input  svm_tag_t               in_tag,
  output logic signed [KW-1:0]   k_out,
  output svm_tag_t               out_tag
);

  logic signed [KW-1:0] prod;
  assign prod = a_in * b_in;

  always_ff @(posedge clk) begin
    if (rst) begin
      k_out   <= '0;
      out_tag <= '0;
    end else begin
      out_tag <= in_tag;
      if (in_tag.valid) k_out <= prod;
    end
  end

endmodule
