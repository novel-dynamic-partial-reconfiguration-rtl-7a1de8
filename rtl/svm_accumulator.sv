// svm_accumulator: accumulation block (Eq. 9).
//
// Adds the kernel terms of all support vectors of one query as they arrive,
// one per clock. A term tagged `first` restarts the sum; when the term tagged
// `last` has been added, the total is presented on acc_out with a one-clock
// acc_valid strobe in the next clock. ACCW leaves room for SV terms of KW
// bits without overflow.
module svm_accumulator
  import svm_pkg::*;
#(
  parameter int unsigned KW   = 36,
  parameter int unsigned ACCW = 41
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic signed [KW-1:0]   k_in,
  input  svm_tag_t               in_tag,
  output logic signed [ACCW-1:0] acc_out,
  output logic                   acc_valid
);

  logic signed [ACCW-1:0] acc, acc_next;
  assign acc_next = (in_tag.first ? ACCW'(0) : acc) + ACCW'(k_in);

  always_ff @(posedge clk) begin
    if (rst) begin
      acc       <= '0;
      acc_out   <= '0;
      acc_valid <= 1'b0;
    end else begin
      acc_valid <= in_tag.valid && in_tag.last;
      if (in_tag.valid) acc <= acc_next;
      if (in_tag.valid && in_tag.last) acc_out <= acc_next;
    end
  end

endmodule
