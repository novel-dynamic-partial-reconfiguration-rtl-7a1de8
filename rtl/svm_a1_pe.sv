// svm_a1_pe: kernel processing element of the A1 architecture.
//
// One PE per support vector. Every clock it receives one feature x_ij of its
// own support vector (from its private SV memory) and the matching query
// feature Q_j (from the previous PE, or from the query FIFO for PE 0), and
// multiply-accumulates x_ij * Q_j. The query feature and its tags are
// registered and passed on to the next PE, so PE k sees feature j one clock
// after PE k-1 does; the SV memories are read with the same one-clock skew.
// When the tagged last feature has been added the PE presents the dot product
// sum_j x_ij Q_j (Eq. 6) for one clock on result/result_valid.
//
// Interface: tag_in.first restarts the sum, tag_in.last closes it. Features
// are B-bit two's complement (an assumption: the word length B is given, the
// number format is not). Latency: result_valid is high in the clock after the
// last feature enters.
module svm_a1_pe
  import svm_pkg::*;
#(
  parameter int unsigned B    = 8,
  parameter int unsigned AWID = 27
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic signed [B-1:0]    x_in,
  input  logic signed [B-1:0]    q_in,
  input  svm_tag_t               tag_in,
  output logic signed [B-1:0]    q_out,
  output svm_tag_t               tag_out,
  output logic signed [AWID-1:0] result,
  output logic                   result_valid
);

  logic signed [AWID-1:0] acc, acc_next;
  logic signed [2*B-1:0]  prod;

  always_comb begin
    prod     = x_in * q_in;
    acc_next = (tag_in.first ? AWID'(0) : acc) + AWID'(prod);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      acc          <= '0;
      result       <= '0;
      result_valid <= 1'b0;
      q_out        <= '0;
      tag_out      <= '0;
    end else begin
      q_out        <= q_in;
      tag_out      <= tag_in;
      result_valid <= tag_in.valid && tag_in.last;
      if (tag_in.valid) acc <= acc_next;
      if (tag_in.valid && tag_in.last) result <= acc_next;
    end
  end

endmodule
