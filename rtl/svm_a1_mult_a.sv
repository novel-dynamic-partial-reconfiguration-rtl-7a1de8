// svm_a1_mult_a: Multiplier A of the A1 architecture (Eq. 6).
//
// A linear systolic array of SV kernel PEs (svm_a1_pe). The query stream
// (one feature per clock with valid/first/last tags) enters PE 0 and shifts
// one PE per clock; PE k takes the features of support vector k from its own
// memory with the same skew. All SV dot products are computed at once and
// finish one clock apart, SV 0 first, so at most one PE has a result in any
// clock. The output stage selects that PE's result and registers it, giving
// one dot product per clock on a_out/a_valid.
//
// Timing: with the first feature entering PE 0 in clock t, dot product k is
// on a_out in clock t + M + k + 1 for an M-feature query. How the results
// leave the array is this design's choice (a registered one-hot select).
module svm_a1_mult_a
  import svm_pkg::*;
#(
  parameter int unsigned B    = 8,
  parameter int unsigned M    = 1024,
  parameter int unsigned SV   = 20,
  localparam int unsigned AWID = dot_width(B, M)
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic signed [B-1:0]    x_in [SV],
  input  logic signed [B-1:0]    q_in,
  input  svm_tag_t               tag_in,
  output logic signed [AWID-1:0] a_out,
  output logic                   a_valid
);

  logic signed [B-1:0]    q_chain   [SV+1];
  svm_tag_t               tag_chain [SV+1];
  logic signed [AWID-1:0] res       [SV];
  logic [SV-1:0]          res_v;

  assign q_chain[0]   = q_in;
  assign tag_chain[0] = tag_in;

  for (genvar k = 0; k < int'(SV); k++) begin : g_pe
    svm_a1_pe #(.B(B), .AWID(AWID)) u_pe (
      .clk, .rst,
      .x_in        (x_in[k]),
      .q_in        (q_chain[k]),
      .tag_in      (tag_chain[k]),
      .q_out       (q_chain[k+1]),
      .tag_out     (tag_chain[k+1]),
      .result      (res[k]),
      .result_valid(res_v[k])
    );
  end

  logic signed [AWID-1:0] sel;
  always_comb begin
    sel = '0;
    for (int k = 0; k < int'(SV); k++) if (res_v[k]) sel |= res[k];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      a_out   <= '0;
      a_valid <= 1'b0;
    end else begin
      a_out   <= sel;
      a_valid <= |res_v;
    end
  end

  a_one_result: assert property (@(posedge clk) disable iff (rst) $onehot0(res_v));

endmodule
