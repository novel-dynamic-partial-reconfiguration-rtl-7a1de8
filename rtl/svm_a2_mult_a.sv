// svm_a2_mult_a: Multiplier A of the A2 architecture (Eq. 6).
//
// A chain of M PEs (svm_a2_pe). Support vector i enters PE 0 in clock t
// (valid_in high, its feature 0 on x_in[0]); feature j must be on x_in[j] in
// clock t + j, which the A2 memory block's pipelined read address provides.
// The partial sum leaves PE M-1 in clock t + M and is registered once more,
// so dot product i is on a_out in clock t + M + 1, one support vector per
// clock. The extra output register is this design's choice; it gives A1 and
// A2 the same total latency, as the two architectures are reported to have.
module svm_a2_mult_a
  import svm_pkg::*;
#(
  parameter int unsigned B    = 8,
  parameter int unsigned M    = 20,
  localparam int unsigned AWID = dot_width(B, M)
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic signed [B-1:0]    x_in   [M],
  input  logic signed [B-1:0]    q_regs [M],
  input  logic                   valid_in,
  output logic signed [AWID-1:0] a_out,
  output logic                   a_valid
);

  logic signed [AWID-1:0] ps [M+1];
  logic                   pv [M+1];

  assign ps[0] = '0;
  assign pv[0] = valid_in;

  for (genvar j = 0; j < int'(M); j++) begin : g_pe
    svm_a2_pe #(.B(B), .AWID(AWID)) u_pe (
      .clk, .rst,
      .x_in     (x_in[j]),
      .q_j      (q_regs[j]),
      .psum_in  (ps[j]),
      .valid_in (pv[j]),
      .psum_out (ps[j+1]),
      .valid_out(pv[j+1])
    );
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      a_out   <= '0;
      a_valid <= 1'b0;
    end else begin
      a_out   <= ps[M];
      a_valid <= pv[M];
    end
  end

endmodule
