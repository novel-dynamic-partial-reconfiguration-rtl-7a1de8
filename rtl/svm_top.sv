// svm_top: the complete SVM classifier system.
//
// Two linear SVM classifier designs side by side, each with its own ports:
//   * quad_*: the reconfigurable quad-core classifier (svm_quad_core), four
//     A1 cores for problems with many more features than support vectors
//     (default M = 1024 features, SV = 20 support vectors, B = 8-bit data),
//     each core individually reconfigurable through quad_rp_reconfig and its
//     load port;
//   * a2_*: one A2 core (svm_a2_core) for problems with many more support
//     vectors than features (default M = 20, SV = 1024).
// Both classify one query in M + SV + 4 = 1048 clocks at their defaults.
// See svm_a1_core, svm_a2_core and svm_quad_core for the port protocols.
module svm_top
  import svm_pkg::*;
#(
  parameter int unsigned NCORES = 4,
  parameter int unsigned B      = 8,
  parameter int unsigned M      = 1024,
  parameter int unsigned SV     = 20,
  parameter int unsigned AW     = 8,
  parameter int unsigned NQ     = 1,
  parameter int unsigned A2_M   = 20,
  parameter int unsigned A2_SV  = 1024,
  localparam int unsigned ACCW    = dot_width(B, M) + AW + 1 + $clog2(SV + 1),
  localparam int unsigned A2_ACCW = dot_width(B, A2_M) + AW + 1 + $clog2(A2_SV + 1),
  localparam int unsigned A2_FW   = (A2_M > 1) ? $clog2(A2_M) : 1
) (
  input  logic                      clk,
  input  logic                      rst,
  // quad-core A1 classifier
  input  logic [NCORES-1:0]         quad_rp_reconfig,
  input  svm_load_t                 quad_ld          [NCORES],
  input  logic [NCORES-1:0]         quad_q_push,
  input  logic [B-1:0]              quad_q_data      [NCORES],
  output logic [NCORES-1:0]         quad_q_full,
  input  logic [NCORES-1:0]         quad_start,
  output logic [NCORES-1:0]         quad_ready,
  output logic [NCORES-1:0]         quad_busy,
  output logic [NCORES-1:0]         quad_class_valid,
  output logic [NCORES-1:0]         quad_class_label,
  output logic signed [ACCW-1:0]    quad_score       [NCORES],
  // A2 classifier
  input  svm_load_t                 a2_ld,
  input  logic                      a2_q_wr,
  input  logic [A2_FW-1:0]          a2_q_addr,
  input  logic [B-1:0]              a2_q_data,
  input  logic                      a2_start,
  output logic                      a2_ready,
  output logic                      a2_busy,
  output logic                      a2_class_valid,
  output logic                      a2_class_label,
  output logic signed [A2_ACCW-1:0] a2_score
);

  svm_quad_core #(.NCORES(NCORES), .B(B), .M(M), .SV(SV), .AW(AW), .NQ(NQ)) u_quad (
    .clk, .rst,
    .rp_reconfig(quad_rp_reconfig),
    .ld         (quad_ld),
    .q_push     (quad_q_push),
    .q_data     (quad_q_data),
    .q_full     (quad_q_full),
    .start      (quad_start),
    .ready      (quad_ready),
    .busy       (quad_busy),
    .class_valid(quad_class_valid),
    .class_label(quad_class_label),
    .score      (quad_score)
  );

  svm_a2_core #(.B(B), .M(A2_M), .SV(A2_SV), .AW(AW)) u_a2 (
    .clk, .rst,
    .ld         (a2_ld),
    .q_wr       (a2_q_wr),
    .q_addr     (a2_q_addr),
    .q_data     (a2_q_data),
    .start      (a2_start),
    .ready      (a2_ready),
    .busy       (a2_busy),
    .class_valid(a2_class_valid),
    .class_label(a2_class_label),
    .score      (a2_score)
  );

endmodule
