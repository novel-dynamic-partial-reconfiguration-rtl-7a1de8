// svm_quad_core: reconfigurable multi-core SVM classifier (four A1 cores).
//
// NCORES independent A1 classifier cores, each placed in its own
// reconfigurable partition so that one core can be swapped for a variant
// with other training data, another active M or SV, while the remaining
// cores keep classifying. Each core has its own load, query and result
// ports, so different cores can run different studies in parallel.
//
// Partial reconfiguration of core k is modelled at the boundary of its
// partition: while rp_reconfig[k] is high the core is held (its queued
// queries and pipeline state are dropped, see svm_a1_core's `hold`) and its outputs are forced
// to zero, so nothing it drives can disturb the static logic; its load port
// stays open so the new memory contents and sizes can be written. When
// rp_reconfig[k] falls the new variant runs. The other cores are untouched.
// The decoupling and the hold-in-reset are this design's choices; the
// configuration port that would deliver a partial bitstream is a device
// feature and lies outside this RTL.
//
// Timing per core is that of svm_a1_core.
module svm_quad_core
  import svm_pkg::*;
#(
  parameter int unsigned NCORES = 4,
  parameter int unsigned B      = 8,
  parameter int unsigned M      = 1024,
  parameter int unsigned SV     = 20,
  parameter int unsigned AW     = 8,
  parameter int unsigned NQ     = 1,
  localparam int unsigned ACCW  = dot_width(B, M) + AW + 1 + $clog2(SV + 1)
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic [NCORES-1:0]      rp_reconfig,
  input  svm_load_t              ld          [NCORES],
  input  logic [NCORES-1:0]      q_push,
  input  logic [B-1:0]           q_data      [NCORES],
  output logic [NCORES-1:0]      q_full,
  input  logic [NCORES-1:0]      start,
  output logic [NCORES-1:0]      ready,
  output logic [NCORES-1:0]      busy,
  output logic [NCORES-1:0]      class_valid,
  output logic [NCORES-1:0]      class_label,
  output logic signed [ACCW-1:0] score       [NCORES]
);

  for (genvar k = 0; k < int'(NCORES); k++) begin : g_core
    logic                   c_q_full, c_ready, c_busy, c_valid, c_label;
    logic signed [ACCW-1:0] c_score;
    svm_a1_core #(.B(B), .M(M), .SV(SV), .AW(AW), .NQ(NQ)) u_core (
      .clk,
      .rst,
      .hold       (rp_reconfig[k]),
      .ld         (ld[k]),
      .q_push     (q_push[k] && !rp_reconfig[k]),
      .q_data     (q_data[k]),
      .q_full     (c_q_full),
      .start      (start[k] && !rp_reconfig[k]),
      .ready      (c_ready),
      .busy       (c_busy),
      .class_valid(c_valid),
      .class_label(c_label),
      .score      (c_score)
    );

    // partition outputs decoupled during reconfiguration
    assign q_full[k]      = rp_reconfig[k] ? 1'b1 : c_q_full;
    assign ready[k]       = !rp_reconfig[k] && c_ready;
    assign busy[k]        = !rp_reconfig[k] && c_busy;
    assign class_valid[k] = !rp_reconfig[k] && c_valid;
    assign class_label[k] = !rp_reconfig[k] && c_label;
    assign score[k]       = rp_reconfig[k] ? '0 : c_score;
  end

endmodule
