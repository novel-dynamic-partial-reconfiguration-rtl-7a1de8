// svm_a1_core: linear SVM classifier, architecture A1 (features M >> SVs).
//
// Computes class = sign( sum_i y_i alpha_i (x_i . Q) ) (Eqs. 5, 9) for one
// query Q against SV support vectors of M features, with the training data
// held on chip:
//   svm_a1_memory   training set (one memory per SV), labels, query FIFO, alphas
//   svm_a1_mult_a   systolic array of SV PEs: all dot products x_i . Q at once
//   svm_mult_b      alpha_i * y_i, started late so it meets dot product i
//   svm_kernel_mult dot product times alpha_i * y_i
//   svm_accumulator sum over the support vectors
//   svm_decision    class = MSB of the sum
//   svm_core_ctrl   the cycle counter that starts each stream on time
// The active feature count m_len (1..M) and SV count sv_len (1..SV) are
// registers written through the load port (LD_CFG_M, LD_CFG_SV; reset to M
// and SV). They stand in for the smaller module variants that can be loaded
// into a partition sized for the largest one; this is the design's choice.
//
// Use: load the training set, labels and coefficients through `ld`; push the
// m_len features of a query into the query FIFO (q_push/q_data); when `ready`
// is high, pulse `start`. class_valid pulses with class_label and score
// exactly m_len + sv_len + 4 clock edges after the start handshake edge
// (1048 for M = 1024, SV = 20). A new query can start in the clock after
// class_valid. Queries queue up in the FIFO (NQ whole queries fit). Loads
// should not be issued while a query is running (assertion). `hold` stops
// the core and empties its query FIFO and pipeline while keeping whatever is
// loaded, including loads made during the hold; it is used by the
// reconfigurable quad-core wrapper and is tied low in a stand-alone core.
module svm_a1_core
  import svm_pkg::*;
#(
  parameter int unsigned B  = 8,
  parameter int unsigned M  = 1024,
  parameter int unsigned SV = 20,
  parameter int unsigned AW = 8,
  parameter int unsigned NQ = 1,
  localparam int unsigned AWID = dot_width(B, M),
  localparam int unsigned BWID = AW + 1,
  localparam int unsigned KW   = AWID + BWID,
  localparam int unsigned ACCW = KW + $clog2(SV + 1),
  localparam int unsigned FW   = (M > 1) ? $clog2(M) : 1,
  localparam int unsigned SW   = (SV > 1) ? $clog2(SV) : 1,
  localparam int unsigned CW   = $clog2(M + SV + 8),
  localparam int unsigned QCW  = $clog2(NQ * M + 1)
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   hold,
  input  svm_load_t              ld,
  input  logic                   q_push,
  input  logic [B-1:0]           q_data,
  output logic                   q_full,
  input  logic                   start,
  output logic                   ready,
  output logic                   busy,
  output logic                   class_valid,
  output logic                   class_label,
  output logic signed [ACCW-1:0] score
);

  // Pipeline reset: a hold (partition being reconfigured) clears the
  // sequencer, the query FIFO and the pipeline, but not the loaded contents:
  // memories, label bits and size registers keep what the load port writes.
  logic prst;
  assign prst = rst || hold;

  // ---------------- run-time size registers ----------------
  logic [CW-1:0] m_len, sv_len;
  always_ff @(posedge clk) begin
    if (rst) begin
      m_len  <= CW'(M);
      sv_len <= CW'(SV);
    end else if (ld.valid && !busy) begin
      if (ld.target == LD_CFG_M)
        m_len <= (ld.data[15:0] == '0) ? CW'(1) : (32'(ld.data[15:0]) > M) ? CW'(M) : CW'(ld.data[15:0]);
      if (ld.target == LD_CFG_SV)
        sv_len <= (ld.data[15:0] == '0) ? CW'(1) : (32'(ld.data[15:0]) > SV) ? CW'(SV) : CW'(ld.data[15:0]);
    end
  end

  // ---------------- sequencer ----------------
  logic          feat_rd, co_rd;
  logic [FW-1:0] feat_addr;
  logic [SW-1:0] co_addr;
  svm_tag_t      feat_tag, co_tag, feat_tag_d, co_tag_d;
  logic [QCW-1:0] q_count;

  svm_core_ctrl #(.CW(CW), .FW(FW), .SW(SW)) u_ctrl (
    .clk, .rst(prst),
    .start, .can_start(32'(q_count) >= 32'(m_len)),
    .n_feat(m_len), .n_sv(sv_len), .lat(m_len),
    .ready, .busy,
    .feat_rd, .feat_addr, .feat_tag,
    .co_rd, .co_addr, .co_tag
  );

  // tags follow the one-clock read latency of the memories
  always_ff @(posedge clk) begin
    if (prst) begin
      feat_tag_d <= '0;
      co_tag_d   <= '0;
    end else begin
      feat_tag_d <= feat_tag;
      co_tag_d   <= co_tag;
    end
  end

  // ---------------- memory block ----------------
  logic signed [B-1:0] x_mem [SV];
  logic signed [B-1:0] q_mem;
  logic [AW-1:0]       alpha;
  logic                y_neg;

  svm_a1_memory #(.B(B), .M(M), .SV(SV), .AW(AW), .NQ(NQ)) u_mem (
    .clk, .rst(prst), .ld,
    .feat_rd, .feat_addr, .x_out(x_mem),
    .q_push, .q_data, .q_full, .q_pop(feat_rd), .q_out(q_mem), .q_count,
    .co_rd, .co_addr, .alpha_out(alpha), .y_out(y_neg)
  );

  // ---------------- kernel computation ----------------
  logic signed [AWID-1:0] a_val;
  logic                   a_valid;
  logic signed [BWID-1:0] b_val;
  svm_tag_t               b_tag, k_tag;
  logic signed [KW-1:0]   k_val;

  svm_a1_mult_a #(.B(B), .M(M), .SV(SV)) u_mult_a (
    .clk, .rst(prst), .x_in(x_mem), .q_in(q_mem), .tag_in(feat_tag_d),
    .a_out(a_val), .a_valid
  );

  svm_mult_b #(.AW(AW)) u_mult_b (
    .clk, .rst(prst), .in_tag(co_tag_d), .alpha, .y_neg, .b_out(b_val), .out_tag(b_tag)
  );

  svm_kernel_mult #(.AWID(AWID), .BWID(BWID)) u_kmul (
    .clk, .rst(prst), .a_in(a_val), .b_in(b_val), .in_tag(b_tag), .k_out(k_val), .out_tag(k_tag)
  );

  // ---------------- accumulation and decision ----------------
  logic signed [ACCW-1:0] acc;
  logic                   acc_valid;

  svm_accumulator #(.KW(KW), .ACCW(ACCW)) u_acc (
    .clk, .rst(prst), .k_in(k_val), .in_tag(k_tag), .acc_out(acc), .acc_valid
  );

  svm_decision #(.ACCW(ACCW)) u_dec (
    .clk, .rst(prst), .acc_in(acc), .acc_valid, .class_label, .class_valid, .score
  );

  // Multiplier B must meet Multiplier A's result for the same SV
  a_streams_aligned: assert property (@(posedge clk) disable iff (prst) b_tag.valid |-> a_valid);
  a_no_load_when_busy: assert property (@(posedge clk) disable iff (prst) busy |-> !ld.valid);

endmodule
