// svm_a2_core: linear SVM classifier, architecture A2 (SVs >> features M).
//
// Same decision function as A1 (Eqs. 5, 9) with the parallelism turned
// around: the systolic array has one PE per feature, and support vectors
// stream through it one per clock, each building its dot product PE by PE.
//   svm_a2_memory   M column memories (SV deep), labels, alphas, query registers
//   svm_a2_mult_a   chain of M PEs holding the query; one dot product per clock
//   svm_mult_b      alpha_i * y_i, started M clocks late to meet dot product i
//   svm_kernel_mult, svm_accumulator, svm_decision, svm_core_ctrl as in A1
// Active sizes m_len (1..M) and sv_len (1..SV) are load-port registers as in
// A1; features at index m_len and above are read as zero.
//
// Use: load the training data through `ld`; write the query features into
// the query registers (q_wr/q_addr/q_data) while the core is idle; pulse
// `start` when `ready`. class_valid pulses M + sv_len + 4 clock edges after
// the start handshake edge (1048 for M = 20, SV = 1024), since the chain is
// always M PEs long. Query registers and loads must not change while busy
// (assertion).
module svm_a2_core
  import svm_pkg::*;
#(
  parameter int unsigned B  = 8,
  parameter int unsigned M  = 20,
  parameter int unsigned SV = 1024,
  parameter int unsigned AW = 8,
  localparam int unsigned AWID = dot_width(B, M),
  localparam int unsigned BWID = AW + 1,
  localparam int unsigned KW   = AWID + BWID,
  localparam int unsigned ACCW = KW + $clog2(SV + 1),
  localparam int unsigned FW   = (M > 1) ? $clog2(M) : 1,
  localparam int unsigned SW   = (SV > 1) ? $clog2(SV) : 1,
  localparam int unsigned CW   = $clog2(M + SV + 8),
  localparam int unsigned LW   = $clog2(M + 1)
) (
  input  logic                   clk,
  input  logic                   rst,
  input  svm_load_t              ld,
  input  logic                   q_wr,
  input  logic [FW-1:0]          q_addr,
  input  logic [B-1:0]           q_data,
  input  logic                   start,
  output logic                   ready,
  output logic                   busy,
  output logic                   class_valid,
  output logic                   class_label,
  output logic signed [ACCW-1:0] score
);

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

  logic          sv_rd, co_rd;
  logic [SW-1:0] sv_addr, co_addr;
  svm_tag_t      sv_tag, co_tag, sv_tag_d, co_tag_d;

  svm_core_ctrl #(.CW(CW), .FW(SW), .SW(SW)) u_ctrl (
    .clk, .rst,
    .start, .can_start(1'b1),
    .n_feat(sv_len), .n_sv(sv_len), .lat(CW'(M)),
    .ready, .busy,
    .feat_rd(sv_rd), .feat_addr(sv_addr), .feat_tag(sv_tag),
    .co_rd, .co_addr, .co_tag
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      sv_tag_d <= '0;
      co_tag_d <= '0;
    end else begin
      sv_tag_d <= sv_tag;
      co_tag_d <= co_tag;
    end
  end

  logic signed [B-1:0] x_mem  [M];
  logic signed [B-1:0] q_regs [M];
  logic [AW-1:0]       alpha;
  logic                y_neg;

  svm_a2_memory #(.B(B), .M(M), .SV(SV), .AW(AW)) u_mem (
    .clk, .rst, .ld,
    .sv_rd, .sv_addr, .x_out(x_mem),
    .q_wr, .q_addr, .q_data, .m_len(LW'(m_len)), .q_regs,
    .co_rd, .co_addr, .alpha_out(alpha), .y_out(y_neg)
  );

  logic signed [AWID-1:0] a_val;
  logic                   a_valid;
  logic signed [BWID-1:0] b_val;
  svm_tag_t               b_tag, k_tag;
  logic signed [KW-1:0]   k_val;

  svm_a2_mult_a #(.B(B), .M(M)) u_mult_a (
    .clk, .rst, .x_in(x_mem), .q_regs, .valid_in(sv_tag_d.valid), .a_out(a_val), .a_valid
  );

  svm_mult_b #(.AW(AW)) u_mult_b (
    .clk, .rst, .in_tag(co_tag_d), .alpha, .y_neg, .b_out(b_val), .out_tag(b_tag)
  );

  svm_kernel_mult #(.AWID(AWID), .BWID(BWID)) u_kmul (
    .clk, .rst, .a_in(a_val), .b_in(b_val), .in_tag(b_tag), .k_out(k_val), .out_tag(k_tag)
  );

  logic signed [ACCW-1:0] acc;
  logic                   acc_valid;

  svm_accumulator #(.KW(KW), .ACCW(ACCW)) u_acc (
    .clk, .rst, .k_in(k_val), .in_tag(k_tag), .acc_out(acc), .acc_valid
  );

  svm_decision #(.ACCW(ACCW)) u_dec (
    .clk, .rst, .acc_in(acc), .acc_valid, .class_label, .class_valid, .score
  );

  a_streams_aligned: assert property (@(posedge clk) disable iff (rst) b_tag.valid |-> a_valid);
  a_no_write_when_busy: assert property (@(posedge clk) disable iff (rst) busy |-> !(ld.valid || q_wr));

endmodule
