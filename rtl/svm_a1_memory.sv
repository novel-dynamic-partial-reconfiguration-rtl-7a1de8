// svm_a1_memory: memory block of the A1 architecture (M much larger than SV).
//
// Four kinds of storage:
//   * the training set: SV memories (svm_sv_fifo), one per kernel PE, each
//     M deep and B wide, holding all features of one support vector;
//   * the class labels: SV register bits (one bit per label, too little to
//     spend a block RAM on);
//   * the query FIFO (svm_query_fifo), NQ*M deep, popped by the sequencer;
//   * the training coefficients alpha_i: one SV-deep memory.
// The feature read address for memory 0 comes from the sequencer and is
// passed down a register chain, so memory k is read one clock after memory
// k-1 and its feature arrives exactly when the query feature reaches PE k.
//
// Timing: x_out[k] carries feature a of SV k in the clock k+1 after
// feat_rd/feat_addr = a; q_out carries the popped query feature one clock
// after q_pop; alpha_out and y_out carry SV co_addr one clock after co_rd.
// Loading (ld) is taken one word per clock; the memory contents are not
// cleared by reset, nor are the label bits.
module svm_a1_memory
  import svm_pkg::*;
#(
  parameter int unsigned B  = 8,
  parameter int unsigned M  = 1024,
  parameter int unsigned SV = 20,
  parameter int unsigned AW = 8,
  parameter int unsigned NQ = 1,
  localparam int unsigned FW = (M > 1) ? $clog2(M) : 1,
  localparam int unsigned SW = (SV > 1) ? $clog2(SV) : 1,
  localparam int unsigned QCW = $clog2(NQ * M + 1)
) (
  input  logic                 clk,
  input  logic                 rst,
  input  svm_load_t            ld,
  // training-set read (sequencer)
  input  logic                 feat_rd,
  input  logic [FW-1:0]        feat_addr,
  output logic signed [B-1:0]  x_out [SV],
  // query FIFO
  input  logic                 q_push,
  input  logic [B-1:0]         q_data,
  output logic                 q_full,
  input  logic                 q_pop,
  output logic signed [B-1:0]  q_out,
  output logic [QCW-1:0]       q_count,
  // coefficients and labels
  input  logic                 co_rd,
  input  logic [SW-1:0]        co_addr,
  output logic [AW-1:0]        alpha_out,
  output logic                 y_out
);

  // pipelined read address: stage k drives memory k
  logic          rd_v [SV];
  logic [FW-1:0] rd_a [SV];
  assign rd_v[0] = feat_rd;
  assign rd_a[0] = feat_addr;
  for (genvar k = 1; k < int'(SV); k++) begin : g_addr
    always_ff @(posedge clk) begin
      if (rst) begin
        rd_v[k] <= 1'b0;
        rd_a[k] <= '0;
      end else begin
        rd_v[k] <= rd_v[k-1];
        rd_a[k] <= rd_a[k-1];
      end
    end
  end

  logic ld_feat, ld_label, ld_coeff;
  assign ld_feat  = ld.valid && (ld.target == LD_FEATURE);
  assign ld_label = ld.valid && (ld.target == LD_LABEL);
  assign ld_coeff = ld.valid && (ld.target == LD_COEFF);

  for (genvar k = 0; k < int'(SV); k++) begin : g_sv
    logic [B-1:0] rd_data;
    svm_sv_fifo #(.W(B), .DEPTH(M)) u_fifo (
      .clk,
      .wr_en  (ld_feat && (ld.row == 16'(k)) && (32'(ld.col) < M)),
      .wr_addr(FW'(ld.col)),
      .wr_data(ld.data[B-1:0]),
      .rd_en  (rd_v[k]),
      .rd_addr(rd_a[k]),
      .rd_data(rd_data)
    );
    assign x_out[k] = signed'(rd_data);
  end

  logic [B-1:0] q_raw;
  logic         q_empty;
  svm_query_fifo #(.W(B), .DEPTH(NQ * M)) u_qfifo (
    .clk, .rst,
    .push     (q_push),
    .push_data(q_data),
    .full     (q_full),
    .pop      (q_pop),
    .pop_data (q_raw),
    .empty    (q_empty),
    .count    (q_count)
  );
  assign q_out = signed'(q_raw);

  svm_sv_fifo #(.W(AW), .DEPTH(SV)) u_coeff (
    .clk,
    .wr_en  (ld_coeff && (32'(ld.row) < SV)),
    .wr_addr(SW'(ld.row)),
    .wr_data(ld.data[AW-1:0]),
    .rd_en  (co_rd),
    .rd_addr(co_addr),
    .rd_data(alpha_out)
  );

  // label bits are loaded contents like the memories: not cleared by reset
  logic labels [SV];
  initial for (int i = 0; i < int'(SV); i++) labels[i] = 1'b0;
  always_ff @(posedge clk) begin
    if (ld_label && (32'(ld.row) < SV)) labels[SW'(ld.row)] <= ld.data[0];
  end
  always_ff @(posedge clk) begin
    if (rst) y_out <= 1'b0;
    else if (co_rd) y_out <= labels[co_addr];
  end

endmodule
