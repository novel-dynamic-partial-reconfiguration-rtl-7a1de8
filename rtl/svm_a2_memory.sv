// svm_a2_memory: memory block of the A2 architecture (SV much larger than M).
//
// The training set is stored column-wise: M memories (svm_sv_fifo), one per
// kernel PE, each SV deep and B wide; memory j holds feature j of every
// support vector. The SV index for memory 0 comes from the sequencer and is
// passed down a register chain, so memory j is read one clock after memory
// j-1, matching the one-clock step of the partial sum along the PE chain.
// The query is held in M registers written by address; features at index
// m_len and above are presented as zero so that a shorter active feature
// count leaves the extra PEs without effect. Labels are SV register bits,
// coefficients one SV-deep memory.
//
// Timing: x_out[j] carries feature j of SV a in the clock j+1 after
// sv_rd/sv_addr = a; alpha_out and y_out carry SV co_addr one clock after
// co_rd. Query registers are cleared by reset; memory contents and label
// bits are not.
module svm_a2_memory
  import svm_pkg::*;
#(
  parameter int unsigned B  = 8,
  parameter int unsigned M  = 20,
  parameter int unsigned SV = 1024,
  parameter int unsigned AW = 8,
  localparam int unsigned FW = (M > 1) ? $clog2(M) : 1,
  localparam int unsigned SW = (SV > 1) ? $clog2(SV) : 1,
  localparam int unsigned LW = $clog2(M + 1)
) (
  input  logic                 clk,
  input  logic                 rst,
  input  svm_load_t            ld,
  input  logic                 sv_rd,
  input  logic [SW-1:0]        sv_addr,
  output logic signed [B-1:0]  x_out [M],
  input  logic                 q_wr,
  input  logic [FW-1:0]        q_addr,
  input  logic [B-1:0]         q_data,
  input  logic [LW-1:0]        m_len,
  output logic signed [B-1:0]  q_regs [M],
  input  logic                 co_rd,
  input  logic [SW-1:0]        co_addr,
  output logic [AW-1:0]        alpha_out,
  output logic                 y_out
);

  logic          rd_v [M];
  logic [SW-1:0] rd_a [M];
  assign rd_v[0] = sv_rd;
  assign rd_a[0] = sv_addr;
  for (genvar j = 1; j < int'(M); j++) begin : g_addr
    always_ff @(posedge clk) begin
      if (rst) begin
        rd_v[j] <= 1'b0;
        rd_a[j] <= '0;
      end else begin
        rd_v[j] <= rd_v[j-1];
        rd_a[j] <= rd_a[j-1];
      end
    end
  end

  logic ld_feat, ld_label, ld_coeff;
  assign ld_feat  = ld.valid && (ld.target == LD_FEATURE);
  assign ld_label = ld.valid && (ld.target == LD_LABEL);
  assign ld_coeff = ld.valid && (ld.target == LD_COEFF);

  logic [B-1:0] q_store [M];

  for (genvar j = 0; j < int'(M); j++) begin : g_feat
    logic [B-1:0] rd_data;
    svm_sv_fifo #(.W(B), .DEPTH(SV)) u_fifo (
      .clk,
      .wr_en  (ld_feat && (ld.col == 16'(j)) && (32'(ld.row) < SV)),
      .wr_addr(SW'(ld.row)),
      .wr_data(ld.data[B-1:0]),
      .rd_en  (rd_v[j]),
      .rd_addr(rd_a[j]),
      .rd_data(rd_data)
    );
    assign x_out[j] = signed'(rd_data);

    always_ff @(posedge clk) begin
      if (rst) q_store[j] <= '0;
      else if (q_wr && (q_addr == FW'(j))) q_store[j] <= q_data;
    end
    assign q_regs[j] = (32'(j) < 32'(m_len)) ? signed'(q_store[j]) : '0;
  end

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
