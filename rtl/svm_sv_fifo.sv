// svm_sv_fifo: one training-set memory ("SV FIFO") of the SVM memory block.
//
// Each kernel PE owns one of these memories. In the A1 core it holds the M
// features of one support vector; in the A2 core it holds feature j of every
// support vector. The contents are written once (with the core's
// configuration) and then read again for every query, so the memory is a
// simple dual-port block RAM: a write port used while loading and an
// addressed read port driven by the core's pipelined read address. Naming it
// a FIFO follows how the data are consumed: strictly in address order.
//
// Timing: rd_data holds mem[rd_addr] from the clock edge after rd_en.
// Contents are not reset; they start at zero, as a block RAM does after
// configuration.
module svm_sv_fifo #(
  parameter int unsigned W     = 8,
  parameter int unsigned DEPTH = 1024,
  localparam int unsigned AW_  = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic           clk,
  input  logic           wr_en,
  input  logic [AW_-1:0] wr_addr,
  input  logic [W-1:0]   wr_data,
  input  logic           rd_en,
  input  logic [AW_-1:0] rd_addr,
  output logic [W-1:0]   rd_data
);

  logic [W-1:0] mem [DEPTH];

  initial begin
    for (int i = 0; i < int'(DEPTH); i++) mem[i] = '0;
  end

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (rd_en) rd_data <= mem[rd_addr];
  end

endmodule
