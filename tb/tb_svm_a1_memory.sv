// tb_svm_a1_memory: loads random training data, labels and coefficients into
// the A1 memory block, then reads the training set with one address per
// clock and checks that memory k delivers feature a of SV k exactly k + 1
// clocks after address a was issued (the pipelined read address), that the
// query FIFO returns the pushed features one clock after each pop, and that
// coefficient and label reads return the loaded values one clock later.
module tb_svm_a1_memory;
  import svm_pkg::*;
  localparam int B = 8, M = 10, SV = 4, AW = 8, NQ = 2;
  localparam int FW = $clog2(M), SW = $clog2(SV), QCW = $clog2(NQ * M + 1);
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  svm_load_t ld;
  logic feat_rd, q_push, q_full, q_pop, co_rd, y_out;
  logic [FW-1:0] feat_addr;
  logic signed [B-1:0] x_out [SV];
  logic [B-1:0] q_data;
  logic signed [B-1:0] q_out;
  logic [QCW-1:0] q_count;
  logic [SW-1:0] co_addr;
  logic [AW-1:0] alpha_out;
  int checks = 0, failures = 0;
  int x [SV][M];
  int alpha [SV];
  int lab [SV];
  int q [M];

  svm_a1_memory #(.B(B), .M(M), .SV(SV), .AW(AW), .NQ(NQ)) dut (.*);

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask

  task automatic load(ld_target_e t, int row, int col, int data);
    ld.valid = 1; ld.target = t; ld.row = 16'(row); ld.col = 16'(col); ld.data = 32'(data);
    @(posedge clk); #1;
    ld = '0;
  endtask

  initial begin
    ld = '0; feat_rd = 0; feat_addr = '0; q_push = 0; q_data = '0; q_pop = 0; co_rd = 0; co_addr = '0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int k = 0; k < SV; k++) begin
      alpha[k] = $urandom_range(0, 255); lab[k] = $urandom_range(0, 1);
      load(LD_COEFF, k, 0, alpha[k]);
      load(LD_LABEL, k, 0, lab[k]);
      for (int j = 0; j < M; j++) begin
        x[k][j] = $urandom_range(0, 255) - 128;
        load(LD_FEATURE, k, j, x[k][j]);
      end
    end
    // writes outside the array must be ignored
    load(LD_FEATURE, SV, 0, 99);
    load(LD_FEATURE, 0, M, 99);
    for (int j = 0; j < M; j++) begin
      q[j] = $urandom_range(0, 255) - 128;
      q_push = 1; q_data = B'(q[j]);
      @(posedge clk); #1;
    end
    q_push = 0;
    check("query count", q_count, M);
    // stream: address c issued in clock c, popped query in clock c
    for (int c = 0; c < M + SV + 1; c++) begin
      feat_rd = (c < M); q_pop = (c < M); feat_addr = FW'(c < M ? c : 0);
      @(posedge clk); #1;
      // now in clock c + 1
      if (c < M) check("query feature", q_out, q[c]);
      for (int k = 0; k < SV; k++)
        if (c - k >= 0 && c - k < M) check($sformatf("feature of SV %0d", k), x_out[k], x[k][c - k]);
    end
    check("query FIFO drained", q_count, 0);
    for (int n = 0; n < 20; n++) begin
      int i;
      i = $urandom_range(0, SV - 1);
      co_rd = 1; co_addr = SW'(i);
      @(posedge clk); #1;
      check("alpha", alpha_out, alpha[i]);
      check("label", y_out, lab[i]);
      co_rd = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
