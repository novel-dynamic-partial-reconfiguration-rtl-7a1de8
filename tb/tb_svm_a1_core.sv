// tb_svm_a1_core: self-checking test of the A1 classifier core.
//
// Loads random training data (B-bit signed features, unsigned alphas, random
// labels) through the load port, queues two queries in the query FIFO and
// classifies them back to back, then switches the active sizes to m_len = 7,
// sv_len = 3 and classifies again. Each score is compared with a reference
// sum computed in the testbench, the label with the sign of that sum, and
// the latency from the start handshake to class_valid with m_len + sv_len + 4.
module tb_svm_a1_core;
  import svm_pkg::*;

  localparam int B = 8, M = 16, SV = 5, AW = 8, NQ = 2;
  localparam int ACCW = dot_width(B, M) + AW + 1 + $clog2(SV + 1);

  logic clk = 0, rst = 1, hold = 0;
  always #5 clk = ~clk;

  svm_load_t ld;
  logic q_push, q_full, start, ready, busy, class_valid, class_label;
  logic [B-1:0] q_data;
  logic signed [ACCW-1:0] score;

  svm_a1_core #(.B(B), .M(M), .SV(SV), .AW(AW), .NQ(NQ)) dut (.*);

  int checks = 0, failures = 0;
  int x [SV][M];
  int alpha [SV];
  int yneg [SV];
  int q [M];

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic load(ld_target_e t, int row, int col, int data);
    ld.valid = 1; ld.target = t; ld.row = 16'(row); ld.col = 16'(col); ld.data = 32'(data);
    @(posedge clk); #1;
    ld = '0;
  endtask

  function automatic longint ref_score(int ml, int sl);
    longint s = 0;
    for (int i = 0; i < sl; i++) begin
      longint d = 0;
      for (int j = 0; j < ml; j++) d += longint'(x[i][j]) * longint'(q[j]);
      s += d * (yneg[i] ? -alpha[i] : alpha[i]);
    end
    return s;
  endfunction

  task automatic new_query(int ml);
    for (int j = 0; j < M; j++) q[j] = $urandom_range(0, 255) - 128;
    for (int j = 0; j < ml; j++) begin
      q_push = 1; q_data = B'(q[j]);
      @(posedge clk); #1;
    end
    q_push = 0;
  endtask

  task automatic classify(int ml, int sl);
    int cyc = 0;
    longint exp_s = ref_score(ml, sl);
    while (!ready) @(posedge clk);
    #1 start = 1;
    @(posedge clk); #1 start = 0;
    cyc = 0;  // edges counted from the handshake edge
    while (!class_valid) begin @(posedge clk); #1 cyc++; end
    check("score", longint'(score), exp_s);
    check("label", longint'(class_label), longint'(exp_s < 0));
    check("latency", cyc, ml + sl + 4);
  endtask

  initial begin
    ld = '0; q_push = 0; q_data = '0; start = 0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    for (int i = 0; i < SV; i++) begin
      alpha[i] = $urandom_range(0, 255);
      yneg[i]  = $urandom_range(0, 1);
      load(LD_COEFF, i, 0, alpha[i]);
      load(LD_LABEL, i, 0, yneg[i]);
      for (int j = 0; j < M; j++) begin
        x[i][j] = $urandom_range(0, 255) - 128;
        load(LD_FEATURE, i, j, x[i][j]);
      end
    end
    // two queries, the second queued while the first is waiting
    for (int n = 0; n < 4; n++) begin
      int qs [M];
      new_query(M);
      qs = q;
      classify(M, SV);
    end
    // queue two queries before starting either
    begin
      int q1 [M];
      new_query(M); q1 = q;
      check("fifo holds two queries", longint'(q_full), 0);
      new_query(M);
      check("fifo full after two queries", longint'(q_full), 1);
      begin int q2 [M]; q2 = q; q = q1; classify(M, SV); q = q2; classify(M, SV); end
    end
    // smaller active sizes
    load(LD_CFG_M, 0, 0, 7);
    load(LD_CFG_SV, 0, 0, 3);
    for (int n = 0; n < 3; n++) begin
      new_query(7);
      classify(7, 3);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
