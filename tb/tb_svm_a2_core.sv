// tb_svm_a2_core: self-checking test of the A2 classifier core.
//
// Loads random training data column-wise (feature j of SV i) through the
// load port, writes random queries into the query registers and classifies
// them, then reduces the active sizes to m_len = 3, sv_len = 9 and repeats.
// Each score is compared with a reference sum, the label with its sign, and
// the latency from the start handshake to class_valid with M + sv_len + 4
// (the PE chain is always M long).
module tb_svm_a2_core;
  import svm_pkg::*;

  localparam int B = 8, M = 6, SV = 24, AW = 8;
  localparam int ACCW = dot_width(B, M) + AW + 1 + $clog2(SV + 1);
  localparam int FW = $clog2(M);

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  svm_load_t ld;
  logic q_wr, start, ready, busy, class_valid, class_label;
  logic [FW-1:0] q_addr;
  logic [B-1:0] q_data;
  logic signed [ACCW-1:0] score;

  svm_a2_core #(.B(B), .M(M), .SV(SV), .AW(AW)) dut (.*);

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

  task automatic new_query();
    for (int j = 0; j < M; j++) begin
      q[j] = $urandom_range(0, 255) - 128;
      q_wr = 1; q_addr = FW'(j); q_data = B'(q[j]);
      @(posedge clk); #1;
    end
    q_wr = 0;
  endtask

  task automatic classify(int ml, int sl);
    int cyc;
    longint exp_s = ref_score(ml, sl);
    while (!ready) @(posedge clk);
    #1 start = 1;
    @(posedge clk); #1 start = 0;
    cyc = 0;
    while (!class_valid) begin @(posedge clk); #1 cyc++; end
    check("score", longint'(score), exp_s);
    check("label", longint'(class_label), longint'(exp_s < 0));
    check("latency", cyc, M + sl + 4);
    @(posedge clk); #1;
  endtask

  initial begin
    ld = '0; q_wr = 0; q_addr = '0; q_data = '0; start = 0;
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
    for (int n = 0; n < 5; n++) begin
      new_query();
      classify(M, SV);
    end
    load(LD_CFG_M, 0, 0, 3);
    load(LD_CFG_SV, 0, 0, 9);
    for (int n = 0; n < 3; n++) begin
      new_query();
      classify(3, 9);
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
