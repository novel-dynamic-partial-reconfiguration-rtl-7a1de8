// tb_svm_dim_sweep: effect of the number of features on classification time.
//
// An A1 core with 1024 support vectors, 16-bit data and up to 16 features
// classifies one query at each active feature count m_len = 1..16 (set at
// run time through the load port). For each size the score is checked
// against a reference sum and the time from the start handshake to the
// result against m_len + 1024 + 4 clocks. Going from 1 to 16 features adds
// only 15 clocks to about 1030, a rise of about 1.5%, because the features
// are processed in a pipeline while all support vectors work in parallel.
module tb_svm_dim_sweep;
  import svm_pkg::*;
  localparam int B = 16, M = 16, SV = 1024, AW = 8, NQ = 1;
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
  int t_first = 0, t_last = 0;

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask

  task automatic load(ld_target_e t, int row, int col, int data);
    ld.valid = 1; ld.target = t; ld.row = 16'(row); ld.col = 16'(col); ld.data = 32'(data);
    @(posedge clk); #1;
    ld = '0;
  endtask

  function automatic longint ref_score(int ml);
    longint s = 0;
    for (int i = 0; i < SV; i++) begin
      longint d = 0;
      for (int j = 0; j < ml; j++) d += longint'(x[i][j]) * longint'(q[j]);
      s += d * (yneg[i] ? -alpha[i] : alpha[i]);
    end
    return s;
  endfunction

  task automatic run(int ml);
    int cyc;
    longint e;
    load(LD_CFG_M, 0, 0, ml);
    for (int j = 0; j < ml; j++) begin
      q[j] = $urandom_range(0, 65535) - 32768;
      q_push = 1; q_data = B'(q[j]);
      @(posedge clk); #1;
    end
    q_push = 0;
    e = ref_score(ml);
    while (!ready) begin @(posedge clk); #1; end
    start = 1;
    @(posedge clk); #1 start = 0;
    cyc = 0;
    while (!class_valid) begin @(posedge clk); #1 cyc++; end
    check($sformatf("score m=%0d", ml), score, e);
    check($sformatf("label m=%0d", ml), class_label, e < 0);
    check($sformatf("cycles m=%0d", ml), cyc, ml + SV + 4);
    if (ml == 1) t_first = cyc;
    if (ml == M) t_last = cyc;
  endtask

  initial begin
    ld = '0; q_push = 0; q_data = '0; start = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int i = 0; i < SV; i++) begin
      alpha[i] = $urandom_range(0, 255); yneg[i] = $urandom_range(0, 1);
      load(LD_COEFF, i, 0, alpha[i]);
      load(LD_LABEL, i, 0, yneg[i]);
      for (int j = 0; j < M; j++) begin
        x[i][j] = $urandom_range(0, 65535) - 32768;
        load(LD_FEATURE, i, j, x[i][j]);
      end
    end
    for (int ml = 1; ml <= M; ml++) run(ml);
    $display("classification time: %0d clocks at M=1, %0d clocks at M=%0d (+%0d.%0d%%)",
             t_first, t_last, M, (t_last - t_first) * 100 / t_first, ((t_last - t_first) * 1000 / t_first) % 10);
    check("time grows by less than 2%", (t_last - t_first) * 100 < 2 * t_first, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
