// tb_svm_quad_core: four small A1 cores (M = 16, SV = 4).
// 1. All cores get their own random training sets and classify in parallel.
// 2. Core 1 is reconfigured in the middle of a classification while cores
//    0, 2 and 3 classify: its run must be abandoned (no class_valid), its
//    outputs must stay at zero during the hold, its queued query must be
//    dropped (ready stays low afterwards), and the other cores' results must
//    be correct.
// 3. Core 1 is reloaded with a new training set and active sizes m_len = 9,
//    sv_len = 3, and must classify with the new contents and a latency of
//    9 + 3 + 4 clocks.
module tb_svm_quad_core;
  import svm_pkg::*;
  localparam int NC = 4, B = 8, M = 16, SV = 4, AW = 8, NQ = 1;
  localparam int ACCW = dot_width(B, M) + AW + 1 + $clog2(SV + 1);
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic [NC-1:0] rp_reconfig, q_push, q_full, start, ready, busy, class_valid, class_label;
  svm_load_t ld [NC];
  logic [B-1:0] q_data [NC];
  logic signed [ACCW-1:0] score [NC];
  logic rp_u [NC], st_u [NC], qp_u [NC];
  for (genvar k = 0; k < NC; k++) begin : g_pack
    assign rp_reconfig[k] = rp_u[k];
    assign start[k] = st_u[k];
    assign q_push[k] = qp_u[k];
  end

  svm_quad_core #(.NCORES(NC), .B(B), .M(M), .SV(SV), .AW(AW), .NQ(NQ)) dut (.*);

  int checks = 0, failures = 0;
  int x [NC][SV][M];
  int alpha [NC][SV];
  int yneg [NC][SV];
  int q [NC][M];
  int ml [NC], sl [NC];
  int leaks = 0, n_hold = 0;

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask

  function automatic longint ref_score(int k);
    longint s = 0;
    for (int i = 0; i < sl[k]; i++) begin
      longint d = 0;
      for (int j = 0; j < ml[k]; j++) d += longint'(x[k][i][j]) * longint'(q[k][j]);
      s += d * (yneg[k][i] ? -alpha[k][i] : alpha[k][i]);
    end
    return s;
  endfunction

  task automatic ld1(int k, ld_target_e t, int row, int col, int data);
    ld[k].valid = 1; ld[k].target = t; ld[k].row = 16'(row); ld[k].col = 16'(col); ld[k].data = 32'(data);
    @(posedge clk); #1;
    ld[k] = '0;
  endtask

  task automatic load_core(int k, int m_len, int sv_len);
    for (int i = 0; i < SV; i++) begin
      alpha[k][i] = $urandom_range(0, 255); yneg[k][i] = $urandom_range(0, 1);
      ld1(k, LD_COEFF, i, 0, alpha[k][i]);
      ld1(k, LD_LABEL, i, 0, yneg[k][i]);
      for (int j = 0; j < M; j++) begin
        x[k][i][j] = $urandom_range(0, 255) - 128;
        ld1(k, LD_FEATURE, i, j, x[k][i][j]);
      end
    end
    ld1(k, LD_CFG_M, 0, 0, m_len);
    ld1(k, LD_CFG_SV, 0, 0, sv_len);
    ml[k] = m_len; sl[k] = sv_len;
  endtask

  task automatic push_query(int k);
    for (int j = 0; j < ml[k]; j++) begin
      q[k][j] = $urandom_range(0, 255) - 128;
      qp_u[k] = 1; q_data[k] = B'(q[k][j]);
      @(posedge clk); #1;
    end
    qp_u[k] = 0;
  endtask

  task automatic classify(int k);
    int cyc;
    longint e;
    e = ref_score(k);
    while (!ready[k]) begin @(posedge clk); #1; end
    st_u[k] = 1;
    @(posedge clk); #1 st_u[k] = 0;
    cyc = 0;
    while (!class_valid[k]) begin @(posedge clk); #1 cyc++; end
    check($sformatf("core %0d score", k), score[k], e);
    check($sformatf("core %0d label", k), class_label[k], e < 0);
    check($sformatf("core %0d latency", k), cyc, ml[k] + sl[k] + 4);
  endtask

  initial begin
    for (int k = 0; k < NC; k++) begin rp_u[k] = 0; st_u[k] = 0; qp_u[k] = 0; ld[k] = '0; q_data[k] = '0; end
    repeat (2) @(posedge clk);
    #1 rst = 0;
    fork
      load_core(0, M, SV); load_core(1, M, SV); load_core(2, M, SV); load_core(3, M, SV);
    join
    fork
      begin push_query(0); classify(0); end
      begin push_query(1); classify(1); end
      begin push_query(2); classify(2); end
      begin push_query(3); classify(3); end
    join
    // reconfigure core 1 in the middle of a run
    fork
      begin push_query(0); classify(0); push_query(0); classify(0); end
      begin push_query(2); classify(2); end
      begin push_query(3); classify(3); push_query(3); classify(3); end
      begin
        push_query(1);
        while (!ready[1]) begin @(posedge clk); #1; end
        st_u[1] = 1;
        @(posedge clk); #1 st_u[1] = 0;
        push_query(1);              // a second query waits in the FIFO
        repeat (3) @(posedge clk);
        #1 rp_u[1] = 1;
        fork
          begin
            repeat (40) begin
              @(negedge clk);
              if ({ready[1], busy[1], class_valid[1], class_label[1], score[1] != 0} != 5'b0) leaks++;
              n_hold++;
            end
          end
          begin repeat (40) @(posedge clk); end
        join
        #1;
        load_core(1, 9, 3);
        rp_u[1] = 0;
        repeat (2) @(posedge clk); #1;
        check("queued query dropped by reconfiguration", ready[1], 0);
      end
    join
    check("outputs quiet while reconfiguring", leaks, 0);
    check("hold observed", n_hold > 0, 1);
    push_query(1);
    classify(1);
    push_query(1);
    classify(1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
