// tb_svm_top: end-to-end test of the complete system at its default sizes
// (four A1 cores with M = 1024, SV = 20; one A2 core with M = 20, SV = 1024;
// B = 8).
//
// 1. Loads random training sets into all four A1 cores and the A2 core, in
//    parallel through their separate load ports.
// 2. Round 1: every core classifies one query; core 0's query is its own
//    SV 0 with label +1 and core 1's is its SV 0 with label -1, so both
//    classes occur. Scores, labels and the 1048-cycle latency are checked.
// 3. Round 2: core 2 is partially reconfigured (held, decoupled, reloaded
//    with a new training set and smaller active sizes m_len = 300,
//    sv_len = 12) while cores 0, 1 and 3 and the A2 core keep classifying.
// 4. Round 3: all cores classify again, core 2 with its new variant
//    (latency 300 + 12 + 4), and the next query of each A1 core is pushed
//    while the current one is still running.
// The counts of each mechanism (classifications per core, both classes,
// reconfiguration with the others running, decoupled outputs, query pushed
// during a run, run-time size switch) are checked to be non-zero.
module tb_svm_top;
  import svm_pkg::*;

  localparam int NC = 4, B = 8, M = 1024, SV = 20, AW = 8;
  localparam int A2M = 20, A2SV = 1024;
  localparam int ACCW = dot_width(B, M) + AW + 1 + $clog2(SV + 1);
  localparam int A2ACCW = dot_width(B, A2M) + AW + 1 + $clog2(A2SV + 1);

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic [NC-1:0] rp, q_full, ready, busy, cvalid, clabel, start_v, push_v;
  svm_load_t     ld [NC];
  logic [B-1:0]  qd [NC];
  logic signed [ACCW-1:0] qscore [NC];
  logic          rp_u [NC], st_u [NC], qp_u [NC];
  svm_load_t     a2_ld;
  logic          a2_q_wr, a2_start, a2_ready, a2_busy, a2_valid, a2_label;
  logic [$clog2(A2M)-1:0] a2_q_addr;
  logic [B-1:0]  a2_q_data;
  logic signed [A2ACCW-1:0] a2_score;

  for (genvar k = 0; k < NC; k++) begin : g_pack
    assign rp[k] = rp_u[k];
    assign start_v[k] = st_u[k];
    assign push_v[k] = qp_u[k];
  end

  svm_top dut (
    .clk, .rst,
    .quad_rp_reconfig(rp), .quad_ld(ld), .quad_q_push(push_v), .quad_q_data(qd), .quad_q_full(q_full),
    .quad_start(start_v), .quad_ready(ready), .quad_busy(busy), .quad_class_valid(cvalid),
    .quad_class_label(clabel), .quad_score(qscore),
    .a2_ld, .a2_q_wr, .a2_q_addr, .a2_q_data, .a2_start, .a2_ready, .a2_busy,
    .a2_class_valid(a2_valid), .a2_class_label(a2_label), .a2_score
  );

  int checks = 0, failures = 0;
  // mechanism counters
  int n_class [NC];
  int n_a2 = 0, n_lab0 = 0, n_lab1 = 0, n_reconf = 0, n_run_during_reconf = 0;
  int n_leak = 0;
  int n_decoupled = 0, n_push_busy = 0, n_size_switch = 0;

  // reference data
  int x [NC][SV][M];
  int alpha [NC][SV];
  int yneg [NC][SV];
  int q [NC][M];
  int ml [NC], sl [NC];
  int ax [A2SV][A2M];
  int aal [A2SV];
  int ayn [A2SV];
  int aq [A2M];

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  function automatic longint ref_a1(int k);
    longint s = 0;
    for (int i = 0; i < sl[k]; i++) begin
      longint d = 0;
      for (int j = 0; j < ml[k]; j++) d += longint'(x[k][i][j]) * longint'(q[k][j]);
      s += d * (yneg[k][i] ? -alpha[k][i] : alpha[k][i]);
    end
    return s;
  endfunction

  function automatic longint ref_a2();
    longint s = 0;
    for (int i = 0; i < A2SV; i++) begin
      longint d = 0;
      for (int j = 0; j < A2M; j++) d += longint'(ax[i][j]) * longint'(aq[j]);
      s += d * (ayn[i] ? -aal[i] : aal[i]);
    end
    return s;
  endfunction

  task automatic ld_a1(int k, ld_target_e t, int row, int col, int data);
    ld[k].valid = 1; ld[k].target = t; ld[k].row = 16'(row); ld[k].col = 16'(col); ld[k].data = 32'(data);
    @(posedge clk); #1;
    ld[k] = '0;
  endtask

  task automatic ld_a2(ld_target_e t, int row, int col, int data);
    a2_ld.valid = 1; a2_ld.target = t; a2_ld.row = 16'(row); a2_ld.col = 16'(col); a2_ld.data = 32'(data);
    @(posedge clk); #1;
    a2_ld = '0;
  endtask

  // random training set for core k; SV 0 gets the largest alpha
  task automatic load_core(int k, int m_len, int sv_len);
    for (int i = 0; i < SV; i++) begin
      alpha[k][i] = (i == 0) ? 255 : $urandom_range(0, 60);
      yneg[k][i]  = $urandom_range(0, 1);
      ld_a1(k, LD_COEFF, i, 0, alpha[k][i]);
      ld_a1(k, LD_LABEL, i, 0, yneg[k][i]);
      for (int j = 0; j < M; j++) begin
        x[k][i][j] = $urandom_range(0, 255) - 128;
        ld_a1(k, LD_FEATURE, i, j, x[k][i][j]);
      end
    end
    ld_a1(k, LD_CFG_M, 0, 0, m_len);
    ld_a1(k, LD_CFG_SV, 0, 0, sv_len);
    ml[k] = m_len; sl[k] = sv_len;
  endtask

  task automatic load_a2();
    for (int i = 0; i < A2SV; i++) begin
      aal[i] = $urandom_range(0, 255);
      ayn[i] = $urandom_range(0, 1);
      ld_a2(LD_COEFF, i, 0, aal[i]);
      ld_a2(LD_LABEL, i, 0, ayn[i]);
      for (int j = 0; j < A2M; j++) begin
        ax[i][j] = $urandom_range(0, 255) - 128;
        ld_a2(LD_FEATURE, i, j, ax[i][j]);
      end
    end
  endtask

  // query for core k: random, or a copy of its SV 0
  task automatic push_query(int k, bit copy_sv0);
    for (int j = 0; j < ml[k]; j++) begin
      q[k][j] = copy_sv0 ? x[k][0][j] : $urandom_range(0, 255) - 128;
      qp_u[k] = 1; qd[k] = B'(q[k][j]);
      if (busy[k]) n_push_busy++;
      @(posedge clk); #1;
    end
    qp_u[k] = 0;
  endtask

  task automatic run_a1(int k);
    int cyc;
    longint e = ref_a1(k);
    while (!ready[k]) begin @(posedge clk); #1; end
    st_u[k] = 1;
    @(posedge clk); #1 st_u[k] = 0;
    cyc = 0;
    while (!cvalid[k]) begin @(posedge clk); #1 cyc++; end
    check($sformatf("core %0d score", k), longint'(qscore[k]), e);
    check($sformatf("core %0d label", k), longint'(clabel[k]), longint'(e < 0));
    check($sformatf("core %0d latency", k), cyc, ml[k] + sl[k] + 4);
    n_class[k]++;
    if (clabel[k]) n_lab1++; else n_lab0++;
  endtask

  task automatic run_a2();
    int cyc;
    longint e;
    for (int j = 0; j < A2M; j++) begin
      aq[j] = $urandom_range(0, 255) - 128;
      a2_q_wr = 1; a2_q_addr = $bits(a2_q_addr)'(j); a2_q_data = B'(aq[j]);
      @(posedge clk); #1;
    end
    a2_q_wr = 0;
    e = ref_a2();
    while (!a2_ready) begin @(posedge clk); #1; end
    a2_start = 1;
    @(posedge clk); #1 a2_start = 0;
    cyc = 0;
    while (!a2_valid) begin @(posedge clk); #1 cyc++; end
    check("a2 score", longint'(a2_score), e);
    check("a2 label", longint'(a2_label), longint'(e < 0));
    check("a2 latency", cyc, A2M + A2SV + 4);
    n_a2++;
    if (a2_label) n_lab1++; else n_lab0++;
  endtask

  // pushes the next query while the current one runs, then classifies it
  task automatic run_a1_overlapped(int k);
    longint e1;
    push_query(k, 0);
    e1 = ref_a1(k);
    while (!ready[k]) begin @(posedge clk); #1; end
    st_u[k] = 1;
    @(posedge clk); #1 st_u[k] = 0;
    fork
      begin
        // the FIFO has room again once the query has been read out
        repeat (ml[k]) @(posedge clk);
        #1 push_query(k, 0);
      end
      begin
        while (!cvalid[k]) begin @(posedge clk); #1; end
        check($sformatf("core %0d first of overlapped pair", k), longint'(qscore[k]), e1);
        n_class[k]++;
        if (clabel[k]) n_lab1++; else n_lab0++;
      end
    join
    run_a1(k);
  endtask

  initial begin
    for (int k = 0; k < NC; k++) begin
      rp_u[k] = 0; st_u[k] = 0; qp_u[k] = 0; ld[k] = '0; qd[k] = '0; n_class[k] = 0;
    end
    a2_ld = '0; a2_q_wr = 0; a2_q_addr = '0; a2_q_data = '0; a2_start = 0;
    repeat (3) @(posedge clk);
    #1 rst = 0;

    // 1. load everything in parallel
    fork
      load_core(0, M, SV);
      load_core(1, M, SV);
      load_core(2, M, SV);
      load_core(3, M, SV);
      load_a2();
    join
    yneg[0][0] = 0; ld_a1(0, LD_LABEL, 0, 0, 0);
    yneg[1][0] = 1; ld_a1(1, LD_LABEL, 0, 0, 1);

    // 2. round 1: all cores at once
    fork
      begin push_query(0, 1); run_a1(0); end
      begin push_query(1, 1); run_a1(1); end
      begin push_query(2, 0); run_a1(2); end
      begin push_query(3, 0); run_a1(3); end
      run_a2();
    join

    // 3. round 2: reconfigure core 2 while the others run
    fork
      begin
        rp_u[2] = 1;
        @(posedge clk); #1;
        load_core(2, 300, 12);
        n_size_switch++;
        rp_u[2] = 0;
        n_reconf++;
      end
      begin
        push_query(0, 0);
        while (!ready[0]) begin @(posedge clk); #1; end
        if (rp[2]) n_run_during_reconf++;
        run_a1(0);
      end
      begin push_query(1, 0); if (rp[2]) n_run_during_reconf++; run_a1(1); end
      begin push_query(3, 0); if (rp[2]) n_run_during_reconf++; run_a1(3); end
      begin
        // core 2 must stay decoupled while its partition is rewritten
        while (!rp[2]) @(posedge clk);
        while (rp[2]) begin
          @(negedge clk);
          if (rp[2]) begin
            if ({ready[2], busy[2], cvalid[2], qscore[2] != 0} != 4'b0) n_leak++;
            n_decoupled++;
          end
        end
      end
      run_a2();
    join

    // 4. round 3: core 2 runs its new variant; queries overlap runs
    fork
      run_a1_overlapped(0);
      run_a1_overlapped(1);
      begin push_query(2, 0); run_a1(2); end
      run_a1_overlapped(3);
    join

    check("core 2 outputs quiet while decoupled", n_leak, 0);
    for (int k = 0; k < NC; k++) check($sformatf("core %0d classified", k), longint'(n_class[k] > 0), 1);
    check("a2 classified", longint'(n_a2 > 0), 1);
    check("class 0 seen", longint'(n_lab0 > 0), 1);
    check("class 1 seen", longint'(n_lab1 > 0), 1);
    check("reconfiguration", longint'(n_reconf > 0), 1);
    check("others ran during reconfiguration", longint'(n_run_during_reconf > 0), 1);
    check("decoupled outputs observed", longint'(n_decoupled > 0), 1);
    check("query pushed during a run", longint'(n_push_busy > 0), 1);
    check("run-time size switch", longint'(n_size_switch > 0), 1);
    $display("mechanisms: class=%0d/%0d/%0d/%0d a2=%0d lab0=%0d lab1=%0d reconf=%0d run_during=%0d decoupled=%0d push_busy=%0d size_switch=%0d",
             n_class[0], n_class[1], n_class[2], n_class[3], n_a2, n_lab0, n_lab1, n_reconf,
             n_run_during_reconf, n_decoupled, n_push_busy, n_size_switch);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
