// tb_svm_a2_memory: loads random training data column-wise into the A2
// memory block, streams SV indices one per clock and checks that memory j
// delivers feature j of SV a exactly j + 1 clocks after index a was issued;
// checks the query registers (with features at and above m_len read as
// zero) and the coefficient and label reads.
module tb_svm_a2_memory;
  import svm_pkg::*;
  localparam int B = 8, M = 5, SV = 12, AW = 8;
  localparam int FW = $clog2(M), SW = $clog2(SV), LW = $clog2(M + 1);
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  svm_load_t ld;
  logic sv_rd, q_wr, co_rd, y_out;
  logic [SW-1:0] sv_addr, co_addr;
  logic signed [B-1:0] x_out [M];
  logic [FW-1:0] q_addr;
  logic [B-1:0] q_data;
  logic [LW-1:0] m_len;
  logic signed [B-1:0] q_regs [M];
  logic [AW-1:0] alpha_out;
  int checks = 0, failures = 0;
  int x [SV][M];
  int alpha [SV];
  int lab [SV];
  int q [M];

  svm_a2_memory #(.B(B), .M(M), .SV(SV), .AW(AW)) dut (.*);

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
    ld = '0; sv_rd = 0; sv_addr = '0; q_wr = 0; q_addr = '0; q_data = '0; co_rd = 0; co_addr = '0;
    m_len = LW'(M);
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int i = 0; i < SV; i++) begin
      alpha[i] = $urandom_range(0, 255); lab[i] = $urandom_range(0, 1);
      load(LD_COEFF, i, 0, alpha[i]);
      load(LD_LABEL, i, 0, lab[i]);
      for (int j = 0; j < M; j++) begin
        x[i][j] = $urandom_range(0, 255) - 128;
        load(LD_FEATURE, i, j, x[i][j]);
      end
    end
    for (int j = 0; j < M; j++) begin
      q[j] = $urandom_range(0, 255) - 128;
      q_wr = 1; q_addr = FW'(j); q_data = B'(q[j]);
      @(posedge clk); #1;
    end
    q_wr = 0;
    for (int j = 0; j < M; j++) check("query register", q_regs[j], q[j]);
    m_len = 3;
    #1;
    for (int j = 0; j < M; j++) check("masked query register", q_regs[j], j < 3 ? q[j] : 0);
    m_len = LW'(M);
    for (int c = 0; c < SV + M + 1; c++) begin
      sv_rd = (c < SV); sv_addr = SW'(c < SV ? c : 0);
      @(posedge clk); #1;
      for (int j = 0; j < M; j++)
        if (c - j >= 0 && c - j < SV) check($sformatf("feature %0d", j), x_out[j], x[c - j][j]);
    end
    for (int n = 0; n < 30; n++) begin
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
