// tb_svm_a2_mult_a: drives the A2 PE chain the way the A2 memory block does
// (SV i enters PE 0 in clock t0 + i, its feature j on x_in[j] in clock
// t0 + i + j) with a held query, and checks that dot product i is on a_out in
// clock t0 + i + M + 1, one per clock.
module tb_svm_a2_mult_a;
  import svm_pkg::*;
  localparam int B = 8, M = 5, NSV = 9;
  localparam int AWID = dot_width(B, M);
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic signed [B-1:0] x_in [M];
  logic signed [B-1:0] q_regs [M];
  logic valid_in;
  logic signed [AWID-1:0] a_out;
  logic a_valid;
  int checks = 0, failures = 0;
  int xs [NSV][M];

  svm_a2_mult_a #(.B(B), .M(M)) dut (.*);

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask

  function automatic longint dotp(int i);
    longint s = 0;
    for (int j = 0; j < M; j++) s += longint'(xs[i][j]) * longint'(q_regs[j]);
    return s;
  endfunction

  initial begin
    for (int j = 0; j < M; j++) begin x_in[j] = 0; q_regs[j] = 0; end
    valid_in = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int n = 0; n < 4; n++) begin
      int got;
      for (int i = 0; i < NSV; i++) for (int j = 0; j < M; j++) xs[i][j] = $urandom_range(0, 255) - 128;
      for (int j = 0; j < M; j++) q_regs[j] = B'($urandom);
      got = 0;
      for (int cyc = 0; cyc < NSV + M + 3; cyc++) begin
        valid_in = (cyc < NSV);
        for (int j = 0; j < M; j++)
          x_in[j] = (cyc - j >= 0 && cyc - j < NSV) ? B'(xs[cyc - j][j]) : B'($urandom);
        if (cyc >= M + 1 && cyc < M + 1 + NSV) begin
          check("a_valid", a_valid, 1);
          check("dot product", a_out, dotp(cyc - M - 1));
          got++;
        end else check("a_valid low", a_valid, 0);
        @(posedge clk); #1;
      end
      check("all results", got, NSV);
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
