// tb_svm_a1_mult_a: drives the A1 systolic array the way the A1 memory block
// does (query feature j into PE 0 at clock t0 + j, feature j of SV k on
// x_in[k] at clock t0 + j + k) and checks that the SV dot products leave one
// per clock, SV 0 first: dot product k is on a_out in clock t0 + M + k + 1,
// and a_valid is low in every other clock.
module tb_svm_a1_mult_a;
  import svm_pkg::*;
  localparam int B = 8, M = 12, SV = 5;
  localparam int AWID = dot_width(B, M);
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic signed [B-1:0] x_in [SV];
  logic signed [B-1:0] q_in;
  svm_tag_t tag_in;
  logic signed [AWID-1:0] a_out;
  logic a_valid;
  int checks = 0, failures = 0;
  int xs [SV][M];
  int qs [M];

  svm_a1_mult_a #(.B(B), .M(M), .SV(SV)) dut (.*);

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask

  function automatic longint dotp(int k);
    longint s = 0;
    for (int j = 0; j < M; j++) s += longint'(xs[k][j]) * longint'(qs[j]);
    return s;
  endfunction

  initial begin
    for (int k = 0; k < SV; k++) x_in[k] = 0;
    q_in = 0; tag_in = '0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int n = 0; n < 4; n++) begin
      int cyc;
      int got;
      for (int k = 0; k < SV; k++) for (int j = 0; j < M; j++) xs[k][j] = $urandom_range(0, 255) - 128;
      for (int j = 0; j < M; j++) qs[j] = $urandom_range(0, 255) - 128;
      got = 0;
      // clock c = t0 + cyc; cyc runs until all results have been seen
      for (cyc = 0; cyc < M + SV + 4; cyc++) begin
        if (cyc < M) begin
          q_in = B'(qs[cyc]);
          tag_in.valid = 1; tag_in.first = (cyc == 0); tag_in.last = (cyc == M - 1);
        end else begin
          q_in = B'($urandom); tag_in = '0;
        end
        for (int k = 0; k < SV; k++)
          x_in[k] = (cyc - k >= 0 && cyc - k < M) ? B'(xs[k][cyc - k]) : B'($urandom);
        // a_out sampled in this clock
        if (cyc >= M + 1 && cyc < M + 1 + SV) begin
          check("a_valid", a_valid, 1);
          check("dot product", a_out, dotp(cyc - M - 1));
          got++;
        end else check("a_valid low", a_valid, 0);
        @(posedge clk); #1;
      end
      check("all results", got, SV);
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
