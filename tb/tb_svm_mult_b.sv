// tb_svm_mult_b: random alphas and label bits; checks b_out = +alpha for
// label bit 0 and -alpha for label bit 1, and that tags follow by one clock.
module tb_svm_mult_b;
  import svm_pkg::*;
  localparam int AW = 8;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  svm_tag_t in_tag, out_tag;
  logic [AW-1:0] alpha;
  logic y_neg;
  logic signed [AW:0] b_out;
  int checks = 0, failures = 0;

  svm_mult_b #(.AW(AW)) dut (.*);

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask

  initial begin
    in_tag = '0; alpha = 0; y_neg = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int n = 0; n < 300; n++) begin
      svm_tag_t t;
      t = svm_tag_t'($urandom_range(0, 7));
      t.valid = 1;
      alpha = AW'($urandom); y_neg = 1'($urandom);
      if (n < 2) alpha = 8'hFF;
      in_tag = t;
      @(posedge clk); #1;
      check("b_out", b_out, y_neg ? -longint'(alpha) : longint'(alpha));
      check("tag", out_tag, t);
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
