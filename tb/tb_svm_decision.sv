// tb_svm_decision: random positive, negative and zero accumulated results
// over the whole ACCW-bit range;
// checks class 1 exactly for negative sums, the registered score, and that
// class_valid follows acc_valid by one clock.
module tb_svm_decision;
  localparam int ACCW = 42;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic signed [ACCW-1:0] acc_in, score;
  logic acc_valid, class_label, class_valid;
  int checks = 0, failures = 0;

  svm_decision #(.ACCW(ACCW)) dut (.*);

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask

  initial begin
    acc_in = 0; acc_valid = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int n = 0; n < 300; n++) begin
      longint v;
      // any 42-bit two's complement value
      v = longint'({$urandom, $urandom}) <<< 22 >>> 22;
      if (n % 50 == 0) v = 0;
      if (n % 50 == 1) v = -1;
      acc_in = ACCW'(v); acc_valid = ($urandom_range(0, 3) != 0);
      @(posedge clk); #1;
      check("class_valid", class_valid, acc_valid);
      if (acc_valid) begin
        check("class_label", class_label, v < 0);
        check("score", score, v);
      end
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
