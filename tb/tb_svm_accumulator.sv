// tb_svm_accumulator: random-length runs of signed kernel terms with gaps;
// checks the final sum and that acc_valid is a one-clock strobe in the clock
// after the last term.
module tb_svm_accumulator;
  import svm_pkg::*;
  localparam int KW = 36, ACCW = 42;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic signed [KW-1:0] k_in;
  svm_tag_t in_tag;
  logic signed [ACCW-1:0] acc_out;
  logic acc_valid;
  int checks = 0, failures = 0;

  svm_accumulator #(.KW(KW), .ACCW(ACCW)) dut (.*);

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask

  initial begin
    k_in = 0; in_tag = '0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int n = 0; n < 30; n++) begin
      int len;
      longint sum;
      len = $urandom_range(1, 25);
      sum = 0;
      for (int i = 0; i < len; i++) begin
        longint v;
        v = longint'($urandom) * 8 - (longint'(1) << 34);
        if ($urandom_range(0, 4) == 0) begin
          in_tag = '0; k_in = KW'($urandom);
          @(posedge clk); #1;
          check("no strobe in gap", acc_valid, 0);
        end
        k_in = KW'(v); sum += v;
        in_tag.valid = 1; in_tag.first = (i == 0); in_tag.last = (i == len - 1);
        @(posedge clk); #1;
        check("acc_valid timing", acc_valid, i == len - 1);
      end
      in_tag = '0;
      check("sum", acc_out, sum);
      @(posedge clk); #1;
      check("strobe is one clock", acc_valid, 0);
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
