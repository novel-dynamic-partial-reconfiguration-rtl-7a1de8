// tb_svm_a1_pe: feeds one A1 PE several random feature/query streams of
// different lengths (with idle clocks inside) and checks the dot product,
// that result_valid comes exactly one clock after the last feature, and
// that the query feature and tags are forwarded with one clock of delay.
module tb_svm_a1_pe;
  import svm_pkg::*;
  localparam int B = 8, AWID = 20;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic signed [B-1:0] x_in, q_in, q_out;
  svm_tag_t tag_in, tag_out;
  logic signed [AWID-1:0] result;
  logic result_valid;
  int checks = 0, failures = 0;

  svm_a1_pe #(.B(B), .AWID(AWID)) dut (.*);

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask

  initial begin
    x_in = 0; q_in = 0; tag_in = '0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int n = 0; n < 20; n++) begin
      int len;
      longint sum;
      len = $urandom_range(1, 40);
      sum = 0;
      for (int j = 0; j < len; j++) begin
        logic signed [B-1:0] xv, qv;
        xv = B'($urandom); qv = B'($urandom);
        // idle clock inside the stream now and then
        if ($urandom_range(0, 3) == 0) begin
          tag_in = '0; x_in = B'($urandom); q_in = B'($urandom);
          @(posedge clk); #1;
          check("no result while idle", result_valid, 0);
        end
        x_in = xv; q_in = qv;
        tag_in.valid = 1; tag_in.first = (j == 0); tag_in.last = (j == len - 1);
        sum += longint'(xv) * longint'(qv);
        @(posedge clk); #1;
        check("q forwarded", q_out, qv);
        check("tag forwarded", tag_out, {1'b1, j == 0, j == len - 1});
        check("result_valid timing", result_valid, j == len - 1);
      end
      tag_in = '0;
      check("dot product", result, sum);
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
