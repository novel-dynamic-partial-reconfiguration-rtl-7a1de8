// tb_svm_kernel_mult: random signed dot products and alpha*y values,
// including the extremes; checks the registered product and tags.
module tb_svm_kernel_mult;
  import svm_pkg::*;
  localparam int AWID = 27, BWID = 9;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic signed [AWID-1:0] a_in;
  logic signed [BWID-1:0] b_in;
  svm_tag_t in_tag, out_tag;
  logic signed [AWID+BWID-1:0] k_out;
  int checks = 0, failures = 0;

  svm_kernel_mult #(.AWID(AWID), .BWID(BWID)) dut (.*);

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask

  initial begin
    a_in = 0; b_in = 0; in_tag = '0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int n = 0; n < 300; n++) begin
      svm_tag_t t;
      t = svm_tag_t'($urandom_range(0, 7)); t.valid = 1;
      a_in = AWID'($urandom); b_in = BWID'($urandom);
      if (n == 0) begin a_in = {1'b1, {(AWID-1){1'b0}}}; b_in = {1'b1, {(BWID-1){1'b0}}}; end
      in_tag = t;
      @(posedge clk); #1;
      check("k_out", k_out, longint'(a_in) * longint'(b_in));
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
