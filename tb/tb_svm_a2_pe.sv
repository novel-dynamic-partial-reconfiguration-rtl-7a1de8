// tb_svm_a2_pe: drives random partial sums, features and a query feature
// into one A2 PE and checks psum_out = psum_in + x * q and valid_out one
// clock later.
module tb_svm_a2_pe;
  localparam int B = 8, AWID = 20;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic signed [B-1:0] x_in, q_j;
  logic signed [AWID-1:0] psum_in, psum_out;
  logic valid_in, valid_out;
  int checks = 0, failures = 0;

  svm_a2_pe #(.B(B), .AWID(AWID)) dut (.*);

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask

  initial begin
    x_in = 0; q_j = 0; psum_in = 0; valid_in = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int n = 0; n < 500; n++) begin
      longint e;
      x_in = B'($urandom); q_j = B'($urandom);
      psum_in = AWID'($urandom_range(0, 200000) - 100000);
      valid_in = ($urandom_range(0, 3) != 0);
      e = valid_in ? longint'(psum_in) + longint'(x_in) * longint'(q_j) : 0;
      @(posedge clk); #1;
      check("valid_out", valid_out, valid_in);
      if (valid_in) check("psum_out", psum_out, e);
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
