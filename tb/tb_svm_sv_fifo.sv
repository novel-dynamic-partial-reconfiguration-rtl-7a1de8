// tb_svm_sv_fifo: checks the training-set memory. Fills it with random
// words, reads every address back in order and then at random, and checks
// that read data appear one clock after rd_en and hold while rd_en is low.
module tb_svm_sv_fifo;
  localparam int W = 8, DEPTH = 64;
  logic clk = 0;
  always #5 clk = ~clk;
  logic wr_en = 0, rd_en = 0;
  logic [5:0] wr_addr = '0, rd_addr = '0;
  logic [W-1:0] wr_data = '0, rd_data;
  int checks = 0, failures = 0;
  logic [W-1:0] ref_mem [DEPTH];

  svm_sv_fifo #(.W(W), .DEPTH(DEPTH)) dut (.*);

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask

  initial begin
    @(posedge clk); #1;
    for (int a = 0; a < DEPTH; a++) begin
      ref_mem[a] = W'($urandom);
      wr_en = 1; wr_addr = 6'(a); wr_data = ref_mem[a];
      @(posedge clk); #1;
    end
    wr_en = 0;
    for (int a = 0; a < DEPTH; a++) begin
      rd_en = 1; rd_addr = 6'(a);
      @(posedge clk); #1;
      check("sequential read", rd_data, ref_mem[a]);
    end
    for (int n = 0; n < 200; n++) begin
      int a;
      a = $urandom_range(0, DEPTH - 1);
      rd_en = 1; rd_addr = 6'(a);
      @(posedge clk); #1;
      check("random read", rd_data, ref_mem[a]);
      rd_en = 0; rd_addr = 6'($urandom);
      @(posedge clk); #1;
      check("hold without rd_en", rd_data, ref_mem[a]);
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
