// tb_svm_query_fifo: random pushes and pops (never past full or empty)
// against a queue model; checks popped data one clock after pop, the fill
// count and the full/empty flags.
module tb_svm_query_fifo;
  localparam int W = 8, DEPTH = 6;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic push = 0, pop = 0, full, empty;
  logic [W-1:0] push_data = '0, pop_data;
  logic [2:0] count;
  int checks = 0, failures = 0;
  logic [W-1:0] model [$];
  int n_full = 0, n_wrap = 0;

  svm_query_fifo #(.W(W), .DEPTH(DEPTH)) dut (.*);

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int n = 0; n < 2000; n++) begin
      logic do_push, do_pop;
      logic [W-1:0] exp_data;
      do_push = ($urandom_range(0, 99) < 55) && (model.size() < DEPTH);
      do_pop  = ($urandom_range(0, 99) < 45) && (model.size() > 0);
      push = do_push; pop = do_pop; push_data = W'($urandom);
      exp_data = do_pop ? model[0] : '0;
      @(posedge clk); #1;
      if (do_pop) begin
        void'(model.pop_front());
        check("pop data", pop_data, exp_data);
      end
      if (do_push) model.push_back(push_data);
      check("count", count, model.size());
      check("full", full, model.size() == DEPTH);
      check("empty", empty, model.size() == 0);
      if (full) n_full++;
      if (n > DEPTH * 3 && do_pop) n_wrap++;
    end
    check("reached full", n_full > 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
