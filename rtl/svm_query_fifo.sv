// svm_query_fifo: the query FIFO of the A1 memory block.
//
// Holds the features of one or more queries. The host pushes features in
// feature order; during a classification the sequencer pops one feature per
// clock and the first kernel PE takes it. DEPTH = NQ * M, so NQ whole queries
// fit. A circular buffer with read and write pointers and a fill counter.
//
// Timing: pop_data holds the popped word from the clock edge after pop (the
// same latency as the SV memories, so a query feature meets its SV features
// in PE 0). push when full and pop when empty are ignored (and flagged by
// assertions). A push and a pop in the same cycle are both performed.
module svm_query_fifo #(
  parameter int unsigned W     = 8,
  parameter int unsigned DEPTH = 1024,
  localparam int unsigned PW   = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int unsigned CW   = $clog2(DEPTH + 1)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          push,
  input  logic [W-1:0]  push_data,
  output logic          full,
  input  logic          pop,
  output logic [W-1:0]  pop_data,
  output logic          empty,
  output logic [CW-1:0] count
);

  logic [W-1:0]  mem [DEPTH];
  logic [PW-1:0] wp, rp;
  logic          do_push, do_pop;

  assign full    = (count == CW'(DEPTH));
  assign empty   = (count == '0);
  assign do_push = push && !full;
  assign do_pop  = pop && !empty;

  function automatic logic [PW-1:0] inc(logic [PW-1:0] p);
    return (p == PW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      wp    <= '0;
      rp    <= '0;
      count <= '0;
    end else begin
      if (do_push) wp <= inc(wp);
      if (do_pop)  rp <= inc(rp);
      count <= count + CW'(do_push) - CW'(do_pop);
    end
  end

  always_ff @(posedge clk) begin
    if (do_push) mem[wp] <= push_data;
  end

  always_ff @(posedge clk) begin
    if (do_pop) pop_data <= mem[rp];
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (rst) !(push && full && !pop));
  a_no_underflow: assert property (@(posedge clk) disable iff (rst) !(pop && empty));

endmodule
