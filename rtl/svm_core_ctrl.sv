// svm_core_ctrl: sequencer shared by the A1 and A2 classifier cores.
//
// A single cycle counter that starts the three streams of a classification
// at the right times so that they meet:
//   * the feature stream: n_feat read addresses 0..n_feat-1, one per clock
//     from clock 0 (A1: feature index, also pops the query FIFO; A2: SV index),
//     tagged first/last;
//   * the coefficient stream: n_sv reads of alpha_i and y_i, one per clock
//     from clock lat, where lat is the latency of Multiplier A in clocks
//     (A1: number of active features, A2: M). This is the delayed start of
//     Multiplier B that keeps it in step with Multiplier A's results;
//   * completion: the core returns to idle in clock lat + n_sv + 3, when the
//     last term has passed the accumulator, and may accept a new query in the
//     next clock.
// Clock 0 is the clock after the start handshake (start && ready). With the
// pipeline registers of the cores this puts the decision strobe
// lat + n_sv + 4 clock edges after the handshake edge.
module svm_core_ctrl
  import svm_pkg::*;
#(
  parameter int unsigned CW = 12,
  parameter int unsigned FW = 10,
  parameter int unsigned SW = 5
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          start,
  input  logic          can_start,
  input  logic [CW-1:0] n_feat,
  input  logic [CW-1:0] n_sv,
  input  logic [CW-1:0] lat,
  output logic          ready,
  output logic          busy,
  output logic          feat_rd,
  output logic [FW-1:0] feat_addr,
  output svm_tag_t      feat_tag,
  output logic          co_rd,
  output logic [SW-1:0] co_addr,
  output svm_tag_t      co_tag
);

  typedef enum logic {S_IDLE, S_RUN} state_e;
  state_e        state;
  logic [CW-1:0] t, ci;

  assign ready = (state == S_IDLE) && can_start;
  assign busy  = (state == S_RUN);

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_IDLE;
      t     <= '0;
    end else begin
      case (state)
        S_IDLE: if (start && ready) begin
          state <= S_RUN;
          t     <= '0;
        end
        S_RUN: begin
          t <= t + 1'b1;
          if (t == lat + n_sv + CW'(3)) state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    ci             = t - lat;
    feat_rd        = busy && (t < n_feat);
    feat_addr      = FW'(t);
    feat_tag.valid = feat_rd;
    feat_tag.first = feat_rd && (t == '0);
    feat_tag.last  = feat_rd && (t == n_feat - 1'b1);
    co_rd          = busy && (t >= lat) && (ci < n_sv);
    co_addr        = SW'(ci);
    co_tag.valid   = co_rd;
    co_tag.first   = co_rd && (ci == '0);
    co_tag.last    = co_rd && (ci == n_sv - 1'b1);
  end

  a_start_only_when_ready: assert property (@(posedge clk) disable iff (rst)
    busy |-> (n_feat != '0 && n_sv != '0));

endmodule
