// spec_scheduler: prediction logic of a shared elastic module.
//
// Each cycle it names the channel allowed to use the shared block (sched).
// It only predicts channels that carry a valid token: if the preferred
// channel has none, the first valid channel after it (in rotating order) is
// chosen. Two prediction policies (spec_pkg::sched_policy_e):
//  SCHED_RR      - the preference moves to the next channel whenever the
//                  chosen channel offered a token, whether it went through or
//                  was stopped by the multiplexor. A stop on the chosen
//                  channel is how a misprediction shows, so it is corrected
//                  in the next cycle, and no valid channel can starve.
//  SCHED_PRIMARY - always prefer channel 0 (the speculative, fast path).
//                  When a token issued on channel 0 comes with hint = 1 (the
//                  guess was wrong), prefer REPLAY_CH until a token has been
//                  issued there, then return to channel 0.
// Timing: sched is combinational in in_valid and the registered preference;
// hint and issued only feed that register, keeping the scheduler off the
// datapath's critical path.
// The need to predict only valid channels, correct every misprediction and
// avoid starvation follows the scheduler requirements of speculation; the
// two concrete policies are this design's choice.
module spec_scheduler
  import spec_pkg::*;
#(
  parameter int unsigned   N         = 2,
  parameter sched_policy_e POLICY    = SCHED_RR,
  parameter int unsigned   REPLAY_CH = 1,
  localparam int unsigned  SW        = (N > 1) ? $clog2(N) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [N-1:0]  in_valid,  // valid token waiting on each channel
  input  logic          issued,    // token on the chosen channel left this cycle
  input  logic          hint,      // SCHED_PRIMARY: issued channel-0 token was a wrong guess
  output logic [SW-1:0] sched
);

  logic [SW-1:0] pref;

  function automatic logic [SW-1:0] next_ch(input logic [SW-1:0] c);
    return (int'(c) == N - 1) ? '0 : SW'(int'(c) + 1);
  endfunction

  // first valid channel at or after the preference, in rotating order
  always_comb begin
    sched = pref;
    if (!in_valid[pref]) begin
      for (int d = N - 1; d >= 1; d--) begin
        if (in_valid[(int'(pref) + d) % N]) sched = SW'((int'(pref) + d) % N);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pref <= '0;
    end else if (POLICY == SCHED_RR) begin
      if (in_valid[sched]) pref <= next_ch(sched);
    end else begin
      if (issued && sched == '0 && hint)           pref <= SW'(REPLAY_CH);
      else if (issued && int'(sched) == REPLAY_CH) pref <= '0;
    end
  end

endmodule
