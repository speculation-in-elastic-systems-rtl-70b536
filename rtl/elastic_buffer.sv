// elastic_buffer: elastic buffer (EB) that stores tokens and anti-tokens.
//
// Forward latency 1, backward latency 1, capacity 2, as in the SELF protocol
// with anti-tokens. The buffer keeps one signed occupancy count k: k > 0 means
// k data tokens are stored, k < 0 means -k anti-tokens are stored. A token
// and an anti-token cancel at either boundary: an anti-token arriving at the
// output kills the token offered there, and a stored anti-token offered at
// the input kills the token the sender offers. Data tokens sit in a two-entry
// FIFO, so a sender that did not yet see the stop bit cannot overwrite one.
//
// Channels (both sides): vp = token valid, sp = token stop, vn = anti-token
// valid (travels backwards), sn = anti-token stop (travels forwards).
// Timing: out_vp, in_sp, in_vn and out_sn are functions of the registers only,
// so tokens, stop bits and anti-tokens each cross the buffer in one cycle.
// The occupancy rules follow the abstract model of an elastic FIFO with
// anti-tokens; the flip-flop FIFO (instead of a pair of transparent latches)
// and the asynchronous active-low reset are this design's choices.
// INIT_TOKEN = 1 makes the buffer start holding one token of value INIT_DATA
// (like a register); INIT_TOKEN = 0 makes it an empty buffer (a bubble).
module elastic_buffer #(
  parameter int unsigned W          = 8,
  parameter bit          INIT_TOKEN = 1'b0,
  parameter logic [W-1:0] INIT_DATA = '0
) (
  input  logic         clk,
  input  logic         rst_n,
  // input channel (from the sender)
  input  logic         in_vp,
  output logic         in_sp,
  output logic         in_vn,
  input  logic         in_sn,
  input  logic [W-1:0] in_data,
  // output channel (to the receiver)
  output logic         out_vp,
  input  logic         out_sp,
  input  logic         out_vn,
  output logic         out_sn,
  output logic [W-1:0] out_data
);

  logic signed [2:0] k;         // tokens (>0) or anti-tokens (<0) stored
  logic [W-1:0]      mem [2];
  logic              rd_ptr, wr_ptr;

  logic tok_in;        // a token enters the FIFO side of the buffer
  logic anti_rm_in;    // a stored anti-token leaves at the input (cancel or pass)
  logic tok_rm_out;    // the head token leaves at the output (transfer or kill)
  logic anti_add_out;  // an anti-token arriving at the output is stored
  logic push, pop;

  assign out_vp   = (k > 0);
  assign in_sp    = (k == 3'sd2);
  assign in_vn    = (k < 0);
  assign out_sn   = (k == -3'sd2);
  assign out_data = mem[rd_ptr];

  assign tok_in       = in_vp && !in_sp && !in_vn;
  assign anti_rm_in   = in_vn && !in_sn;
  assign tok_rm_out   = out_vp && (!out_sp || out_vn);
  assign anti_add_out = out_vn && !out_sn && !out_vp;

  // With k == 0 an entering token and an anti-token stored in the same cycle
  // cancel inside the buffer: the data is never written.
  assign push = tok_in && !anti_add_out;
  assign pop  = tok_rm_out;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      k      <= INIT_TOKEN ? 3'sd1 : 3'sd0;
      rd_ptr <= 1'b0;
      wr_ptr <= INIT_TOKEN;
      mem[0] <= INIT_DATA;
      mem[1] <= '0;
    end else begin
      k <= k + $signed({2'b00, tok_in}) + $signed({2'b00, anti_rm_in})
             - $signed({2'b00, tok_rm_out}) - $signed({2'b00, anti_add_out});
      if (push) begin
        mem[wr_ptr] <= in_data;
        wr_ptr      <= !wr_ptr;
      end
      if (pop) rd_ptr <= !rd_ptr;
    end
  end

  // SELF channel rules seen from this buffer: a token is never stopped and
  // killed at once, and the count stays inside the capacity.
  a_in_excl : assert property (@(posedge clk) disable iff (!rst_n) !(in_sp && in_vn));
  a_out_excl: assert property (@(posedge clk) disable iff (!rst_n) !(out_vp && out_sn));
  // Retry rule: a stopped token (or anti-token) is offered again, unchanged.
  a_persist : assert property (@(posedge clk) disable iff (!rst_n)
                               out_vp && out_sp && !out_vn |=> out_vp && $stable(out_data));
  a_persist_n: assert property (@(posedge clk) disable iff (!rst_n) in_vn && in_sn |=> in_vn);
  a_range   : assert property (@(posedge clk) disable iff (!rst_n) (k <= 3'sd2) && (k >= -3'sd2));

endmodule
