// elastic_buffer_zbl: elastic buffer with zero backward latency.
//
// Forward latency 1, backward latency 0, capacity 1 (C = Lf + Lb). The token
// valid bit and the data are registered; the stop bit and the anti-token (kill)
// bit pass through combinationally. While the buffer is full, an anti-token
// arriving at the output kills the stored token, and the sender may write a new
// token in the same cycle in which the stored one leaves or is killed. While
// it is empty, an anti-token from the receiver goes straight on to the sender
// (and its stop bit straight back), so anti-tokens rush backwards to the token
// they must cancel. Chaining many of these gives long combinational control
// paths.
//
// Channels: vp/sp token valid/stop, vn/sn anti-token valid/stop.
// The single valid flip-flop plus data register and the asynchronous
// active-low reset are this design's choices.
module elastic_buffer_zbl #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_vp,
  output logic         in_sp,
  output logic         in_vn,
  input  logic         in_sn,
  input  logic [W-1:0] in_data,
  output logic         out_vp,
  input  logic         out_sp,
  input  logic         out_vn,
  output logic         out_sn,
  output logic [W-1:0] out_data
);

  logic         full;
  logic [W-1:0] data_q;
  logic         removed;   // stored token transferred or killed this cycle
  logic         tok_in;

  assign out_vp   = full;
  assign out_data = data_q;
  assign removed  = full && (!out_sp || out_vn);
  assign in_sp    = full && !removed;
  assign in_vn    = out_vn && !full;
  assign out_sn   = !full && in_sn;
  assign tok_in   = in_vp && !in_sp && !in_vn;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      full   <= 1'b0;
      data_q <= '0;
    end else begin
      full <= (full && !removed) || tok_in;
      if (tok_in) data_q <= in_data;
    end
  end

  a_in_excl : assert property (@(posedge clk) disable iff (!rst_n) !(in_sp && in_vn));
  a_out_excl: assert property (@(posedge clk) disable iff (!rst_n) !(out_vp && out_sn));
  // Retry rule on the output: a stopped token is offered again, unchanged.
  a_persist : assert property (@(posedge clk) disable iff (!rst_n)
                               out_vp && out_sp && !out_vn |=> out_vp && $stable(out_data));

endmodule
