// ee_mux: early-evaluation multiplexor for elastic channels with anti-tokens.
//
// The multiplexor fires as soon as the select token and the token on the
// selected data input are valid (and the output can take a token); it does not
// wait for the other data inputs. On firing it consumes the select and the
// selected token and issues one anti-token to every other data input: the
// token that input will carry for this firing is not needed. An anti-token
// kills the token waiting on that input in the same cycle if one is there,
// otherwise it is sent backwards (active) or, if the sender stops it, kept in
// a per-input counter until it can leave. A token that arrives on an input
// with a pending anti-token is killed, never used.
// If the selected data is missing (a misprediction upstream), the select
// waits and the token on any other input is stopped, not consumed.
// Anti-tokens arriving at the output are not propagated: they wait (out_sn
// high while no token is offered) and cancel the next output token.
// Timing: out_vp and the input stop/kill bits are combinational in the input
// valids and the output stop; pending counters are registered.
// Firing rule and anti-token generation follow the early-evaluation scheme;
// the counter depth (PEND_W bits) and the passive output side are this
// design's choices.
module ee_mux #(
  parameter int unsigned N      = 2,
  parameter int unsigned W      = 8,
  parameter int unsigned PEND_W = 2,
  localparam int unsigned SW    = (N > 1) ? $clog2(N) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  // select channel
  input  logic          sel_vp,
  output logic          sel_sp,
  input  logic [SW-1:0] sel_data,
  // data inputs
  input  logic [N-1:0]  in_vp,
  output logic [N-1:0]  in_sp,
  output logic [N-1:0]  in_vn,
  input  logic [N-1:0]  in_sn,
  input  logic [W-1:0]  in_data [N],
  // output channel
  output logic          out_vp,
  input  logic          out_sp,
  input  logic          out_vn,
  output logic          out_sn,
  output logic [W-1:0]  out_data
);

  localparam logic [PEND_W-1:0] PEND_MAX = '1;

  logic [PEND_W-1:0] pend [N];
  logic [PEND_W-1:0] pend_nxt [N];
  logic [N-1:0]      room;      // input can take one more anti-token
  logic [N-1:0]      veff;      // valid token with no anti-token ahead of it
  logic              offer, fire;

  always_comb begin
    for (int i = 0; i < N; i++) begin
      veff[i] = in_vp[i] && (pend[i] == '0);
      room[i] = (pend[i] != PEND_MAX) || (int'(sel_data) == i);
    end
    offer    = sel_vp && (int'(sel_data) < N) && veff[sel_data] && (&room);
    out_vp   = offer;
    out_sn   = !offer;
    out_data = in_data[sel_data];
    fire     = offer && (!out_sp || out_vn);
    sel_sp   = !fire;

    for (int i = 0; i < N; i++) begin
      logic [PEND_W:0] tot;
      logic            newa, leave;
      newa   = fire && (int'(sel_data) != i);
      tot    = {1'b0, pend[i]} + {{PEND_W{1'b0}}, newa};
      in_vn[i] = (tot != '0);
      // a token is accepted when it is used, or killed by an anti-token
      in_sp[i] = !((fire && (int'(sel_data) == i)) || in_vn[i]);
      leave  = in_vn[i] && (in_vp[i] || !in_sn[i]);
      pend_nxt[i] = PEND_W'(tot - {{PEND_W{1'b0}}, leave});
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) pend[i] <= '0;
    end else begin
      for (int i = 0; i < N; i++) pend[i] <= pend_nxt[i];
    end
  end

  a_kill_excl: assert property (@(posedge clk) disable iff (!rst_n) !(|(in_sp & in_vn & in_vp)));

endmodule
