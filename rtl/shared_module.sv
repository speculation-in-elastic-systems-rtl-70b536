// shared_module: one combinational block shared by N elastic channels.
//
// Each input channel i wants the block applied to its token and the result
// sent on output channel i. A scheduler (spec_scheduler) picks one channel per
// cycle; the input multiplexor steers that channel's data to the block
// (f_arg), and the block's result (f_res) drives the data of every output
// channel. Control per channel:
//  - chosen channel: out_vp = in_vp, and its stop/kill bits pass straight back;
//  - other channels: out_vp = 0, and the input is stopped unless an anti-token
//    is killing it (stop and kill of a channel are never high together).
// Anti-tokens (vn/sn) pass through combinationally in both directions, so a
// token stalled at an input waiting for a possible replay is cancelled as
// soon as the multiplexor downstream decides it is not needed.
// Because the scheduler may change its choice after a stopped cycle, the
// output channels are not persistent; inputs are. Datapath delay added: one
// multiplexor. Structure follows the published shared-module controller; the
// scheduler policy is a parameter.
module shared_module
  import spec_pkg::*;
#(
  parameter int unsigned   N         = 2,
  parameter int unsigned   W_IN      = 8,
  parameter int unsigned   W_OUT     = 8,
  parameter sched_policy_e POLICY    = SCHED_RR,
  parameter int unsigned   REPLAY_CH = 1,
  localparam int unsigned  SW        = (N > 1) ? $clog2(N) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [N-1:0]     in_vp,
  output logic [N-1:0]     in_sp,
  output logic [N-1:0]     in_vn,
  input  logic [N-1:0]     in_sn,
  input  logic [W_IN-1:0]  in_data [N],
  output logic [N-1:0]     out_vp,
  input  logic [N-1:0]     out_sp,
  input  logic [N-1:0]     out_vn,
  output logic [N-1:0]     out_sn,
  output logic [W_OUT-1:0] out_data,
  // the shared combinational block
  output logic [W_IN-1:0]  f_arg,
  input  logic [W_OUT-1:0] f_res,
  // scheduler
  input  logic             hint,
  output logic [SW-1:0]    sched
);

  logic issued;

  spec_scheduler #(.N(N), .POLICY(POLICY), .REPLAY_CH(REPLAY_CH)) u_sched (
    .clk, .rst_n,
    .in_valid(in_vp),
    .issued,
    .hint,
    .sched
  );

  always_comb begin
    for (int i = 0; i < N; i++) begin
      if (int'(sched) == i) begin
        out_vp[i] = in_vp[i];
        in_sp[i]  = out_sp[i];
      end else begin
        out_vp[i] = 1'b0;
        in_sp[i]  = !out_vn[i];
      end
      in_vn[i]  = out_vn[i];
      out_sn[i] = in_sn[i];
    end
    issued = out_vp[sched] && (!out_sp[sched] || out_vn[sched]);
  end

  assign f_arg    = in_data[sched];
  assign out_data = f_res;

  a_excl: assert property (@(posedge clk) disable iff (!rst_n) !(|(in_sp & in_vn)));

endmodule
