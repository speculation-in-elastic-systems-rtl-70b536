// elastic_fork: eager fork of one elastic channel into N branches.
//
// The incoming token is offered on every branch that has not yet taken it; a
// branch is done once its receiver accepts the token or kills it with an
// anti-token. When every branch is done the input token is consumed. Data is
// not copied here: each branch reads the sender's data (or a function of it).
// Anti-tokens stop at the fork: one arriving on a branch with no token on
// offer waits there (passive) until the next token reaches that branch, so the
// fork never sends anti-tokens to its own sender (in_vn is tied low).
// Timing: branch valids depend on the input valid and a done flag per branch;
// the input stop bit depends combinationally on the branch stop/kill bits.
// Eager forks are the usual SELF primitive; this version is this design's own.
module elastic_fork #(
  parameter int unsigned N = 2
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_vp,
  output logic         in_sp,
  output logic         in_vn,
  input  logic         in_sn,
  output logic [N-1:0] out_vp,
  input  logic [N-1:0] out_sp,
  input  logic [N-1:0] out_vn,
  output logic [N-1:0] out_sn
);

  logic [N-1:0] done_q;
  logic [N-1:0] done_now;
  logic         all_done;

  always_comb begin
    for (int i = 0; i < N; i++) begin
      out_vp[i]   = in_vp && !done_q[i];
      out_sn[i]   = !out_vp[i];
      done_now[i] = done_q[i] || (out_vp[i] && (!out_sp[i] || out_vn[i]));
    end
    all_done = &done_now;
  end

  assign in_sp = !all_done;
  assign in_vn = 1'b0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                 done_q <= '0;
    else if (in_vp && all_done) done_q <= '0;
    else if (in_vp)             done_q <= done_now;
  end

  // in_sn is unused: the fork never offers anti-tokens upstream.
  logic unused_sn;
  assign unused_sn = in_sn;

endmodule
