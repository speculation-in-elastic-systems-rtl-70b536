// varlat_alu: variable-latency ALU built with speculation and replay.
//
// The exact ALU (add, sub, and, or, xor on W-bit operands) has a long carry
// chain. An approximate ALU cuts the chain in the middle: the upper half is
// computed as if no carry came out of the lower half. F_err, the carry out of
// the lower half of an add/sub, tells that the approximation is wrong. The
// design always speculates that the approximation is right and feeds it to
// the shared output stage G in the same cycle; when F_err was set, the
// exact result (kept in an empty elastic buffer) is sent through G the next
// cycle and the early-evaluation multiplexor takes that one instead
// (spec_replay). G forms the result with zero and negative flags.
// Interface: elastic input channel (in_vp/in_sp, op and operands) and output
// channel (out_vp/out_sp, result and flags); no anti-tokens cross the ports.
// Timing: one operation per cycle when F_err is clear, one extra cycle per
// operation with F_err set; 3 cycles from input transfer to out_vp.
// The 8-bit width and the approximate/exact/F_err split follow the published
// variable-latency ALU; the operation set, the half-width carry cut and the
// flags computed by G are this design's choices.
module varlat_alu
  import spec_pkg::*;
#(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_vp,
  output logic         in_sp,
  input  alu_op_e      in_op,
  input  logic [W-1:0] in_a,
  input  logic [W-1:0] in_b,
  output logic         out_vp,
  input  logic         out_sp,
  output logic [W-1:0] out_result,
  output logic         out_zero,
  output logic         out_neg,
  output logic         stat_replay,
  output logic         stat_fast
);

  localparam int unsigned H = W / 2;

  logic [W-1:0] exact, approx;
  logic         f_err;

  // F_exact, F_approx and F_err
  always_comb begin
    logic [W-1:0] bb;
    logic         cin;
    logic [H:0]   lo;
    logic [W-H-1:0] hi;
    bb  = (in_op == ALU_SUB) ? ~in_b : in_b;
    cin = (in_op == ALU_SUB);
    lo  = {1'b0, in_a[H-1:0]} + {1'b0, bb[H-1:0]} + (H+1)'(cin);
    hi  = in_a[W-1:H] + bb[W-1:H];
    unique case (in_op)
      ALU_ADD, ALU_SUB: begin
        exact  = in_a + bb + W'(cin);
        approx = {hi, lo[H-1:0]};
        f_err  = lo[H];
      end
      ALU_AND: begin exact = in_a & in_b; approx = exact; f_err = 1'b0; end
      ALU_OR:  begin exact = in_a | in_b; approx = exact; f_err = 1'b0; end
      ALU_XOR: begin exact = in_a ^ in_b; approx = exact; f_err = 1'b0; end
      default: begin exact = '0;          approx = exact; f_err = 1'b0; end
    endcase
  end

  // shared output stage G: {negative, zero, result}
  logic [W-1:0] g_arg;
  logic [W+1:0] g_res, res;

  assign g_res = {g_arg[W-1], (g_arg == '0), g_arg};

  spec_replay #(.WI(W), .WO(W + 2)) u_spec (
    .clk, .rst_n,
    .in_vp, .in_sp,
    .fast_data(approx), .replay_data(exact), .wrong(f_err),
    .f_arg(g_arg), .f_res(g_res),
    .out_vp, .out_sp, .out_data(res),
    .stat_replay, .stat_fast
  );

  assign out_result = res[W-1:0];
  assign out_zero   = res[W];
  assign out_neg    = res[W+1];

endmodule
