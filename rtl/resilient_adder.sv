// resilient_adder: 64-bit adder stage protected by SECDED with speculation.
//
// Both operands arrive as 72-bit codewords (64 data + 8 check bits). The
// stage speculates that no soft error is present: the raw data bits go to
// the shared prefix adder at once, while two SECDED decoders check and
// correct the operands in parallel and their results wait in an empty
// elastic buffer. If either decoder found an error, the scheduler replays
// the addition with the corrected operands in the next cycle and the
// early-evaluation multiplexor discards the speculative sum (spec_replay).
// A double error cannot be corrected: the replayed sum then carries
// out_ded = 1.
// Interface: elastic input channel (in_vp/in_sp, two codewords) and output
// channel (out_vp/out_sp, sum, carry out, double-error flag).
// Timing: one addition per cycle when no error is found, one lost cycle for
// each operand pair with an error; 3 cycles from input transfer to out_vp.
// The 64-bit width, the 8 check bits, the prefix adder and the replay of a
// corrected operation follow the published resilient design; the code layout
// and the double-error flag on the output are this design's choices.
module resilient_adder
  import spec_pkg::*;
(
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_vp,
  output logic                     in_sp,
  input  logic [SECDED_CODE_W-1:0] in_a_code,
  input  logic [SECDED_CODE_W-1:0] in_b_code,
  output logic                     out_vp,
  input  logic                     out_sp,
  output logic [SECDED_DATA_W-1:0] out_sum,
  output logic                     out_cout,
  output logic                     out_ded,
  output logic                     stat_replay,
  output logic                     stat_fast
);

  localparam int unsigned D  = SECDED_DATA_W;
  localparam int unsigned WI = 2 * D + 1;   // {ded, a, b}
  localparam int unsigned WO = D + 2;       // {ded, cout, sum}

  logic [D-1:0] a_raw, a_fix, b_raw, b_fix;
  logic         a_sec, a_ded, a_err, b_sec, b_ded, b_err;

  secded_decoder u_dec_a (
    .code(in_a_code), .data_raw(a_raw), .data_fixed(a_fix),
    .sec(a_sec), .ded(a_ded), .err(a_err)
  );
  secded_decoder u_dec_b (
    .code(in_b_code), .data_raw(b_raw), .data_fixed(b_fix),
    .sec(b_sec), .ded(b_ded), .err(b_err)
  );

  logic [WI-1:0] add_arg;
  logic [WO-1:0] add_res, res;
  logic [D-1:0]  sum;
  logic          cout;

  prefix_adder #(.W(D)) u_add (
    .a(add_arg[2*D-1:D]), .b(add_arg[D-1:0]), .cin(1'b0),
    .sum, .cout
  );
  assign add_res = {add_arg[2*D], cout, sum};

  spec_replay #(.WI(WI), .WO(WO)) u_spec (
    .clk, .rst_n,
    .in_vp, .in_sp,
    .fast_data({1'b0, a_raw, b_raw}),
    .replay_data({a_ded || b_ded, a_fix, b_fix}),
    .wrong(a_err || b_err),
    .f_arg(add_arg), .f_res(add_res),
    .out_vp, .out_sp, .out_data(res),
    .stat_replay, .stat_fast
  );

  assign out_sum  = res[D-1:0];
  assign out_cout = res[D];
  assign out_ded  = res[D+1];

endmodule
