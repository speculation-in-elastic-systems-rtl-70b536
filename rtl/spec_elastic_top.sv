// spec_elastic_top: the three speculative elastic designs side by side.
//
//  loop_*  : spec_loop, a self-timed loop where a shared block is speculated
//            ahead of an early-evaluation multiplexor (output channel only).
//  alu_*   : varlat_alu, 8-bit variable-latency ALU, speculating on an
//            approximate result and replaying the exact one.
//  add_*   : resilient_adder, 64-bit adder with SECDED-checked operands,
//            speculating on error-free inputs and replaying corrected ones.
// Each design has its own elastic input/output channels (valid/stop) and
// event outputs; they share only clock and reset (asynchronous, active low).
module spec_elastic_top
  import spec_pkg::*;
(
  input  logic                     clk,
  input  logic                     rst_n,
  // speculative loop
  output logic                     loop_out_vp,
  input  logic                     loop_out_sp,
  output logic [15:0]              loop_out_data,
  output logic                     loop_stat_fire,
  output logic                     loop_stat_mispredict,
  // variable-latency ALU
  input  logic                     alu_in_vp,
  output logic                     alu_in_sp,
  input  alu_op_e                  alu_in_op,
  input  logic [7:0]               alu_in_a,
  input  logic [7:0]               alu_in_b,
  output logic                     alu_out_vp,
  input  logic                     alu_out_sp,
  output logic [7:0]               alu_out_result,
  output logic                     alu_out_zero,
  output logic                     alu_out_neg,
  output logic                     alu_stat_replay,
  output logic                     alu_stat_fast,
  // resilient adder
  input  logic                     add_in_vp,
  output logic                     add_in_sp,
  input  logic [SECDED_CODE_W-1:0] add_in_a_code,
  input  logic [SECDED_CODE_W-1:0] add_in_b_code,
  output logic                     add_out_vp,
  input  logic                     add_out_sp,
  output logic [SECDED_DATA_W-1:0] add_out_sum,
  output logic                     add_out_cout,
  output logic                     add_out_ded,
  output logic                     add_stat_replay,
  output logic                     add_stat_fast
);

  spec_loop u_loop (
    .clk, .rst_n,
    .out_vp(loop_out_vp), .out_sp(loop_out_sp), .out_data(loop_out_data),
    .stat_fire(loop_stat_fire), .stat_mispredict(loop_stat_mispredict)
  );

  varlat_alu u_alu (
    .clk, .rst_n,
    .in_vp(alu_in_vp), .in_sp(alu_in_sp), .in_op(alu_in_op), .in_a(alu_in_a), .in_b(alu_in_b),
    .out_vp(alu_out_vp), .out_sp(alu_out_sp), .out_result(alu_out_result),
    .out_zero(alu_out_zero), .out_neg(alu_out_neg),
    .stat_replay(alu_stat_replay), .stat_fast(alu_stat_fast)
  );

  resilient_adder u_add (
    .clk, .rst_n,
    .in_vp(add_in_vp), .in_sp(add_in_sp), .in_a_code(add_in_a_code), .in_b_code(add_in_b_code),
    .out_vp(add_out_vp), .out_sp(add_out_sp), .out_sum(add_out_sum),
    .out_cout(add_out_cout), .out_ded(add_out_ded),
    .stat_replay(add_stat_replay), .stat_fast(add_stat_fast)
  );

endmodule
