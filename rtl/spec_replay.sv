// spec_replay: speculation with replay around one shared combinational block.
//
// The common skeleton of the variable-latency ALU and the resilient adder.
// Each input token carries a fast (speculative) operand, a slow but correct
// replay operand and a flag telling whether the fast operand was wrong. An
// eager fork sends the token three ways:
//   channel 0 : fast operand straight to the shared block (predicted path);
//   channel 1 : replay operand through an empty elastic buffer (a bubble);
//   select    : the wrong-guess flag through an elastic buffer to the
//               early-evaluation multiplexor.
// The shared block (f_arg -> f_res, outside this module) serves channel 0
// unless the scheduler was told, by the flag of the token it just issued on
// channel 0, to replay: then it serves channel 1 next cycle. Both results go
// through zero-backward-latency buffers to the multiplexor, which picks the
// channel named by the flag and kills the other one's result with an
// anti-token; the result passes an output elastic buffer.
// Timing: with correct guesses one token per cycle, latency 3 cycles from an
// accepted input to out_vp; each wrong guess costs one cycle. The flag only
// reaches registers (select buffer, scheduler), never the control path of
// the same cycle.
// Arrangement follows the published speculative variable-latency and
// SECDED designs; buffer kinds and the scheduler policy are this design's
// choice.
module spec_replay
  import spec_pkg::*;
#(
  parameter int unsigned WI = 8,
  parameter int unsigned WO = 8
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_vp,
  output logic          in_sp,
  input  logic [WI-1:0] fast_data,
  input  logic [WI-1:0] replay_data,
  input  logic          wrong,        // fast_data is not the correct operand
  output logic [WI-1:0] f_arg,
  input  logic [WO-1:0] f_res,
  output logic          out_vp,
  input  logic          out_sp,
  output logic [WO-1:0] out_data,
  output logic          stat_replay,  // multiplexor took the replayed result
  output logic          stat_fast     // multiplexor took the speculative result
);

  // fork
  logic [2:0] fk_vp, fk_sp, fk_vn, fk_sn;
  logic       fk_in_vn;

  elastic_fork #(.N(3)) u_fork (
    .clk, .rst_n,
    .in_vp, .in_sp, .in_vn(fk_in_vn), .in_sn(1'b0),
    .out_vp(fk_vp), .out_sp(fk_sp), .out_vn(fk_vn), .out_sn(fk_sn)
  );

  // replay operand bubble
  logic          rb_vp, rb_sp, rb_vn, rb_sn;
  logic [WI-1:0] rb_data;

  elastic_buffer #(.W(WI), .INIT_TOKEN(1'b0)) u_replay_eb (
    .clk, .rst_n,
    .in_vp(fk_vp[1]), .in_sp(fk_sp[1]), .in_vn(fk_vn[1]), .in_sn(fk_sn[1]),
    .in_data(replay_data),
    .out_vp(rb_vp), .out_sp(rb_sp), .out_vn(rb_vn), .out_sn(rb_sn),
    .out_data(rb_data)
  );

  // select (wrong-guess flag) buffer
  logic sb_vp, sb_sp, sb_data, sb_sn;

  elastic_buffer #(.W(1), .INIT_TOKEN(1'b0)) u_sel_eb (
    .clk, .rst_n,
    .in_vp(fk_vp[2]), .in_sp(fk_sp[2]), .in_vn(fk_vn[2]), .in_sn(fk_sn[2]),
    .in_data(wrong),
    .out_vp(sb_vp), .out_sp(sb_sp), .out_vn(1'b0), .out_sn(sb_sn),
    .out_data(sb_data)
  );

  // shared block
  logic [1:0]    sh_in_vp, sh_in_sp, sh_in_vn, sh_in_sn;
  logic [WI-1:0] sh_in_data [2];
  logic [1:0]    sh_out_vp, sh_out_sp, sh_out_vn, sh_out_sn;
  logic [WO-1:0] sh_out_data;
  logic          sched;

  assign sh_in_vp      = {rb_vp, fk_vp[0]};
  assign sh_in_sn      = {rb_sn, fk_sn[0]};
  assign sh_in_data[0] = fast_data;
  assign sh_in_data[1] = rb_data;
  assign fk_sp[0]      = sh_in_sp[0];
  assign fk_vn[0]      = sh_in_vn[0];
  assign rb_sp         = sh_in_sp[1];
  assign rb_vn         = sh_in_vn[1];

  shared_module #(.N(2), .W_IN(WI), .W_OUT(WO), .POLICY(SCHED_PRIMARY), .REPLAY_CH(1)) u_shared (
    .clk, .rst_n,
    .in_vp(sh_in_vp), .in_sp(sh_in_sp), .in_vn(sh_in_vn), .in_sn(sh_in_sn),
    .in_data(sh_in_data),
    .out_vp(sh_out_vp), .out_sp(sh_out_sp), .out_vn(sh_out_vn), .out_sn(sh_out_sn),
    .out_data(sh_out_data),
    .f_arg, .f_res,
    .hint(wrong), .sched
  );

  // result buffers after the shared block (zero backward latency)
  logic [1:0]    mx_vp, mx_sp, mx_vn, mx_sn;
  logic [WO-1:0] mx_data [2];

  for (genvar c = 0; c < 2; c++) begin : g_res
    elastic_buffer_zbl #(.W(WO)) u_res_eb (
      .clk, .rst_n,
      .in_vp(sh_out_vp[c]), .in_sp(sh_out_sp[c]), .in_vn(sh_out_vn[c]), .in_sn(sh_out_sn[c]),
      .in_data(sh_out_data),
      .out_vp(mx_vp[c]), .out_sp(mx_sp[c]), .out_vn(mx_vn[c]), .out_sn(mx_sn[c]),
      .out_data(mx_data[c])
    );
  end

  // early-evaluation multiplexor
  logic          mo_vp, mo_sp, mo_vn, mo_sn;
  logic [WO-1:0] mo_data;

  ee_mux #(.N(2), .W(WO)) u_mux (
    .clk, .rst_n,
    .sel_vp(sb_vp), .sel_sp(sb_sp), .sel_data(sb_data),
    .in_vp(mx_vp), .in_sp(mx_sp), .in_vn(mx_vn), .in_sn(mx_sn), .in_data(mx_data),
    .out_vp(mo_vp), .out_sp(mo_sp), .out_vn(mo_vn), .out_sn(mo_sn), .out_data(mo_data)
  );

  // output buffer
  logic ob_sn_unused;

  elastic_buffer #(.W(WO), .INIT_TOKEN(1'b0)) u_out_eb (
    .clk, .rst_n,
    .in_vp(mo_vp), .in_sp(mo_sp), .in_vn(mo_vn), .in_sn(mo_sn), .in_data(mo_data),
    .out_vp, .out_sp, .out_vn(1'b0), .out_sn(ob_sn_unused), .out_data
  );

  assign stat_replay  = mo_vp && !mo_sp && sb_data;
  assign stat_fast    = mo_vp && !mo_sp && !sb_data;

endmodule
