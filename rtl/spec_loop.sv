// spec_loop: a loop whose critical cycle runs into the select of a
// multiplexor, made fast by speculation.
//
// State: one elastic buffer holding one token x (think of it as a program
// counter). Each iteration computes
//     x' = F(G(x) ? x + OFFSET : x)
// where G (the "branch taken" decision) drives the select of an
// early-evaluation multiplexor and F (here: add STEP) is the block after the
// multiplexor. F has been moved in front of the multiplexor (Shannon
// decomposition) and its two copies merged into one shared module, so F runs
// in parallel with G: the shared module's round-robin scheduler guesses
// which multiplexor input needs F this cycle. A right guess lets the
// multiplexor fire at once and an anti-token removes the unused input; a
// wrong guess is seen as a stop on the chosen channel, and the scheduler
// switches in the next cycle. No buffers sit between the shared module and
// the multiplexor.
// Interface: elastic output channel (out_vp/out_sp/out_data) carrying every
// value the state buffer takes, starting with INIT_DATA; back-pressure on it
// stalls the loop. stat_* pulse when the multiplexor fires and when a
// guess is found wrong.
// Timing: one iteration per cycle when the guess is right, two when wrong.
// The structure follows the published speculative loop; G, F, the widths
// and constants are this design's choices.
module spec_loop
  import spec_pkg::*;
#(
  parameter int unsigned  W         = 16,
  parameter logic [W-1:0] INIT_DATA = W'(1),
  parameter logic [W-1:0] OFFSET    = W'(16'h0130),
  parameter logic [W-1:0] STEP      = W'(4),
  parameter logic [W-1:0] G_MASK    = W'(16'h0a14)
) (
  input  logic         clk,
  input  logic         rst_n,
  output logic         out_vp,
  input  logic         out_sp,
  output logic [W-1:0] out_data,
  output logic         stat_fire,
  output logic         stat_mispredict
);

  // state buffer
  logic         eb_in_vp, eb_in_sp, eb_in_vn, eb_in_sn;
  logic [W-1:0] eb_in_data;
  logic         eb_vp, eb_sp, eb_sn;
  logic [W-1:0] x;

  elastic_buffer #(.W(W), .INIT_TOKEN(1'b1), .INIT_DATA(INIT_DATA)) u_state (
    .clk, .rst_n,
    .in_vp(eb_in_vp), .in_sp(eb_in_sp), .in_vn(eb_in_vn), .in_sn(eb_in_sn),
    .in_data(eb_in_data),
    .out_vp(eb_vp), .out_sp(eb_sp), .out_vn(1'b0), .out_sn(eb_sn),
    .out_data(x)
  );

  // fork: 0,1 -> shared F inputs, 2 -> G / select, 3 -> output port
  logic [3:0] fk_vp, fk_sp, fk_vn, fk_sn;
  logic       fk_in_vn;

  elastic_fork #(.N(4)) u_fork (
    .clk, .rst_n,
    .in_vp(eb_vp), .in_sp(eb_sp), .in_vn(fk_in_vn), .in_sn(eb_sn),
    .out_vp(fk_vp), .out_sp(fk_sp), .out_vn(fk_vn), .out_sn(fk_sn)
  );

  assign out_vp   = fk_vp[3];
  assign fk_sp[3] = out_sp;
  assign fk_vn[3] = 1'b0;
  assign out_data = x;

  // shared F
  logic [1:0]   sh_in_sp, sh_in_vn;
  logic [W-1:0] sh_in_data [2];
  logic [1:0]   sh_out_vp, sh_out_sp, sh_out_vn, sh_out_sn;
  logic [W-1:0] f_arg, f_res, sh_out_data;
  logic         sched;

  assign sh_in_data[0] = x;
  assign sh_in_data[1] = x + OFFSET;
  assign fk_sp[1:0]    = sh_in_sp;
  assign fk_vn[1:0]    = sh_in_vn;
  assign f_res         = f_arg + STEP;

  shared_module #(.N(2), .W_IN(W), .W_OUT(W), .POLICY(SCHED_RR)) u_shared (
    .clk, .rst_n,
    .in_vp(fk_vp[1:0]), .in_sp(sh_in_sp), .in_vn(sh_in_vn), .in_sn(fk_sn[1:0]),
    .in_data(sh_in_data),
    .out_vp(sh_out_vp), .out_sp(sh_out_sp), .out_vn(sh_out_vn), .out_sn(sh_out_sn),
    .out_data(sh_out_data),
    .f_arg, .f_res,
    .hint(1'b0), .sched
  );

  // early-evaluation multiplexor, select = G(x)
  logic         g_sel, sel_sp;
  logic [W-1:0] mx_data [2];

  assign g_sel      = ^(x & G_MASK);
  assign mx_data[0] = sh_out_data;
  assign mx_data[1] = sh_out_data;
  assign fk_sp[2]   = sel_sp;
  assign fk_vn[2]   = 1'b0;

  ee_mux #(.N(2), .W(W)) u_mux (
    .clk, .rst_n,
    .sel_vp(fk_vp[2]), .sel_sp, .sel_data(g_sel),
    .in_vp(sh_out_vp), .in_sp(sh_out_sp), .in_vn(sh_out_vn), .in_sn(sh_out_sn),
    .in_data(mx_data),
    .out_vp(eb_in_vp), .out_sp(eb_in_sp), .out_vn(eb_in_vn), .out_sn(eb_in_sn),
    .out_data(eb_in_data)
  );

  assign stat_fire       = eb_in_vp && !eb_in_sp;
  assign stat_mispredict = sh_out_vp[sched] && sh_out_sp[sched] && !sh_out_vn[sched];

endmodule
