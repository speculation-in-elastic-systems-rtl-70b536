// tb_table1_trace: replays the seven-cycle example trace of the speculative
// loop on a round-robin shared module, an early-evaluation multiplexor and
// the buffer that takes the multiplexor's output.
//
// Channel 0 carries tokens A, (x), C, E, F and channel 1 (y), B, D, (z), G,
// where the tokens in brackets belong to slots the multiplexor will not
// select. The select stream is 0, 1, 1, 0, 0. All tokens are available from
// the start. The shared block is the identity. Expected per cycle:
//   scheduler choice : 0 1 0 1 0 1 0
//   buffer input     : A B - D E - F   ('-' = no token, a wrong guess)
// Wrong guesses in cycles 2 and 5 cost one cycle each; C and G are cancelled
// by anti-tokens.
`timescale 1ns/1ps
module tb_table1_trace;
  import spec_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = !clk;

  int unsigned checks = 0, failures = 0, cycle = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL cycle %0d: %s", cycle, what);
    end
  endtask

  // token streams per slot
  localparam logic [7:0] CH0 [5] = '{"A", "x", "C", "E", "F"};
  localparam logic [7:0] CH1 [5] = '{"y", "B", "D", "z", "G"};
  localparam bit         SEL [5] = '{1'b0, 1'b1, 1'b1, 1'b0, 1'b0};
  localparam bit         EXP_SCHED [7] = '{0, 1, 0, 1, 0, 1, 0};
  localparam logic [7:0] EXP_EB    [7] = '{"A", "B", "-", "D", "E", "-", "F"};

  int unsigned  slot [2];
  int unsigned  sel_slot;
  logic [1:0]   in_vp, in_sp, in_vn, in_sn, f_vp, f_sp, f_vn, f_sn;
  logic [7:0]   in_data [2];
  logic [7:0]   f_data, f_arg, mx_data [2];
  logic [0:0]   sched;
  logic         sel_vp, sel_sp;
  logic [0:0]   sel_data;
  logic         eb_vp, eb_sp, eb_vn, eb_sn, q_vp, q_sn;
  logic [7:0]   eb_data, q_data;

  always_comb begin
    for (int i = 0; i < 2; i++) begin
      in_vp[i]   = (slot[i] < 5);
      in_data[i] = (i == 0) ? CH0[slot[i] % 5] : CH1[slot[i] % 5];
    end
    sel_vp   = (sel_slot < 5);
    sel_data = SEL[sel_slot % 5];
  end
  assign in_sn      = '0;
  assign mx_data[0] = f_data;
  assign mx_data[1] = f_data;

  shared_module #(.N(2), .W_IN(8), .W_OUT(8), .POLICY(SCHED_RR)) u_shared (
    .clk, .rst_n,
    .in_vp, .in_sp, .in_vn, .in_sn, .in_data,
    .out_vp(f_vp), .out_sp(f_sp), .out_vn(f_vn), .out_sn(f_sn), .out_data(f_data),
    .f_arg, .f_res(f_arg), .hint(1'b0), .sched
  );

  ee_mux #(.N(2), .W(8)) u_mux (
    .clk, .rst_n,
    .sel_vp, .sel_sp, .sel_data,
    .in_vp(f_vp), .in_sp(f_sp), .in_vn(f_vn), .in_sn(f_sn), .in_data(mx_data),
    .out_vp(eb_vp), .out_sp(eb_sp), .out_vn(eb_vn), .out_sn(eb_sn), .out_data(eb_data)
  );

  elastic_buffer #(.W(8)) u_eb (
    .clk, .rst_n,
    .in_vp(eb_vp), .in_sp(eb_sp), .in_vn(eb_vn), .in_sn(eb_sn), .in_data(eb_data),
    .out_vp(q_vp), .out_sp(1'b0), .out_vn(1'b0), .out_sn(q_sn), .out_data(q_data)
  );

  int unsigned n_cancel = 0;

  initial begin
    slot[0] = 0; slot[1] = 0; sel_slot = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
  end

  always @(posedge clk) begin
    if (rst_n) begin
      logic [7:0] got;
      got = (eb_vp && !eb_sp) ? eb_data : "-";
      if (cycle < 7) begin
        check(sched == EXP_SCHED[cycle], $sformatf("scheduler chose %0d, trace says %0d", sched, EXP_SCHED[cycle]));
        check(got == EXP_EB[cycle], $sformatf("buffer input %s, trace says %s", got, EXP_EB[cycle]));
      end
      for (int i = 0; i < 2; i++) begin
        if (in_vp[i] && in_vn[i]) begin n_cancel++; slot[i]++; end
        else if (in_vp[i] && !in_sp[i]) slot[i]++;
      end
      if (sel_vp && !sel_sp) sel_slot++;
      cycle <= cycle + 1;
      if (cycle == 9) begin
        check(slot[0] == 5 && slot[1] == 5 && sel_slot == 5, "not every slot was used up");
        check(n_cancel == 5, $sformatf("%0d tokens cancelled, expected 5", n_cancel));
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
  end

  initial begin
    repeat (100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
