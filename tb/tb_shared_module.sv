// tb_shared_module: self-checking test of the shared module (round-robin).
//
// Two input channels carry tokens tagged {channel, number}; the shared block
// in the testbench is f(x) = x ^ 8'h5a. On each output channel the k-th event
// (token received, or anti-token accepted) must be f of that channel's k-th
// token, so every token is served exactly once, in order, or cancelled.
// Also checked each cycle: only the scheduled channel is valid at the
// output, anti-tokens pass back in the same cycle, stop and kill of a channel
// are never high together, and no channel waits longer than a few cycles
// while the receivers are ready (no starvation).
`timescale 1ns/1ps
module tb_shared_module;
  import spec_pkg::*;

  localparam int unsigned N = 2;
  localparam int unsigned W = 8;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = !clk;

  int unsigned checks = 0, failures = 0, cycle = 0;

  logic [N-1:0] in_vp, in_sp, in_vn, in_sn, out_vp, out_sp, out_vn, out_sn;
  logic [W-1:0] in_data [N];
  logic [W-1:0] out_data, f_arg, f_res;
  logic         hint;
  logic [0:0]   sched;

  assign f_res = f_arg ^ 8'h5a;
  assign hint  = 1'b0;

  shared_module #(.N(N), .W_IN(W), .W_OUT(W), .POLICY(SCHED_RR)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL cycle %0d: %s", cycle, what);
    end
  endtask

  int unsigned s_seq [N], r_cnt [N], wait_cnt [N];
  int unsigned n_out = 0, n_retry_switch = 0, n_kill = 0;
  bit          last_retry = 0;
  int unsigned last_sched = 0;

  initial begin
    foreach (s_seq[i]) begin s_seq[i] = 0; r_cnt[i] = 0; wait_cnt[i] = 0; end
    in_vp = '0; in_sn = '0; out_sp = '0; out_vn = '0;
    for (int i = 0; i < N; i++) in_data[i] = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
  end

  always @(posedge clk) begin
    if (rst_n) begin
      cycle <= cycle + 1;
      check($countones(out_vp) <= 1 && (out_vp == '0 || out_vp[sched]), "output valid on an unscheduled channel");
      check(in_vn == out_vn && in_sn == out_sn, "anti-token bits do not pass through");
      check(!(|(in_sp & in_vn)), "stop and kill together");
      if (last_retry && int'(sched) != last_sched && in_vp[sched]) n_retry_switch++;
      last_retry = out_vp[sched] && out_sp[sched] && !out_vn[sched];
      last_sched = int'(sched);

      for (int i = 0; i < N; i++) begin
        bit v, a;
        // receiver i
        if (out_vp[i] && !out_sp[i] && !out_vn[i]) begin
          check(out_data == ({1'(i), 7'(r_cnt[i])} ^ 8'h5a),
                $sformatf("channel %0d result %h expected %h", i, out_data, {1'(i), 7'(r_cnt[i])} ^ 8'h5a));
          n_out++; r_cnt[i]++;
        end else if (out_vn[i] && (out_vp[i] || !out_sn[i])) begin
          n_kill++; r_cnt[i]++;
        end
        if (out_vn[i] && out_sn[i]) a = 1'b1;
        else a = (cycle > 200) && ($urandom_range(0, 7) == 0);
        out_vn[i] <= a;
        out_sp[i] <= !a && (cycle > 200) && ($urandom_range(0, 3) == 0);
        // sender i
        if (in_vp[i] && in_vn[i]) s_seq[i]++;
        else if (in_vp[i] && !in_sp[i]) s_seq[i]++;
        else if (!in_vp[i] && in_vn[i] && !in_sn[i]) s_seq[i]++;
        if (in_vp[i] && in_sp[i] && !in_vn[i]) v = 1'b1;
        else v = ($urandom_range(0, 9) < 7);
        in_vp[i]   <= v;
        in_data[i] <= {1'(i), 7'(s_seq[i])};
        in_sn[i]   <= !v && ($urandom_range(0, 2) == 0);
        // starvation while receivers never stop (first 200 cycles)
        if (in_vp[i] && in_sp[i]) wait_cnt[i]++; else wait_cnt[i] = 0;
        if (cycle <= 200) check(wait_cnt[i] <= N, $sformatf("channel %0d starved", i));
      end

      if (cycle == 3000) begin
        check(n_kill > 0, "no anti-token reached the module");
        check(n_retry_switch > 0, "scheduler never moved after a stop");
        check(r_cnt[0] > 500 && r_cnt[1] > 500, "a channel made little progress");
        $display("results %0d, kills %0d, switches after stop %0d", n_out, n_kill, n_retry_switch);
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
