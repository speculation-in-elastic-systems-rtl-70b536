// tb_spec_scheduler: self-checking test of both scheduler policies.
//
// Two schedulers (3 channels round-robin, 2 channels primary/replay) get
// random channel valids, issue and hint bits. A reference model kept here
// predicts the chosen channel every cycle. Also checked: a valid channel is
// always chosen when one exists, and under round-robin every channel that
// stays valid is chosen within N cycles.
`timescale 1ns/1ps
module tb_spec_scheduler;
  import spec_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = !clk;

  int unsigned checks = 0, failures = 0, cycle = 0;

  logic [2:0] rr_valid;
  logic [1:0] rr_sched;
  logic [1:0] pr_valid;
  logic [0:0] pr_sched;
  logic       pr_issued, pr_hint;

  spec_scheduler #(.N(3), .POLICY(SCHED_RR)) dut_rr (
    .clk, .rst_n, .in_valid(rr_valid), .issued(1'b0), .hint(1'b0), .sched(rr_sched)
  );
  spec_scheduler #(.N(2), .POLICY(SCHED_PRIMARY), .REPLAY_CH(1)) dut_pr (
    .clk, .rst_n, .in_valid(pr_valid), .issued(pr_issued), .hint(pr_hint), .sched(pr_sched)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL cycle %0d: %s", cycle, what);
    end
  endtask

  int unsigned rr_ptr = 0, pr_ptr = 0;
  int unsigned rr_wait [3];
  int unsigned n_replay = 0, n_skip = 0;

  initial begin
    foreach (rr_wait[i]) rr_wait[i] = 0;
    rr_valid = '0; pr_valid = '0; pr_issued = 0; pr_hint = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
  end

  always @(posedge clk) begin
    if (rst_n) begin
      int unsigned e;
      cycle <= cycle + 1;

      // round-robin: first valid channel starting at the pointer
      e = rr_ptr;
      if (!rr_valid[rr_ptr]) begin
        if (rr_valid[(rr_ptr + 1) % 3]) e = (rr_ptr + 1) % 3;
        else if (rr_valid[(rr_ptr + 2) % 3]) e = (rr_ptr + 2) % 3;
      end
      if (e != rr_ptr) n_skip++;
      check(int'(rr_sched) == e, $sformatf("round-robin chose %0d expected %0d", rr_sched, e));
      if (rr_valid[e]) rr_ptr = (e + 1) % 3;
      for (int i = 0; i < 3; i++) begin
        if (rr_valid[i] && int'(rr_sched) != i) rr_wait[i]++; else rr_wait[i] = 0;
        check(rr_wait[i] < 3, "round-robin starves a channel");
      end

      // primary / replay
      e = pr_ptr;
      if (!pr_valid[pr_ptr] && pr_valid[1 - pr_ptr]) e = 1 - pr_ptr;
      check(int'(pr_sched) == e, $sformatf("primary chose %0d expected %0d", pr_sched, e));
      if (pr_issued && e == 0 && pr_hint) begin pr_ptr = 1; n_replay++; end
      else if (pr_issued && e == 1) pr_ptr = 0;

      // stimulus: valids mostly held so the pointer matters
      rr_valid  <= ($urandom_range(0, 3) == 0) ? 3'($urandom) : rr_valid | 3'($urandom_range(0, 1));
      pr_valid  <= 2'($urandom);
      pr_issued <= ($urandom_range(0, 2) != 0);
      pr_hint   <= ($urandom_range(0, 3) == 0);

      if (cycle == 2000) begin
        check(n_replay > 0 && n_skip > 0, "replay or skip never happened");
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
