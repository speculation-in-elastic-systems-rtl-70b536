// tb_ee_mux: self-checking test of the early-evaluation multiplexor.
//
// Every firing k of the multiplexor uses up slot k of every data input: the
// selected input's k-th token is the result, the other inputs' k-th tokens
// are cancelled by anti-tokens. The data senders therefore tag tokens with
// {input, slot} and skip a slot whenever an anti-token reaches them; the k-th
// output event (token received or killed by an output anti-token) must carry
// {sel_k, k}. Random gaps on every input, random output stops and output
// anti-tokens; counts of early firings (other input absent), kills of a
// waiting token and anti-tokens sent back must all be non-zero.
`timescale 1ns/1ps
module tb_ee_mux;

  localparam int unsigned N = 2;
  localparam int unsigned W = 8;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = !clk;

  int unsigned checks = 0, failures = 0, cycle = 0;

  logic          sel_vp, sel_sp;
  logic [0:0]    sel_data;
  logic [N-1:0]  in_vp, in_sp, in_vn, in_sn;
  logic [W-1:0]  in_data [N];
  logic          out_vp, out_sp, out_vn, out_sn;
  logic [W-1:0]  out_data;

  ee_mux #(.N(N), .W(W)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL cycle %0d: %s", cycle, what);
    end
  endtask

  bit          sel_hist [4096];
  int unsigned sel_seq = 0, r_cnt = 0;
  int unsigned s_seq [N];
  int unsigned n_early = 0, n_kill = 0, n_anti_back = 0, n_out = 0, n_out_kill = 0;

  initial begin
    foreach (sel_hist[i]) sel_hist[i] = 1'($urandom);
    foreach (s_seq[i]) s_seq[i] = 0;
    sel_vp = 0; sel_data = '0; in_vp = '0; in_sn = '0; out_sp = 0; out_vn = 0;
    for (int i = 0; i < N; i++) in_data[i] = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
  end

  always @(posedge clk) begin
    if (rst_n) begin
      bit nv;
      cycle <= cycle + 1;
      check(!(|(in_sp & in_vn)) && !(out_vp && out_sn), "stop and kill together");

      // output side
      if (out_vp && !out_sp && !out_vn) begin
        check(out_data == {sel_hist[r_cnt], 7'(r_cnt)},
              $sformatf("output %h expected %h", out_data, {sel_hist[r_cnt], 7'(r_cnt)}));
        if (!in_vp[!sel_hist[r_cnt]]) n_early++;
        n_out++; r_cnt++;
      end else if (out_vn && out_vp) begin
        n_out_kill++; r_cnt++;
      end
      if (out_vn && !out_vp) nv = 1'b1;      // output anti-token waits for a token
      else nv = ($urandom_range(0, 9) == 0);
      out_vn <= nv;
      out_sp <= !nv && ($urandom_range(0, 3) == 0);

      // select sender
      if (sel_vp && !sel_sp) sel_seq++;
      if (!(sel_vp && sel_sp)) begin
        sel_vp   <= ($urandom_range(0, 3) != 0);
        sel_data <= sel_hist[sel_seq];
      end

      // data senders
      for (int i = 0; i < N; i++) begin
        bit v;
        if (in_vp[i] && in_vn[i]) begin n_kill++; s_seq[i]++; end
        else if (in_vp[i] && !in_sp[i]) s_seq[i]++;
        else if (!in_vp[i] && in_vn[i] && !in_sn[i]) begin n_anti_back++; s_seq[i]++; end
        if (in_vp[i] && in_sp[i] && !in_vn[i]) v = 1'b1;
        else v = ($urandom_range(0, 9) < 6);
        in_vp[i]   <= v;
        in_data[i] <= {1'(i), 7'(s_seq[i])};
        in_sn[i]   <= !v && ($urandom_range(0, 2) == 0);
      end

      if (r_cnt >= 3000) begin
        check(n_early > 0, "never fired early");
        check(n_kill > 0, "never killed a waiting token");
        check(n_anti_back > 0, "never sent an anti-token back");
        check(n_out_kill > 0, "never cancelled an output token");
        $display("outputs %0d, early %0d, kills %0d, anti-tokens back %0d, output kills %0d",
                 n_out, n_early, n_kill, n_anti_back, n_out_kill);
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
