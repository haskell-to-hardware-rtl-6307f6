// tb_df_merge: self-checking test of the two-way nondeterministic merge.
// Two input streams, each token tagged with its input number and sequence
// number, random valids and independent random readies on the data and the
// select outputs. Checks: every token appears once; each input's tokens keep
// their order; the j-th select token names the input of the j-th data token;
// when both inputs wait, both get chosen over the run, and a waiting input
// sees the other input win at most once before its own turn (no starvation).
module tb_df_merge;
  localparam int W = 16, NTOK = 300;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [1:0] in_valid, in_ready;
  logic [1:0][W-1:0] in_data;
  logic out_valid, out_ready, sel_valid, sel_ready, sel_data;
  logic [W-1:0] out_data;
  int checks = 0, failures = 0, total = 0, nsel = 0;
  int pi [2];
  int ci [2];
  int tie_win [2];
  int waited [2];                 // wins of the other input while this one waits
  int max_wait = 0;
  logic origin [$];

  df_merge #(.W(W)) dut (.*);

  always @(posedge clk) begin
    if (!rst_n) begin
      in_valid <= '0; in_data <= '0; out_ready <= 1'b0; sel_ready <= 1'b0;
      for (int k = 0; k < 2; k++) begin pi[k] = 0; ci[k] = 0; tie_win[k] = 0; waited[k] = 0; end
    end else begin
      if (&in_valid && |in_ready) tie_win[in_ready[1]]++;
      for (int k = 0; k < 2; k++) begin
        if (in_valid[k] && in_ready[1-k]) waited[k]++;
        else if (!in_valid[k] || in_ready[k]) waited[k] = 0;
        if (waited[k] > max_wait) max_wait = waited[k];
      end
      if (out_valid && out_ready) begin
        logic k;
        k = out_data[W-1];
        checks++;
        if (int'(out_data[W-2:0]) != ci[k]) begin
          failures++;
          $display("input %0d: got token %0d expected %0d", k, out_data[W-2:0], ci[k]);
        end
        ci[k]++;
        origin.push_back(k);
        total++;
      end
      if (sel_valid && sel_ready) begin
        checks++;
        // the data copy of the same token may still be pending
        if (nsel < origin.size()) begin
          if (sel_data !== origin[nsel]) begin failures++; $display("select %0d wrong", nsel); end
        end else if (!(out_valid && out_data[W-1] == sel_data)) begin
          failures++; $display("select %0d ahead of a different data token", nsel);
        end
        nsel++;
      end
      for (int k = 0; k < 2; k++) begin
        if (in_valid[k] && in_ready[k]) pi[k]++;
        if (!in_valid[k] || in_ready[k]) begin
          in_valid[k] <= (pi[k] < NTOK) && ($urandom % 4 != 0);
          in_data[k]  <= {1'(k), (W-1)'(pi[k])};
        end
      end
      out_ready <= ($urandom % 4 != 0);
      sel_ready <= ($urandom % 4 != 0);
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    wait (total == 2 * NTOK && nsel == 2 * NTOK);
    repeat (5) @(negedge clk);
    for (int k = 0; k < 2; k++) begin
      checks++;
      if (ci[k] != NTOK) begin failures++; $display("input %0d: %0d tokens", k, ci[k]); end
      checks++;
      if (tie_win[k] == 0) begin failures++; $display("input %0d never won a tie", k); end
    end
    checks++;
    if (max_wait > 1) begin failures++; $display("an input waited through %0d wins of the other", max_wait); end
    $display("ties won: %0d / %0d", tie_win[0], tie_win[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
