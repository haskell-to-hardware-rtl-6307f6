// tb_df_fork: self-checking test of the three-way fork. Each output has its
// own random ready; every output must receive every token exactly once, in
// order, and an output must be able to take its copy while another output
// is stalled (non-strict outputs). Also checks that the input is consumed
// only after all three copies have gone.
module tb_df_fork;
  localparam int W = 16, N = 3, NTOK = 300;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic in_valid, in_ready;
  logic [W-1:0] in_data;
  logic [N-1:0] out_valid, out_ready;
  logic [N-1:0][W-1:0] out_data;
  int checks = 0, failures = 0, pi = 0, nonstrict = 0;
  int ci [N];
  int got_since_accept [N];

  df_fork #(.N(N), .W(W)) dut (.*);

  function automatic logic [W-1:0] val(int i);
    return W'(i * 7919 + 3);
  endfunction

  always @(posedge clk) begin
    if (!rst_n) begin
      in_valid <= 1'b0; in_data <= '0; out_ready <= '0;
      for (int k = 0; k < N; k++) begin ci[k] = 0; got_since_accept[k] = 0; end
    end else begin
      for (int k = 0; k < N; k++) begin
        if (out_valid[k] && out_ready[k]) begin
          checks++;
          if (out_data[k] !== val(ci[k])) begin
            failures++;
            $display("out%0d token %0d: got %h", k, ci[k], out_data[k]);
          end
          ci[k]++;
          got_since_accept[k]++;
          for (int j = 0; j < N; j++)
            if (j != k && out_valid[j] && !out_ready[j]) nonstrict++;
        end
      end
      if (in_valid && in_ready) begin
        pi++;
        checks++;
        for (int k = 0; k < N; k++) begin
          if (got_since_accept[k] != 1) begin
            failures++;
            $display("input consumed with %0d copies on out%0d", got_since_accept[k], k);
          end
          got_since_accept[k] = 0;
        end
      end
      if (!in_valid || in_ready) begin
        in_valid <= (pi < NTOK) && ($urandom % 4 != 0);
        in_data  <= val(pi);
      end
      for (int k = 0; k < N; k++) out_ready[k] <= ($urandom % 3 != 0);
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    wait (ci[0] == NTOK && ci[1] == NTOK && ci[2] == NTOK);
    repeat (10) @(negedge clk);
    for (int k = 0; k < N; k++) begin
      checks++;
      if (ci[k] != NTOK) begin failures++; $display("out%0d got %0d tokens", k, ci[k]); end
    end
    checks++;
    if (nonstrict == 0) begin failures++; $display("no output ever ran ahead of a stalled one"); end
    $display("non-strict transfers: %0d", nonstrict);
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
