// tb_df_mux: self-checking test of the three-way multiplexer. A random select
// stream and three data streams, all with random valid, and a random output
// ready. The j-th output token must be the next unused token of the input
// named by the j-th select token; unselected inputs must wait.
module tb_df_mux;
  localparam int W = 16, N = 3, NTOK = 300;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic sel_valid, sel_ready;
  logic [1:0] sel_data;
  logic [N-1:0] in_valid, in_ready;
  logic [N-1:0][W-1:0] in_data;
  logic out_valid, out_ready;
  logic [W-1:0] out_data;
  int checks = 0, failures = 0, si = 0, oi = 0;
  int pi [N];
  int exp_i [N];
  logic [1:0] sel_seq [NTOK];

  df_mux #(.N(N), .W(W)) dut (.*);

  function automatic logic [W-1:0] val(int k, int i);
    return W'((k << 12) + i);
  endfunction

  initial for (int j = 0; j < NTOK; j++) sel_seq[j] = 2'($urandom % N);

  always @(posedge clk) begin
    if (!rst_n) begin
      sel_valid <= 1'b0; sel_data <= '0; in_valid <= '0; in_data <= '0;
      out_ready <= 1'b0;
      for (int k = 0; k < N; k++) begin pi[k] = 0; exp_i[k] = 0; end
    end else begin
      if (out_valid && out_ready) begin
        logic [1:0] s;
        s = sel_seq[oi];
        checks++;
        if (out_data !== val(s, exp_i[s])) begin
          failures++;
          $display("output %0d: got %h expected %h", oi, out_data, val(s, exp_i[s]));
        end
        exp_i[s]++;
        oi++;
      end
      if (sel_valid && sel_ready) si++;
      if (!sel_valid || sel_ready) begin
        sel_valid <= (si < NTOK) && ($urandom % 3 != 0);
        sel_data  <= sel_seq[si < NTOK ? si : 0];
      end
      for (int k = 0; k < N; k++) begin
        if (in_valid[k] && in_ready[k]) pi[k]++;
        if (!in_valid[k] || in_ready[k]) begin
          in_valid[k] <= ($urandom % 3 != 0);
          in_data[k]  <= val(k, pi[k]);
        end
      end
      out_ready <= ($urandom % 4 != 0);
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    wait (oi == NTOK);
    repeat (5) @(negedge clk);
    checks++;
    if (si != NTOK) begin failures++; $display("%0d select tokens consumed", si); end
    for (int k = 0; k < N; k++) begin
      checks++;
      if (pi[k] != exp_i[k]) begin
        failures++;
        $display("input %0d: %0d consumed, %0d selected", k, pi[k], exp_i[k]);
      end
    end
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
