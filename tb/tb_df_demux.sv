// tb_df_demux: self-checking test of the three-way demultiplexer. Random
// select and data streams and random output readies; output k must receive,
// in order, exactly the data tokens whose select token was k.
module tb_df_demux;
  localparam int W = 16, N = 3, NTOK = 300;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic sel_valid, sel_ready;
  logic [1:0] sel_data;
  logic in_valid, in_ready;
  logic [W-1:0] in_data;
  logic [N-1:0] out_valid, out_ready;
  logic [N-1:0][W-1:0] out_data;
  int checks = 0, failures = 0, si = 0, pi = 0, total = 0;
  int oi [N];
  logic [1:0] sel_seq [NTOK];
  int idx [N][$];                 // expected token numbers per output

  df_demux #(.N(N), .W(W)) dut (.*);

  function automatic logic [W-1:0] val(int i);
    return W'(i * 977 + 5);
  endfunction

  initial for (int j = 0; j < NTOK; j++) begin
    sel_seq[j] = 2'($urandom % N);
    idx[sel_seq[j]].push_back(j);
  end

  always @(posedge clk) begin
    if (!rst_n) begin
      sel_valid <= 1'b0; sel_data <= '0; in_valid <= 1'b0; in_data <= '0;
      out_ready <= '0;
      for (int k = 0; k < N; k++) oi[k] = 0;
    end else begin
      for (int k = 0; k < N; k++) if (out_valid[k] && out_ready[k]) begin
        checks++;
        if (oi[k] >= idx[k].size() || out_data[k] !== val(idx[k][oi[k]])) begin
          failures++;
          $display("out%0d token %0d: got %h", k, oi[k], out_data[k]);
        end
        oi[k]++;
        total++;
      end
      checks++;
      if ($countones(out_valid) > 1) begin failures++; $display("two outputs valid"); end
      if (sel_valid && sel_ready) si++;
      if (!sel_valid || sel_ready) begin
        sel_valid <= (si < NTOK) && ($urandom % 3 != 0);
        sel_data  <= sel_seq[si < NTOK ? si : 0];
      end
      if (in_valid && in_ready) pi++;
      if (!in_valid || in_ready) begin
        in_valid <= (pi < NTOK) && ($urandom % 3 != 0);
        in_data  <= val(pi);
      end
      for (int k = 0; k < N; k++) out_ready[k] <= ($urandom % 3 != 0);
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    wait (total == NTOK);
    repeat (5) @(negedge clk);
    for (int k = 0; k < N; k++) begin
      checks++;
      if (oi[k] != idx[k].size()) begin failures++; $display("out%0d count %0d", k, oi[k]); end
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
