// tb_df_dbuf: self-checking test of the data buffer: order and values kept under random stalls; one-cycle latency and one token per cycle at full rate.
// Phase 1 drives random valid/ready patterns and checks every token arrives
// once, in order, with its value. Phase 2 holds valid and ready high and
// checks the latency of the first token and the rate.
module tb_df_dbuf;
  localparam int W = 16, NTOK = 300, NFULL = 40, LAT = 1;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic in_valid, in_ready, out_valid, out_ready;
  logic [W-1:0] in_data, out_data;
  int checks = 0, failures = 0, cycle = 0;
  int pi = 0, ci = 0, phase = 1;
  int first_in_cyc = -1, first_out_cyc = -1, full_out = 0;

  df_dbuf #(.W(W)) dut (.*);

  function automatic logic [W-1:0] val(int i);
    return W'(i * 40503 + 17);
  endfunction

  always @(posedge clk) cycle <= cycle + 1;

  // producer
  always @(posedge clk) begin
    if (!rst_n) begin
      in_valid <= 1'b0; in_data <= '0;
    end else begin
      if (in_valid && in_ready) begin
        if (pi == NTOK) first_in_cyc = cycle;
        pi++;
      end
      if (!in_valid || in_ready) begin
        in_valid <= (phase == 1) ? (pi < NTOK && ($urandom % 3 != 0))
                                 : (pi < NTOK + NFULL);
        in_data  <= val(pi);
      end
    end
  end

  // consumer
  always @(posedge clk) begin
    if (!rst_n) begin
      out_ready <= 1'b0;
    end else begin
      if (out_valid && out_ready) begin
        checks++;
        if (out_data !== val(ci)) begin
          failures++;
          $display("token %0d: got %h expected %h", ci, out_data, val(ci));
        end
        if (ci == NTOK) first_out_cyc = cycle;
        if (ci >= NTOK) full_out++;
        ci++;
      end
      out_ready <= (phase == 1) ? ($urandom % 4 != 0) : 1'b1;
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    wait (ci == NTOK);
    @(negedge clk);
    phase = 2;
    wait (ci == NTOK + NFULL);
    @(negedge clk);
    checks++;
    if (first_out_cyc - first_in_cyc != LAT) begin
      failures++;
      $display("latency %0d, expected %0d", first_out_cyc - first_in_cyc, LAT);
    end
    checks++;
    if (cycle - first_out_cyc > NFULL + 2) begin
      failures++;
      $display("%0d tokens took %0d cycles", NFULL, cycle - first_out_cyc);
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
