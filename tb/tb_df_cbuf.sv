// tb_df_cbuf: self-checking test of the control buffer: order and values kept under random stalls; zero latency and one token per cycle at full rate; in_ready never depends combinationally on out_ready.
// Phase 1 drives random valid/ready patterns and checks every token arrives
// once, in order, with its value. Phase 2 holds valid and ready high and
// checks the latency of the first token and the rate. out_ready also
// changes at the falling edge to show that in_ready is a register output.
module tb_df_cbuf;
  localparam int W = 16, NTOK = 300, NFULL = 40, LAT = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic in_valid, in_ready, out_valid, out_ready;
  logic [W-1:0] in_data, out_data;
  int checks = 0, failures = 0, cycle = 0;
  int pi = 0, ci = 0, phase = 1;
  int first_in_cyc = -1, first_out_cyc = -1, full_out = 0;

  df_cbuf #(.W(W)) dut (.*);

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
      if (phase != 1) out_ready <= 1'b1;
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

  // the registered ready: out_ready is also changed at the falling edge;
  // in_ready must not move within a clock cycle
  logic rdy_at_rise;
  always @(posedge clk) begin
    #1 rdy_at_rise = in_ready;
  end
  always @(negedge clk) if (rst_n && phase == 1) begin
    out_ready <= ($urandom % 2 == 0);
    #1;
    checks++;
    if (in_ready !== rdy_at_rise) begin
      failures++;
      $display("in_ready follows out_ready combinationally");
    end
  end
endmodule
