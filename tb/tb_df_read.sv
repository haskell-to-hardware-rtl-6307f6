// tb_df_read: self-checking test of the memory read node. The memory is
// filled through the write port with word(a) = a * 41 + 7, then a stream of
// random pointers is sent with random valid and random output ready; each
// output token must be the word the pointer names. A final burst with valid
// and ready held high checks one-cycle latency and one read per cycle.
module tb_df_read;
  localparam int AW = 6, W = 16, NTOK = 300, NFULL = 40;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic in_valid, in_ready, out_valid, out_ready, wr_en;
  logic [AW-1:0] in_data, wr_addr;
  logic [W-1:0] out_data, wr_data;
  int checks = 0, failures = 0, pi = 0, oi = 0, phase = 0, cycle = 0;
  int t_in = -1, t_out = -1;
  logic [AW-1:0] ptrs [NTOK + NFULL];

  df_read #(.AW(AW), .W(W)) dut (.*);

  function automatic logic [W-1:0] word(logic [AW-1:0] a); return W'(a * 41 + 7); endfunction

  initial for (int i = 0; i < NTOK + NFULL; i++) ptrs[i] = AW'($urandom);

  always @(posedge clk) cycle <= cycle + 1;

  always @(posedge clk) begin
    if (!rst_n || phase == 0) begin
      in_valid <= 1'b0; in_data <= '0; out_ready <= 1'b0;
    end else begin
      if (out_valid && out_ready) begin
        checks++;
        if (out_data !== word(ptrs[oi])) begin
          failures++; $display("read %0d of %0d: got %h", oi, ptrs[oi], out_data);
        end
        if (oi == NTOK) t_out = cycle;
        oi++;
      end
      if (in_valid && in_ready) begin
        if (pi == NTOK) t_in = cycle;
        pi++;
      end
      if (!in_valid || in_ready) begin
        in_valid <= (phase == 1) ? (pi < NTOK && $urandom % 3 != 0) : (pi < NTOK + NFULL);
        in_data  <= ptrs[pi < NTOK + NFULL ? pi : 0];
      end
      out_ready <= (phase == 1) ? ($urandom % 4 != 0) : 1'b1;
    end
  end

  initial begin
    wr_en = 1'b0; wr_addr = '0; wr_data = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int a = 0; a < 2**AW; a++) begin
      wr_en = 1'b1; wr_addr = AW'(a); wr_data = word(AW'(a));
      @(negedge clk);
    end
    wr_en = 1'b0;
    phase = 1;
    wait (oi == NTOK);
    @(negedge clk);
    phase = 2;
    wait (oi == NTOK + NFULL);
    @(negedge clk);
    checks += 2;
    if (t_out - t_in != 1) begin failures++; $display("latency %0d", t_out - t_in); end
    if (cycle - t_out > NFULL + 2) begin failures++; $display("burst took %0d cycles", cycle - t_out); end
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
