// tb_sum_list: self-checking test of the list-sum dataflow circuit.
// NL linked lists of random length (0..MAXLEN, one of them long) with random
// elements are written into the list memory at scattered addresses; the calls
// (head pointer, initial s) are then offered back to back with random valid
// and random result ready. Each result must equal s plus the list's elements,
// in call order. The test also checks the pipelining that non-strictness
// gives: a later list cell must be read before the earlier element has been
// added, and the long list, run alone with ready held high, must take at most
// 2 cycles per element plus a fixed overhead. For that run s is offered
// S_DELAY cycles after lp: the non-strict circuit starts reading the list
// before s arrives, and the depth it can run ahead is set by its buffers.
// A strict circuit could start only once s is there and would need at least
// S_DELAY + 2 * LONG cycles; this one must finish sooner.
module tb_sum_list;
  localparam int AW = 12, W = 32, NL = 24, MAXLEN = 12, LONG = 100, S_DELAY = 20;
  localparam int CW = AW + W + 1;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic lp_valid, lp_ready, s_valid, s_ready, res_valid, res_ready, wr_en;
  logic [AW-1:0] lp_data, wr_addr;
  logic [W-1:0] s_data, res_data;
  logic [CW-1:0] wr_data;

  sum_list #(.AW(AW), .W(W)) dut (.*);

  int checks = 0, failures = 0, cycle = 0;
  logic [AW-1:0] head [NL];
  logic [W-1:0]  s0 [NL];
  logic [W-1:0]  expect_sum [NL];
  int            len [NL];
  int li = 0, si = 0, ri = 0;
  bit go = 0, solo = 0;
  int reads = 0, consumed = 0, max_ahead = 0;
  int t_start = 0, t_end = 0;

  always @(posedge clk) cycle <= cycle + 1;

  // pipelining monitor: cells read versus cells whose s-step is done
  always @(posedge clk) if (rst_n) begin
    if (dut.lpm_v && dut.lpm_r) reads++;
    if (dut.sm_v && dut.sm_r) consumed++;
    if (reads - consumed > max_ahead) max_ahead = reads - consumed;
  end

  always @(posedge clk) begin
    if (!rst_n || !go) begin
      lp_valid <= 1'b0; s_valid <= 1'b0; lp_data <= '0; s_data <= '0; res_ready <= 1'b0;
    end else begin
      if (res_valid && res_ready) begin
        checks++;
        if (res_data !== expect_sum[ri]) begin
          failures++; $display("list %0d: got %0d expected %0d", ri, res_data, expect_sum[ri]);
        end
        ri++;
        if (solo) t_end = cycle;
      end
      if (lp_valid && lp_ready) li++;
      if (s_valid && s_ready) si++;
      if (!lp_valid || lp_ready) begin
        lp_valid <= (li < (solo ? NL : NL - 1)) && (solo || $urandom % 3 != 0);
        lp_data  <= head[li < NL ? li : 0];
      end
      if (!s_valid || s_ready) begin
        s_valid <= (si < (solo ? NL : NL - 1)) && (solo ? (cycle - t_start >= S_DELAY) : ($urandom % 3 != 0));
        s_data  <= s0[si < NL ? si : 0];
      end
      res_ready <= solo || ($urandom % 4 != 0);
    end
  end

  task automatic put(input logic [AW-1:0] a, input logic [CW-1:0] d);
    wr_en = 1'b1; wr_addr = a; wr_data = d;
    @(negedge clk);
    wr_en = 1'b0;
  endtask

  initial begin
    int next_addr;
    wr_en = 1'b0; wr_addr = '0; wr_data = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // cells are placed at addresses k * 97 mod 2**AW (all distinct)
    next_addr = 1;
    for (int l = 0; l < NL; l++) begin
      logic [AW-1:0] addr [$];
      logic [W-1:0]  elem [$];
      addr.delete();
      elem.delete();
      len[l] = (l == NL - 1) ? LONG : int'($urandom % (MAXLEN + 1));
      s0[l] = W'($urandom % 1000);
      expect_sum[l] = s0[l];
      for (int i = 0; i <= len[l]; i++) begin
        addr.push_back(AW'(next_addr * 97));
        next_addr++;
        elem.push_back(W'($urandom));
      end
      for (int i = 0; i < len[l]; i++) begin
        expect_sum[l] += elem[i];
        put(addr[i], {addr[i + 1], elem[i], 1'b1});
      end
      put(addr[len[l]], '0);            // Nil
      head[l] = addr[0];
    end
    // all but the long list, with random stalls
    go = 1'b1;
    wait (ri == NL - 1);
    // the long list alone at full rate
    @(negedge clk);
    solo = 1'b1;
    t_start = cycle;
    wait (ri == NL);
    repeat (3) @(negedge clk);
    $display("long list of %0d: %0d cycles; max cells read ahead: %0d",
             LONG, t_end - t_start, max_ahead);
    checks++;
    if (t_end - t_start > 2 * LONG + S_DELAY + 8) begin
      failures++; $display("too slow: %0d cycles", t_end - t_start);
    end
    checks++;
    if (t_end - t_start >= 2 * LONG + S_DELAY) begin
      failures++; $display("no faster than a strict circuit: %0d cycles", t_end - t_start);
    end
    checks++;
    if (max_ahead < 2) begin failures++; $display("no read ran ahead of the additions"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
