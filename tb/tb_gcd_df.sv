// tb_gcd_df: self-checking test of the GCD dataflow circuit. Random operand
// pairs (1..MAXV, plus equal and coprime corner cases) are offered with random
// valid and a random result ready; every result must equal the GCD computed
// here by Euclid's remainder method. The test counts how often each arm ran
// (a < b, a > b, a = b), requires each at least once, and checks that a call
// takes one cycle per subtraction step when run alone.
module tb_gcd_df;
  localparam int W = 32, NT = 60, MAXV = 300;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic a_valid, a_ready, b_valid, b_ready, res_valid, res_ready;
  logic [W-1:0] a_data, b_data, res_data;
  gcd_df #(.W(W)) dut (.*);

  int checks = 0, failures = 0, cycle = 0;
  logic [W-1:0] av [NT], bv [NT];
  int ai = 0, bi = 0, ri = 0;
  int n_lt = 0, n_gt = 0, n_eq = 0;
  bit go = 0, solo = 0;
  int t0 = 0, t1 = 0;

  function automatic logic [W-1:0] ref_gcd(logic [W-1:0] a, logic [W-1:0] b);
    while (b != 0) begin logic [W-1:0] t; t = a % b; a = b; b = t; end
    return a;
  endfunction
  function automatic int steps(logic [W-1:0] a, logic [W-1:0] b);
    int s = 0;
    while (a != b) begin if (a < b) b -= a; else a -= b; s++; end
    return s;
  endfunction

  always @(posedge clk) cycle <= cycle + 1;

  always @(posedge clk) if (rst_n) begin
    if (dut.cf_v[0] && dut.cf_r[0]) begin
      case (dut.cf_d[0]) 2'd0: n_eq++; 2'd1: n_lt++; default: n_gt++; endcase
    end
  end

  always @(posedge clk) begin
    if (!rst_n || !go) begin
      a_valid <= 1'b0; b_valid <= 1'b0; a_data <= '0; b_data <= '0; res_ready <= 1'b0;
    end else begin
      if (res_valid && res_ready) begin
        checks++;
        if (res_data !== ref_gcd(av[ri], bv[ri])) begin
          failures++;
          $display("gcd(%0d,%0d): got %0d", av[ri], bv[ri], res_data);
        end
        ri++;
        if (solo) t1 = cycle;
      end
      if (a_valid && a_ready) begin ai++; if (solo) t0 = cycle; end
      if (b_valid && b_ready) bi++;
      if (!a_valid || a_ready) begin
        a_valid <= (ai < NT) && (solo || $urandom % 3 != 0); a_data <= av[ai < NT ? ai : 0];
      end
      if (!b_valid || b_ready) begin
        b_valid <= (bi < NT) && (solo || $urandom % 3 != 0); b_data <= bv[bi < NT ? bi : 0];
      end
      res_ready <= solo || ($urandom % 3 != 0);
    end
  end

  initial begin
    for (int i = 0; i < NT; i++) begin
      av[i] = W'(1 + $urandom % MAXV);
      bv[i] = W'(1 + $urandom % MAXV);
    end
    av[0] = 7;  bv[0] = 7;                  // equal on entry
    av[1] = 12; bv[1] = 18;                 // a < b first
    av[2] = 35; bv[2] = 1;                  // many a > b steps
    av[NT-1] = 221; bv[NT-1] = 34;          // gcd 17, run alone
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    go = 1'b1;
    wait (ri == NT - 1);
    @(negedge clk);
    solo = 1'b1;
    wait (ri == NT);
    repeat (3) @(negedge clk);
    $display("arms: a<b %0d, a>b %0d, a=b %0d; lone call of %0d steps: %0d cycles",
             n_lt, n_gt, n_eq, steps(av[NT-1], bv[NT-1]), t1 - t0);
    checks += 4;
    if (n_lt == 0) begin failures++; $display("a<b arm never ran"); end
    if (n_gt == 0) begin failures++; $display("a>b arm never ran"); end
    if (n_eq != NT) begin failures++; $display("a=b arm ran %0d times", n_eq); end
    // one cycle per step: the loop's only register is its data buffer
    if (t1 - t0 != steps(av[NT-1], bv[NT-1])) begin
      failures++; $display("lone call took %0d cycles", t1 - t0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
