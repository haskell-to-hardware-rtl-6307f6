// tb_fib_cps: self-checking test of the continuation-passing Fibonacci engine.
// For n = 1..NMAX the result must equal the iterative Fibonacci number, and
// the number of cycles from accepting n to the result must be two (writing K0,
// presenting the result) plus the number of rule applications, which a
// software interpreter here
// counts by running the same Call rules with a heap that never frees. A
// second instance with an 8-entry stack must flag overflow for a large n and
// still compute a small one.
module tb_fib_cps;
  localparam int W = 32, NMAX = 18;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic start_valid, start_ready, res_valid, res_ready, res_overflow;
  logic [W-1:0] start_n, res_value;
  fib_cps #(.W(W)) dut (.*);

  logic s2_valid, s2_ready, r2_valid, r2_overflow;
  logic [W-1:0] s2_n, r2_value;
  fib_cps #(.W(W), .AW(3)) dut_small (
    .clk, .rst_n, .start_valid(s2_valid), .start_ready(s2_ready), .start_n(s2_n),
    .res_valid(r2_valid), .res_ready(1'b1), .res_value(r2_value),
    .res_overflow(r2_overflow));

  int checks = 0, failures = 0, cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // software interpreter of the merged Call rules (continuations on a heap)
  typedef struct { int tag; longint val; int kref; } kont_t;
  function automatic void model(input int n, output longint result, output int rules);
    kont_t heap [$];
    bit is_fibk = 1;
    int k;
    longint a;
    kont_t kk;
    rules = 0;
    heap.push_back('{0, 0, 0});
    k = 0;
    forever begin
      rules++;
      if (is_fibk) begin
        if (n <= 2) begin kk = heap[k]; a = 1; is_fibk = 0; end
        else begin heap.push_back('{1, n, k}); k = heap.size() - 1; n = n - 1; end
      end else begin
        if (kk.tag == 1) begin
          heap.push_back('{2, a, kk.kref}); k = heap.size() - 1; n = int'(kk.val) - 2; is_fibk = 1;
        end else if (kk.tag == 2) begin
          a = kk.val + a; kk = heap[kk.kref];
        end else begin
          result = a; return;
        end
      end
    end
  endfunction

  task automatic call(input int n, output logic [W-1:0] v, output int cycles, output bit ovf);
    int t0;
    @(negedge clk);
    start_valid = 1'b1; start_n = W'(n);
    @(posedge clk);
    while (!start_ready) @(posedge clk);
    t0 = cycle;
    @(negedge clk);
    start_valid = 1'b0;
    while (!res_valid) @(posedge clk);
    cycles = cycle - t0;
    v = res_value; ovf = res_overflow;
    @(negedge clk);
    res_ready = 1'b1;
    @(negedge clk);
    res_ready = 1'b0;
  endtask

  initial begin
    longint f1, f2, mres;
    int rules, cyc;
    logic [W-1:0] v;
    bit ovf;
    start_valid = 1'b0; start_n = '0; res_ready = 1'b0; s2_valid = 1'b0; s2_n = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    f1 = 1; f2 = 1;                      // fib 1, fib 2
    for (int n = 1; n <= NMAX; n++) begin
      longint expect_v;
      expect_v = (n <= 2) ? 1 : f1 + f2;
      if (n > 2) begin f1 = f2; f2 = expect_v; end
      model(n, mres, rules);
      call(n, v, cyc, ovf);
      checks += 3;
      if (v !== W'(expect_v) || mres != expect_v) begin
        failures++; $display("fib %0d: got %0d, model %0d, expected %0d", n, v, mres, expect_v);
      end
      if (cyc != rules + 2) begin
        failures++; $display("fib %0d: %0d cycles, %0d rules", n, cyc, rules);
      end
      if (ovf) begin failures++; $display("fib %0d: overflow flagged", n); end
    end
    $display("fib %0d took %0d cycles", NMAX, cyc);
    // small stack: fib 12 needs 11 live continuations, fib 6 needs 5
    for (int t = 0; t < 2; t++) begin
      @(negedge clk);
      s2_valid = 1'b1; s2_n = (t == 0) ? W'(12) : W'(6);
      @(negedge clk);
      s2_valid = 1'b0;
      while (!r2_valid) @(posedge clk);
      checks++;
      if (t == 0 && !r2_overflow) begin failures++; $display("overflow not flagged"); end
      if (t == 1 && (r2_overflow || r2_value !== W'(8))) begin
        failures++; $display("fib 6 on the small stack: %0d ovf %b", r2_value, r2_overflow);
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
