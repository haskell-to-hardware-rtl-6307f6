// tb_df_func2: self-checking test of the strict two-input function block.
// An adder instance gets two independent random token streams and a random
// output ready: each output token must be the sum of the i-th tokens of both
// inputs, an output is valid exactly when both inputs are, and both inputs
// are consumed together. A second instance (three-way compare) is driven
// with fixed operand pairs to check the other operation codes.
module tb_df_func2;
  import fhw_pkg::*;
  localparam int W = 16, NTOK = 300;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic in0_valid, in0_ready, in1_valid, in1_ready, out_valid, out_ready;
  logic [W-1:0] in0_data, in1_data, out_data;
  int checks = 0, failures = 0, p0 = 0, p1 = 0, oi = 0;

  df_func2 #(.WA(W), .WB(W), .WO(W), .OP(OP_ADD)) dut (.*);

  function automatic logic [W-1:0] va(int i); return W'(i * 3001 + 11); endfunction
  function automatic logic [W-1:0] vb(int i); return W'(i * 57 + 40000); endfunction

  always @(posedge clk) begin
    if (!rst_n) begin
      in0_valid <= 1'b0; in1_valid <= 1'b0; in0_data <= '0; in1_data <= '0;
      out_ready <= 1'b0;
    end else begin
      checks++;
      if (out_valid !== (in0_valid & in1_valid) || in0_ready !== in1_ready) begin
        failures++; $display("handshake rule broken");
      end
      if (out_valid && out_ready) begin
        checks++;
        if (out_data !== W'(va(oi) + vb(oi))) begin
          failures++; $display("token %0d: got %h", oi, out_data);
        end
        oi++;
      end
      if (in0_valid && in0_ready) p0++;
      if (in1_valid && in1_ready) p1++;
      if (!in0_valid || in0_ready) begin
        in0_valid <= (p0 < NTOK) && ($urandom % 3 != 0); in0_data <= va(p0);
      end
      if (!in1_valid || in1_ready) begin
        in1_valid <= (p1 < NTOK) && ($urandom % 2 != 0); in1_data <= vb(p1);
      end
      out_ready <= ($urandom % 4 != 0);
    end
  end

  // operation codes, combinational check
  logic [W-1:0] ca, cb;
  logic [1:0]   cmp;
  logic         c_ir0, c_ir1, c_ov;
  logic [W-1:0] sa, sb, sub;
  logic         s_ir0, s_ir1, s_ov;
  df_func2 #(.WA(W), .WB(W), .WO(2), .OP(OP_CMP3)) u_cmp (
    .in0_valid(1'b1), .in0_ready(c_ir0), .in0_data(ca),
    .in1_valid(1'b1), .in1_ready(c_ir1), .in1_data(cb),
    .out_valid(c_ov), .out_ready(1'b1), .out_data(cmp));
  df_func2 #(.WA(W), .WB(W), .WO(W), .OP(OP_RSUB)) u_rsub (
    .in0_valid(1'b1), .in0_ready(s_ir0), .in0_data(sa),
    .in1_valid(1'b1), .in1_ready(s_ir1), .in1_data(sb),
    .out_valid(s_ov), .out_ready(1'b1), .out_data(sub));

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 50; t++) begin
      logic [1:0] e;
      ca = W'($urandom % 8); cb = W'($urandom % 8);
      sa = W'($urandom); sb = W'($urandom);
      #1;
      e = (ca == cb) ? 2'd0 : (ca < cb) ? 2'd1 : 2'd2;
      checks += 2;
      if (cmp !== e) begin failures++; $display("cmp %0d %0d gave %0d", ca, cb, cmp); end
      if (sub !== W'(sb - sa)) begin failures++; $display("rsub wrong"); end
    end
    wait (oi == NTOK);
    repeat (3) @(negedge clk);
    checks++;
    if (p0 != NTOK || p1 != NTOK) begin failures++; $display("consumed %0d/%0d", p0, p1); end
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
