// tb_mc_dff: self-checking test of the modified-clock flip-flop.
//
// Drives random data (with long runs of equal values) and checks that q
// follows d one clock later like a plain D flip-flop, that asynchronous reset
// clears q, and that the internal gated clock fires exactly once per change
// of q and never when d equals q.
module tb_mc_dff;
  logic clk = 1'b0, rst_n = 1'b1, d = 1'b0, q;
  int checks = 0, failures = 0;
  int gedges = 0, changes = 0;
  logic exp_q;

  mc_dff u_dut (.clk(clk), .rst_n(rst_n), .d(d), .q(q));

  always #5 clk = ~clk;
  always @(posedge u_dut.gclk) gedges++;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 rst_n = 1'b0;
    repeat (2) @(negedge clk);
    checks++;
    if (q !== 1'b0) begin failures++; $display("reset value wrong"); end
    rst_n = 1'b1;
    exp_q = 1'b0;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      // fewer changes than cycles: change d with probability 1/4
      if (($urandom % 4) == 0) d = ~d;
      @(posedge clk);
      if (d != exp_q) changes++;
      exp_q = d;
      #1;
      checks++;
      if (q !== exp_q) begin failures++; $display("i=%0d q=%b exp=%b", i, q, exp_q); end
    end
    // asynchronous reset in mid-cycle
    @(negedge clk);
    d = 1'b1;
    @(posedge clk);
    #2 rst_n = 1'b0;
    #1;
    checks++;
    if (q !== 1'b0) begin failures++; $display("async reset failed"); end
    rst_n = 1'b1;
    @(negedge clk);
    checks++;
    if (gedges != changes + 1) begin
      failures++; $display("gated edges %0d, value changes %0d", gedges, changes + 1);
    end
    checks++;
    if (changes == 0 || changes > 400) begin failures++; $display("poor stimulus"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
