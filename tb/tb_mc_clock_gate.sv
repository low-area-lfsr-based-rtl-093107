// tb_mc_clock_gate: self-checking test of the modified-clock control logic.
//
// Random d/q values are applied while the clock is low. In every clock-high
// phase the gated clock must be high exactly when d differed from q at the
// rising edge, and it must stay low while the clock is low. Gated rising
// edges are counted and compared with the number of cycles where d != q.
module tb_mc_clock_gate;
  logic clk = 1'b0;
  logic d = 1'b0, q = 1'b0;
  logic gclk;
  int checks = 0, failures = 0;
  int exp_edges = 0, got_edges = 0;

  mc_clock_gate u_dut (.clk(clk), .d(d), .q(q), .gclk(gclk));

  always @(posedge gclk) got_edges++;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic want;
    for (int i = 0; i < 400; i++) begin
      // clock low: set new inputs, gated clock must be low
      d = 1'($urandom);
      q = 1'($urandom);
      #2;
      checks++;
      if (gclk !== 1'b0) begin failures++; $display("gclk high while clk low, i=%0d", i); end
      want = d ^ q;
      if (want) exp_edges++;
      #3 clk = 1'b1;
      #1;
      checks++;
      if (gclk !== want) begin
        failures++; $display("i=%0d d=%b q=%b gclk=%b", i, d, q, gclk);
      end
      // the flip-flop's q follows d right after the edge: gate must not glitch
      q = d;
      #1;
      checks++;
      if (gclk !== want) begin failures++; $display("glitch at i=%0d", i); end
      #3 clk = 1'b0;
    end
    #5;
    checks++;
    if (got_edges != exp_edges) begin
      failures++; $display("gated edges %0d expected %0d", got_edges, exp_edges);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
