// tb_lfsr24: the modified-clock LFSR widened to 24 stages, the register size
// used for the ITC-99 b07 seed-based test example.
//
// Taps x^24 + x^23 + x^22 + x^17 + 1 (a primitive polynomial) are passed as a
// parameter. The test loads a random non-zero seed, runs 20000 shifts against
// a reference model kept here, checks that the start state does not recur
// early (period 2^24 - 1 is too long to run out), and checks that the number
// of gated clock edges equals the number of stage output changes while
// staying below the 24 edges per cycle an ungated register would receive.
module tb_lfsr24;
  localparam int W = 24;
  localparam logic [W-1:0] TAPS = (24'd1 << 23) | (24'd1 << 22) | (24'd1 << 21) | (24'd1 << 16);
  localparam int STEPS = 20000;

  logic clk = 1'b0, rst_n = 1'b1, en = 1'b0, load = 1'b0;
  logic [W-1:0] seed = '0, y, ref_y, start;
  int checks = 0, failures = 0;
  int gedges = 0, toggles = 0;
  bit counting = 1'b0;

  mc_lfsr #(.W(W), .TAPS(TAPS), .SEED(24'h000001)) u_dut (
    .clk(clk), .rst_n(rst_n), .en(en), .load(load), .seed(seed), .y(y)
  );

  always #5 clk = ~clk;

  for (genvar k = 0; k < W; k++) begin : g_cnt
    always @(posedge u_dut.g_stage[k].u_ff.gclk) if (counting) gedges++;
    always @(y[k]) if (counting) toggles++;
  end

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 rst_n = 1'b0;
    repeat (2) @(negedge clk);
    checks++;
    if (y !== 24'h000001) begin failures++; $display("reset seed %h", y); end
    rst_n = 1'b1;
    seed = W'($urandom) | 24'h1;
    load = 1'b1;
    @(negedge clk);
    load = 1'b0;
    ref_y = seed;
    start = seed;
    checks++;
    if (y !== ref_y) begin failures++; $display("load: %h exp %h", y, ref_y); end
    counting = 1'b1;
    en = 1'b1;
    for (int i = 1; i <= STEPS; i++) begin
      @(negedge clk);
      ref_y = {ref_y[W-2:0], ^(ref_y & TAPS)};
      checks++;
      if (y !== ref_y) begin failures++; $display("step %0d: %h exp %h", i, y, ref_y); end
      if (y == start) begin failures++; $display("period %0d too short", i); end
    end
    en = 1'b0;
    @(negedge clk);
    checks++;
    if (gedges != toggles) begin failures++; $display("%0d gated edges, %0d changes", gedges, toggles); end
    checks++;
    if (gedges >= W * STEPS) begin failures++; $display("no clock edge withheld"); end
    $display("gated clock edges %0d against %0d ungated", gedges, W * STEPS);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
