// tb_mc_lfsr: self-checking test of the modified-clock LFSR.
//
// The default 3-stage LFSR is checked against a reference shift register
// computed here (Y1 <= Y2 ^ Y3, Yk <= Yk-1): reset seed, maximal period of
// 7 distinct non-zero states, hold while en is low, synchronous seed load and
// its priority over en. For every stage the gated clock edges are counted and
// must equal the number of times that stage's output changed.
module tb_mc_lfsr;
  localparam int W = 3;

  logic clk = 1'b0, rst_n = 1'b1, en = 1'b0, load = 1'b0;
  logic [W-1:0] seed = '0;
  logic [W-1:0] y;
  logic [W-1:0] ref_y;
  int checks = 0, failures = 0;
  int gedges [W];
  int toggles [W];
  bit counting = 1'b0;

  mc_lfsr u_dut (.clk(clk), .rst_n(rst_n), .en(en), .load(load), .seed(seed), .y(y));

  always #5 clk = ~clk;

  for (genvar k = 0; k < W; k++) begin : g_cnt
    initial begin gedges[k] = 0; toggles[k] = 0; end
    always @(posedge u_dut.g_stage[k].u_ff.gclk) if (counting) gedges[k]++;
    always @(y[k]) if (counting) toggles[k]++;
  end

  function automatic logic [W-1:0] ref_next(input logic [W-1:0] s);
    return {s[1], s[0], s[1] ^ s[2]};
  endfunction

  task automatic step_check(input string what);
    @(negedge clk);
    checks++;
    if (y !== ref_y) begin failures++; $display("%s: got %b exp %b", what, y, ref_y); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] first;
    int period;
    #1 rst_n = 1'b0;
    repeat (2) @(negedge clk);
    ref_y = 3'b001;
    checks++;
    if (y !== ref_y) begin failures++; $display("reset seed %b", y); end
    rst_n = 1'b1;
    counting = 1'b1;
    // period
    en = 1'b1;
    first = y;
    period = 0;
    for (int i = 0; i < 20; i++) begin
      ref_y = ref_next(ref_y);
      step_check("run");
      checks++;
      if (y == '0) begin failures++; $display("lock-up state reached"); end
      if (period == 0 && y == first) period = i + 1;
    end
    checks++;
    if (period != (1 << W) - 1) begin failures++; $display("period %0d", period); end
    // hold
    en = 1'b0;
    repeat (4) step_check("hold");
    // load with and without en
    seed = 3'b110; load = 1'b1; ref_y = seed;
    step_check("load");
    en = 1'b1; seed = 3'b011; ref_y = seed;
    step_check("load over en");
    load = 1'b0;
    for (int i = 0; i < 10; i++) begin
      ref_y = ref_next(ref_y);
      step_check("after load");
    end
    en = 1'b0;
    @(negedge clk);
    for (int k = 0; k < W; k++) begin
      checks++;
      if (gedges[k] != toggles[k]) begin
        failures++; $display("stage %0d: %0d gated edges, %0d changes", k + 1, gedges[k], toggles[k]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
