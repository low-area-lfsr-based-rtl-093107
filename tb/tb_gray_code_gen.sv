// tb_gray_code_gen: self-checking test of the Gray code pattern generator.
//
// Runs the default 4-bit generator through two full sequences and checks each
// pattern against k ^ (k >> 1) computed here from a plain counter, that
// consecutive patterns differ in exactly one bit, that all 2^N patterns occur
// once per sequence and that the sequence wraps to zero. It also counts the
// rising edges of every flip-flop's gated clock: exactly one flip-flop must be
// clocked per step, and none while en is low.
module tb_gray_code_gen;
  localparam int N = 4;
  localparam int P = 1 << N;

  logic clk = 1'b0, rst_n = 1'b1, en = 1'b0;
  logic [N-1:0] pattern, prev;
  int checks = 0, failures = 0;
  int gedges [N];
  int total_edges;
  bit seen [P];

  gray_code_gen u_dut (.clk(clk), .rst_n(rst_n), .en(en), .pattern(pattern));

  always #5 clk = ~clk;

  for (genvar i = 0; i < N; i++) begin : g_cnt
    initial gedges[i] = 0;
    always @(posedge u_dut.g_bit[i].u_ff.gclk) gedges[i]++;
  end

  function automatic int sum_edges();
    int s = 0;
    for (int i = 0; i < N; i++) s += gedges[i];
    return s;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 rst_n = 1'b0;
    repeat (2) @(negedge clk);
    checks++;
    if (pattern !== '0) begin failures++; $display("reset pattern %b", pattern); end
    rst_n = 1'b1;
    @(negedge clk);
    total_edges = sum_edges();
    for (int k = 1; k <= 2 * P; k++) begin
      logic [N-1:0] kb;
      logic [N-1:0] exp_p;
      prev = pattern;
      en = 1'b1;
      @(negedge clk);
      kb    = N'(k);
      exp_p = kb ^ (kb >> 1);
      checks++;
      if (pattern !== exp_p) begin failures++; $display("k=%0d got %b exp %b", k, pattern, exp_p); end
      checks++;
      if ($countones(pattern ^ prev) != 1) begin
        failures++; $display("k=%0d hamming distance %0d", k, $countones(pattern ^ prev));
      end
      if (k <= P) begin
        checks++;
        if (seen[pattern]) begin failures++; $display("pattern %b repeated", pattern); end
        seen[pattern] = 1'b1;
      end
      checks++;
      if (sum_edges() != total_edges + 1) begin
        failures++; $display("k=%0d %0d flip-flops clocked", k, sum_edges() - total_edges);
      end
      total_edges = sum_edges();
      // hold for a few cycles now and then
      if (k % 5 == 0) begin
        en = 1'b0;
        prev = pattern;
        repeat (3) @(negedge clk);
        checks++;
        if (pattern !== prev || sum_edges() != total_edges) begin
          failures++; $display("hold failed at k=%0d", k);
        end
      end
    end
    checks++;
    if (pattern !== '0) begin failures++; $display("no wrap to zero"); end
    for (int i = 0; i < P; i++) begin
      checks++;
      if (!seen[i]) begin failures++; $display("pattern %0d never produced", i); end
    end
    // bit i toggles 2^(N-1-i) times per sequence, bit N-1 twice
    for (int i = 0; i < N; i++) begin
      int exp_e;
      exp_e = 2 * ((i == N - 1) ? 2 : (1 << (N - 1 - i)));
      checks++;
      if (gedges[i] != exp_e) begin failures++; $display("bit %0d clocked %0d exp %0d", i, gedges[i], exp_e); end
    end
    $display("gated clock edges %0d for %0d steps of %0d flip-flops", sum_edges(), 2 * P, N);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
