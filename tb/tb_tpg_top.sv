// tb_tpg_top: end-to-end test of the test pattern generator at its default
// size (4-bit Gray code generator, 3-stage LFSR).
//
// Both generators run together under random enables and occasional seed
// loads. Every cycle the two pattern buses are compared with reference models
// kept here (a binary counter turned into Gray code, and a shift register
// with Y1 <= Y2 ^ Y3). The test also counts the rising edges of all seven
// gated flip-flop clocks and checks that they equal the number of bit changes
// on the pattern buses, i.e. no flip-flop is clocked without changing.
// Mechanisms that must each occur at least once: Gray sequence wrap, full
// LFSR period, seed load, hold of each generator, and a cycle in which a
// gated clock was withheld from a flip-flop while the clock ran.
module tb_tpg_top;
  localparam int N = 4;
  localparam int W = 3;

  logic clk = 1'b0, rst_n = 1'b1;
  logic gray_en = 1'b0, lfsr_en = 1'b0, lfsr_load = 1'b0;
  logic [W-1:0] lfsr_seed = '0;
  logic [N-1:0] gray_pattern;
  logic [W-1:0] lfsr_pattern;

  int checks = 0, failures = 0;
  int gedges = 0, changes = 0;
  bit counting = 1'b0;
  int n_gray_wrap = 0, n_lfsr_period = 0, n_load = 0;
  int n_gray_hold = 0, n_lfsr_hold = 0, n_withheld = 0;

  tpg_top u_dut (
    .clk          (clk),
    .rst_n        (rst_n),
    .gray_en      (gray_en),
    .lfsr_en      (lfsr_en),
    .lfsr_load    (lfsr_load),
    .lfsr_seed    (lfsr_seed),
    .gray_pattern (gray_pattern),
    .lfsr_pattern (lfsr_pattern)
  );

  always #5 clk = ~clk;

  for (genvar i = 0; i < N; i++) begin : g_gcnt
    always @(posedge u_dut.u_gray.g_bit[i].u_ff.gclk) if (counting) gedges++;
    always @(gray_pattern[i]) if (counting) changes++;
  end
  for (genvar k = 0; k < W; k++) begin : g_lcnt
    always @(posedge u_dut.u_lfsr.g_stage[k].u_ff.gclk) if (counting) gedges++;
    always @(lfsr_pattern[k]) if (counting) changes++;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0] cnt;        // reference binary count of the Gray generator
    logic [W-1:0] ref_l;      // reference LFSR state
    logic [W-1:0] period_start;
    int since_start;
    int edges_before;
    #1 rst_n = 1'b0;
    repeat (2) @(negedge clk);
    cnt = '0;
    ref_l = 3'b001;
    checks++;
    if (gray_pattern !== '0 || lfsr_pattern !== ref_l) begin
      failures++; $display("reset state %b %b", gray_pattern, lfsr_pattern);
    end
    rst_n = 1'b1;
    counting = 1'b1;
    period_start = ref_l;
    since_start = 0;
    for (int cyc = 0; cyc < 400; cyc++) begin
      // pick controls for this cycle
      gray_en   = ($urandom % 4) != 0;
      lfsr_en   = ($urandom % 4) != 0;
      lfsr_load = ($urandom % 40) == 0;
      lfsr_seed = W'(1 + ($urandom % ((1 << W) - 1)));
      edges_before = gedges;
      @(negedge clk);
      // reference update
      if (gray_en) begin
        if (cnt == N'((1 << N) - 1)) n_gray_wrap++;
        cnt = cnt + 1'b1;
      end else n_gray_hold++;
      if (lfsr_load) begin
        ref_l = lfsr_seed;
        n_load++;
        period_start = ref_l;
        since_start = 0;
      end else if (lfsr_en) begin
        ref_l = {ref_l[1:0], ref_l[1] ^ ref_l[2]};
        since_start++;
        if (ref_l == period_start) begin
          if (since_start == (1 << W) - 1) n_lfsr_period++;
          else begin failures++; $display("LFSR period %0d", since_start); end
          since_start = 0;
        end
      end else n_lfsr_hold++;
      if (gedges - edges_before < N + W) n_withheld++;
      checks++;
      if (gray_pattern !== (cnt ^ (cnt >> 1))) begin
        failures++; $display("cyc %0d gray %b exp %b", cyc, gray_pattern, cnt ^ (cnt >> 1));
      end
      checks++;
      if (lfsr_pattern !== ref_l) begin
        failures++; $display("cyc %0d lfsr %b exp %b", cyc, lfsr_pattern, ref_l);
      end
    end
    checks++;
    if (gedges != changes) begin
      failures++; $display("gated clock edges %0d but %0d bit changes", gedges, changes);
    end
    $display("gated clock edges %0d for %0d flip-flop-cycles (ungated)", gedges, 400 * (N + W));
    $display("mechanisms: gray_wrap=%0d lfsr_period=%0d load=%0d gray_hold=%0d lfsr_hold=%0d withheld=%0d",
             n_gray_wrap, n_lfsr_period, n_load, n_gray_hold, n_lfsr_hold, n_withheld);
    checks++; if (n_gray_wrap == 0)   begin failures++; $display("Gray wrap never happened"); end
    checks++; if (n_lfsr_period == 0) begin failures++; $display("full LFSR period never happened"); end
    checks++; if (n_load == 0)        begin failures++; $display("seed load never happened"); end
    checks++; if (n_gray_hold == 0)   begin failures++; $display("Gray hold never happened"); end
    checks++; if (n_lfsr_hold == 0)   begin failures++; $display("LFSR hold never happened"); end
    checks++; if (n_withheld == 0)    begin failures++; $display("no clock edge was ever withheld"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
