// tb_accumulator_array: self-checking test of the eight-unit averager and its
// readout selector. Each unit gets its own random strobe pattern, so units
// finish at different times; the test checks the per-unit ready bits, reads
// every one of the 512 channel totals through the selector (one clock of
// latency) against its own sums, and checks that a busy unit reads zero.
module tb_accumulator_array;
  localparam int N_FB = 8, N_CH = 64, ADC_W = 14, ACC_W = 32, NSAMP_W = 19, SEL_W = 9;

  logic clk = 0, rst = 1, trig = 0;
  logic [NSAMP_W-1:0] num_samples = '0;
  logic [N_FB-1:0] data_valid = '0;
  logic [N_FB-1:0][N_CH-1:0][ADC_W-1:0] data = '0;
  logic [SEL_W-1:0] sel = '0;
  logic [N_FB-1:0] accum_ready;
  logic [ACC_W-1:0] ch_total;
  int checks = 0, failures = 0;
  longint unsigned ref_sum [N_FB][N_CH];
  int sent [N_FB];

  accumulator_array dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  localparam int NS = 20;

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    foreach (sent[u]) sent[u] = 0;
    foreach (ref_sum[u, c]) ref_sum[u][c] = 0;
    @(negedge clk); num_samples = NS; trig = 1;
    @(negedge clk); trig = 0;
    // unit 7 is kept slow so it is still busy when unit 0 is read
    while (sent[0] < NS || sent[1] < NS || sent[2] < NS || sent[3] < NS ||
           sent[4] < NS || sent[5] < NS || sent[6] < NS) begin
      for (int u = 0; u < N_FB; u++) begin
        data_valid[u] = (u == 7) ? ($urandom_range(0, 7) == 0) : ($urandom_range(0, 1) == 1);
        for (int c = 0; c < N_CH; c++) data[u][c] = ADC_W'($urandom);
        if (data_valid[u]) begin
          if (sent[u] < NS) for (int c = 0; c < N_CH; c++) ref_sum[u][c] += data[u][c];
          sent[u]++;
        end
      end
      @(negedge clk);
    end
    data_valid = '0;
    @(negedge clk);
    for (int u = 0; u < 7; u++) check(accum_ready[u], $sformatf("unit %0d ready", u));
    if (sent[7] < NS) begin
      check(!accum_ready[7], "slow unit still busy");
      sel = SEL_W'(7 * N_CH + 3);
      @(negedge clk);
      check(ch_total == '0, "busy unit reads zero");
    end
    // finish unit 7
    while (sent[7] < NS) begin
      data_valid[7] = 1;
      for (int c = 0; c < N_CH; c++) begin data[7][c] = ADC_W'($urandom); ref_sum[7][c] += data[7][c]; end
      sent[7]++;
      @(negedge clk);
    end
    data_valid = '0;
    @(negedge clk);
    check(accum_ready == '1, "all units ready");
    for (int u = 0; u < N_FB; u++)
      for (int c = 0; c < N_CH; c++) begin
        sel = SEL_W'(u * N_CH + c);
        @(negedge clk);
        check(ch_total == ACC_W'(ref_sum[u][c]), $sformatf("total of channel %0d", u * N_CH + c));
      end
    // new trigger clears every ready bit
    @(negedge clk); num_samples = 1; trig = 1;
    @(negedge clk); trig = 0;
    check(accum_ready == '0, "trigger clears ready bits");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
