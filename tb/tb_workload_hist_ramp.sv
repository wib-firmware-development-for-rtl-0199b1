// tb_workload_hist_ramp: the ColdADC linearity measurement at full length.
// One channel (hist_ch = 77) sees a slow ramp that starts below the ADC range
// and rises at 100 samples per code, as in the DNL/INL test: 1,639,000
// samples are counted, one every SAMPLE_CLKS fabric clocks. The ADC model is
// code = clip(floor((n - 5000) / 100) + noise), noise in -1..+1, so the
// first 5000 samples sit at code 0 (overflow protection), like the spike at
// the ends of a measured histogram. The histogram must start at the first
// zero sample, count exactly 1,639,000 samples without losing any, be ready a
// few clocks after the last one, and hold a count for every code equal to the
// reference kept here; the memory is read through port B. Middle codes must
// show about 100 counts.
module tb_workload_hist_ramp;
  localparam int N_FB = 8, N_CH = 64, ADC_W = 14, HNUM_W = 32, HCNT_W = 16;
  localparam int SEL_W = 9, HADDR_W = 13;
  localparam int NSAMP = 1_639_000;
  localparam int SAMPLE_CLKS = 4;
  localparam int CH = 77;

  logic clk = 0, rst = 1, trig = 0;
  logic [HNUM_W-1:0] num_samples = '0;
  logic [SEL_W-1:0] hist_ch = SEL_W'(CH);
  logic [N_FB-1:0] data_valid = '0;
  logic [N_FB-1:0][N_CH-1:0][ADC_W-1:0] data = '0;
  logic hist_ready, overrun;
  logic [ADC_W-1:0] live_data;
  logic a_en, a_we;
  logic [HADDR_W-1:0] a_addr;
  logic [2*HCNT_W-1:0] a_wdata, a_rdata;
  logic en_b = 0;
  logic [HADDR_W-1:0] addr_b = '0;
  logic [2*HCNT_W-1:0] dout_b;
  int checks = 0, failures = 0;
  int unsigned ref_hist [2**ADC_W];

  histogram dut (.*);
  hist_bram #(.ADDR_W(HADDR_W), .DATA_W(2*HCNT_W)) mem (
    .clk_a(clk), .en_a(a_en), .we_a(a_we), .addr_a(a_addr), .din_a(a_wdata), .dout_a(a_rdata),
    .clk_b(clk), .en_b, .addr_b, .dout_b);

  always #5 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic int ramp(input int n);
    int unsigned h = n * 32'd2654435761;
    int v = (n - 5000) / 100 + int'((h >> 20) % 3) - 1;
    if (n < 5000) v = 0;
    return (v < 0) ? 0 : (v > 16383) ? 16383 : v;
  endfunction

  initial begin
    int waited, bad, mid_lo, mid_hi;
    longint t_last;
    foreach (ref_hist[i]) ref_hist[i] = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    // software: the ramp is running, trigger the histogram
    @(negedge clk); num_samples = NSAMP; trig = 1;
    @(negedge clk); trig = 0;
    repeat (8200) @(negedge clk);   // memory clear
    check(!hist_ready, "not ready before counting");
    // a few samples in mid-scale first: they must be ignored
    for (int n = -300; n < NSAMP; n++) begin
      automatic int v = (n < 0) ? 9000 + n : ramp(n);
      if (n >= 0) ref_hist[v]++;
      data_valid[CH / N_CH] = 1;
      data[CH / N_CH][CH % N_CH] = ADC_W'(v);
      @(negedge clk);
      data_valid = '0;
      if (n == NSAMP - 1) t_last = $time;
      if (n < NSAMP - 1) repeat (SAMPLE_CLKS - 1) @(negedge clk);
    end
    waited = 0;
    while (!hist_ready && waited < 100) begin @(negedge clk); waited++; end
    check(hist_ready, "hist_ready after 1,639,000 samples");
    check(waited <= 4, $sformatf("ready %0d clocks after the last sample", waited));
    check(!overrun, "no sample lost at one sample per 4 clocks");
    // copy the memory out through port B
    bad = 0; mid_lo = 1 << 30; mid_hi = 0;
    for (int w = 0; w < 2**HADDR_W; w++) begin
      en_b = 1; addr_b = HADDR_W'(w);
      @(negedge clk);
      for (int h = 0; h < 2; h++) begin
        automatic int got = int'(dout_b[h*HCNT_W +: HCNT_W]);
        automatic int code = 2 * w + h;
        automatic int expv = (ref_hist[code] > 65535) ? 65535 : int'(ref_hist[code]);
        if (got != expv) begin
          if (bad < 5) $display("  code %0d: %0d counts, expected %0d", code, got, expv);
          bad++;
        end
        if (code >= 1000 && code < 15000) begin
          if (got < mid_lo) mid_lo = got;
          if (got > mid_hi) mid_hi = got;
        end
      end
    end
    en_b = 0;
    check(bad == 0, $sformatf("all 16384 code counts match (%0d differ)", bad));
    check(mid_lo >= 50 && mid_hi <= 150, $sformatf("mid-range counts %0d..%0d, about 100 per code", mid_lo, mid_hi));
    check(ref_hist[0] > 5000, "clipped stretch piles up at code 0");
    $display("code 0: %0d counts, code 16383: %0d counts, mid-range %0d..%0d",
             ref_hist[0], ref_hist[16383], mid_lo, mid_hi);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (7_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
