// tb_histogram: self-checking test of the histogram state machine together
// with its dual-port memory. The selected channel carries a noisy sawtooth
// ramp that does not start at zero, so the test also checks that counting
// waits for code 0x0000. Sample strobes come with random gaps and in
// back-to-back pairs (exercising the skid register). After hist_ready the
// whole memory is read through port B and compared with a reference
// histogram; a second run on another channel checks the clear, a third
// checks counter saturation at 0xFFFF, and a last one checks the overrun
// flag under a strobe on every clock.
module tb_histogram;
  localparam int N_FB = 8, N_CH = 64, ADC_W = 14, HNUM_W = 32, HCNT_W = 16;
  localparam int SEL_W = 9, HADDR_W = 13;

  logic clk = 0, rst = 1, trig = 0;
  logic [HNUM_W-1:0] num_samples = '0;
  logic [SEL_W-1:0] hist_ch = '0;
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

  task automatic start(input int ch, input int n);
    @(negedge clk); hist_ch = SEL_W'(ch); num_samples = HNUM_W'(n); trig = 1;
    @(negedge clk); trig = 0;
    foreach (ref_hist[i]) ref_hist[i] = 0;
  endtask

  // one strobe of builder ch/N_CH with the given code on channel ch
  task automatic strobe(input int ch, input logic [ADC_W-1:0] code);
    data_valid = '0;
    for (int u = 0; u < N_FB; u++) begin
      data_valid[u] = (u == ch / N_CH) || ($urandom_range(0, 3) == 0);
      for (int c = 0; c < N_CH; c++) data[u][c] = ADC_W'($urandom);
    end
    data[ch / N_CH][ch % N_CH] = code;
    @(negedge clk);
    data_valid = '0;
  endtask

  task automatic compare_memory(input string what);
    int bad = 0;
    for (int w = 0; w < 2**HADDR_W; w++) begin
      en_b = 1; addr_b = HADDR_W'(w);
      @(negedge clk);
      if (dout_b[HCNT_W-1:0] != HCNT_W'(ref_hist[2*w] > 65535 ? 65535 : ref_hist[2*w]) ||
          dout_b[2*HCNT_W-1:HCNT_W] != HCNT_W'(ref_hist[2*w+1] > 65535 ? 65535 : ref_hist[2*w+1]))
        bad++;
    end
    en_b = 0;
    check(bad == 0, $sformatf("%s: %0d memory words differ", what, bad));
  endtask

  task automatic wait_ready(input int limit, output int waited);
    waited = 0;
    while (!hist_ready && waited < limit) begin @(negedge clk); waited++; end
  endtask

  int ch, n, counted, waited, code, lastgap;
  bit started;

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;

    // run 1: ramp starting mid-scale, 3000 counted samples
    ch = 77; n = 3000;
    start(ch, n);
    wait_ready(9000, waited);
    check(!hist_ready, "not ready while clearing / waiting for zero");
    code = 9000; counted = 0; started = 0;
    while (counted < n) begin
      int c;
      c = code + $urandom_range(0, 6) - 3;
      if (c < 0) c = 0;
      if (c > 16383) c = 16383;
      if (code == 0) c = 0;
      if (c == 0 && !started) started = 1;
      if (started) begin ref_hist[c]++; counted++; end
      strobe(ch, ADC_W'(c));
      code = (code >= 16383 - 40) ? 0 : code + 40;
      lastgap = $urandom_range(1, 4);
      if (counted < n) repeat (lastgap) @(negedge clk);
      check(live_data == ADC_W'(c), "live data shows the channel's sample");
    end
    check(!hist_ready, "not ready right after the last strobe");
    wait_ready(10, waited);
    check(hist_ready, "ready after the last sample");
    check(waited <= 4, $sformatf("ready %0d clocks after the last strobe", waited));
    strobe(ch, 14'd5); strobe(ch, 14'd5);
    repeat (4) @(negedge clk);
    compare_memory("run 1");
    check(!overrun, "no overrun at normal rates");

    // run 2: another channel, back-to-back pairs; memory must be cleared first
    ch = 448 + 5; n = 2000;
    start(ch, n);
    repeat (8200) @(negedge clk);
    strobe(ch, 14'd0); ref_hist[0]++;
    for (int i = 1; i < n; i += 2) begin
      int c1, c2;
      c1 = $urandom_range(0, 63); c2 = (i % 5 == 0) ? c1 : $urandom_range(0, 63);
      ref_hist[c1]++;
      strobe(ch, ADC_W'(c1));
      if (i + 1 < n) begin ref_hist[c2]++; strobe(ch, ADC_W'(c2)); end
      repeat (2) @(negedge clk);
    end
    wait_ready(10, waited);
    check(hist_ready, "run 2 ready");
    compare_memory("run 2");
    check(!overrun, "no overrun with paired strobes");

    // run 3: saturation of one counter
    ch = 0; n = 66000;
    start(ch, n);
    repeat (8200) @(negedge clk);
    for (int i = 0; i < n; i++) begin
      ref_hist[(i < 10) ? i : 0]++;
      strobe(ch, (i < 10) ? ADC_W'(i) : 14'd0);
      @(negedge clk);
    end
    wait_ready(10, waited);
    check(hist_ready, "run 3 ready");
    compare_memory("run 3 (counter of code 0 saturated)");

    // run 4: zero-sample run ends after the clear
    start(9, 0);
    wait_ready(8300, waited);
    check(hist_ready && waited >= 8180, $sformatf("zero-sample run ready after the clear (%0d clocks)", waited));

    // run 5: a strobe on every clock overruns the two-clock read-modify-write
    start(1, 100);
    repeat (8200) @(negedge clk);
    for (int i = 0; i < 20; i++) strobe(1, 14'd0);
    check(overrun, "overrun flagged under continuous strobes");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (600000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
