// tb_wib_qc_top: end-to-end test of the QC firmware additions at their
// default size (8 COLDATA chips, 16 links, 512 channels, 2^14-code
// histogram), driven the way the QC software drives them: through AXI4-Lite
// register accesses and BRAM port-B reads.
//
// A frame generator sends a frame on all 16 links every FRAME_CLKS clocks,
// link B of each chip lagging link A by 0-2 clocks, and injects faults at
// random: decoder errors and lost frames on either link. It works out from
// what it sent which sample sets the builders must release, and keeps the
// reference sums and histograms. The scenario:
//   1. averager: every channel sits at its own DC level plus noise; write the
//      sample count, trigger, poll accum_ready, then read all 512 totals via
//      accum_total_ch_sel / accum_ch_total and compare;
//   2. histogram, twice (channels 0 and 200): a clipped ramp on every channel;
//      select the channel, wait until the live peek register shows 0x0000,
//      write the sample count, trigger, poll hist_ready, copy the 32 KB memory
//      through port B and compare with the reference histogram.
// Each mechanism is counted, and one that never happened is a failure.
module tb_wib_qc_top;
  import wib_qc_pkg::*;

  localparam int FRAME_CLKS = 8;
  localparam int ACC_N      = 60;
  localparam int HIST_N     = 1500;
  localparam int RAMP_STEP  = 37;
  localparam int RAMP_LEN   = 17000;   // ramp spans -300 .. 16699 before clipping

  logic clk = 0, aresetn = 0, hist_axi_clk = 0;
  link_frame_t [2*N_FB-1:0] link;
  logic [BYTE_ADDR_W-1:0] s_axi_awaddr = '0, s_axi_araddr = '0;
  logic s_axi_awvalid = 0, s_axi_wvalid = 0, s_axi_bready = 0, s_axi_arvalid = 0, s_axi_rready = 0;
  logic [31:0] s_axi_wdata = '0;
  logic [3:0] s_axi_wstrb = '0;
  logic s_axi_awready, s_axi_wready, s_axi_bvalid, s_axi_arready, s_axi_rvalid;
  logic [1:0] s_axi_bresp, s_axi_rresp;
  logic [31:0] s_axi_rdata;
  logic hist_en = 0;
  logic [BYTE_ADDR_W-1:0] hist_addr = '0;
  logic [31:0] hist_data_in;
  logic [N_FB-1:0] fb_aligned, fb_drop;
  logic hist_overrun;

  wib_qc_top dut (.*);

  always #5 clk = ~clk;
  always #6 hist_axi_clk = ~hist_axi_clk;

  int checks = 0, failures = 0;
  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---------------- channel data model ----------------
  bit ramp_mode = 0;
  function automatic int noise(input int ts, input int ch);
    int unsigned h = (ts * 32'd2654435761) ^ (ch * 32'd40503) ^ 32'h5bd1e995;
    h = h ^ (h >> 15);
    h = h * 32'd2246822519;
    h = h ^ (h >> 13);
    return int'(h % 7) - 3;
  endfunction
  function automatic int clip(input int v);
    return (v < 0) ? 0 : (v > 16383) ? 16383 : v;
  endfunction
  // sample of global channel ch in frame ts
  function automatic int adc(input int ts, input int ch);
    if (ramp_mode) return clip((ts * RAMP_STEP) % RAMP_LEN - 300 + noise(ts, ch) / 2);
    return clip((ch * 29 + 1000) % 16000 + noise(ts, ch));
  endfunction

  // ---------------- frame generator and reference ----------------
  bit traffic_on = 0;
  int ts_next = 1;
  // accumulator reference
  int acc_cnt [N_FB];
  longint unsigned ref_tot [N_FB*CH_PER_FB];
  // histogram reference
  int hist_sel = 0;
  bit h_started = 0;
  int h_cnt = 0, h_skipped = 0;
  int unsigned ref_hist [2**ADC_W];
  // mechanism counters
  int n_err = 0, n_lost = 0, n_drop = 0, n_realign = 0, n_good = 0;
  logic [N_FB-1:0] aligned_q = '0;

  function automatic link_frame_t make_frame(input int ts, input int fb, input int half, input bit err);
    link_frame_t f;
    f.valid = 1; f.err = err; f.ts = TS_W'(ts);
    for (int c = 0; c < CH_PER_LINK; c++)
      f.data[c] = ADC_W'(adc(ts, fb * CH_PER_FB + half * CH_PER_LINK + c));
    return f;
  endfunction

  initial begin
    link = '0;
    forever begin
      @(negedge clk);
      if (traffic_on) begin
        automatic int ts = ts_next;
        int skew [N_FB];
        int fault [N_FB];   // 0 good, 1 err A, 2 err B, 3 lost A, 4 lost B
        ts_next++;
        for (int k = 0; k < N_FB; k++) begin
          automatic int r = $urandom_range(0, 99);
          skew[k]  = $urandom_range(0, 2);
          fault[k] = (r < 3) ? 1 : (r < 6) ? 2 : (r < 8) ? 3 : (r < 10) ? 4 : 0;
          if (fault[k] == 1 || fault[k] == 2) n_err++;
          if (fault[k] == 3 || fault[k] == 4) n_lost++;
          if (fault[k] == 0) begin
            n_good++;
            // reference bookkeeping for a released sample set
            if (!ramp_mode && acc_cnt[k] < ACC_N) begin
              for (int c = 0; c < CH_PER_FB; c++)
                ref_tot[k * CH_PER_FB + c] += longint'(adc(ts, k * CH_PER_FB + c));
              acc_cnt[k]++;
            end
            if (ramp_mode && k == hist_sel / CH_PER_FB) begin
              automatic int v = adc(ts, hist_sel);
              if (!h_started && v == 0) h_started = 1;
              if (!h_started) h_skipped++;
              if (h_started && h_cnt < HIST_N) begin ref_hist[v]++; h_cnt++; end
            end
          end
        end
        for (int t = 0; t < FRAME_CLKS; t++) begin
          for (int k = 0; k < N_FB; k++) begin
            link[2*k]   = (t == 0 && fault[k] != 3) ? make_frame(ts, k, 0, fault[k] == 1) : '0;
            link[2*k+1] = (t == skew[k] && fault[k] != 4) ? make_frame(ts, k, 1, fault[k] == 2) : '0;
          end
          if (t < FRAME_CLKS - 1) @(negedge clk);
        end
      end else
        link = '0;
    end
  end

  always @(posedge clk) if (aresetn) begin
    n_drop <= n_drop + $countones(fb_drop);
    aligned_q <= fb_aligned;
    n_realign <= n_realign + $countones(fb_aligned & ~aligned_q);
  end

  // ---------------- AXI4-Lite master (handshakes decided on falling edges) ----------------
  task automatic axi_write(input logic [BYTE_ADDR_W-1:0] addr, input logic [31:0] d);
    bit aw_hs, w_hs, b_hs;
    @(negedge clk);
    s_axi_awaddr = addr; s_axi_wdata = d; s_axi_wstrb = 4'hF;
    s_axi_awvalid = 1; s_axi_wvalid = 1;
    while (s_axi_awvalid || s_axi_wvalid) begin
      aw_hs = s_axi_awvalid && s_axi_awready;
      w_hs  = s_axi_wvalid && s_axi_wready;
      @(negedge clk);
      if (aw_hs) s_axi_awvalid = 0;
      if (w_hs) s_axi_wvalid = 0;
    end
    s_axi_bready = 1;
    do begin b_hs = s_axi_bvalid; @(negedge clk); end while (!b_hs);
    s_axi_bready = 0;
  endtask

  task automatic axi_read(input logic [BYTE_ADDR_W-1:0] addr, output logic [31:0] d);
    @(negedge clk);
    s_axi_araddr = addr; s_axi_arvalid = 1;
    while (!s_axi_arready) @(negedge clk);
    @(negedge clk); s_axi_arvalid = 0;
    while (!s_axi_rvalid) @(negedge clk);
    d = s_axi_rdata;
    s_axi_rready = 1;
    @(negedge clk); s_axi_rready = 0;
  endtask

  // ---------------- scenario ----------------
  int n_acc_runs = 0, n_tot_reads = 0, n_hist_runs = 0, n_peek_zero = 0, n_bram_words = 0;

  task automatic histogram_run(input int ch);
    logic [31:0] d;
    int polls, bad;
    // select the channel and let the ramp run until the peek register reads zero
    hist_sel = ch; h_started = 0; h_cnt = 0; h_skipped = 0;
    foreach (ref_hist[i]) ref_hist[i] = 0;
    axi_write(16'h78, 32'(ch));
    axi_write(16'h7C, 32'(HIST_N));
    ramp_mode = 1;
    traffic_on = 1;
    polls = 0;
    do begin axi_read(16'hF0, d); polls++; end while (d[MON_LSB +: ADC_W] != 0 && polls < 5000);
    check(d[MON_LSB +: ADC_W] == 0, "live peek register reached 0x0000");
    if (d[MON_LSB +: ADC_W] == 0) n_peek_zero++;
    // stop the ramp while the histogram clears its memory, then trigger
    traffic_on = 0;
    repeat (2 * FRAME_CLKS) @(negedge clk);
    h_started = 0; h_cnt = 0; h_skipped = 0;
    foreach (ref_hist[i]) ref_hist[i] = 0;
    axi_write(16'h74, 32'h0);
    axi_write(16'h74, 32'h1);
    repeat (8300) @(negedge clk);
    axi_read(16'hF0, d);
    check(!d[HIST_RDY_BIT], "hist_ready low before counting");
    // restart the ramp mid-scale so the start-at-zero rule matters
    ts_next = ts_next + 150;
    traffic_on = 1;
    polls = 0;
    do begin axi_read(16'hF0, d); polls++; end while (!d[HIST_RDY_BIT] && polls < 20000);
    traffic_on = 0;
    check(d[HIST_RDY_BIT], $sformatf("hist_ready for channel %0d", ch));
    check(h_cnt == HIST_N, "reference saw enough samples");
    check(h_skipped > 0, "samples before the first zero were skipped");
    // copy the histogram memory through port B
    bad = 0;
    for (int w = 0; w < 2**HADDR_W; w++) begin
      @(negedge hist_axi_clk); hist_en = 1; hist_addr = BYTE_ADDR_W'(w * 4);
      @(negedge hist_axi_clk);
      n_bram_words++;
      if (hist_data_in != {16'(ref_hist[2*w+1]), 16'(ref_hist[2*w])}) begin
        if (bad < 5) $display("  word %0d: got %h expected %h", w, hist_data_in,
                               {16'(ref_hist[2*w+1]), 16'(ref_hist[2*w])});
        bad++;
      end
    end
    hist_en = 0;
    check(bad == 0, $sformatf("histogram of channel %0d (%0d words differ)", ch, bad));
    n_hist_runs++;
  endtask

  initial begin
    logic [31:0] d;
    int polls, bad, t0;
    foreach (acc_cnt[k]) acc_cnt[k] = 0;
    foreach (ref_tot[i]) ref_tot[i] = 0;
    repeat (4) @(negedge clk);
    aresetn = 1;
    repeat (2) @(negedge clk);

    // ---- 1. averager ----
    axi_write(16'h70, 32'(ACC_N) << ACCUM_NUM_LSB);          // count, trigger low
    axi_write(16'h70, (32'(ACC_N) << ACCUM_NUM_LSB) | 32'h1); // rising edge of accum_trig
    axi_read(16'hF0, d);
    check(d[7:0] == 8'h00, "accumulators busy after the trigger");
    t0 = $time;
    traffic_on = 1;
    polls = 0;
    do begin axi_read(16'hF0, d); polls++; end while (d[7:0] != 8'hFF && polls < 5000);
    traffic_on = 0;
    check(d[7:0] == 8'hFF, "all eight accumulators ready");
    foreach (acc_cnt[k]) check(acc_cnt[k] == ACC_N, "reference counted every unit");
    // read the 512 totals one by one
    bad = 0;
    for (int ch = 0; ch < N_FB * CH_PER_FB; ch++) begin
      axi_write(16'h70, (32'(ACC_N) << ACCUM_NUM_LSB) | (32'(ch) << ACCUM_SEL_LSB) | 32'h1);
      axi_read(16'hF4, d);
      n_tot_reads++;
      if (d != 32'(ref_tot[ch])) begin
        if (bad < 5) $display("  channel %0d: total %0d expected %0d", ch, d, ref_tot[ch]);
        bad++;
      end
    end
    check(bad == 0, $sformatf("all 512 accumulated totals (%0d differ)", bad));
    // software division gives the DC level to within the noise
    check(ref_tot[100] / ACC_N >= 100 * 29 + 1000 - 3 && ref_tot[100] / ACC_N <= 100 * 29 + 1000 + 3,
          "average of channel 100 is its DC level");
    n_acc_runs++;

    // ---- 2. histogram of two channels ----
    histogram_run(0);
    histogram_run(200);
    check(!hist_overrun, "no histogram overrun at the frame rate");

    // ---- mechanisms ----
    $display("mechanisms: frames=%0d decoder_errors=%0d lost=%0d discarded=%0d realigned=%0d",
             n_good, n_err, n_lost, n_drop, n_realign);
    $display("            accum_runs=%0d total_reads=%0d hist_runs=%0d peek_zero=%0d bram_words=%0d",
             n_acc_runs, n_tot_reads, n_hist_runs, n_peek_zero, n_bram_words);
    check(n_err > 0, "decoder errors injected");
    check(n_lost > 0, "lost frames injected");
    check(n_drop > 0, "frames discarded by validation");
    check(n_realign > 0, "builders realigned after a mismatch");
    check(n_acc_runs > 0 && n_tot_reads == 512, "averager run and readout");
    check(n_hist_runs == 2 && n_peek_zero == 2 && n_bram_words == 2 * 8192, "histogram runs and readout");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
