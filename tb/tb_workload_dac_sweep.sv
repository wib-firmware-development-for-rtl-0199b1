// tb_workload_dac_sweep: the ColdADC DC transfer measurement with the
// averager, over the full sweep of 2^10 DAC levels (every 64th code of a
// 16-bit DAC). The 128 channels of one test board sit on two COLDATA chips,
// i.e. accumulator units 0 and 1. At each level the software sequence is
// repeated: trigger, let SAMPLES sample sets accumulate, wait for both ready
// bits, read the 128 totals through the selector, divide. The ADC model
// follows the measured transfer curve shape: code 0 below about 0.15 V,
// linear up to 16383 near 1.6 V, held at the limits (overflow protection),
// with a per-channel offset and noise of -2..+2 codes. Checked: every total,
// that ready rises on the clock after the last sample set, and that the
// averages reproduce the curve, including both clipped ends. A last run takes
// the documented maximum of 262,144 full-scale sample sets and checks that the
// 32-bit total (4,294,705,152) does not overflow.
module tb_workload_dac_sweep;
  localparam int N_FB = 8, N_CH = 64, ADC_W = 14, ACC_W = 32, NSAMP_W = 19, SEL_W = 9;
  localparam int SAMPLES = 32;
  localparam int STEPS   = 1024;
  localparam int DAT_CH  = 128;

  logic clk = 0, rst = 1, trig = 0;
  logic [NSAMP_W-1:0] num_samples = NSAMP_W'(SAMPLES);
  logic [N_FB-1:0] data_valid = '0;
  logic [N_FB-1:0][N_CH-1:0][ADC_W-1:0] data = '0;
  logic [SEL_W-1:0] sel = '0;
  logic [N_FB-1:0] accum_ready;
  logic [ACC_W-1:0] ch_total;
  int checks = 0, failures = 0;
  longint unsigned ref_tot [DAT_CH];

  accumulator_array dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // DAC code (16-bit, 0..2.5 V) -> ideal ADC code before noise and clipping
  function automatic int transfer(input int dac, input int ch);
    // 0.15 V = 3932 DAC codes, 1.6 V = 41943 DAC codes
    return ((dac - 3932 - ch) * 16383) / (41943 - 3932);
  endfunction
  function automatic int adc(input int dac, input int ch, input int n);
    int unsigned h = (n * 32'd2654435761) ^ (ch * 32'd40503) ^ (dac * 32'd97);
    int v = transfer(dac, ch) + int'((h >> 17) % 5) - 2;
    return (v < 0) ? 0 : (v > 16383) ? 16383 : v;
  endfunction

  initial begin
    int bad_tot, bad_ready, bad_curve, low_ok, high_ok;
    bad_tot = 0; bad_ready = 0; bad_curve = 0; low_ok = 0; high_ok = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int step = 0; step < STEPS; step++) begin
      automatic int dac = step * 64;
      foreach (ref_tot[c]) ref_tot[c] = 0;
      @(negedge clk); trig = 1;
      @(negedge clk); trig = 0;
      for (int n = 0; n < SAMPLES; n++) begin
        data_valid[1:0] = 2'b11;
        for (int c = 0; c < DAT_CH; c++) begin
          data[c / N_CH][c % N_CH] = ADC_W'(adc(dac, c, n));
          ref_tot[c] += longint'(adc(dac, c, n));
        end
        if (accum_ready[1:0] != 2'b00) bad_ready++;
        @(negedge clk);
        data_valid = '0;
        if (n < SAMPLES - 1) @(negedge clk);
      end
      if (accum_ready[1:0] != 2'b11) bad_ready++;
      for (int c = 0; c < DAT_CH; c++) begin
        automatic int avg;
        sel = SEL_W'(c);
        @(negedge clk);
        if (ch_total != ACC_W'(ref_tot[c])) bad_tot++;
        avg = int'(ch_total) / SAMPLES;
        begin
          automatic int ideal = transfer(dac, c);
          automatic int clipped = (ideal < 0) ? 0 : (ideal > 16383) ? 16383 : ideal;
          if (avg < clipped - 3 || avg > clipped + 3) bad_curve++;
          if (ideal < -100 && avg == 0) low_ok++;
          if (ideal > 16483 && avg == 16383) high_ok++;
        end
      end
    end
    // one run at the documented maximum count, with every sample at full scale
    num_samples = NSAMP_W'(262_144);
    @(negedge clk); trig = 1;
    @(negedge clk); trig = 0;
    for (int c = 0; c < DAT_CH; c++) data[c / N_CH][c % N_CH] = 14'h3FFF;
    for (int n = 0; n < 262_144; n++) begin
      data_valid[1:0] = 2'b11;
      @(negedge clk);
      data_valid = '0;
    end
    check(accum_ready[1:0] == 2'b11, "ready after 262,144 sample sets");
    sel = SEL_W'(127);
    @(negedge clk);
    check(ch_total == 32'd4_294_705_152, $sformatf("262,144 x 16,383 = %0d without overflow", ch_total));
    check(bad_tot == 0, $sformatf("all %0d totals match (%0d differ)", STEPS * DAT_CH, bad_tot));
    check(bad_ready == 0, $sformatf("ready exactly after the last sample set (%0d misses)", bad_ready));
    check(bad_curve == 0, $sformatf("averages follow the transfer curve (%0d off)", bad_curve));
    check(low_ok > 0, "lower overflow protection seen (average 0)");
    check(high_ok > 0, "upper overflow protection seen (average 16383)");
    $display("levels=%0d channels=%0d clipped_low=%0d clipped_high=%0d", STEPS, DAT_CH, low_ok, high_ok);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
