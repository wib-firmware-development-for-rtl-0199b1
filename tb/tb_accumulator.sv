// tb_accumulator: self-checking test of one accumulator unit (64 channels).
// Drives random 14-bit sample sets with random gaps, keeps its own per-channel
// sums, and checks the totals, the moment ready rises (the clock after the
// last counted set), that totals freeze once ready, zero-sample runs, a
// restart in mid-run, and full-scale samples. Inputs change on the falling
// edge; outputs are sampled on the falling edge.
module tb_accumulator;
  localparam int N_CH = 64, ADC_W = 14, ACC_W = 32, NSAMP_W = 19;

  logic clk = 0, rst = 1, trig = 0, data_valid = 0;
  logic [NSAMP_W-1:0] num_samples = '0;
  logic [N_CH-1:0][ADC_W-1:0] data = '0;
  logic [N_CH-1:0][ACC_W-1:0] totals;
  logic ready;
  int checks = 0, failures = 0;
  longint unsigned ref_sum [N_CH];

  accumulator #(.N_CH(N_CH), .ADC_W(ADC_W), .ACC_W(ACC_W), .NSAMP_W(NSAMP_W)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic start(input int n);
    @(negedge clk); num_samples = NSAMP_W'(n); trig = 1;
    @(negedge clk); trig = 0;
    foreach (ref_sum[c]) ref_sum[c] = 0;
  endtask

  // one sample set; counted tells whether the reference should add it
  task automatic send(input bit counted, input bit full_scale);
    data_valid = 1;
    for (int c = 0; c < N_CH; c++) begin
      data[c] = full_scale ? '1 : ADC_W'($urandom);
      if (counted) ref_sum[c] += data[c];
    end
    @(negedge clk); data_valid = 0;
    repeat ($urandom_range(0, 3)) @(negedge clk);
  endtask

  function automatic bit totals_match();
    for (int c = 0; c < N_CH; c++) if (totals[c] != ACC_W'(ref_sum[c])) return 0;
    return 1;
  endfunction

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    @(negedge clk);
    check(!ready, "not ready after reset");

    // run of 5 sets: ready exactly after the 5th
    start(5);
    check(!ready, "not ready right after trigger");
    for (int i = 0; i < 4; i++) send(1, 0);
    check(!ready, "not ready before last set");
    data_valid = 1;
    for (int c = 0; c < N_CH; c++) begin data[c] = ADC_W'($urandom); ref_sum[c] += data[c]; end
    @(negedge clk); data_valid = 0;
    check(ready, "ready one clock after the last set");
    check(totals_match(), "totals of 5 sets");
    send(0, 0); send(0, 0);
    check(ready && totals_match(), "totals frozen after ready");

    // zero-sample run
    start(0);
    check(ready, "zero-sample run is ready at once");
    check(totals == '0, "zero-sample totals are zero");

    // restart in mid-run
    start(10);
    send(1, 0); send(1, 0); send(1, 0);
    start(4);
    check(!ready && totals == '0, "restart clears totals");
    for (int i = 0; i < 4; i++) send(1, 0);
    check(ready && totals_match(), "totals after restart");

    // full-scale samples, longer run
    start(300);
    for (int i = 0; i < 300; i++) send(1, 1);
    check(ready, "ready after 300 full-scale sets");
    check(totals_match(), "full-scale totals");
    check(totals[0] == 32'(300 * 16383), "full-scale value");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
