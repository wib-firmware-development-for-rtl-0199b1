// tb_chan_select: self-checking test of the channel selector / live peek.
// Every builder strobes at random with random data; for each selected
// channel the test predicts, from the inputs one clock earlier, whether
// s_valid pulses and which sample s_data holds, and checks both every clock.
module tb_chan_select;
  localparam int N_FB = 8, N_CH = 64, ADC_W = 14, SEL_W = 9;

  logic clk = 0, rst = 1;
  logic [N_FB-1:0] data_valid = '0;
  logic [N_FB-1:0][N_CH-1:0][ADC_W-1:0] data = '0;
  logic [SEL_W-1:0] ch = '0;
  logic s_valid;
  logic [ADC_W-1:0] s_data;
  int checks = 0, failures = 0;
  int hits = 0;

  chan_select dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [ADC_W-1:0] exp_data;
  bit exp_valid;

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    exp_data = '0;
    for (int r = 0; r < 40; r++) begin
      ch = SEL_W'($urandom_range(0, N_FB * N_CH - 1));
      for (int t = 0; t < 25; t++) begin
        for (int u = 0; u < N_FB; u++) begin
          data_valid[u] = ($urandom_range(0, 2) == 0);
          for (int c = 0; c < N_CH; c++) data[u][c] = ADC_W'($urandom);
        end
        exp_valid = data_valid[ch / N_CH];
        if (exp_valid) begin exp_data = data[ch / N_CH][ch % N_CH]; hits++; end
        @(negedge clk);
        check(s_valid == exp_valid, "s_valid follows the selected builder's strobe");
        check(s_data == exp_data, "s_data holds the selected channel's latest sample");
      end
    end
    check(hits > 100, "selected builder strobed often enough");
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
