// tb_fbld_modified: self-checking test of the validate-and-align stage.
// A scenario generator sends frames on the two links of one COLDATA with
// random skew between the links, and injects the faults the stage must
// filter: decoder errors, lost frames on one link, repeated frames and stale
// frames. The expected output is worked out from the frame lists: every
// timestamp that arrives error-free on both links, newer than everything
// released before, is released exactly once with link A on channels 0..31
// and link B on 32..63. Also checks the aligned flag, the drop strobe and
// the release latency (two clocks after the later frame of a pair).
module tb_fbld_modified;
  import wib_qc_pkg::*;

  logic clk = 0, rst = 1;
  link_frame_t link_a, link_b;
  logic [CH_PER_FB-1:0][ADC_W-1:0] data_aligned;
  logic rq_state, aligned, drop;
  logic [TS_W-1:0] ts_out;
  int checks = 0, failures = 0;

  fbld_modified dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // deterministic frame contents: sample = f(link, ts, channel)
  function automatic logic [ADC_W-1:0] sample(input int lk, input int ts, input int c);
    return ADC_W'((ts * 131 + c * 7 + lk * 5003) ^ (c << 9));
  endfunction

  function automatic link_frame_t frame(input int lk, input int ts, input bit err);
    link_frame_t f;
    f.valid = 1; f.err = err; f.ts = TS_W'(ts);
    for (int c = 0; c < CH_PER_LINK; c++) f.data[c] = sample(lk, ts, c);
    return f;
  endfunction

  int released_ts [$];
  int n_rel = 0, n_drop = 0, n_bad_data = 0;

  // output monitor
  always @(negedge clk) if (!rst) begin
    if (rq_state) begin
      automatic bit ok = 1;
      for (int c = 0; c < CH_PER_LINK; c++) begin
        if (data_aligned[c] != sample(0, int'(ts_out), c)) ok = 0;
        if (data_aligned[CH_PER_LINK + c] != sample(1, int'(ts_out), c)) ok = 0;
      end
      if (!ok) n_bad_data++;
      released_ts.push_back(int'(ts_out));
      n_rel++;
    end
    if (drop) n_drop++;
  end

  int exp_ts [$];

  // send frame ts on both links with link B lagging by 'skew' clocks
  task automatic pair(input int ts, input int skew, input bit err_a, input bit err_b,
                      input bit lose_a, input bit lose_b);
    @(negedge clk);
    link_a = lose_a ? '0 : frame(0, ts, err_a);
    link_b = (skew == 0 && !lose_b) ? frame(1, ts, err_b) : '0;
    @(negedge clk);
    link_a = '0;
    if (skew > 0) begin
      repeat (skew - 1) @(negedge clk);
      link_b = lose_b ? '0 : frame(1, ts, err_b);
      @(negedge clk);
      link_b = '0;
    end
    repeat (2) @(negedge clk);
  endtask

  int last_rel;
  initial begin
    link_a = '0; link_b = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    last_rel = -1;
    for (int ts = 1; ts <= 300; ts++) begin
      automatic int kind = $urandom_range(0, 9);
      automatic int skew = $urandom_range(0, 3);
      unique case (kind)
        0: pair(ts, skew, 1, 0, 0, 0);          // error on link A
        1: pair(ts, skew, 0, 1, 0, 0);          // error on link B
        2: pair(ts, skew, 0, 0, 1, 0);          // lost on link A
        3: pair(ts, skew, 0, 0, 0, 1);          // lost on link B
        default: begin pair(ts, skew, 0, 0, 0, 0); exp_ts.push_back(ts); last_rel = ts; end
      endcase
      if (kind == 4 && last_rel > 0) begin
        pair(last_rel, skew, 0, 0, 0, 0);       // repeat of the last released pair
        if (ts > 3) pair(ts - 3, 0, 0, 0, 0, 0); // stale pair
      end
    end
    repeat (5) @(negedge clk);
    check(n_rel == exp_ts.size(), $sformatf("released %0d pairs, expected %0d", n_rel, exp_ts.size()));
    begin
      automatic bit same = (released_ts.size() == exp_ts.size());
      if (same) foreach (exp_ts[i]) if (released_ts[i] != exp_ts[i]) same = 0;
      check(same, "released exactly the good timestamps, in order, once each");
    end
    check(n_bad_data == 0, "released data = link A on 0..31, link B on 32..63");
    check(n_drop > 50, $sformatf("discarded frames were counted (%0d)", n_drop));

    // latency and aligned flag
    @(negedge clk); link_a = frame(0, 400, 0);
    @(negedge clk); link_a = '0;
    @(negedge clk); link_b = frame(1, 400, 0);
    @(negedge clk); link_b = '0;
    check(!rq_state, "no release on the clock that captures the later frame");
    @(negedge clk);
    check(rq_state && ts_out == 16'd400, "release on the second clock after the later frame");
    check(aligned, "aligned after a good pair");
    @(negedge clk);
    check(!rq_state, "rq_state is a single-clock strobe");
    @(negedge clk); link_a = frame(0, 401, 0);
    @(negedge clk); link_a = '0; link_b = frame(1, 402, 0);
    @(negedge clk); link_b = '0;
    @(negedge clk);
    check(!aligned, "timestamp mismatch clears aligned");
    @(negedge clk); link_a = frame(0, 402, 0);
    @(negedge clk); link_a = '0;
    @(negedge clk);
    check(aligned && ts_out == 16'd402, "realigned on the next matching pair");
    @(negedge clk); link_a = frame(0, 403, 1);
    @(negedge clk); link_a = '0;
    check(!aligned, "decoder error clears aligned");

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
