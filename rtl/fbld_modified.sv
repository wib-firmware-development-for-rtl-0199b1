// fbld_modified: validate-and-align front half of a DAQ frame builder, copied
// out so that the QC accumulators and histogram see live, validated samples.
//
// One instance serves one COLDATA chip, i.e. two COLDATA links (A and B) of
// CH_PER_LINK channels each. A decoded link frame is held until the other
// link delivers the frame with the same timestamp; the pair is then released
// as one CH_PER_FB-channel sample set (link A on channels 0..CH_PER_LINK-1,
// link B above) together with a one-cycle rq_state strobe. The rules that make
// every sample count exactly once and keep garbage out:
//   * a frame the decoder marks with err is discarded;
//   * a frame whose timestamp is not newer than the last released one is a
//     repeat or is stale, and is discarded;
//   * when both links hold frames with different timestamps, the older frame
//     is discarded (its partner was lost) and the newer one waits;
//   * a held frame overwritten by a newer frame on the same link is discarded.
// aligned ("data aligned flag") is set by every released pair and cleared by a
// timestamp mismatch or a decoder error. drop pulses for each discarded frame.
//
// Timing: the clock edge that samples the later frame of a pair captures it,
// and the next edge releases the pair, so rq_state rises two clocks after the
// later frame is presented. data_aligned and ts_out hold until the next
// release.
// The original firmware description gives only this block's purpose (validate and align
// the deframed data, then hand it on); the pairing-by-timestamp scheme and the
// discard rules are this design's own.
module fbld_modified
  import wib_qc_pkg::*;
(
  input  logic                               clk,
  input  logic                               rst,
  input  link_frame_t                        link_a,
  input  link_frame_t                        link_b,
  output logic [CH_PER_FB-1:0][ADC_W-1:0]    data_aligned,
  output logic                               rq_state,
  output logic                               aligned,
  output logic [TS_W-1:0]                    ts_out,
  output logic                               drop
);

  logic                              have_a, have_b, have_last;
  logic [TS_W-1:0]                   ts_a, ts_b, ts_last;
  logic [CH_PER_LINK-1:0][ADC_W-1:0] dat_a, dat_b;

  // timestamp x is newer than y (modulo wrap-around)
  function automatic logic newer(input logic [TS_W-1:0] x, input logic [TS_W-1:0] y);
    logic [TS_W-1:0] d;
    d = x - y;
    return (d != '0) && !d[TS_W-1];
  endfunction

  logic acc_a, acc_b;          // incoming frame accepted into the holding register
  logic bad_a, bad_b;          // incoming frame discarded
  logic pair_ok, pair_drop_a, pair_drop_b;

  always_comb begin
    acc_a = link_a.valid && !link_a.err && (!have_last || newer(link_a.ts, ts_last));
    acc_b = link_b.valid && !link_b.err && (!have_last || newer(link_b.ts, ts_last));
    bad_a = link_a.valid && !acc_a;
    bad_b = link_b.valid && !acc_b;
    pair_ok     = have_a && have_b && (ts_a == ts_b);
    pair_drop_a = have_a && have_b && (ts_a != ts_b) && newer(ts_b, ts_a);
    pair_drop_b = have_a && have_b && (ts_a != ts_b) && !newer(ts_b, ts_a);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      have_a       <= 1'b0;
      have_b       <= 1'b0;
      have_last    <= 1'b0;
      ts_a         <= '0;
      ts_b         <= '0;
      ts_last      <= '0;
      dat_a        <= '0;
      dat_b        <= '0;
      data_aligned <= '0;
      ts_out       <= '0;
      rq_state     <= 1'b0;
      aligned      <= 1'b0;
      drop         <= 1'b0;
    end else begin
      rq_state <= 1'b0;
      // pairing decision on the held frames
      if (pair_ok) begin
        data_aligned <= {dat_b, dat_a};
        ts_out       <= ts_a;
        ts_last      <= ts_a;
        have_last    <= 1'b1;
        rq_state     <= 1'b1;
        aligned      <= 1'b1;
        have_a       <= 1'b0;
        have_b       <= 1'b0;
      end else if (pair_drop_a) begin
        have_a  <= 1'b0;
        aligned <= 1'b0;
      end else if (pair_drop_b) begin
        have_b  <= 1'b0;
        aligned <= 1'b0;
      end
      // new arrivals take the holding registers (overriding a clear above)
      if (acc_a) begin
        have_a <= 1'b1;
        ts_a   <= link_a.ts;
        dat_a  <= link_a.data;
      end
      if (acc_b) begin
        have_b <= 1'b1;
        ts_b   <= link_b.ts;
        dat_b  <= link_b.data;
      end
      if ((link_a.valid && link_a.err) || (link_b.valid && link_b.err))
        aligned <= 1'b0;
      drop <= bad_a || bad_b || pair_drop_a || pair_drop_b
              || (acc_a && have_a && !pair_ok) || (acc_b && have_b && !pair_ok);
    end
  end

  // a release is a single-cycle strobe
  assert property (@(posedge clk) disable iff (rst) rq_state |=> !rq_state);

endmodule
