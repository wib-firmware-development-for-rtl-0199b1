// histogram: code-density histogram of one ADC channel, for the ColdADC
// DNL/INL and missing-code test with a slow ramp on the input.
//
// Software selects a channel (hist_ch), writes the number of samples to count
// and raises the trigger. The state machine then
//   CLEAR  writes zero to every word of the count memory,
//   ARM    waits until the selected channel reads code 0x0000, so that every
//          run starts at the bottom of the ramp,
//   COUNT  counts that zero sample and the following ones, until num_samples
//          samples have been counted, by read-modify-write of the sample's
//          16-bit counter in the memory (2^ADC_W counters, two per 32-bit
//          word: even code in bits 15:0, odd code in bits 31:16),
//   DONE   raises hist_ready and leaves the memory to be read over AXI.
// A counter that reaches 0xFFFF stays there. num_samples = 0 ends right after
// CLEAR. A rising edge of trig restarts from CLEAR in any state.
//
// Interface: port A of the dual-port histogram memory (a_*; read data one
// clock after the address), the validated data and rq_state strobes of all
// modified frame builders, and live_data, the latest sample of the selected
// channel for the live peek register. The read-modify-write of one sample
// takes two clocks; a sample arriving during it waits in a one-entry skid
// register. Samples of one channel arrive at the ADC rate (2 MHz), far slower
// than that; overrun flags a sample lost because both were full.
// Taken from the original firmware description: trigger, channel and sample-count controls, start at code
// 0x0000, the 2^14 x 16-bit memory behind a 2^13 x 32-bit port, hist_ready.
// Clearing the memory in hardware, counter saturation and the pairing of
// codes in a word are this design's own.
module histogram #(
  parameter int unsigned N_FB    = 8,
  parameter int unsigned N_CH    = 64,
  parameter int unsigned ADC_W   = 14,
  parameter int unsigned HNUM_W  = 32,
  parameter int unsigned HCNT_W  = 16,
  parameter int unsigned SEL_W   = $clog2(N_FB * N_CH),
  parameter int unsigned HADDR_W = ADC_W - 1
) (
  input  logic                                 clk,
  input  logic                                 rst,
  input  logic                                 trig,
  input  logic [HNUM_W-1:0]                    num_samples,
  input  logic [SEL_W-1:0]                     hist_ch,
  input  logic [N_FB-1:0]                      data_valid,
  input  logic [N_FB-1:0][N_CH-1:0][ADC_W-1:0] data,
  output logic                                 hist_ready,
  output logic [ADC_W-1:0]                     live_data,
  output logic                                 overrun,
  // port A of the histogram memory
  output logic                                 a_en,
  output logic                                 a_we,
  output logic [HADDR_W-1:0]                   a_addr,
  output logic [2*HCNT_W-1:0]                  a_wdata,
  input  logic [2*HCNT_W-1:0]                  a_rdata
);

  typedef enum logic [2:0] {IDLE, CLEAR, ARM, COUNT, DONE} state_t;
  localparam logic [HCNT_W-1:0] CNT_MAX = '1;

  state_t              state;
  logic                trig_q;
  logic [HNUM_W-1:0]   target, taken;
  logic [HADDR_W-1:0]  clr_addr;

  // selected channel stream
  logic             s_valid;
  logic [ADC_W-1:0] s_data;

  chan_select #(
    .N_FB(N_FB), .N_CH(N_CH), .ADC_W(ADC_W), .SEL_W(SEL_W)
  ) u_sel (
    .clk, .rst, .data_valid, .data, .ch(hist_ch),
    .s_valid, .s_data
  );
  assign live_data = s_data;

  // read-modify-write engine: rd = read issued, word arrives next clock
  logic             rmw_busy;       // read issued last clock, write this clock
  logic [ADC_W-1:0] rmw_code;
  logic             skid_v;
  logic [ADC_W-1:0] skid_code;

  logic             take;           // the incoming sample is counted
  logic             start_rd;       // a read for a counted sample is issued now
  logic [ADC_W-1:0] start_code;

  always_comb begin
    take = 1'b0;
    if (s_valid && taken < target) begin
      if (state == COUNT) take = 1'b1;
      if (state == ARM && s_data == '0) take = 1'b1;
    end
    // the memory port is free for a new read when no write is pending
    start_rd   = !rmw_busy && (skid_v || take);
    start_code = skid_v ? skid_code : s_data;
  end

  // updated counter word for the read-modify-write
  logic [HCNT_W-1:0]   old_cnt, new_cnt;
  logic [2*HCNT_W-1:0] new_word;
  always_comb begin
    old_cnt  = rmw_code[0] ? a_rdata[2*HCNT_W-1:HCNT_W] : a_rdata[HCNT_W-1:0];
    new_cnt  = (old_cnt == CNT_MAX) ? old_cnt : old_cnt + 1'b1;
    new_word = rmw_code[0] ? {new_cnt, a_rdata[HCNT_W-1:0]}
                           : {a_rdata[2*HCNT_W-1:HCNT_W], new_cnt};
  end

  // memory port A
  always_comb begin
    a_en    = 1'b0;
    a_we    = 1'b0;
    a_addr  = '0;
    a_wdata = '0;
    if (state == CLEAR) begin
      a_en   = 1'b1;
      a_we   = 1'b1;
      a_addr = clr_addr;
    end else if (rmw_busy) begin
      a_en    = 1'b1;
      a_we    = 1'b1;
      a_addr  = rmw_code[ADC_W-1:1];
      a_wdata = new_word;
    end else if (start_rd) begin
      a_en   = 1'b1;
      a_addr = start_code[ADC_W-1:1];
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= IDLE;
      trig_q    <= 1'b0;
      target    <= '0;
      taken     <= '0;
      clr_addr  <= '0;
      rmw_busy  <= 1'b0;
      rmw_code  <= '0;
      skid_v    <= 1'b0;
      skid_code <= '0;
      overrun   <= 1'b0;
    end else begin
      trig_q <= trig;
      if (trig && !trig_q) begin
        state    <= CLEAR;
        target   <= num_samples;
        taken    <= '0;
        clr_addr <= '0;
        rmw_busy <= 1'b0;
        skid_v   <= 1'b0;
        overrun  <= 1'b0;
      end else begin
        // sample bookkeeping
        if (take) taken <= taken + 1'b1;
        rmw_busy <= start_rd;
        if (start_rd) rmw_code <= start_code;
        // skid register: filled by a sample that cannot start now
        if (start_rd && skid_v) begin
          skid_v <= take;
          if (take) skid_code <= s_data;
        end else if (take && !start_rd) begin
          if (skid_v) overrun <= 1'b1;
          skid_v    <= 1'b1;
          skid_code <= s_data;
        end
        unique case (state)
          IDLE: ;
          CLEAR: begin
            clr_addr <= clr_addr + 1'b1;
            if (clr_addr == '1) state <= (target == '0) ? DONE : ARM;
          end
          ARM:   if (take) state <= COUNT;
          COUNT: if (taken == target && !rmw_busy && !skid_v && !start_rd) state <= DONE;
          DONE:  ;
          default: state <= IDLE;
        endcase
      end
    end
  end

  assign hist_ready = (state == DONE);

  // the memory port is never asked to clear and count at once
  assert property (@(posedge clk) disable iff (rst) (state == CLEAR) |-> !rmw_busy);

endmodule
