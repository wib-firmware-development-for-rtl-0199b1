// accumulator: one averager unit for the N_CH channels of one COLDATA chip.
//
// Software writes the number of samples to take and raises the trigger; the
// unit then adds each validated sample set (data_valid = rq_state of its
// modified frame builder) into N_CH per-channel running totals until
// num_samples sets have been added, and raises ready. Software reads the
// totals and divides them by the sample count itself: the hardware only sums,
// so any count up to the documented maximum of 262,144 can be asked for.
// With 14-bit samples, 262,144 x 16,383 still fits in the 32-bit totals.
//
// Interface and timing: trig is a level (a register bit); its rising edge
// clears the totals and ready and starts a run. A run of num_samples = 0 ends
// at once with zero totals. ready rises in the cycle after the last sample set
// is added and stays high, with the totals frozen, until the next trigger.
// A new rising edge of trig restarts a run in progress.
// Taken from the original firmware description: one state machine per unit, 64 channels, the sample
// count limit, the 32-bit totals and the software division. The edge-
// triggered start and restart rules are this design's own.
module accumulator #(
  parameter int unsigned N_CH    = 64,
  parameter int unsigned ADC_W   = 14,
  parameter int unsigned ACC_W   = 32,
  parameter int unsigned NSAMP_W = 19
) (
  input  logic                         clk,
  input  logic                         rst,
  input  logic                         trig,
  input  logic [NSAMP_W-1:0]           num_samples,
  input  logic                         data_valid,
  input  logic [N_CH-1:0][ADC_W-1:0]   data,
  output logic [N_CH-1:0][ACC_W-1:0]   totals,
  output logic                         ready
);

  typedef enum logic [1:0] {IDLE, ACCUM, DONE} state_t;
  state_t             state;
  logic               trig_q;
  logic [NSAMP_W-1:0] count, target;

  always_ff @(posedge clk) begin
    if (rst) begin
      state  <= IDLE;
      trig_q <= 1'b0;
      count  <= '0;
      target <= '0;
      totals <= '0;
    end else begin
      trig_q <= trig;
      if (trig && !trig_q) begin
        totals <= '0;
        count  <= '0;
        target <= num_samples;
        state  <= (num_samples == '0) ? DONE : ACCUM;
      end else begin
        unique case (state)
          IDLE, DONE: ;
          ACCUM: if (data_valid) begin
            for (int c = 0; c < int'(N_CH); c++)
              totals[c] <= totals[c] + ACC_W'(data[c]);
            count <= count + 1'b1;
            if (count + 1'b1 == target) state <= DONE;
          end
          default: state <= IDLE;
        endcase
      end
    end
  end

  assign ready = (state == DONE);

endmodule
