// accumulator_array: the averager of the QC firmware, one accumulator unit
// per modified frame builder (N_FB units of N_CH channels) plus the readout
// selector that software uses to fetch totals one channel at a time.
//
// All units share the trigger and the sample count, so one trigger starts
// every channel; each unit counts its own builder's rq_state strobes and
// raises its own bit of accum_ready. The channel selector sel is
// {unit, channel}; ch_total shows the selected channel's 32-bit total once
// that unit is ready and reads zero before. ch_total is registered: it follows
// a change of sel, or of the totals, one clock later.
// Taken from the original firmware description: eight units of 64 channels, the per-unit ready bits and
// the selector semantics of accum_total_ch_sel / accum_ch_total. Reading zero
// while a unit is busy is this design's own choice.
module accumulator_array #(
  parameter int unsigned N_FB    = 8,
  parameter int unsigned N_CH    = 64,
  parameter int unsigned ADC_W   = 14,
  parameter int unsigned ACC_W   = 32,
  parameter int unsigned NSAMP_W = 19,
  parameter int unsigned SEL_W   = $clog2(N_FB * N_CH)
) (
  input  logic                                 clk,
  input  logic                                 rst,
  input  logic                                 trig,
  input  logic [NSAMP_W-1:0]                   num_samples,
  input  logic [N_FB-1:0]                      data_valid,
  input  logic [N_FB-1:0][N_CH-1:0][ADC_W-1:0] data,
  input  logic [SEL_W-1:0]                     sel,
  output logic [N_FB-1:0]                      accum_ready,
  output logic [ACC_W-1:0]                     ch_total
);

  localparam int unsigned CH_W = $clog2(N_CH);
  localparam int unsigned FB_W = (N_FB > 1) ? $clog2(N_FB) : 1;

  logic [N_FB-1:0][N_CH-1:0][ACC_W-1:0] totals;

  for (genvar u = 0; u < int'(N_FB); u++) begin : g_unit
    accumulator #(
      .N_CH(N_CH), .ADC_W(ADC_W), .ACC_W(ACC_W), .NSAMP_W(NSAMP_W)
    ) u_acc (
      .clk, .rst, .trig, .num_samples,
      .data_valid(data_valid[u]),
      .data      (data[u]),
      .totals    (totals[u]),
      .ready     (accum_ready[u])
    );
  end

  logic [FB_W-1:0] sel_fb;
  logic [CH_W-1:0] sel_ch;
  assign sel_ch = sel[CH_W-1:0];
  assign sel_fb = FB_W'(sel >> CH_W);

  always_ff @(posedge clk) begin
    if (rst)
      ch_total <= '0;
    else if (int'(sel_fb) < int'(N_FB) && accum_ready[sel_fb])
      ch_total <= totals[sel_fb][sel_ch];
    else
      ch_total <= '0;
  end

endmodule
