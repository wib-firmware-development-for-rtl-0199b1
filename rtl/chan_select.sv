// chan_select: picks one channel out of the validated data of all modified
// frame builders. It serves two documented functions: the one-channel sample
// stream that the histogram counts, and the live data peek register through
// which software watches that channel (deframed_data_mon).
//
// ch is {builder, channel}. Whenever the selected builder strobes rq_state,
// the selected channel's sample is registered: s_valid pulses for one cycle
// with s_data, and s_data keeps that value until the next one, which makes it
// the live peek value as well. Both follow the builder's strobe by one clock. A change of ch takes effect with the next
// strobe of the newly selected builder.
module chan_select #(
  parameter int unsigned N_FB  = 8,
  parameter int unsigned N_CH  = 64,
  parameter int unsigned ADC_W = 14,
  parameter int unsigned SEL_W = $clog2(N_FB * N_CH)
) (
  input  logic                                 clk,
  input  logic                                 rst,
  input  logic [N_FB-1:0]                      data_valid,
  input  logic [N_FB-1:0][N_CH-1:0][ADC_W-1:0] data,
  input  logic [SEL_W-1:0]                     ch,
  output logic                                 s_valid,
  output logic [ADC_W-1:0]                     s_data
);

  localparam int unsigned CH_W = $clog2(N_CH);
  localparam int unsigned FB_W = (N_FB > 1) ? $clog2(N_FB) : 1;

  logic [FB_W-1:0] fb;
  logic [CH_W-1:0] cn;
  logic            hit;
  assign cn  = ch[CH_W-1:0];
  assign fb  = FB_W'(ch >> CH_W);
  assign hit = (int'(fb) < int'(N_FB)) && data_valid[fb];

  always_ff @(posedge clk) begin
    if (rst) begin
      s_valid <= 1'b0;
      s_data  <= '0;
    end else begin
      s_valid <= hit;
      if (hit) s_data <= data[fb][cn];
    end
  end

endmodule
