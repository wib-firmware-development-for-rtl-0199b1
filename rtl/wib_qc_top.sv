// wib_qc_top: the ColdADC QC additions to the WIB firmware.
//
// The 16 decoded COLDATA links (two per COLDATA chip) enter NUM_FB (8) modified
// frame builders, which validate and pair them into 64-channel sample sets
// with an rq_state strobe. Those sets feed two test engines at once:
//   * the accumulator array (averager): one unit of 64 per-channel 32-bit
//     sums per builder, all started by one trigger, read back one channel at
//     a time through a selector register;
//   * the histogram: one selected channel's code counts, kept as 2^14 16-bit
//     counters in a dual-port BRAM whose port B is brought out to the AXI BRAM
//     controller (byte window 0x0000-0x7FFF, read-only).
// Software drives both through the 64-register AXI4-Lite bank:
//   0x70  [28:10] accum_num_samples  [9:1] accum_total_ch_sel  [0] accum_trig
//   0x74  [0]     hist_trig
//   0x78  [8:0]   hist_ch
//   0x7C  [31:0]  hist_num_samples
//   0xF0  [23:10] deframed_data_mon  [9] hist_ready  [7:0] accum_ready
//   0xF4  [31:0]  accum_ch_total
//   0xF8  [31:0]  hist_out (retired register, reads zero)
// The register map, block structure and widths follow the original firmware description. One clock
// (clk, also the AXI4-Lite clock) runs everything except BRAM port B, which
// runs on hist_axi_clk; running the link side and the register side on one
// clock is this design's own simplification. aresetn is a synchronous,
// active-low reset. The production DAQ frame builders, spy buffers and the
// processor sit outside this module and connect through its ports.
// fb_aligned, fb_drop and hist_overrun are brought out as diagnostics.
// hist_addr is a byte address of 32-bit words, so its two low bits are not
// used; likewise the register bank decodes only address bits 7:2.
module wib_qc_top
  import wib_qc_pkg::*;
#(
  parameter int unsigned NUM_FB = wib_qc_pkg::N_FB
) (
  input  logic                    clk,
  input  logic                    aresetn,
  // decoded COLDATA links, link 2k and 2k+1 belong to COLDATA k
  input  link_frame_t [2*NUM_FB-1:0] link,
  // AXI4-Lite slave of the register bank
  input  logic [BYTE_ADDR_W-1:0]  s_axi_awaddr,
  input  logic                    s_axi_awvalid,
  output logic                    s_axi_awready,
  input  logic [31:0]             s_axi_wdata,
  input  logic [3:0]              s_axi_wstrb,
  input  logic                    s_axi_wvalid,
  output logic                    s_axi_wready,
  output logic [1:0]              s_axi_bresp,
  output logic                    s_axi_bvalid,
  input  logic                    s_axi_bready,
  input  logic [BYTE_ADDR_W-1:0]  s_axi_araddr,
  input  logic                    s_axi_arvalid,
  output logic                    s_axi_arready,
  output logic [31:0]             s_axi_rdata,
  output logic [1:0]              s_axi_rresp,
  output logic                    s_axi_rvalid,
  input  logic                    s_axi_rready,
  // histogram BRAM port B, to the AXI BRAM controller
  input  logic                    hist_axi_clk,
  input  logic                    hist_en,
  input  logic [BYTE_ADDR_W-1:0]  hist_addr,
  output logic [31:0]             hist_data_in,
  // diagnostics
  output logic [NUM_FB-1:0]         fb_aligned,
  output logic [NUM_FB-1:0]         fb_drop,
  output logic                    hist_overrun
);

  localparam int unsigned SEL_W = $clog2(NUM_FB * CH_PER_FB);

  logic rst;
  assign rst = !aresetn;

  // ---------------- modified frame builders ----------------
  logic [NUM_FB-1:0]                        rq_state;
  logic [NUM_FB-1:0][CH_PER_FB-1:0][ADC_W-1:0] fb_data;

  for (genvar k = 0; k < int'(NUM_FB); k++) begin : g_fb
    logic [TS_W-1:0] ts_unused;
    fbld_modified u_fbld (
      .clk, .rst,
      .link_a      (link[2*k]),
      .link_b      (link[2*k+1]),
      .data_aligned(fb_data[k]),
      .rq_state    (rq_state[k]),
      .aligned     (fb_aligned[k]),
      .ts_out      (ts_unused),
      .drop        (fb_drop[k])
    );
  end

  // ---------------- register bank ----------------
  logic [31:0][31:0] cfg;
  logic [31:0][31:0] status;

  reg_bank_64 #(.ADDR_W(BYTE_ADDR_W)) u_regs (
    .aclk(clk), .aresetn,
    .s_axi_awaddr, .s_axi_awvalid, .s_axi_awready,
    .s_axi_wdata, .s_axi_wstrb, .s_axi_wvalid, .s_axi_wready,
    .s_axi_bresp, .s_axi_bvalid, .s_axi_bready,
    .s_axi_araddr, .s_axi_arvalid, .s_axi_arready,
    .s_axi_rdata, .s_axi_rresp, .s_axi_rvalid, .s_axi_rready,
    .cfg, .status
  );

  logic               accum_trig, hist_trig;
  logic [NSAMP_W-1:0] accum_num_samples;
  logic [SEL_W-1:0]   accum_total_ch_sel, hist_ch;
  logic [HNUM_W-1:0]  hist_num_samples;

  assign accum_trig         = cfg[REG_ACCUM_CTRL][ACCUM_TRIG_BIT];
  assign accum_total_ch_sel = cfg[REG_ACCUM_CTRL][ACCUM_SEL_LSB +: SEL_W];
  assign accum_num_samples  = cfg[REG_ACCUM_CTRL][ACCUM_NUM_LSB +: NSAMP_W];
  assign hist_trig          = cfg[REG_HIST_TRIG][0];
  assign hist_ch            = cfg[REG_HIST_CH][SEL_W-1:0];
  assign hist_num_samples   = cfg[REG_HIST_NUM];

  // ---------------- accumulators ----------------
  logic [NUM_FB-1:0]  accum_ready;
  logic [ACC_W-1:0] accum_ch_total;

  accumulator_array #(
    .N_FB(NUM_FB), .N_CH(CH_PER_FB), .ADC_W(ADC_W), .ACC_W(ACC_W),
    .NSAMP_W(NSAMP_W), .SEL_W(SEL_W)
  ) u_accum (
    .clk, .rst,
    .trig(accum_trig), .num_samples(accum_num_samples),
    .data_valid(rq_state), .data(fb_data),
    .sel(accum_total_ch_sel),
    .accum_ready, .ch_total(accum_ch_total)
  );

  // ---------------- histogram and its memory ----------------
  logic                 hist_ready;
  logic [ADC_W-1:0]     live_data;
  logic                 a_en, a_we;
  logic [HADDR_W-1:0]   a_addr;
  logic [2*HCNT_W-1:0]  a_wdata, a_rdata;

  histogram #(
    .N_FB(NUM_FB), .N_CH(CH_PER_FB), .ADC_W(ADC_W), .HNUM_W(HNUM_W),
    .HCNT_W(HCNT_W), .SEL_W(SEL_W), .HADDR_W(HADDR_W)
  ) u_hist (
    .clk, .rst,
    .trig(hist_trig), .num_samples(hist_num_samples), .hist_ch,
    .data_valid(rq_state), .data(fb_data),
    .hist_ready, .live_data, .overrun(hist_overrun),
    .a_en, .a_we, .a_addr, .a_wdata, .a_rdata
  );

  hist_bram #(.ADDR_W(HADDR_W), .DATA_W(2*HCNT_W)) u_bram (
    .clk_a(clk), .en_a(a_en), .we_a(a_we), .addr_a(a_addr),
    .din_a(a_wdata), .dout_a(a_rdata),
    .clk_b(hist_axi_clk), .en_b(hist_en),
    .addr_b(hist_addr[BYTE_ADDR_W-1:2]), .dout_b(hist_data_in)
  );

  // ---------------- status words ----------------
  always_comb begin
    status = '0;
    status[REG_QC_STATUS - 32][MON_LSB +: ADC_W] = live_data;
    status[REG_QC_STATUS - 32][HIST_RDY_BIT]     = hist_ready;
    status[REG_QC_STATUS - 32][NUM_FB-1:0]         = accum_ready;
    status[REG_ACCUM_TOT - 32]                   = accum_ch_total;
    status[REG_HIST_OUT  - 32]                   = '0;
  end

endmodule
