// wib_qc_pkg: constants and types shared by the WIB ColdADC QC firmware
// additions (modified frame builders, accumulators, histogram, register bank).
//
// The WIB serves four front-end boards: 16 COLDATA links from 8 COLDATA chips.
// Each modified frame builder pairs the two links of one COLDATA and hands on
// 64 channels of 14-bit ADC samples, so the design sees 8 x 64 = 512 channels,
// addressed by a 9-bit channel number {builder[2:0], channel[5:0]}.
//
// The register offsets and bit fields below are the documented QC register
// map (config bank and status bank inside the 32 KB register window at
// 0xA00C0000). The link-frame type is this design's own choice: the decoders'
// output format is not part of the documented design.
package wib_qc_pkg;

  localparam int unsigned N_FB        = 8;    // modified frame builders / COLDATA chips
  localparam int unsigned CH_PER_LINK = 32;   // channels carried by one COLDATA link
  localparam int unsigned CH_PER_FB   = 2 * CH_PER_LINK;  // 64 per builder
  localparam int unsigned N_CH        = N_FB * CH_PER_FB; // 512
  localparam int unsigned CH_SEL_W    = 9;    // accum_total_ch_sel / hist_ch width
  localparam int unsigned ADC_W       = 14;   // deframed_data_mon is 14 bits wide
  localparam int unsigned TS_W        = 16;   // frame timestamp carried as metadata
  localparam int unsigned ACC_W       = 32;   // accum_ch_total width
  localparam int unsigned NSAMP_W     = 19;   // accum_num_samples, bits 28:10
  localparam int unsigned HNUM_W      = 32;   // hist_num_samples width
  localparam int unsigned HCNT_W      = 16;   // one code counter (2^14 x 16 bits)
  localparam int unsigned HADDR_W     = 13;   // 2^13 32-bit BRAM words
  localparam int unsigned BYTE_ADDR_W = 15;   // hist_addr[14:0], 32 KB window

  // register word indices (byte offset / 4) inside reg_bank_64
  localparam int unsigned REG_ACCUM_CTRL = 'h70 >> 2; // config
  localparam int unsigned REG_HIST_TRIG  = 'h74 >> 2; // config
  localparam int unsigned REG_HIST_CH    = 'h78 >> 2; // config
  localparam int unsigned REG_HIST_NUM   = 'h7C >> 2; // config
  localparam int unsigned REG_QC_STATUS  = 'hF0 >> 2; // status
  localparam int unsigned REG_ACCUM_TOT  = 'hF4 >> 2; // status
  localparam int unsigned REG_HIST_OUT   = 'hF8 >> 2; // status, unused

  // bit fields of the config and status words
  localparam int unsigned ACCUM_NUM_LSB  = 10;  // accum_num_samples 28:10
  localparam int unsigned ACCUM_SEL_LSB  = 1;   // accum_total_ch_sel 9:1
  localparam int unsigned ACCUM_TRIG_BIT = 0;   // accum_trig 0
  localparam int unsigned MON_LSB        = 10;  // deframed_data_mon 23:10
  localparam int unsigned HIST_RDY_BIT   = 9;   // hist_ready 9
                                                // accum_ready 7:0

  typedef logic [ADC_W-1:0] sample_t;

  // One decoded COLDATA link frame, as handed on by a frame decoder.
  typedef struct packed {
    logic                             valid;  // one-cycle strobe per frame
    logic                             err;    // decoder flagged the frame bad
    logic [TS_W-1:0]                  ts;     // frame timestamp (metadata)
    logic [CH_PER_LINK-1:0][ADC_W-1:0] data;  // channel samples
  } link_frame_t;

endpackage
