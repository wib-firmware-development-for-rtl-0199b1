// reg_bank_64: AXI4-Lite register bank of the WIB, 64 32-bit registers.
//
// Words 0..N_CFG-1 (byte offsets 0x00-0x7C) are configuration registers:
// read/write from the bus, reset to zero, presented on cfg. Words
// N_CFG..63 (0x80-0xFC) are status registers: read-only, read straight from
// the status input; writes to them are accepted and ignored. Only address bits
// 7:2 are decoded, so the bank repeats through its 32 KB address window.
// Write strobes apply per byte to configuration registers.
//
// Handshake: the write address and write data channels are accepted
// independently; once both are held, the register is written and a write
// response (OKAY) is raised until the master takes it. A read is accepted
// when no read response is pending; the data appears one clock later and is
// held until rready. One outstanding transaction per direction.
// Taken from the original firmware description: the bank's name, its place in the address map and the
// QC fields it carries (0x70-0x7C config, 0xF0-0xF8 status). The split into
// 32 + 32 registers and the handshake details are this design's own.
module reg_bank_64 #(
  parameter int unsigned ADDR_W = 15,
  parameter int unsigned N_CFG  = 32,
  parameter int unsigned N_STAT = 32
) (
  input  logic                    aclk,
  input  logic                    aresetn,
  // write address / data / response
  input  logic [ADDR_W-1:0]       s_axi_awaddr,
  input  logic                    s_axi_awvalid,
  output logic                    s_axi_awready,
  input  logic [31:0]             s_axi_wdata,
  input  logic [3:0]              s_axi_wstrb,
  input  logic                    s_axi_wvalid,
  output logic                    s_axi_wready,
  output logic [1:0]              s_axi_bresp,
  output logic                    s_axi_bvalid,
  input  logic                    s_axi_bready,
  // read address / data
  input  logic [ADDR_W-1:0]       s_axi_araddr,
  input  logic                    s_axi_arvalid,
  output logic                    s_axi_arready,
  output logic [31:0]             s_axi_rdata,
  output logic [1:0]              s_axi_rresp,
  output logic                    s_axi_rvalid,
  input  logic                    s_axi_rready,
  // register contents
  output logic [N_CFG-1:0][31:0]  cfg,
  input  logic [N_STAT-1:0][31:0] status
);

  localparam int unsigned IDX_W = $clog2(N_CFG + N_STAT);

  logic              aw_held, w_held;
  logic [IDX_W-1:0]  aw_idx;
  logic [31:0]       w_data;
  logic [3:0]        w_strb;

  assign s_axi_awready = !aw_held;
  assign s_axi_wready  = !w_held;
  assign s_axi_bresp   = 2'b00;
  assign s_axi_rresp   = 2'b00;
  assign s_axi_arready = !s_axi_rvalid;

  logic do_write;
  assign do_write = aw_held && w_held && !s_axi_bvalid;

  always_ff @(posedge aclk) begin
    if (!aresetn) begin
      aw_held      <= 1'b0;
      w_held       <= 1'b0;
      aw_idx       <= '0;
      w_data       <= '0;
      w_strb       <= '0;
      s_axi_bvalid <= 1'b0;
      cfg          <= '0;
    end else begin
      if (s_axi_awvalid && s_axi_awready) begin
        aw_held <= 1'b1;
        aw_idx  <= s_axi_awaddr[IDX_W+1:2];
      end
      if (s_axi_wvalid && s_axi_wready) begin
        w_held <= 1'b1;
        w_data <= s_axi_wdata;
        w_strb <= s_axi_wstrb;
      end
      if (s_axi_bvalid && s_axi_bready) s_axi_bvalid <= 1'b0;
      if (do_write) begin
        if (int'(aw_idx) < int'(N_CFG))
          for (int b = 0; b < 4; b++)
            if (w_strb[b]) cfg[aw_idx][8*b +: 8] <= w_data[8*b +: 8];
        aw_held      <= 1'b0;
        w_held       <= 1'b0;
        s_axi_bvalid <= 1'b1;
      end
    end
  end

  logic [IDX_W-1:0] ar_idx;
  assign ar_idx = s_axi_araddr[IDX_W+1:2];

  always_ff @(posedge aclk) begin
    if (!aresetn) begin
      s_axi_rvalid <= 1'b0;
      s_axi_rdata  <= '0;
    end else begin
      if (s_axi_rvalid && s_axi_rready) s_axi_rvalid <= 1'b0;
      if (s_axi_arvalid && s_axi_arready) begin
        s_axi_rvalid <= 1'b1;
        if (int'(ar_idx) < int'(N_CFG))
          s_axi_rdata <= cfg[ar_idx];
        else
          s_axi_rdata <= status[int'(ar_idx) - int'(N_CFG)];
      end
    end
  end

  // AXI rule: a response, once raised, stays until it is taken
  assert property (@(posedge aclk) disable iff (!aresetn)
                   s_axi_bvalid && !s_axi_bready |=> s_axi_bvalid);
  assert property (@(posedge aclk) disable iff (!aresetn)
                   s_axi_rvalid && !s_axi_rready |=> s_axi_rvalid && $stable(s_axi_rdata));

endmodule
