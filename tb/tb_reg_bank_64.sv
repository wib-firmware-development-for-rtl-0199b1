// tb_reg_bank_64: self-checking test of the AXI4-Lite register bank.
// An AXI4-Lite master model writes random values with random byte strobes to
// the 32 configuration registers, presenting address and data together, address
// first or data first, and taking responses after random delays; it then
// reads every register back and compares with a shadow copy. It checks the
// status registers against the status input, that writes to them are ignored,
// that the bank repeats above 0xFF, that cfg shows the written values, and
// that a read response is held while rready is low.
module tb_reg_bank_64;
  localparam int ADDR_W = 15;

  logic aclk = 0, aresetn = 0;
  logic [ADDR_W-1:0] s_axi_awaddr = '0, s_axi_araddr = '0;
  logic s_axi_awvalid = 0, s_axi_wvalid = 0, s_axi_bready = 0, s_axi_arvalid = 0, s_axi_rready = 0;
  logic [31:0] s_axi_wdata = '0;
  logic [3:0] s_axi_wstrb = '0;
  logic s_axi_awready, s_axi_wready, s_axi_bvalid, s_axi_arready, s_axi_rvalid;
  logic [1:0] s_axi_bresp, s_axi_rresp;
  logic [31:0] s_axi_rdata;
  logic [31:0][31:0] cfg;
  logic [31:0][31:0] status;
  logic [31:0] shadow [32];
  int checks = 0, failures = 0;

  reg_bank_64 dut (.*);

  always #5 aclk = ~aclk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Handshakes are decided on the falling edge: valid and ready seen there
  // are what the next rising edge samples.
  task automatic axi_write(input logic [ADDR_W-1:0] addr, input logic [31:0] d, input logic [3:0] strb);
    int order = $urandom_range(0, 2);
    bit aw_hs, w_hs, b_hs;
    @(negedge aclk);
    s_axi_awaddr = addr; s_axi_wdata = d; s_axi_wstrb = strb;
    if (order != 2) s_axi_awvalid = 1;
    if (order != 1) s_axi_wvalid = 1;
    while (s_axi_awvalid || s_axi_wvalid) begin
      aw_hs = s_axi_awvalid && s_axi_awready;
      w_hs  = s_axi_wvalid && s_axi_wready;
      @(negedge aclk);
      if (aw_hs) s_axi_awvalid = 0;
      if (w_hs) s_axi_wvalid = 0;
      if (order == 1 && aw_hs) s_axi_wvalid = 1;
      if (order == 2 && w_hs) s_axi_awvalid = 1;
    end
    repeat ($urandom_range(0, 3)) @(negedge aclk);
    s_axi_bready = 1;
    do begin
      b_hs = s_axi_bvalid;
      @(negedge aclk);
    end while (!b_hs);
    s_axi_bready = 0;
  endtask

  task automatic axi_read(input logic [ADDR_W-1:0] addr, output logic [31:0] d);
    @(negedge aclk);
    s_axi_araddr = addr; s_axi_arvalid = 1;
    while (!s_axi_arready) @(negedge aclk);
    @(negedge aclk); s_axi_arvalid = 0;
    while (!s_axi_rvalid) @(negedge aclk);
    // hold off a few clocks: the response must not change
    d = s_axi_rdata;
    repeat ($urandom_range(0, 3)) begin
      @(negedge aclk);
      if (!s_axi_rvalid || s_axi_rdata != d) begin failures++; $display("FAIL: read response not held"); end
    end
    s_axi_rready = 1;
    @(negedge aclk); s_axi_rready = 0;
  endtask

  initial begin
    logic [31:0] d;
    int bad;
    foreach (status[i]) status[i] = $urandom;
    repeat (3) @(negedge aclk);
    aresetn = 1;
    foreach (shadow[i]) shadow[i] = '0;
    // random writes
    for (int i = 0; i < 200; i++) begin
      automatic int r = $urandom_range(0, 31);
      automatic logic [31:0] v = $urandom;
      automatic logic [3:0] st = (i < 32) ? 4'hF : 4'($urandom);
      if (i < 32) r = i;
      axi_write(ADDR_W'(r * 4), v, st);
      for (int b = 0; b < 4; b++) if (st[b]) shadow[r][8*b +: 8] = v[8*b +: 8];
    end
    // writes to status registers are ignored
    axi_write(15'h0F0, 32'hFFFF_FFFF, 4'hF);
    // read back config
    bad = 0;
    for (int r = 0; r < 32; r++) begin
      axi_read(ADDR_W'(r * 4), d);
      if (d != shadow[r]) bad++;
      if (cfg[r] != shadow[r]) bad++;
    end
    check(bad == 0, $sformatf("config read-back (%0d mismatches)", bad));
    // status
    bad = 0;
    for (int r = 0; r < 32; r++) begin
      axi_read(ADDR_W'(128 + r * 4), d);
      if (d != status[r]) bad++;
    end
    check(bad == 0, $sformatf("status read-back (%0d mismatches)", bad));
    // aliasing above 0xFF
    axi_read(15'h4070, d);
    check(d == shadow[28], "bank repeats through the window");
    axi_write(15'h1074, 32'h1234_5678, 4'hF);
    axi_read(15'h0074, d);
    check(d == 32'h1234_5678, "write through an alias");
    check(s_axi_bresp == 2'b00 && s_axi_rresp == 2'b00, "OKAY responses");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge aclk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
