// tb_hist_bram: self-checking test of the dual-port histogram memory.
// Port A writes random words at random addresses, port B (on its own,
// slower clock) reads them back; the test keeps a shadow copy and checks
// read data one port-B clock after each address, read-first behaviour of
// port A, that a disabled port holds its output, and that the memory
// starts cleared.
module tb_hist_bram;
  localparam int ADDR_W = 13, DATA_W = 32;

  logic clk_a = 0, clk_b = 0;
  logic en_a = 0, we_a = 0, en_b = 0;
  logic [ADDR_W-1:0] addr_a = '0, addr_b = '0;
  logic [DATA_W-1:0] din_a = '0, dout_a, dout_b;
  logic [DATA_W-1:0] shadow [2**ADDR_W];
  int checks = 0, failures = 0;

  hist_bram dut (.*);

  always #5 clk_a = ~clk_a;
  always #7 clk_b = ~clk_b;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int bad;
    foreach (shadow[i]) shadow[i] = '0;
    // starts cleared: sample 200 addresses on port B
    bad = 0;
    for (int i = 0; i < 200; i++) begin
      @(negedge clk_b); en_b = 1; addr_b = ADDR_W'($urandom);
      @(negedge clk_b);
      if (dout_b != '0) bad++;
    end
    check(bad == 0, "memory starts cleared");
    // port A writes
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk_a);
      en_a = 1; we_a = 1; addr_a = ADDR_W'($urandom); din_a = $urandom;
      shadow[addr_a] = din_a;
    end
    @(negedge clk_a); en_a = 0; we_a = 0;
    // read-first on port A
    @(negedge clk_a); en_a = 1; we_a = 1; addr_a = 13'd100; din_a = 32'hCAFE_0001;
    @(negedge clk_a); we_a = 0;
    check(dout_a == shadow[100], "port A returns the old word during a write");
    shadow[100] = 32'hCAFE_0001;
    @(negedge clk_a);
    check(dout_a == 32'hCAFE_0001, "port A reads the new word");
    en_a = 0;
    // port B reads everything back
    bad = 0;
    for (int w = 0; w < 2**ADDR_W; w++) begin
      @(negedge clk_b); en_b = 1; addr_b = ADDR_W'(w);
      @(negedge clk_b);
      if (dout_b != shadow[w]) bad++;
    end
    check(bad == 0, $sformatf("port B read-back (%0d words differ)", bad));
    // disabled port B holds its output
    @(negedge clk_b); addr_b = 13'd100; en_b = 1;
    @(negedge clk_b); en_b = 0; addr_b = 13'd101;
    @(negedge clk_b); @(negedge clk_b);
    check(dout_b == 32'hCAFE_0001, "disabled port holds its output");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk_a);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
