// Self-checking test of sync_ram: fills a 256x16 memory with random words,
// reads every address back, and checks read-before-write on a simultaneous
// write, against a shadow array kept by the testbench. A second instance
// at the 16x8 table size is exercised the same way.
module tb_sync_ram;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic        we;
  logic [7:0]  addr;
  logic [15:0] wdata, rdata;
  logic [15:0] shadow [256];

  logic        we_s;
  logic [3:0]  addr_s;
  logic [7:0]  wdata_s, rdata_s;
  logic [7:0]  shadow_s [16];

  sync_ram #(.DEPTH(256), .WIDTH(16)) dut   (.clk, .we, .addr, .wdata, .rdata);
  sync_ram #(.DEPTH(16),  .WIDTH(8))  dut_s (.clk, .we(we_s), .addr(addr_s), .wdata(wdata_s), .rdata(rdata_s));

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; addr = 0; wdata = 0; we_s = 0; addr_s = 0; wdata_s = 0;
    // fill
    for (int a = 0; a < 256; a++) begin
      @(negedge clk);
      we = 1; addr = 8'(a); wdata = 16'($urandom);
      shadow[a] = wdata;
      if (a < 16) begin
        we_s = 1; addr_s = 4'(a); wdata_s = 8'($urandom); shadow_s[a] = wdata_s;
      end else we_s = 0;
    end
    @(negedge clk); we = 0; we_s = 0;
    // read back in random order
    for (int i = 0; i < 300; i++) begin
      int a;
      a = $urandom_range(255);
      addr = 8'(a); addr_s = 4'(a);
      @(negedge clk);
      check(rdata == shadow[a], $sformatf("read %0d: %h vs %h", a, rdata, shadow[a]));
      check(rdata_s == shadow_s[a % 16], $sformatf("small read %0d", a % 16));
    end
    // read-before-write: the read returns the old word, the next read the new
    for (int i = 0; i < 20; i++) begin
      int a;
      a = $urandom_range(255);
      addr = 8'(a); we = 1; wdata = ~shadow[a];
      @(negedge clk);
      check(rdata == shadow[a], "old word on write cycle");
      shadow[a] = wdata; we = 0;
      @(negedge clk);
      check(rdata == shadow[a], "new word after write");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
