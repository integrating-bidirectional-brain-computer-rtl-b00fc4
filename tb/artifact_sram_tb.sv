// Self-checking testbench of artifact_sram: random reads and writes
// compared with a shadow array, including the one-cycle read latency and
// that rdata holds between reads and during writes.
module artifact_sram_tb;
  logic clk = 0, en = 0, we = 0;
  logic [6:0] addr = 0;
  logic [9:0] wdata = 0, rdata;
  logic [9:0] shadow [128];
  bit         known [128];
  int checks = 0, failures = 0;
  logic [9:0] expect_q; bit pend = 0;

  artifact_sram dut (.*);
  always #5 clk = ~clk;

  initial begin
    // fill everything first
    for (int a = 0; a < 128; a++) begin
      @(negedge clk); en = 1; we = 1; addr = 7'(a); wdata = 10'($urandom);
      shadow[a] = wdata; known[a] = 1;
    end
    for (int c = 0; c < 3000; c++) begin
      @(negedge clk);
      if (pend) begin
        checks++;
        if (rdata !== expect_q) begin failures++; if (failures < 10) $display("read mismatch %h/%h", rdata, expect_q); end
      end
      en = ($urandom_range(0, 3) != 0); we = $urandom_range(0, 1); addr = 7'($urandom); wdata = 10'($urandom);
      if (en && !we) begin expect_q = shadow[addr]; pend = 1; end
      if (en && we) shadow[addr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
