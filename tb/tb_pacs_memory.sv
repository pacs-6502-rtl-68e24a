// tb_pacs_memory: writes and reads back the full 64 KiB memory.
//
// Every address is written with a value derived from a random seed, then
// read back in a different (strided) order; the read data must appear one
// cycle after the address and must not change during a write cycle.
module tb_pacs_memory;
  logic        clk = 1'b0;
  logic [15:0] addr;
  logic        write;
  logic [7:0]  wdata, rdata;
  int checks = 0, failures = 0;

  pacs_memory dut (.*);

  always #5 clk = ~clk;

  function automatic logic [7:0] pattern(int unsigned a, int unsigned seed);
    return 8'((a * 37 + (a >> 8) * 11 + seed) ^ (seed >> 8));
  endfunction

  initial begin
    int unsigned seed = $urandom;
    logic [7:0] held;
    write = 1'b0; addr = 0; wdata = 0;
    for (int i = 0; i < 65536; i++) begin
      @(negedge clk);
      addr = 16'(i); wdata = pattern(i, seed); write = 1'b1;
    end
    @(negedge clk);
    write = 1'b0;
    for (int k = 0; k < 65536; k++) begin
      int unsigned a = (k * 40503) & 16'hFFFF;  // odd stride: visits every address
      addr = 16'(a);
      @(negedge clk);
      checks++;
      if (rdata != pattern(a, seed)) begin
        failures++;
        if (failures < 10) $display("FAIL mem[%h]=%h expected %h", a, rdata, pattern(a, seed));
      end
    end
    // read data holds during a write cycle
    held = rdata;
    addr = 16'h1234; wdata = ~pattern(16'h1234, seed); write = 1'b1;
    @(negedge clk);
    checks++;
    if (rdata != held) failures++;
    write = 1'b0;
    @(negedge clk);
    checks++;
    if (rdata != ~pattern(16'h1234, seed)) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
