// pacs_memory: the 6502's memory, 2^ADDR_W bytes (64 KiB by default, the
// whole 16-bit address space of the processor).
//
// Single-port synchronous RAM written as an array, which FPGA tools map to
// block RAM. On a clock edge with write high the byte on wdata is stored at
// addr; otherwise the byte at addr is registered onto rdata, so read data
// appears one cycle after the address (read latency 1). During a write
// cycle rdata keeps its previous value. The contents are not initialised:
// the host loads a program before the processor is started.
module pacs_memory #(
  parameter int unsigned ADDR_W = 16
) (
  input  logic              clk,
  input  logic [ADDR_W-1:0] addr,
  input  logic              write,
  input  logic [7:0]        wdata,
  output logic [7:0]        rdata
);

  logic [7:0] mem [2**ADDR_W];

  always_ff @(posedge clk) begin
    if (write)
      mem[addr] <= wdata;
    else
      rdata <= mem[addr];
  end

endmodule
