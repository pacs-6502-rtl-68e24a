// pacs_nes_ctrl: the PACS 6502 system, a memory-mapped peripheral that holds
// the 6502 core and its 64 KiB memory and lets a host processor load a
// program, run it, stop it and read the memory back.
//
// Host interface: an Avalon-MM style slave with 16-bit words, fixed read
// latency of one cycle and no wait states.
//   write, byteenable[1] : writedata[15:8] is a command
//       RESET_CPU (0) or WRITE_MEM (3): hold the CPU in reset, host owns memory
//       START_CPU (1): release the CPU (it starts at address 0000 after a
//                      reset, or resumes where it was paused)
//       PAUSE_CPU (2): freeze the running CPU, host owns memory
//   write, byteenable[0] : writedata[7:0] is written to memory[address] if
//                          the host owns memory (ignored while running)
//   read                 : next cycle readdatavalid is high and readdata = {6'b0, mode, memory byte};
//                          the byte is memory[address] while the host owns
//                          memory, and the byte on the CPU's bus while it runs
// Word address = byte address of the program byte, so host software that
// writes byte x of a program at byte offset 2x and a command at byte offset 1
// maps directly onto this interface.
//
// One single-port memory is shared: a multiplexer in front of it selects the
// CPU's address, data and write strobe while running, and the host's
// otherwise; the memory's read data goes both to the CPU and to readdata.
// The CPU is held in reset while the host owns memory after RESET_CPU or
// WRITE_MEM, and frozen with ready low while paused. write_pulse is high in
// the cycle after each host write (a board-level activity indicator).
//
// The command codes, the reset-while-loading behaviour, the shared memory
// with its multiplexer and the 16-bit word per byte layout are those of the
// original PACS 6502 controller. Decoding commands only on writes with
// byteenable[1], the working PAUSE_CPU, the mode bits in readdata and
// readdatavalid are choices of this design.
module pacs_nes_ctrl
  import pacs_pkg::*;
#(
  parameter int unsigned ADDR_W = 16
) (
  input  logic        clk,
  input  logic        reset,
  // host slave port
  input  logic [15:0] address,
  input  logic        read,
  output logic [15:0] readdata,
  output logic        readdatavalid,
  input  logic        write,
  input  logic [15:0] writedata,
  input  logic [1:0]  byteenable,
  // status
  output mode_e       mode,
  output logic        cpu_sync,
  output logic        write_pulse
);

  mode_e       mode_q;
  logic        cpu_rst, cpu_ready, cpu_write, mem_write;
  logic [15:0] cpu_addr;
  logic [7:0]  cpu_dout, mem_wdata, mem_rdata;
  logic [ADDR_W-1:0] mem_addr;
  logic        host_owns;

  // command decoding
  always_ff @(posedge clk) begin
    if (reset) begin
      mode_q <= MODE_HOST;
    end else if (write && byteenable[1]) begin
      unique case (writedata[15:8])
        CMD_RESET_CPU, CMD_WRITE_MEM: mode_q <= MODE_HOST;
        CMD_START_CPU:                mode_q <= MODE_RUN;
        CMD_PAUSE_CPU: if (mode_q == MODE_RUN) mode_q <= MODE_PAUSED;
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      write_pulse   <= 1'b0;
      readdatavalid <= 1'b0;
    end else begin
      write_pulse   <= write;
      readdatavalid <= read;
    end
  end

  assign mode      = mode_q;
  assign host_owns = (mode_q != MODE_RUN);
  assign cpu_rst   = reset || (mode_q == MODE_HOST);
  assign cpu_ready = (mode_q == MODE_RUN);

  pacs_cpu u_cpu (
    .clk   (clk),
    .rst   (cpu_rst),
    .ready (cpu_ready),
    .d_in  (mem_rdata),
    .addr  (cpu_addr),
    .d_out (cpu_dout),
    .write (cpu_write),
    .sync  (cpu_sync)
  );

  // memory port multiplexer
  always_comb begin
    if (host_owns) begin
      mem_addr  = address[ADDR_W-1:0];
      mem_write = write && byteenable[0];
      mem_wdata = writedata[7:0];
    end else begin
      mem_addr  = cpu_addr[ADDR_W-1:0];
      mem_write = cpu_write;
      mem_wdata = cpu_dout;
    end
  end

  pacs_memory #(.ADDR_W(ADDR_W)) u_mem (
    .clk   (clk),
    .addr  (mem_addr),
    .write (mem_write),
    .wdata (mem_wdata),
    .rdata (mem_rdata)
  );

  assign readdata = {6'b000000, mode_q, mem_rdata};

  // the processor only writes while it owns the memory
  always_ff @(posedge clk) begin
    if (!reset)
      assert (!(cpu_write && host_owns)) else $error("CPU write while host owns memory");
  end

endmodule
