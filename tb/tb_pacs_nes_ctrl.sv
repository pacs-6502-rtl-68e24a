// tb_pacs_nes_ctrl: end-to-end test of the whole PACS 6502 system at its
// full size (64 KiB memory), driven only through the host port.
//
// Phase 1 runs the sample assembly test programs (listed below in assembly
// and hand-assembled) from address 0000, ending in a JMP to itself; the rest
// of memory holds random data that the indexed and indirect loads read.
// Phase 2 runs random programs biased to the implemented opcodes. In both,
// the host loads the full memory image with WRITE_MEM and byte writes,
// starts the CPU, pauses it mid-program, reads and writes memory while it is
// paused, resumes it, tries a memory write while it runs (must be ignored),
// and finally pauses it exactly at the opcode fetch after the last
// instruction. The reference model gives the expected memory, registers and
// cycle count: the number of running cycles must equal the 6502 cycle count
// of the executed instructions. Every memory byte is then read back through
// the host port. Each mechanism (reset and write-mem commands, start, pause,
// resume, host reads and writes, ignored write while running, page crossing,
// read-modify-write, jumps) is counted and must have happened.
module tb_pacs_nes_ctrl;
  import pacs_pkg::*;
  import pacs_ref_pkg::*;

  logic        clk = 1'b0;
  logic        reset = 1'b1;
  logic [15:0] address = '0;
  logic        read = 1'b0;
  logic [15:0] readdata;
  logic        readdatavalid;
  logic        write = 1'b0;
  logic [15:0] writedata = '0;
  logic [1:0]  byteenable = '0;
  mode_e       mode;
  logic        cpu_sync, write_pulse;

  pacs_nes_ctrl dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_host_wr = 0, n_host_rd = 0, n_reset = 0, n_wrmem = 0, n_start = 0;
  int n_pause = 0, n_resume = 0, n_ignored = 0, n_pulse = 0;
  Ref6502 model;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  always @(posedge clk) if (write_pulse) n_pulse++;

  task automatic host_write(logic [15:0] a, logic [15:0] d, logic [1:0] be);
    @(negedge clk);
    address = a; writedata = d; byteenable = be; write = 1'b1;
    @(negedge clk);
    write = 1'b0; byteenable = '0;
    if (be[0]) n_host_wr++;
  endtask

  task automatic command(cmd_e c);
    host_write(16'h0000, {c, 8'h00}, 2'b10);
    case (c)
      CMD_RESET_CPU: n_reset++;
      CMD_WRITE_MEM: n_wrmem++;
      CMD_PAUSE_CPU: n_pause++;
      default: ;
    endcase
  endtask

  task automatic host_read(logic [15:0] a, output logic [15:0] d);
    @(negedge clk);
    address = a; read = 1'b1;
    @(negedge clk);
    read = 1'b0;
    check(readdatavalid, "readdatavalid one cycle after read");
    d = readdata;
    n_host_rd++;
  endtask

  // load the model's memory image through the host port
  task automatic load_image();
    command(CMD_WRITE_MEM);
    check(mode == MODE_HOST, "WRITE_MEM gives the host the memory");
    for (int i = 0; i < 65536; i++) begin
      @(negedge clk);
      address = 16'(i); writedata = {8'h00, model.mem[i]}; byteenable = 2'b01; write = 1'b1;
      n_host_wr++;
    end
    @(negedge clk);
    write = 1'b0; byteenable = '0;
  endtask

  // read every byte back and compare with the model
  task automatic compare_memory(string phase);
    logic [15:0] d;
    int bad = 0;
    for (int i = 0; i < 65536; i++) begin
      host_read(16'(i), d);
      if (d[7:0] != model.mem[i]) begin
        bad++;
        if (bad < 5) $display("memory[%h]=%h expected %h", i, d[7:0], model.mem[i]);
      end
    end
    check(bad == 0, {phase, ": memory contents"});
    check(d[9:8] == MODE_PAUSED, {phase, ": mode reads as paused"});
  endtask

  task automatic compare_regs(string phase);
    check(dut.u_cpu.a_q == model.a && dut.u_cpu.x_q == model.x &&
          dut.u_cpu.y_q == model.y && dut.u_cpu.p_q == model.p,
          $sformatf("%s: registers A=%h X=%h Y=%h P=%h expected %h %h %h %h", phase,
                    dut.u_cpu.a_q, dut.u_cpu.x_q, dut.u_cpu.y_q, dut.u_cpu.p_q,
                    model.a, model.x, model.y, model.p));
  endtask

  // Start (or resume) the CPU and let it execute n instructions, counting
  // running cycles; the host pauses it in the opcode fetch that follows the
  // n-th instruction. After a reset the first cycle is the first opcode
  // fetch; a resumed CPU continues in the instruction whose fetch it was
  // paused in. Optionally pause once in between after mid cycles, and
  // try a memory write while it runs.
  task automatic run(int n, int mid, bit resumed, output int cycles);
    int syncs = 0;
    logic [15:0] d;
    cycles = 0;
    command(CMD_START_CPU);
    n_start++;
    // command() returns in the first running cycle
    forever begin
      write = 1'b0; byteenable = '0;
      if (mode == MODE_RUN) begin
        cycles++;
        if (cpu_sync) syncs++;
        if (cpu_sync && syncs == (resumed ? n : n + 1)) begin
          address = 16'h0000; writedata = {CMD_PAUSE_CPU, 8'h00};
          byteenable = 2'b10; write = 1'b1;
          @(negedge clk);
          write = 1'b0; byteenable = '0;
          n_pause++;
          break;
        end else if (cycles == 40) begin
          // write while running: the memory must not change
          address = 16'hFFF7; writedata = {8'h00, ~model.mem[16'hFFF7]};
          byteenable = 2'b01; write = 1'b1;
          n_ignored++;
        end else if (cycles == mid) begin
          address = 16'h0000; writedata = {CMD_PAUSE_CPU, 8'h00};
          byteenable = 2'b10; write = 1'b1;
          @(negedge clk);
          write = 1'b0; byteenable = '0;
          n_pause++;
          check(mode == MODE_PAUSED, "PAUSE_CPU freezes the CPU");
          // host access in the middle of the program (phase 1 leaves FFF8 alone)
          host_read(16'hFFF8, d);
          check(d[7:0] == model.mem[16'hFFF8], "read while paused");
          check(d[9:8] == MODE_PAUSED, "mode reads as paused");
          host_read(16'(cycles * 131), d);
          command(CMD_START_CPU);
          n_resume++;
          continue;
        end
      end
      @(negedge clk);
    end
  endtask

  // sample test programs, hand-assembled, followed by JMP to itself
  //   LDA $0707  ADC $0304  LDA $aaff,X  ADC #$04  LDA $aaff,Y  ADC #$04
  //   LDA #$02  ADC #$02  ADC #$04 (x4)  LDA #$55  AND #$50
  //   AND #$01  LDA #$03  CMP #$01  LDA #$0F  EOR #$0F  LDA ($aa,X)
  //   ADC ($bb,X)  ADC #$04  ADC #$01  LDA ($ff),Y  ADC ($bb),Y  ADC #$04
  //   ADC #$01  LDX #$05  LDX #$03  LDA #$03  AND #$01  STA $0200  LDA #$0
  //   ORA #$01  STA $0201  LDA #$03  EOR #$01  STA $0202  LDA #$0F
  //   ORA #$F0  ORA #$00  LDA #$0F  SBC #$03  SBC #$01  LDA #$05
  //   STA $07aa  LDA #$03  LDA $07aa  ADC #$02  LDA #$05  STA $00aa
  //   LDA #$03  LDA $00aa  ADC #$02  LDX #$08  STX $0506
  //   ADC $00aa,X  ADC #$03  LDY #$08  STY $0506  ADC $00aa,Y  ADC #$03
  //   LDA $00aa  ADC #$01  ADC $00aa  ADC #$01  LDA $ee,X  ADC $bb,X
  //   ADC #$01  LDA $aa,Y (absolute,Y)  ADC $cc,Y (absolute,Y)  ADC #$01
  localparam int PROG_LEN = 166;
  localparam int PROG_INSTR = 72;
  localparam byte unsigned PROG [PROG_LEN] = '{
    8'hAD, 8'h07, 8'h07, 8'h6D, 8'h04, 8'h03, 8'hBD, 8'hFF, 8'hAA, 8'h69, 8'h04,
    8'hB9, 8'hFF, 8'hAA, 8'h69, 8'h04, 8'hA9, 8'h02, 8'h69, 8'h02, 8'h69, 8'h04,
    8'h69, 8'h04, 8'h69, 8'h04, 8'h69, 8'h04, 8'hA9, 8'h55, 8'h29, 8'h50,
    8'h29, 8'h01, 8'hA9, 8'h03, 8'hC9, 8'h01, 8'hA9, 8'h0F, 8'h49, 8'h0F,
    8'hA1, 8'hAA, 8'h61, 8'hBB, 8'h69, 8'h04, 8'h69, 8'h01, 8'hB1, 8'hFF,
    8'h71, 8'hBB, 8'h69, 8'h04, 8'h69, 8'h01, 8'hA2, 8'h05, 8'hA2, 8'h03,
    8'hA9, 8'h03, 8'h29, 8'h01, 8'h8D, 8'h00, 8'h02, 8'hA9, 8'h00, 8'h09, 8'h01,
    8'h8D, 8'h01, 8'h02, 8'hA9, 8'h03, 8'h49, 8'h01, 8'h8D, 8'h02, 8'h02,
    8'hA9, 8'h0F, 8'h09, 8'hF0, 8'h09, 8'h00, 8'hA9, 8'h0F, 8'hE9, 8'h03,
    8'hE9, 8'h01, 8'hA9, 8'h05, 8'h8D, 8'hAA, 8'h07, 8'hA9, 8'h03, 8'hAD, 8'hAA,
    8'h07, 8'h69, 8'h02, 8'hA9, 8'h05, 8'h8D, 8'hAA, 8'h00, 8'hA9, 8'h03, 8'hAD,
    8'hAA, 8'h00, 8'h69, 8'h02, 8'hA2, 8'h08, 8'h8E, 8'h06, 8'h05,
    8'h7D, 8'hAA, 8'h00, 8'h69, 8'h03, 8'hA0, 8'h08, 8'h8C, 8'h06, 8'h05,
    8'h79, 8'hAA, 8'h00, 8'h69, 8'h03, 8'hAD, 8'hAA, 8'h00, 8'h69, 8'h01,
    8'h6D, 8'hAA, 8'h00, 8'h69, 8'h01, 8'hB5, 8'hEE, 8'h75, 8'hBB, 8'h69, 8'h01,
    8'hB9, 8'hAA, 8'h00, 8'h79, 8'hCC, 8'h00, 8'h69, 8'h01,
    8'h4C, 8'hA3, 8'h00
  };

  initial begin
    int cycles, exp_cycles, r, n;
    int cross0, rmw0;
    model = new();

    // ---- phase 1: the sample programs
    for (int i = 0; i < 65536; i++) model.mem[i] = 8'($urandom);
    foreach (PROG[i]) model.mem[i] = PROG[i];
    repeat (4) @(negedge clk);
    reset = 1'b0;
    check(mode == MODE_HOST, "after reset the host owns memory");
    command(CMD_RESET_CPU);
    load_image();
    model.reset();
    exp_cycles = 1;                       // the final opcode fetch
    for (int i = 0; i < PROG_INSTR; i++) exp_cycles += model.step();
    check(model.pc == 16'h00A3, $sformatf("program ends at the JMP (pc=%h)", model.pc));
    run(PROG_INSTR, 100, 1'b0, cycles);
    check(cycles == exp_cycles, $sformatf("sample programs: %0d cycles, expected %0d",
                                          cycles, exp_cycles));
    check(dut.u_cpu.pc_q == 16'h00A4, "paused at the final JMP");
    compare_regs("sample programs");
    compare_memory("sample programs");
    // the stores of the programs, worked out by hand
    check(model.mem[16'h0200] == 8'h01 && model.mem[16'h0201] == 8'h01 &&
          model.mem[16'h0202] == 8'h02 && model.mem[16'h07AA] == 8'h05 &&
          model.mem[16'h0506] == 8'h08, "stored results of the sample programs");
    // the loop keeps running after a resume
    run(3, -1, 1'b1, cycles);
    check(cycles == 3 * 3, "JMP to itself takes 3 cycles");
    check(dut.u_cpu.pc_q == 16'h00A4, "still looping at the final JMP");

    // ---- phase 2: random programs, from reset
    cross0 = model.page_cross;
    rmw0 = model.rmw_count;
    for (int e = 0; e < 3; e++) begin
      for (int i = 0; i < 65536; i++) begin
        r = $urandom_range(0, 99);
        if (r < 60) model.mem[i] = LEGAL[$urandom_range(0, NUM_LEGAL - 1)];
        else if (r < 62) model.mem[i] = (r == 60) ? 8'h4C : 8'h6C;
        else model.mem[i] = 8'($urandom);
      end
      command(CMD_RESET_CPU);
      check(mode == MODE_HOST, "RESET_CPU gives the host the memory");
      load_image();
      model.reset();
      n = 1500;
      exp_cycles = 1;
      for (int i = 0; i < n; i++) exp_cycles += model.step();
      run(n, -1, 1'b0, cycles);
      check(cycles == exp_cycles, $sformatf("random program: %0d cycles, expected %0d",
                                            cycles, exp_cycles));
      compare_regs("random program");
      compare_memory("random program");
      // resume after the full read-back and run some more
      exp_cycles = 0;
      for (int i = 0; i < 500; i++) exp_cycles += model.step();
      run(500, -1, 1'b1, cycles);
      n_resume++;
      check(cycles == exp_cycles, "random program after resume: cycle count");
      compare_regs("random program after resume");
      compare_memory("random program after resume");
    end

    $display("host writes %0d, reads %0d, reset %0d, write_mem %0d, start %0d, pause %0d, resume %0d, ignored %0d, pulses %0d",
             n_host_wr, n_host_rd, n_reset, n_wrmem, n_start, n_pause, n_resume, n_ignored, n_pulse);
    $display("page crossings %0d, read-modify-writes %0d, JMP %0d, JMP() %0d",
             model.page_cross - cross0, model.rmw_count - rmw0, model.op_count[8'h4C],
             model.op_count[8'h6C]);
    check(n_host_wr > 0 && n_host_rd > 0, "host writes and reads happened");
    check(n_reset > 0 && n_wrmem > 0 && n_start > 0, "reset, write-mem and start commands");
    check(n_pause > 0 && n_resume > 0, "pause and resume happened");
    check(n_ignored > 0 && n_pulse > 0, "write while running and write pulse happened");
    check(model.page_cross > cross0 && model.rmw_count > rmw0, "page crossings and RMW happened");
    check(model.op_count[8'h4C] > 0 && model.op_count[8'h6C] > 0, "jumps happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
