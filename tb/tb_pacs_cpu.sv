// tb_pacs_cpu: random-program test of the 6502 core against the reference
// model.
//
// The 64 KiB memory is filled with random bytes biased towards implemented
// opcodes, so the program also jumps around and modifies itself. The core
// runs on a synchronous memory model (one-cycle read latency); ready is
// dropped at random, and while it is low the memory returns garbage, as it
// would while another master uses it. At every opcode fetch the testbench
// checks the fetch address and the number of active cycles the previous
// instruction took against the model, and one cycle later A, X, Y and P. At
// the end the whole memory is compared. Coverage: every implemented opcode,
// page crossings, read-modify-writes and stalls must each have occurred.
module tb_pacs_cpu;
  import pacs_ref_pkg::*;

  localparam int N_INSTR   = 2000; // instructions per episode
  localparam int EPISODES  = 25;   // fresh random memory and reset each

  logic        clk = 1'b0;
  logic        rst = 1'b1;
  logic        ready = 1'b0;
  logic [7:0]  d_in;
  logic [15:0] addr;
  logic [7:0]  d_out;
  logic        write, sync;

  int checks = 0, failures = 0;

  pacs_cpu dut (.*);

  always #5 clk = ~clk;

  logic [7:0] mem [65536];
  Ref6502 model;

  // synchronous memory; garbage on the read port while the core is frozen
  always_ff @(posedge clk) begin
    if (write) mem[addr] <= d_out;
    d_in <= ready ? mem[addr] : 8'($urandom);
  end

  int  active_cycles = 0, exp_cycles = 0, n_instr = 0, stalls = 0;
  bit  started = 0, reg_check = 0, done = 0;
  byte unsigned sa, sx, sy, sp;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s (instr %0d, t=%0t)", what, n_instr, $time);
    end
  endtask

  always @(posedge clk) begin
    if (!rst && !done) begin
      if (reg_check) begin
        reg_check = 0;
        check(dut.a_q == sa && dut.x_q == sx && dut.y_q == sy && dut.p_q == sp,
              $sformatf("regs A=%h X=%h Y=%h P=%h expected %h %h %h %h",
                        dut.a_q, dut.x_q, dut.y_q, dut.p_q, sa, sx, sy, sp));
      end
      if (ready) begin
        active_cycles++;
        if (sync) begin
          if (started) begin
            check(active_cycles == exp_cycles,
                  $sformatf("cycles %0d expected %0d (op %h)", active_cycles,
                            exp_cycles, dut.ir_q));
          end
          check(addr == 16'(model.pc),
                $sformatf("fetch address %h expected %h", addr, model.pc));
          started = 1;
          sa = model.a; sx = model.x; sy = model.y; sp = model.p;
          reg_check = 1;
          active_cycles = 0;
          if (n_instr == N_INSTR) done = 1;
          else begin
            exp_cycles = model.step();
            n_instr++;
          end
        end
      end else begin
        stalls++;
      end
    end
  end

  always @(negedge clk) ready <= rst ? 1'b0 : ($urandom_range(0, 9) != 0);

  initial begin
    int legal_seen, r;
    model = new();
    for (int e = 0; e < EPISODES; e++) begin
      rst = 1'b1;
      for (int i = 0; i < 65536; i++) begin
        r = $urandom_range(0, 99);
        if (r < 60) mem[i] = LEGAL[$urandom_range(0, NUM_LEGAL - 1)];
        else if (r < 62) mem[i] = (r == 60) ? 8'h4C : 8'h6C;
        else mem[i] = 8'($urandom);
        model.mem[i] = mem[i];
      end
      model.reset();
      started = 0; reg_check = 0; n_instr = 0; active_cycles = 0; done = 0;
      repeat (3) @(posedge clk);
      rst = 1'b0;
      wait (done);
      @(posedge clk);
      for (int i = 0; i < 65536; i++)
        if (mem[i] != model.mem[i]) begin
          check(0, $sformatf("memory[%h]=%h expected %h", i, mem[i], model.mem[i]));
        end
      checks++;
    end
    legal_seen = 0;
    foreach (LEGAL[i])
      if (model.op_count[LEGAL[i]] > 0) legal_seen++;
      else $display("opcode %h never executed", LEGAL[i]);
    $display("opcodes covered %0d/%0d, page crossings %0d, rmw %0d, writes %0d, stalls %0d",
             legal_seen, NUM_LEGAL, model.page_cross, model.rmw_count, model.writes, stalls);
    check(legal_seen == NUM_LEGAL, "every implemented opcode executed");
    check(model.page_cross > 0, "page crossing occurred");
    check(model.rmw_count > 0, "read-modify-write occurred");
    check(model.writes > 0, "stores occurred");
    check(stalls > 0, "stalls occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
