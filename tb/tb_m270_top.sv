// tb_m270_top: end-to-end test of the M270 computer at its default size.
//
// Loads machine-code programs straight into primary memory, resets the
// computer, pulses Start and lets it run until HALT brings it back to Idle.
// An instruction-level reference model in this testbench executes the same
// program; the outputs written with OUT, the final register file, the first
// 256 bytes of memory and the number of clock cycles are compared with it.
// Program 1 exercises every opcode, including taken and untaken BRN/BRZ and
// INP from the DIP switches. Program 2 is a bubble sort of 7, -15, 4, -2, 25
// that prints the sorted list; its outputs are also checked against the
// hand-sorted list. Each mechanism (every opcode, taken and untaken
// conditional branches, memory reads and writes, the Idle -> run -> Idle
// round trip) is counted, and one that never occurs counts as a failure.
module tb_m270_top;
  import m270_pkg::*;

  logic       clk = 1'b0;
  logic       rst, start;
  byte_t      dipsw, outr;
  logic [6:0] led;
  logic       out_load, idle;
  logic [14:0] mem_addr;
  byte_t      data_bus;

  int checks = 0, failures = 0;

  m270_top dut (
    .clk, .rst, .start, .dipsw, .outr, .led, .out_load, .mem_addr, .data_bus, .idle
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---------------- reference model ----------------
  byte_t ref_mem [256];
  byte_t ref_r   [4];
  byte_t ref_out [$];
  int    ref_cycles;
  int    op_count [16];
  int    brn_taken, brn_not, brz_taken, brz_not;

  task automatic ref_run();
    byte_t pc = 8'h00;
    logic  nf = 1'b0, zf = 1'b0;
    logic  cond;
    byte_t b0, n, y, res;
    opcode_e op;
    logic [1:0] ra, rb;
    for (int i = 0; i < 4; i++) ref_r[i] = 8'h00;
    ref_out.delete();
    ref_cycles = 1;  // Start sampled in Idle
    forever begin
      b0 = ref_mem[pc];
      n  = ref_mem[pc + 8'd1];
      pc = pc + 8'd2;
      op = opcode_e'(b0[7:4]);
      ra = b0[3:2];
      rb = b0[1:0];
      op_count[op]++;
      // branch condition uses the flags left by the previous instruction
      cond = (op == OP_BRU) || (op == OP_BRN && nf) || (op == OP_BRZ && zf);
      y  = ref_r[rb] + n;           // Yr, and the flags follow it
      nf = y[7];
      zf = (y == 8'h00);
      ref_cycles += 6 + 1;
      if (is_mem_ref(op)) begin
        y = ref_mem[y];
        ref_cycles += 3;
      end
      ref_cycles += (op == OP_STR) ? 3 : (op inside {OP_INVR, OP_INVM}) ? 2 : 1;
      case (op)
        OP_HALT: return;
        OP_BRU, OP_BRN, OP_BRZ: begin
          if (cond) pc = y;
          if (op == OP_BRN) begin if (cond) brn_taken++; else brn_not++; end
          if (op == OP_BRZ) begin if (cond) brz_taken++; else brz_not++; end
        end
        OP_STR:  ref_mem[y] = ref_r[ra];
        OP_INP:  ref_r[ra] = dipsw;
        OP_OUT:  ref_out.push_back(ref_r[ra]);
        OP_LDI:  ref_r[ra] = n;
        OP_ADDR, OP_ADDM: begin
          res = ref_r[ra] + y;
          ref_r[ra] = res;
          nf = res[7];
          zf = (res == 8'h00);
        end
        OP_ANDR, OP_ANDM: ref_r[ra] = ref_r[ra] & y;
        OP_INVR, OP_INVM: ref_r[ra] = ~y;
        OP_LDR, OP_LDM:   ref_r[ra] = y;
        default: ;
      endcase
    end
  endtask

  // ---------------- DUT side ----------------
  byte_t dut_out [$];
  logic  out_pending = 1'b0;
  int    n_mem_read, n_mem_write, n_pc_load, n_runs;

  always @(posedge clk) begin
    if (out_pending) dut_out.push_back(outr);
    out_pending <= out_load;
    if (dut.ctrl.mem_read)  n_mem_read++;
    if (dut.ctrl.mem_write) n_mem_write++;
    if (dut.ctrl.pc_load)   n_pc_load++;
  end

  task automatic load(input byte_t prog [], input int base);
    for (int i = 0; i < prog.size(); i++) begin
      dut.u_mem.mem[base + i] = prog[i];
      ref_mem[base + i]       = prog[i];
    end
  endtask

  task automatic clear_mem();
    for (int i = 0; i < 256; i++) begin
      dut.u_mem.mem[i] = 8'h00;
      ref_mem[i]       = 8'h00;
    end
  endtask

  task automatic run_and_compare(input string name, input byte_t expect_out []);
    int cycles = 0;
    dut_out.delete();
    rst = 1'b1;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    @(posedge clk);
    check(idle, {name, ": idle after reset"});
    check(dut.u_dp.pc_q == 8'h00, {name, ": PC cleared by reset"});
    #1 start = 1'b1;
    @(posedge clk);
    #1 start = 1'b0;
    cycles = 1;
    while (!idle) begin
      @(posedge clk);
      #1 cycles++;
    end
    @(posedge clk);
    n_runs++;
    ref_run();
    check(dut_out.size() == ref_out.size(),
          $sformatf("%s: %0d outputs, model %0d", name, dut_out.size(), ref_out.size()));
    for (int i = 0; i < ref_out.size() && i < dut_out.size(); i++)
      check(dut_out[i] == ref_out[i],
            $sformatf("%s: output %0d = %02h, model %02h", name, i, dut_out[i], ref_out[i]));
    check(expect_out.size() == dut_out.size(), {name, ": output count vs expected list"});
    for (int i = 0; i < expect_out.size() && i < dut_out.size(); i++)
      check(dut_out[i] == expect_out[i],
            $sformatf("%s: output %0d = %02h, expected %02h", name, i, dut_out[i], expect_out[i]));
    for (int i = 0; i < 4; i++)
      check(dut.u_dp.u_rf.regs[i] == ref_r[i],
            $sformatf("%s: R%0d = %02h, model %02h", name, i, dut.u_dp.u_rf.regs[i], ref_r[i]));
    for (int a = 0; a < 256; a++)
      check(dut.u_mem.mem[a] == ref_mem[a], $sformatf("%s: MEM[%02h]", name, a));
    check(cycles == ref_cycles,
          $sformatf("%s: %0d cycles, model %0d", name, cycles, ref_cycles));
    check(led == outr[6:0], {name, ": LED shows OUTR[6:0]"});
    $display("%s: %0d instructions' outputs, %0d cycles", name, dut_out.size(), cycles);
  endtask

  // Program 1: every instruction once or more.
  byte_t prog1 [] = '{
    8'h50, 8'h00,  // 00 INP  R0
    8'h60, 8'h00,  // 02 OUT  R0
    8'h74, 8'h33,  // 04 LDI  R1, 33
    8'h84, 8'h01,  // 06 ADDR R1, R0, 1
    8'h64, 8'h00,  // 08 OUT  R1
    8'h94, 8'h00,  // 0A ANDR R1, R0, 0
    8'h64, 8'h00,  // 0C OUT  R1
    8'hA9, 8'h00,  // 0E INVR R2, R1, 0
    8'h68, 8'h00,  // 10 OUT  R2
    8'hBE, 8'h03,  // 12 LDR  R3, R2, 3
    8'h6C, 8'h00,  // 14 OUT  R3
    8'h43, 8'hF0,  // 16 STR  R0, R3, F0   -> MEM[E8]
    8'hF7, 8'hF0,  // 18 LDM  R1, R3, F0
    8'h64, 8'h00,  // 1A OUT  R1
    8'hC7, 8'hF1,  // 1C ADDM R1, R3, F1   (MEM[E9] = 10)
    8'h64, 8'h00,  // 1E OUT  R1
    8'hD7, 8'hF1,  // 20 ANDM R1, R3, F1
    8'h64, 8'h00,  // 22 OUT  R1
    8'hEB, 8'hF1,  // 24 INVM R2, R3, F1
    8'h68, 8'h00,  // 26 OUT  R2
    8'h7C, 8'h00,  // 28 LDI  R3, 0
    8'h13, 8'h2E,  // 2A BRU  R3, 2E
    8'h60, 8'h00,  // 2C OUT  R0 (skipped)
    8'h74, 8'hFF,  // 2E LDI  R1, FF
    8'h87, 8'h00,  // 30 ADDR R1, R3, 0    NF=1 ZF=0
    8'h33, 8'h50,  // 32 BRZ  R3, 50       not taken
    8'h87, 8'h00,  // 34 ADDR R1, R3, 0    NF=1
    8'h23, 8'h3C,  // 36 BRN  R3, 3C       taken
    8'h60, 8'h00,  // 38 OUT  R0 (skipped)
    8'h00, 8'h00,  // 3A HALT (skipped)
    8'h74, 8'h01,  // 3C LDI  R1, 1
    8'h87, 8'hFF,  // 3E ADDR R1, R3, -1   ZF=1
    8'h33, 8'h46,  // 40 BRZ  R3, 46       taken
    8'h60, 8'h00,  // 42 OUT  R0 (skipped)
    8'h00, 8'h00,  // 44 HALT (skipped)
    8'h87, 8'h05,  // 46 ADDR R1, R3, 5    NF=0
    8'h23, 8'h50,  // 48 BRN  R3, 50       not taken
    8'h64, 8'h00,  // 4A OUT  R1
    8'h00, 8'h00   // 4C HALT
  };
  byte_t exp1 [] = '{8'h5A, 8'h8E, 8'h0A, 8'hF5, 8'hF8, 8'h5A, 8'h6A, 8'h00, 8'hEF, 8'h05};

  // Program 2: bubble sort of the five bytes at E0..E4, four passes; the
  // pass counter lives at F0, R3 = 0 is the base for absolute addresses.
  byte_t prog2 [] = '{
    8'h7C, 8'h00,  // 00 LDI  R3, 0
    8'h74, 8'h04,  // 02 LDI  R1, 4
    8'h47, 8'hF0,  // 04 STR  R1, R3, F0
    8'h70, 8'hE0,  // 06 outer: LDI R0, E0
    8'hE4, 8'h00,  // 08 inner: INVM R1, R0, 0      R1 = ~a[p]
    8'hC4, 8'h01,  // 0A ADDM R1, R0, 1             a[p+1] - a[p] - 1
    8'h23, 8'h20,  // 0C BRN  R3, swap              a[p+1] <= a[p]
    8'hB0, 8'h01,  // 0E next: LDR R0, R0, 1        p++
    8'h74, 8'h00,  // 10 LDI  R1, 0
    8'h84, 8'h1C,  // 12 ADDR R1, R0, -E4
    8'h23, 8'h08,  // 14 BRN  R3, inner
    8'hF7, 8'hF0,  // 16 LDM  R1, R3, F0
    8'h87, 8'hFF,  // 18 ADDR R1, R3, -1
    8'h33, 8'h2A,  // 1A BRZ  R3, done
    8'h47, 8'hF0,  // 1C STR  R1, R3, F0
    8'h13, 8'h06,  // 1E BRU  R3, outer
    8'hF4, 8'h00,  // 20 swap: LDM R1, R0, 0
    8'hF8, 8'h01,  // 22 LDM  R2, R0, 1
    8'h48, 8'h00,  // 24 STR  R2, R0, 0
    8'h44, 8'h01,  // 26 STR  R1, R0, 1
    8'h13, 8'h0E,  // 28 BRU  R3, next
    8'hF7, 8'hE0,  // 2A done: LDM R1, R3, E0
    8'h64, 8'h00,  // 2C OUT  R1
    8'hF7, 8'hE1,  // 2E LDM  R1, R3, E1
    8'h64, 8'h00,  // 30 OUT  R1
    8'hF7, 8'hE2,  // 32 LDM  R1, R3, E2
    8'h64, 8'h00,  // 34 OUT  R1
    8'hF7, 8'hE3,  // 36 LDM  R1, R3, E3
    8'h64, 8'h00,  // 38 OUT  R1
    8'hF7, 8'hE4,  // 3A LDM  R1, R3, E4
    8'h64, 8'h00,  // 3C OUT  R1
    8'h00, 8'h00   // 3E HALT
  };
  byte_t data2 [] = '{8'h07, 8'hF1, 8'h04, 8'hFE, 8'h19};   // 7, -15, 4, -2, 25
  byte_t exp2  [] = '{8'hF1, 8'hFE, 8'h04, 8'h07, 8'h19};   // -15, -2, 4, 7, 25

  initial begin
    rst = 1'b1; start = 1'b0; dipsw = 8'h5A;
    for (int i = 0; i < 16; i++) op_count[i] = 0;
    {brn_taken, brn_not, brz_taken, brz_not} = '0;
    {n_mem_read, n_mem_write, n_pc_load, n_runs} = '0;

    clear_mem();
    load(prog1, 'h00);
    load('{8'h10}, 'hE9);
    run_and_compare("instruction test", exp1);

    clear_mem();
    load(prog2, 'h00);
    load(data2, 'hE0);
    run_and_compare("sort", exp2);
    for (int i = 0; i < 5; i++)
      check(dut.u_mem.mem['hE0 + i] == exp2[i], $sformatf("sorted MEM[%02h]", 'hE0 + i));

    // Every mechanism must have happened.
    for (int i = 0; i < 16; i++)
      check(op_count[i] > 0, $sformatf("opcode %0h executed", i));
    check(brn_taken > 0, "BRN taken");
    check(brn_not   > 0, "BRN not taken");
    check(brz_taken > 0, "BRZ taken");
    check(brz_not   > 0, "BRZ not taken");
    check(n_mem_write > 0, "memory writes");
    check(n_mem_read  > 0, "memory reads");
    check(n_pc_load   > 0, "PC loads");
    check(n_runs == 2, "Idle -> run -> Idle round trips");
    $display("mechanisms: BRN %0d/%0d BRZ %0d/%0d taken/not, mem reads %0d writes %0d",
             brn_taken, brn_not, brz_taken, brz_not, n_mem_read, n_mem_write);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
