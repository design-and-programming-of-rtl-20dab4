// tb_m270_ctrl: self-checking test of the controller.
//
// For every opcode and every NF/ZF combination, the testbench starts the
// controller from Idle, plays the role of the datapath (holding the opcode
// and flags), and tallies the control signals issued until the next
// instruction fetch begins (or Idle, after HALT). The tallies are compared
// with what the instruction must do: two instruction-byte reads with PC
// increments, one IR and one NR load, one Yr addition, three more cycles and
// one more memory read for memory operands, the register, memory, output
// and PC writes of the instruction, and the total cycle count. The flags
// are flipped right after the Yr cycle to check that branches test the
// flags as they stood before it. Bus and ALU-select exclusivity is checked
// every cycle.
module tb_m270_ctrl;
  import m270_pkg::*;

  logic    clk = 0, rst, start, nf, zf, idle;
  opcode_e op;
  ctrl_t   ctrl;
  int      checks = 0, failures = 0;

  m270_ctrl dut (.clk, .rst, .start, .op, .nf, .zf, .ctrl, .idle);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    rst = 1; start = 0; op = OP_HALT; nf = 0; zf = 0;
    repeat (2) @(posedge clk);
    #1;
    check(ctrl.pc_clear, "PC_CLEAR during reset");
    rst = 0;
    #1;
    check(idle, "Idle after reset");
    // Idle stays Idle without Start.
    repeat (5) @(posedge clk);
    #1 check(idle && ctrl == CTRL_NOP, "Idle holds without Start");

    for (int o = 0; o < 16; o++) begin
      for (int f = 0; f < 4; f++) begin
        int cyc, mem_rd, pc_inc, ir_ld, nr_ld, adds;
        int rf_ld, rf_in, mem_wr, out_ld, pc_ld, yr_ld;
        int exp_cyc, exp_rf, exp_pc, exp_adds;
        logic memref, nf0, zf0;
        {cyc, mem_rd, pc_inc, ir_ld, nr_ld, adds} = '0;
        {rf_ld, rf_in, mem_wr, out_ld, pc_ld, yr_ld} = '0;
        op = opcode_e'(o);
        nf0 = f[0]; zf0 = f[1];
        nf = nf0; zf = zf0;
        memref = (o >= 'hC);
        // Restart from Idle for each case.
        rst = 1; @(posedge clk); #1 rst = 0;
        start = 1;
        @(posedge clk); #1 start = 0;
        do begin
          cyc++;
          check($onehot0({ctrl.alu_passx, ctrl.alu_passy, ctrl.alu_add, ctrl.alu_and, ctrl.alu_cmp}),
                "one ALU operation");
          check($onehot0({ctrl.rf_read, ctrl.pc_read}), "one XBUS source");
          check($onehot0({ctrl.nr_read, ctrl.yr_read, ctrl.mdr_read}), "one YBUS source");
          mem_rd += int'(ctrl.mem_read);
          pc_inc += int'(ctrl.pc_inc);
          ir_ld  += int'(ctrl.ir_load);
          nr_ld  += int'(ctrl.nr_load);
          adds   += int'(ctrl.alu_add);
          yr_ld  += int'(ctrl.yr_load);
          rf_ld  += int'(ctrl.rf_load);
          rf_in  += int'(ctrl.rf_load && ctrl.rf_dsel);
          mem_wr += int'(ctrl.mem_write);
          out_ld += int'(ctrl.outr_load);
          pc_ld  += int'(ctrl.pc_load);
          // After the Yr addition the flags change: flip them.
          if (ctrl.alu_add && ctrl.yr_load) begin
            @(posedge clk); #1;
            nf = ~nf0; zf = ~zf0;
          end else begin
            @(posedge clk); #1;
          end
        end while (!idle && !(ctrl.pc_read && ctrl.mar_load && nr_ld > 0));

        case (o)
          'h4: exp_cyc = 6 + 1 + 3;
          'hA: exp_cyc = 6 + 1 + 2;
          'hE: exp_cyc = 6 + 4 + 2;
          default: exp_cyc = 6 + 1 + (memref ? 3 : 0) + 1;
        endcase
        exp_rf   = (o inside {['h5:'h5], ['h7:'hF]}) ? ((o == 'hA || o == 'hE) ? 2 : 1) : 0;
        exp_pc   = (o == 1) || (o == 2 && nf0) || (o == 3 && zf0);
        exp_adds = (o == 'h8 || o == 'hC) ? 2 : 1;
        check(cyc == exp_cyc, $sformatf("op %0h: %0d cycles, expected %0d", o, cyc, exp_cyc));
        check(mem_rd == 2 + (memref ? 1 : 0), $sformatf("op %0h: memory reads %0d", o, mem_rd));
        check(pc_inc == 2, $sformatf("op %0h: PC increments %0d", o, pc_inc));
        check(ir_ld == 1 && nr_ld == 1, $sformatf("op %0h: IR/NR loads", o));
        check(adds == exp_adds, $sformatf("op %0h: additions %0d", o, adds));
        check(yr_ld == 1 + (memref ? 1 : 0), $sformatf("op %0h: YR loads %0d", o, yr_ld));
        check(rf_ld == exp_rf, $sformatf("op %0h: RF loads %0d expected %0d", o, rf_ld, exp_rf));
        check(rf_in == (o == 5 ? 1 : 0), $sformatf("op %0h: DIPSW loads", o));
        check(mem_wr == (o == 4 ? 1 : 0), $sformatf("op %0h: memory writes", o));
        check(out_ld == (o == 6 ? 1 : 0), $sformatf("op %0h: OUTR loads", o));
        check(pc_ld == exp_pc, $sformatf("op %0h nf=%0d zf=%0d: PC loads %0d", o, nf0, zf0, pc_ld));
        check(idle == (o == 0), $sformatf("op %0h: Idle only after HALT", o));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
