// tb_m270_datapath: self-checking test of the datapath under random control.
//
// Each cycle a random but legal control word is applied (at most one source
// per operand bus, at most one ALU operation, no simultaneous memory read
// and write) and a register-level model kept in this testbench computes
// XBUS, YBUS and ZBUS and updates every register. The datapath's outputs
// (IR, NF, ZF, MAR, MDR, OUTR) and its RF and PC are compared with the model
// after every clock edge. The testbench also acts as memory, answering reads
// on DINBUS. The example transfer NR <- PC + MDR from the specification is
// run explicitly first.
module tb_m270_datapath;
  import m270_pkg::*;

  logic  clk = 0, rst, nf, zf;
  ctrl_t ctrl;
  ir_t   ir;
  byte_t mem_addr, mem_dout, mem_din, dipsw, outr;
  byte_t m_rf [4];
  byte_t m_pc, m_ir, m_nr, m_yr, m_mdr, m_mar, m_outr;
  logic  m_nf, m_zf;
  byte_t tbmem [256];
  int    checks = 0, failures = 0;

  m270_datapath dut (.clk, .rst, .ctrl, .ir, .nf, .zf, .mem_addr, .mem_dout,
                     .mem_din, .dipsw, .outr);
  always #5 clk = ~clk;

  assign mem_din = ctrl.mem_read ? tbmem[mem_addr] : 8'h00;

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

  // Apply ctrl for one cycle and step the model.
  task automatic step();
    byte_t x, y, z, a;
    logic [1:0] ad;
    ad = ctrl.rf_asel ? m_ir[1:0] : m_ir[3:2];
    x = ctrl.rf_read ? m_rf[ad] : ctrl.pc_read ? m_pc : 8'h00;
    y = ctrl.nr_read ? m_nr : ctrl.yr_read ? m_yr : ctrl.mdr_read ? m_mdr : 8'h00;
    z = ctrl.alu_passx ? x : ctrl.alu_passy ? y : ctrl.alu_add ? byte_t'(x + y) :
        ctrl.alu_and ? (x & y) : ctrl.alu_cmp ? ~x : 8'h00;
    a = m_mar;
    @(posedge clk);
    if (ctrl.mem_write) tbmem[a] = m_mdr;
    if (ctrl.rf_load)   m_rf[ad] = ctrl.rf_dsel ? dipsw : z;
    if (ctrl.pc_clear)  m_pc = 0; else if (ctrl.pc_load) m_pc = z; else if (ctrl.pc_inc) m_pc = m_pc + 1;
    if (ctrl.ir_load)   m_ir = z;
    if (ctrl.nr_load)   m_nr = z;
    if (ctrl.yr_load)   m_yr = z;
    if (ctrl.mar_load)  m_mar = z;
    if (ctrl.outr_load) m_outr = z;
    if (ctrl.mdr_load)  m_mdr = ctrl.mdr_sel ? z : (ctrl.mem_read ? tbmem[a] : 8'h00);
    if (ctrl.alu_add) begin m_nf = z[7]; m_zf = (z == 0); end
    #1;
    check(ir == ir_t'(m_ir), $sformatf("IR %02h vs %02h", ir, m_ir));
    check(nf == m_nf && zf == m_zf, "flags");
    check(mem_addr == m_mar, $sformatf("MAR %02h vs %02h", mem_addr, m_mar));
    check(mem_dout == m_mdr, $sformatf("MDR %02h vs %02h", mem_dout, m_mdr));
    check(outr == m_outr, "OUTR");
    check(dut.pc_q == m_pc, $sformatf("PC %02h vs %02h", dut.pc_q, m_pc));
    for (int i = 0; i < 4; i++) check(dut.u_rf.regs[i] == m_rf[i], $sformatf("R%0d", i));
  endtask

  initial begin
    for (int i = 0; i < 256; i++) tbmem[i] = byte_t'($urandom);
    ctrl = CTRL_NOP; ctrl.pc_clear = 1; rst = 1; dipsw = 8'h3C;
    @(posedge clk); #1;
    rst = 0;
    for (int i = 0; i < 4; i++) m_rf[i] = 0;
    {m_pc, m_ir, m_nr, m_yr, m_mdr, m_mar, m_outr} = '0;
    {m_nf, m_zf} = '0;

    // PC <- 5 via increments, MDR <- 0x21 through MEM, then NR <- PC + MDR.
    ctrl = CTRL_NOP; ctrl.pc_inc = 1;
    repeat (5) step();
    tbmem[0] = 8'h21;
    ctrl = CTRL_NOP; ctrl.mem_read = 1; ctrl.mdr_load = 1; step();
    ctrl = CTRL_NOP; ctrl.nr_load = 1; ctrl.pc_read = 1; ctrl.mdr_read = 1; ctrl.alu_add = 1; step();
    check(dut.nr_q == 8'h26, $sformatf("NR <- PC + MDR gave %02h", dut.nr_q));

    for (int i = 0; i < 4000; i++) begin
      int xs, ys, al, mm;
      xs = $urandom_range(0, 2); ys = $urandom_range(0, 3);
      al = $urandom_range(0, 5); mm = $urandom_range(0, 2);
      ctrl = CTRL_NOP;
      ctrl.rf_read  = (xs == 1); ctrl.pc_read  = (xs == 2);
      ctrl.nr_read  = (ys == 1); ctrl.yr_read  = (ys == 2); ctrl.mdr_read = (ys == 3);
      ctrl.alu_passx = (al == 1); ctrl.alu_passy = (al == 2); ctrl.alu_add = (al == 3);
      ctrl.alu_and   = (al == 4); ctrl.alu_cmp   = (al == 5);
      ctrl.rf_asel  = $urandom_range(0, 1); ctrl.rf_dsel = $urandom_range(0, 1);
      ctrl.mem_read = (mm == 1); ctrl.mem_write = (mm == 2);
      if (mm == 2) ctrl.mdr_read = (ys == 0) || ctrl.mdr_read;
      if (mm == 2 && ys != 3 && ys != 0) ctrl.mdr_read = 0;
      ctrl.mdr_sel  = $urandom_range(0, 1);
      {ctrl.rf_load, ctrl.pc_load, ctrl.pc_inc, ctrl.ir_load, ctrl.nr_load, ctrl.yr_load,
       ctrl.mar_load, ctrl.mdr_load, ctrl.outr_load} = 9'($urandom);
      ctrl.pc_clear = ($urandom_range(0, 99) == 0);
      dipsw = byte_t'($urandom);
      step();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
