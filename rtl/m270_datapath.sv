// m270_datapath: the bus-oriented M270 datapath.
//
// Three internal busses connect the components: XBUS and YBUS carry ALU
// operands and ZBUS carries the ALU result to every loadable register.
//   XBUS sources: RF, PC          YBUS sources: NR, YR, MDR
//   ZBUS loads:   IR, RF, PC, NR, YR, MDR, MAR, OUTR
// NF/ZF capture the sign and zero-ness of ZBUS on ALU_ADD. RF can instead
// load INBUS, the DIP switches. The memory interface is MAR (address) and
// MDR (data): DINBUS brings read data into MDR, DOUTBUS carries MDR to memory.
// The structure and all control signals follow the specification's datapath
// drawing and control signal table; tri-state bus drivers are replaced by
// multiplexers. Every register is clocked on the rising edge; all are
// cleared by the synchronous rst (PC through PC_CLEAR, from the controller).
//
// Ports: the control word and clock/reset; ir and nf/zf to the controller;
// mem_addr/mem_dout/mem_din to primary memory together with the MEM_READ and
// MEM_WRITE strobes (passed on by the top); dipsw in; outr out.
module m270_datapath
  import m270_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  ctrl_t ctrl,
  output ir_t   ir,
  output logic  nf,
  output logic  zf,
  output byte_t mem_addr,   // MAR
  output byte_t mem_dout,   // DOUTBUS (MDR)
  input  byte_t mem_din,    // DINBUS
  input  byte_t dipsw,      // INBUS
  output byte_t outr
);

  byte_t xbus, ybus, zbus;
  byte_t rf_q, pc_q, nr_q, yr_q, mdr_q, ir_q;

  m270_buses u_buses (
    .clk      (clk),
    .rf_read  (ctrl.rf_read),
    .pc_read  (ctrl.pc_read),
    .nr_read  (ctrl.nr_read),
    .yr_read  (ctrl.yr_read),
    .mdr_read (ctrl.mdr_read),
    .rf_q     (rf_q),
    .pc_q     (pc_q),
    .nr_q     (nr_q),
    .yr_q     (yr_q),
    .mdr_q    (mdr_q),
    .xbus     (xbus),
    .ybus     (ybus)
  );

  m270_alu u_alu (
    .passx  (ctrl.alu_passx),
    .passy  (ctrl.alu_passy),
    .add    (ctrl.alu_add),
    .and_op (ctrl.alu_and),
    .cmp    (ctrl.alu_cmp),
    .xbus   (xbus),
    .ybus   (ybus),
    .zbus   (zbus)
  );

  m270_flags u_flags (
    .clk     (clk),
    .rst     (rst),
    .alu_add (ctrl.alu_add),
    .zbus    (zbus),
    .nf      (nf),
    .zf      (zf)
  );

  m270_reg #(.WIDTH(W)) u_ir (
    .clk (clk), .rst (rst), .load (ctrl.ir_load), .d (zbus), .q (ir_q)
  );
  assign ir = ir_t'(ir_q);

  m270_regfile #(.NREGS(4)) u_rf (
    .clk   (clk),
    .rst   (rst),
    .ra    (ir.ra),
    .rb    (ir.rb),
    .asel  (ctrl.rf_asel),
    .dsel  (ctrl.rf_dsel),
    .load  (ctrl.rf_load),
    .zbus  (zbus),
    .inbus (dipsw),
    .rdata (rf_q)
  );

  m270_pc u_pc (
    .clk   (clk),
    .clear (ctrl.pc_clear),
    .load  (ctrl.pc_load),
    .inc   (ctrl.pc_inc),
    .zbus  (zbus),
    .pc    (pc_q)
  );

  m270_reg #(.WIDTH(W)) u_nr (
    .clk (clk), .rst (rst), .load (ctrl.nr_load), .d (zbus), .q (nr_q)
  );

  m270_reg #(.WIDTH(W)) u_yr (
    .clk (clk), .rst (rst), .load (ctrl.yr_load), .d (zbus), .q (yr_q)
  );

  m270_mdr u_mdr (
    .clk     (clk),
    .rst     (rst),
    .sel     (ctrl.mdr_sel),
    .load    (ctrl.mdr_load),
    .zbus    (zbus),
    .dinbus  (mem_din),
    .doutbus (mdr_q)
  );

  m270_reg #(.WIDTH(W)) u_mar (
    .clk (clk), .rst (rst), .load (ctrl.mar_load), .d (zbus), .q (mem_addr)
  );

  m270_reg #(.WIDTH(W)) u_outr (
    .clk (clk), .rst (rst), .load (ctrl.outr_load), .d (zbus), .q (outr)
  );

  assign mem_dout = mdr_q;

endmodule
