// m270_buses: the XBUS and YBUS operand busses of the M270 datapath.
//
// In the original schematic each source drives a bus through a tri-state
// buffer; here each bus is a multiplexer selected by the read enables,
// which keeps the logic two-state and synthesizable in any fabric.
//   XBUS sources: RF (RF_READ), PC (PC_READ)
//   YBUS sources: NR (NR_READ), YR (YR_READ), MDR (MDR_READ)
// A bus with no enabled source reads 0. At most one source may drive a bus
// in any cycle (a bus conflict in the original); assertions check this.
module m270_buses
  import m270_pkg::*;
(
  input  logic  clk,
  input  logic  rf_read,
  input  logic  pc_read,
  input  logic  nr_read,
  input  logic  yr_read,
  input  logic  mdr_read,
  input  byte_t rf_q,
  input  byte_t pc_q,
  input  byte_t nr_q,
  input  byte_t yr_q,
  input  byte_t mdr_q,
  output byte_t xbus,
  output byte_t ybus
);

  always_comb begin
    xbus = '0;
    if (rf_read)      xbus = rf_q;
    else if (pc_read) xbus = pc_q;
  end

  always_comb begin
    ybus = '0;
    if (nr_read)       ybus = nr_q;
    else if (yr_read)  ybus = yr_q;
    else if (mdr_read) ybus = mdr_q;
  end

  a_xbus_one_driver: assert property (@(posedge clk) $onehot0({rf_read, pc_read}))
    else $error("XBUS driven by more than one source");
  a_ybus_one_driver: assert property (@(posedge clk) $onehot0({nr_read, yr_read, mdr_read}))
    else $error("YBUS driven by more than one source");

endmodule
