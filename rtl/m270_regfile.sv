// m270_regfile: the M270 register file RF, four 8-bit registers R0..R3.
//
// A single port is shared by reads and writes. RF_ASEL picks the register
// address from the instruction fields (1: Rb, 0: Ra). RF_DSEL picks the data
// written (1: INBUS, the DIP switches; 0: ZBUS). The selected register is
// read combinationally onto rdata (the datapath gates it onto XBUS with
// RF_READ) and written on the rising clock edge when RF_LOAD is high, so a
// register may be read and rewritten in the same cycle. Clearing all
// registers on the synchronous reset is this design's choice.
module m270_regfile
  import m270_pkg::*;
#(
  parameter int unsigned NREGS = 4
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic [$clog2(NREGS)-1:0] ra,
  input  logic [$clog2(NREGS)-1:0] rb,
  input  logic                     asel,
  input  logic                     dsel,
  input  logic                     load,
  input  byte_t                    zbus,
  input  byte_t                    inbus,
  output byte_t                    rdata
);

  byte_t                     regs [NREGS];
  logic [$clog2(NREGS)-1:0]  addr;
  byte_t                     src;

  assign addr  = asel ? rb : ra;
  assign src   = dsel ? inbus : zbus;
  assign rdata = regs[addr];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < NREGS; i++) regs[i] <= '0;
    end else if (load) begin
      regs[addr] <= src;
    end
  end

endmodule
