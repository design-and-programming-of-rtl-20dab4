// m270_pc: the M270 program counter.
//
// An 8-bit register with three synchronous operations from the control
// signal table: PC_CLEAR (PC = 0), PC_LOAD (PC = ZBUS) and PC_INC
// (PC = PC + 1, wrapping at 8 bits). The increment has its own adder so it
// can run alongside any bus transfer. The specification does not rank the
// three; here clear wins over load, and load over increment.
module m270_pc
  import m270_pkg::*;
(
  input  logic  clk,
  input  logic  clear,
  input  logic  load,
  input  logic  inc,
  input  byte_t zbus,
  output byte_t pc
);

  always_ff @(posedge clk) begin
    if (clear)      pc <= '0;
    else if (load)  pc <= zbus;
    else if (inc)   pc <= pc + 1'b1;
  end

endmodule
