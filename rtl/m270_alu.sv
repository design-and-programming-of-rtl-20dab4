// m270_alu: the M270 arithmetic and logic unit.
//
// Combinational. It drives ZBUS from the two operand busses according to one
// of five one-hot operation selects, as the control signal table defines them:
//   alu_passx  ZBUS = XBUS
//   alu_passy  ZBUS = YBUS
//   alu_add    ZBUS = XBUS + YBUS   (8-bit, carry discarded)
//   alu_and    ZBUS = XBUS & YBUS
//   alu_cmp    ZBUS = ~XBUS          (bitwise invert of XBUS)
// The specification names no carry or overflow output, so there is none.
// With no select asserted ZBUS is 0; that value and the priority among
// several selects (never issued by the controller, checked by an assertion)
// are this design's choices.
module m270_alu
  import m270_pkg::*;
(
  input  logic  passx,
  input  logic  passy,
  input  logic  add,
  input  logic  and_op,
  input  logic  cmp,
  input  byte_t xbus,
  input  byte_t ybus,
  output byte_t zbus
);

  always_comb begin
    zbus = '0;
    unique0 case (1'b1)
      passx:  zbus = xbus;
      passy:  zbus = ybus;
      add:    zbus = xbus + ybus;
      and_op: zbus = xbus & ybus;
      cmp:    zbus = ~xbus;
    endcase
  end

endmodule
