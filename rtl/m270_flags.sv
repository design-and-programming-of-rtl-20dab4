// m270_flags: the NF and ZF condition flag flip-flops.
//
// NF takes the sign bit of ZBUS and ZF is set when all eight ZBUS bits are
// zero. As in the datapath drawing, both flip-flops are enabled by the
// ALU_ADD control signal only, so they keep the result of the most recent
// addition performed in the ALU (including the Rb + n operand computation of
// every instruction). Updates happen on the rising clock edge; the
// synchronous reset clearing both flags is this design's choice.
module m270_flags
  import m270_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  logic  alu_add,
  input  byte_t zbus,
  output logic  nf,
  output logic  zf
);

  always_ff @(posedge clk) begin
    if (rst) begin
      nf <= 1'b0;
      zf <= 1'b0;
    end else if (alu_add) begin
      nf <= zbus[W-1];
      zf <= (zbus == '0);
    end
  end

endmodule
