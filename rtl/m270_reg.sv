// m270_reg: a parallel-load register loaded from ZBUS.
//
// Used for IR, NR, YR, MAR and OUTR. On the rising clock edge the register
// takes d when load is high and holds otherwise. The synchronous reset to 0
// follows the specification's statement that reset initialises PC "among
// other registers"; which registers that covers is this design's choice
// (all of them).
module m270_reg #(
  parameter int unsigned WIDTH = 8
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             load,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  always_ff @(posedge clk) begin
    if (rst)       q <= '0;
    else if (load) q <= d;
  end

endmodule
