// m270_mdr: the memory data register, the data interface to primary memory.
//
// On the rising clock edge with MDR_LOAD high, MDR takes ZBUS when MDR_SEL is
// 1 and DINBUS (the data read from memory) when MDR_SEL is 0. Its content is
// always available as DOUTBUS; the datapath places it on YBUS with MDR_READ,
// and memory stores it on a MEM_WRITE. Reset to 0 is this design's choice.
module m270_mdr
  import m270_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  logic  sel,
  input  logic  load,
  input  byte_t zbus,
  input  byte_t dinbus,
  output byte_t doutbus
);

  always_ff @(posedge clk) begin
    if (rst)       doutbus <= '0;
    else if (load) doutbus <= sel ? zbus : dinbus;
  end

endmodule
