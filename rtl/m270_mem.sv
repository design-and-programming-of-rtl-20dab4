// m270_mem: primary memory of the M270 computer.
//
// A byte-wide static RAM with DEPTH locations (32 KB by default, the size of
// the board RAM; the ISA itself reaches only the first 256 bytes). Reading is
// asynchronous, like the SRAM chip and the distributed RAM used to simulate
// it: while read is high, dout shows the byte at addr in the same cycle, and
// MDR captures it at the next clock edge. Otherwise dout is 0 (the DATA bus
// is not driven). A write stores din at addr on the rising clock edge while
// write is high. The clocked write and the idle value are this design's
// choices; the specification describes the memory only by its size and bus
// widths. Contents are not reset: programs are loaded into the array before
// the computer is started.
module m270_mem #(
  parameter int unsigned DEPTH = 32768,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          read,
  input  logic          write,
  input  logic [AW-1:0] addr,
  input  logic [7:0]    din,
  output logic [7:0]    dout
);

  logic [7:0] mem [DEPTH];

  assign dout = read ? mem[addr] : 8'h00;

  always_ff @(posedge clk) begin
    if (write) mem[addr] <= din;
  end

  a_no_read_write: assert property (@(posedge clk) !(read && write))
    else $error("memory read and write in the same cycle");

endmodule
