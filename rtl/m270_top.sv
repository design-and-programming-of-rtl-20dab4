// m270_top: the M270 computer: controller, datapath and primary memory.
//
// The controller drives the datapath's control signals from IR and the
// flags. MAR addresses the low byte of the 15-bit memory address bus; the
// seven upper address bits are tied to 0, as on the board, so programs see
// 256 bytes. The memory's data lines are split into a read path (DINBUS)
// and a write path (DOUTBUS, from MDR); the board's bidirectional DATA bus
// is shown here as data_bus, the value on it in each cycle (read data while
// MEM_READ is high, MDR otherwise), which is what the board's bar LED shows.
//
// Ports: clk, synchronous rst and a one-cycle start pulse (the three
// parallel-port signals); dipsw, the eight DIP switches; outr, the output
// register, with led[6:0] = outr[6:0] driving the seven-segment display
// (the MSB has no segment) and out_load high in the cycle OUTR is loaded;
// mem_addr and data_bus, the memory busses shown on the board LEDs; idle,
// high while the controller waits in Idle (after reset or HALT).
module m270_top
  import m270_pkg::*;
#(
  parameter int unsigned MEM_DEPTH = 32768
) (
  input  logic                          clk,
  input  logic                          rst,
  input  logic                          start,
  input  byte_t                         dipsw,
  output byte_t                         outr,
  output logic [6:0]                    led,
  output logic                          out_load,
  output logic [$clog2(MEM_DEPTH)-1:0]  mem_addr,
  output byte_t                         data_bus,
  output logic                          idle
);

  localparam int unsigned AW = $clog2(MEM_DEPTH);

  ctrl_t ctrl;
  ir_t   ir;
  logic  nf, zf;
  byte_t mar, dout, din;

  m270_ctrl u_ctrl (
    .clk   (clk),
    .rst   (rst),
    .start (start),
    .op    (ir.op),
    .nf    (nf),
    .zf    (zf),
    .ctrl  (ctrl),
    .idle  (idle)
  );

  m270_datapath u_dp (
    .clk      (clk),
    .rst      (rst),
    .ctrl     (ctrl),
    .ir       (ir),
    .nf       (nf),
    .zf       (zf),
    .mem_addr (mar),
    .mem_dout (dout),
    .mem_din  (din),
    .dipsw    (dipsw),
    .outr     (outr)
  );

  // Upper address bits grounded: only the first 256 bytes are reachable.
  assign mem_addr = AW'(mar);

  m270_mem #(.DEPTH(MEM_DEPTH)) u_mem (
    .clk   (clk),
    .read  (ctrl.mem_read),
    .write (ctrl.mem_write),
    .addr  (mem_addr),
    .din   (dout),
    .dout  (din)
  );

  assign data_bus = ctrl.mem_read ? din : dout;
  assign led      = outr[6:0];
  assign out_load = ctrl.outr_load;

endmodule
