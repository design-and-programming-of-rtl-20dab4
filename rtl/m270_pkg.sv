// m270_pkg: types and constants shared by the M270 computer.
//
// M270 is an 8-bit stored-program computer with a 16-bit instruction: a first
// byte holding a 4-bit opcode, a 2-bit destination register field Ra and a
// 2-bit source register field Rb, and a second byte holding an 8-bit two's
// complement immediate n. The opcode values follow the instruction table of
// the M270 specification. The control word groups the datapath control
// signals of the specification (one field per signal, same names in lower
// case); how they are packed into a struct is this design's own choice.
package m270_pkg;

  localparam int unsigned W = 8;  // data and address width of the ISA

  typedef logic [W-1:0] byte_t;

  typedef enum logic [3:0] {
    OP_HALT = 4'h0,
    OP_BRU  = 4'h1,
    OP_BRN  = 4'h2,
    OP_BRZ  = 4'h3,
    OP_STR  = 4'h4,
    OP_INP  = 4'h5,
    OP_OUT  = 4'h6,
    OP_LDI  = 4'h7,
    OP_ADDR = 4'h8,
    OP_ANDR = 4'h9,
    OP_INVR = 4'hA,
    OP_LDR  = 4'hB,
    OP_ADDM = 4'hC,
    OP_ANDM = 4'hD,
    OP_INVM = 4'hE,
    OP_LDM  = 4'hF
  } opcode_e;

  // First instruction byte as held in IR.
  typedef struct packed {
    opcode_e    op;
    logic [1:0] ra;
    logic [1:0] rb;
  } ir_t;

  // Datapath control signals, one per row of the control signal table.
  typedef struct packed {
    logic alu_passx;
    logic alu_passy;
    logic alu_add;
    logic alu_and;
    logic alu_cmp;
    logic rf_asel;    // 1: Rb addresses RF, 0: Ra
    logic rf_dsel;    // 1: RF loads from INBUS (DIPSW), 0: from ZBUS
    logic rf_read;
    logic rf_load;
    logic pc_read;
    logic pc_load;
    logic pc_inc;
    logic pc_clear;
    logic ir_load;
    logic nr_read;
    logic nr_load;
    logic yr_read;
    logic yr_load;
    logic mar_load;
    logic mdr_sel;    // 1: MDR loads from ZBUS, 0: from DINBUS
    logic mdr_read;
    logic mdr_load;
    logic mem_read;
    logic mem_write;
    logic outr_load;
  } ctrl_t;

  localparam ctrl_t CTRL_NOP = '0;

  // Memory reference instructions use the memory operand Ym = MEM[Rb + n].
  function automatic logic is_mem_ref(opcode_e op);
    return op inside {OP_ADDM, OP_ANDM, OP_INVM, OP_LDM};
  endfunction

endpackage
