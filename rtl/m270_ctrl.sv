// m270_ctrl: the M270 controller, a Moore state machine that sequences the
// datapath through the instruction cycle.
//
// Top level (as in the specification's state diagram): Reset forces Idle;
// Idle waits for Start; then each instruction goes Fetch -> Generate Y ->
// Decode/Execute and returns to Fetch, except HALT, which returns to Idle.
// Each major phase is split into states that each perform register
// transfers the bus datapath supports in one clock cycle. An ALU transfer
// may share a cycle with a memory read or a PC increment, but two ALU
// transfers may not share one.
//
//   F0  MAR <- PC                      F3  MAR <- PC
//   F1  MDR <- MEM[MAR], PC <- PC + 1  F4  MDR <- MEM[MAR], PC <- PC + 1
//   F2  IR  <- MDR                     F5  NR  <- MDR
//   G0  YR  <- RF[Rb] + NR  (Yr; NF/ZF take this sum)
//   G1  MAR <- YR       } memory reference instructions only (ADDM, ANDM,
//   G2  MDR <- MEM[MAR] } INVM, LDM): YR becomes Ym
//   G3  YR  <- MDR      }
//   E0  the operation of the instruction table, then F0 (or Idle for HALT)
//   E1  INVR/INVM: RF[Ra] <- ~RF[Ra]     STR: MDR <- RF[Ra]
//   E2  STR: MEM[MAR] <- MDR
// The first three fetch rows follow the decomposition printed in the
// specification; the rest of the sequence is this design's own. Because the
// ALU's invert acts on XBUS and Yr sits on YBUS, INVR/INVM first copy Y into
// Ra and then invert Ra in place.
//
// Branch conditions: NF and ZF load on every ALU addition, so the Yr sum of
// G0 would overwrite the flags before a branch could test them. The
// controller therefore samples NF/ZF in G0, before they change, so that
// BRN/BRZ test the last addition of the previous instruction (for example
// the result of an ADDR or ADDM). This reading is this design's choice.
//
// Interface: clk, synchronous rst, start (one cycle in Idle starts the
// program at PC), the IR opcode, the flags; outputs the control word and
// idle (high in Idle). Cycle counts: fetch 6, generate Y 1 (4 for memory
// reference), execute 1, or 2 for INVR/INVM, 3 for STR.
module m270_ctrl
  import m270_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  logic  start,
  input  opcode_e op,     // opcode field of IR
  input  logic  nf,
  input  logic  zf,
  output ctrl_t ctrl,
  output logic  idle
);

  typedef enum logic [3:0] {
    S_IDLE, S_F0, S_F1, S_F2, S_F3, S_F4, S_F5,
    S_G0, S_G1, S_G2, S_G3, S_E0, S_E1, S_E2
  } state_e;

  state_e state, state_n;
  logic   take_q;   // branch condition sampled in G0

  always_ff @(posedge clk) begin
    if (rst) begin
      state  <= S_IDLE;
      take_q <= 1'b0;
    end else begin
      state <= state_n;
      if (state == S_G0) begin
        unique case (op)
          OP_BRU:  take_q <= 1'b1;
          OP_BRN:  take_q <= nf;
          OP_BRZ:  take_q <= zf;
          default: take_q <= 1'b0;
        endcase
      end
    end
  end

  // Next state.
  always_comb begin
    state_n = state;
    unique case (state)
      S_IDLE: if (start) state_n = S_F0;
      S_F0:   state_n = S_F1;
      S_F1:   state_n = S_F2;
      S_F2:   state_n = S_F3;
      S_F3:   state_n = S_F4;
      S_F4:   state_n = S_F5;
      S_F5:   state_n = S_G0;
      S_G0:   state_n = is_mem_ref(op) ? S_G1 : S_E0;
      S_G1:   state_n = S_G2;
      S_G2:   state_n = S_G3;
      S_G3:   state_n = S_E0;
      S_E0: begin
        if (op == OP_HALT) state_n = S_IDLE;
        else if (op inside {OP_STR, OP_INVR, OP_INVM}) state_n = S_E1;
        else state_n = S_F0;
      end
      S_E1:   state_n = (op == OP_STR) ? S_E2 : S_F0;
      S_E2:   state_n = S_F0;
      default: state_n = S_IDLE;
    endcase
  end

  // Control word for each state.
  always_comb begin
    ctrl = CTRL_NOP;
    ctrl.pc_clear = rst;
    unique case (state)
      S_IDLE: ;
      S_F0, S_F3: begin               // MAR <- PC
        ctrl.pc_read   = 1'b1;
        ctrl.alu_passx = 1'b1;
        ctrl.mar_load  = 1'b1;
      end
      S_F1, S_F4, S_G2: begin         // MDR <- MEM[MAR]
        ctrl.mem_read  = 1'b1;
        ctrl.mdr_sel   = 1'b0;
        ctrl.mdr_load  = 1'b1;
        ctrl.pc_inc    = (state != S_G2);
      end
      S_F2: begin                     // IR <- MDR
        ctrl.mdr_read  = 1'b1;
        ctrl.alu_passy = 1'b1;
        ctrl.ir_load   = 1'b1;
      end
      S_F5: begin                     // NR <- MDR
        ctrl.mdr_read  = 1'b1;
        ctrl.alu_passy = 1'b1;
        ctrl.nr_load   = 1'b1;
      end
      S_G0: begin                     // YR <- RF[Rb] + NR
        ctrl.rf_asel   = 1'b1;
        ctrl.rf_read   = 1'b1;
        ctrl.nr_read   = 1'b1;
        ctrl.alu_add   = 1'b1;
        ctrl.yr_load   = 1'b1;
      end
      S_G1: begin                     // MAR <- YR
        ctrl.yr_read   = 1'b1;
        ctrl.alu_passy = 1'b1;
        ctrl.mar_load  = 1'b1;
      end
      S_G3: begin                     // YR <- MDR
        ctrl.mdr_read  = 1'b1;
        ctrl.alu_passy = 1'b1;
        ctrl.yr_load   = 1'b1;
      end
      S_E0: begin
        unique case (op)
          OP_HALT: ;
          OP_BRU, OP_BRN, OP_BRZ: begin       // PC <- YR when taken
            ctrl.yr_read   = 1'b1;
            ctrl.alu_passy = 1'b1;
            ctrl.pc_load   = take_q;
          end
          OP_STR: begin                       // MAR <- YR
            ctrl.yr_read   = 1'b1;
            ctrl.alu_passy = 1'b1;
            ctrl.mar_load  = 1'b1;
          end
          OP_INP: begin                       // RF[Ra] <- DIPSW
            ctrl.rf_dsel   = 1'b1;
            ctrl.rf_load   = 1'b1;
          end
          OP_OUT: begin                       // OUTR <- RF[Ra]
            ctrl.rf_read   = 1'b1;
            ctrl.alu_passx = 1'b1;
            ctrl.outr_load = 1'b1;
          end
          OP_LDI: begin                       // RF[Ra] <- NR
            ctrl.nr_read   = 1'b1;
            ctrl.alu_passy = 1'b1;
            ctrl.rf_load   = 1'b1;
          end
          OP_ADDR, OP_ADDM: begin             // RF[Ra] <- RF[Ra] + YR
            ctrl.rf_read   = 1'b1;
            ctrl.yr_read   = 1'b1;
            ctrl.alu_add   = 1'b1;
            ctrl.rf_load   = 1'b1;
          end
          OP_ANDR, OP_ANDM: begin             // RF[Ra] <- RF[Ra] & YR
            ctrl.rf_read   = 1'b1;
            ctrl.yr_read   = 1'b1;
            ctrl.alu_and   = 1'b1;
            ctrl.rf_load   = 1'b1;
          end
          OP_INVR, OP_INVM, OP_LDR, OP_LDM: begin  // RF[Ra] <- YR
            ctrl.yr_read   = 1'b1;
            ctrl.alu_passy = 1'b1;
            ctrl.rf_load   = 1'b1;
          end
          default: ;
        endcase
      end
      S_E1: begin
        if (op == OP_STR) begin            // MDR <- RF[Ra]
          ctrl.rf_read   = 1'b1;
          ctrl.alu_passx = 1'b1;
          ctrl.mdr_sel   = 1'b1;
          ctrl.mdr_load  = 1'b1;
        end else begin                        // RF[Ra] <- ~RF[Ra]
          ctrl.rf_read   = 1'b1;
          ctrl.alu_cmp   = 1'b1;
          ctrl.rf_load   = 1'b1;
        end
      end
      S_E2: begin                             // MEM[MAR] <- MDR
        ctrl.mdr_read  = 1'b1;
        ctrl.mem_write = 1'b1;
      end
      default: ;
    endcase
  end

  assign idle = (state == S_IDLE);

  a_alu_onehot: assert property (@(posedge clk)
      $onehot0({ctrl.alu_passx, ctrl.alu_passy, ctrl.alu_add, ctrl.alu_and, ctrl.alu_cmp}))
    else $error("more than one ALU operation selected");

endmodule
