// tb_m270_alu: self-checking test of the ALU.
// Drives every operation select with random and corner operands and compares
// ZBUS with the value computed here from the operation's definition.
module tb_m270_alu;
  import m270_pkg::*;

  logic  passx, passy, add, and_op, cmp;
  byte_t xbus, ybus, zbus, expect_z;
  int    checks = 0, failures = 0;

  m270_alu dut (.passx, .passy, .add, .and_op, .cmp, .xbus, .ybus, .zbus);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 3000; i++) begin
      int sel;
      sel = i % 6;
      xbus = (i < 36) ? byte_t'((i / 6) * 51) : byte_t'($urandom);
      ybus = (i < 36) ? byte_t'(255 - (i / 6) * 51) : byte_t'($urandom);
      {passx, passy, add, and_op, cmp} = '0;
      case (sel)
        0: begin passx  = 1; expect_z = xbus; end
        1: begin passy  = 1; expect_z = ybus; end
        2: begin add    = 1; expect_z = byte_t'((int'(xbus) + int'(ybus)) % 256); end
        3: begin and_op = 1; for (int b = 0; b < 8; b++) expect_z[b] = xbus[b] && ybus[b]; end
        4: begin cmp    = 1; expect_z = 8'hFF - xbus; end
        default: expect_z = 8'h00;
      endcase
      #1;
      checks++;
      if (zbus !== expect_z) begin
        failures++;
        $display("FAIL sel=%0d x=%02h y=%02h z=%02h expected %02h", sel, xbus, ybus, zbus, expect_z);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
