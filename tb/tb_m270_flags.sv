// tb_m270_flags: self-checking test of the NF/ZF flag flip-flops.
// Drives random ZBUS values with ALU_ADD on and off and checks that the flags
// follow sign and zero-ness only on ALU_ADD cycles and hold otherwise.
module tb_m270_flags;
  import m270_pkg::*;

  logic  clk = 0, rst, alu_add;
  byte_t zbus;
  logic  nf, zf, exp_nf, exp_zf;
  int    checks = 0, failures = 0;

  m270_flags dut (.clk, .rst, .alu_add, .zbus, .nf, .zf);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; alu_add = 0; zbus = 8'hFF;
    @(posedge clk); #1;
    rst = 0;
    exp_nf = 0; exp_zf = 0;
    checks++; if (nf || zf) failures++;
    for (int i = 0; i < 1000; i++) begin
      alu_add = $urandom_range(0, 1);
      case (i % 4)
        0: zbus = 8'h00;
        1: zbus = 8'h80;
        default: zbus = byte_t'($urandom);
      endcase
      @(posedge clk); #1;
      if (alu_add) begin
        exp_nf = (zbus >= 8'h80);
        exp_zf = (zbus == 0);
      end
      checks++;
      if (nf !== exp_nf || zf !== exp_zf) begin
        failures++;
        $display("FAIL add=%0d z=%02h nf=%0d zf=%0d", alu_add, zbus, nf, zf);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
