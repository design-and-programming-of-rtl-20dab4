// tb_m270_mdr: self-checking test of the memory data register: loads from
// ZBUS (MDR_SEL = 1) or DINBUS (MDR_SEL = 0), holds when not loaded.
module tb_m270_mdr;
  import m270_pkg::*;

  logic  clk = 0, rst, sel, load;
  byte_t zbus, dinbus, doutbus, model;
  int    checks = 0, failures = 0;

  m270_mdr dut (.clk, .rst, .sel, .load, .zbus, .dinbus, .doutbus);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; sel = 0; load = 0; zbus = 0; dinbus = 0;
    @(posedge clk); #1 rst = 0;
    model = 0;
    for (int i = 0; i < 2000; i++) begin
      sel = $urandom_range(0, 1); load = $urandom_range(0, 1);
      zbus = byte_t'($urandom); dinbus = byte_t'($urandom);
      @(posedge clk); #1;
      if (load) model = sel ? zbus : dinbus;
      checks++;
      if (doutbus !== model) begin
        failures++;
        $display("FAIL mdr=%02h expected %02h sel=%0d", doutbus, model, sel);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
