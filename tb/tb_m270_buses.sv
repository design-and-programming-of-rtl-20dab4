// tb_m270_buses: self-checking test of the XBUS/YBUS source selection.
// Enables at most one source per bus per cycle (the datapath rule) and
// checks that each bus carries that source, or 0 with none enabled.
module tb_m270_buses;
  import m270_pkg::*;

  logic  clk = 0;
  logic  rf_read, pc_read, nr_read, yr_read, mdr_read;
  byte_t rf_q, pc_q, nr_q, yr_q, mdr_q, xbus, ybus, ex, ey;
  int    checks = 0, failures = 0;

  m270_buses dut (.clk, .rf_read, .pc_read, .nr_read, .yr_read, .mdr_read,
                  .rf_q, .pc_q, .nr_q, .yr_q, .mdr_q, .xbus, .ybus);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      int xs, ys;
      xs = $urandom_range(0, 2);
      ys = $urandom_range(0, 3);
      rf_q = byte_t'($urandom); pc_q = byte_t'($urandom);
      nr_q = byte_t'($urandom); yr_q = byte_t'($urandom); mdr_q = byte_t'($urandom);
      rf_read = (xs == 1); pc_read = (xs == 2);
      nr_read = (ys == 1); yr_read = (ys == 2); mdr_read = (ys == 3);
      ex = (xs == 1) ? rf_q : (xs == 2) ? pc_q : 8'h00;
      ey = (ys == 1) ? nr_q : (ys == 2) ? yr_q : (ys == 3) ? mdr_q : 8'h00;
      @(negedge clk);
      checks += 2;
      if (xbus !== ex) begin failures++; $display("FAIL xbus src %0d", xs); end
      if (ybus !== ey) begin failures++; $display("FAIL ybus src %0d", ys); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
