// tb_m270_pc: self-checking test of the program counter: clear, load from
// ZBUS and increment (with wrap-around), in random order, against a model.
module tb_m270_pc;
  import m270_pkg::*;

  logic  clk = 0, clear, load, inc;
  byte_t zbus, pc, model;
  int    checks = 0, failures = 0, wraps = 0;

  m270_pc dut (.clk, .clear, .load, .inc, .zbus, .pc);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clear = 1; load = 0; inc = 0; zbus = 0;
    @(posedge clk); #1;
    model = 0;
    checks++; if (pc !== 0) failures++;
    // load FE, then increment through the wrap to 01
    clear = 0; load = 1; inc = 0; zbus = 8'hFE;
    @(posedge clk); #1;
    load = 0; inc = 1;
    repeat (3) @(posedge clk);
    #1;
    checks++; if (pc !== 8'h01) begin failures++; $display("FAIL wrap: pc=%02h", pc); end
    model = 8'h01;
    wraps++;
    for (int i = 0; i < 3000; i++) begin
      int r;
      r = $urandom_range(0, 19);
      clear = (r == 0);
      load  = (r inside {[1:3]});
      inc   = (r >= 3);
      zbus  = (r == 1) ? 8'hFE : byte_t'($urandom);
      @(posedge clk); #1;
      if (clear) model = 0;
      else if (load) model = zbus;
      else if (inc) begin
        if (model == 8'hFF) wraps++;
        model = (model == 8'hFF) ? 8'h00 : model + 8'd1;
      end
      checks++;
      if (pc !== model) begin
        failures++;
        $display("FAIL pc=%02h expected %02h (c%0d l%0d i%0d)", pc, model, clear, load, inc);
      end
    end
    checks++;
    if (wraps == 0) begin failures++; $display("FAIL no wrap-around seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
