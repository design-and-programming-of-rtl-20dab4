// tb_m270_reg: self-checking test of the load register (IR, NR, YR, MAR,
// OUTR): reset, load and hold with random data.
module tb_m270_reg;
  logic       clk = 0, rst, load;
  logic [7:0] d, q, model;
  int         checks = 0, failures = 0;

  m270_reg #(.WIDTH(8)) dut (.clk, .rst, .load, .d, .q);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 0; load = 1; d = 8'hA5;
    @(posedge clk); #1;
    rst = 1;
    @(posedge clk); #1;
    model = 0;
    checks++; if (q !== 0) begin failures++; $display("FAIL reset"); end
    for (int i = 0; i < 2000; i++) begin
      rst  = ($urandom_range(0, 49) == 0);
      load = $urandom_range(0, 1);
      d    = 8'($urandom);
      @(posedge clk); #1;
      if (rst) model = 0; else if (load) model = d;
      checks++;
      if (q !== model) begin
        failures++;
        $display("FAIL q=%02h expected %02h", q, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
