// tb_m270_regfile: self-checking test of the four-register file.
// Random reads and writes with random Ra/Rb, address select and data select
// (ZBUS or DIP switches) are checked against a shadow copy kept here.
module tb_m270_regfile;
  import m270_pkg::*;

  logic       clk = 0, rst, asel, dsel, load;
  logic [1:0] ra, rb, a;
  byte_t      zbus, inbus, rdata;
  byte_t      shadow [4];
  int         checks = 0, failures = 0;

  m270_regfile dut (.clk, .rst, .ra, .rb, .asel, .dsel, .load, .zbus, .inbus, .rdata);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; load = 0; asel = 0; dsel = 0; ra = 0; rb = 0; zbus = 0; inbus = 0;
    @(posedge clk); #1 rst = 0;
    for (int i = 0; i < 4; i++) shadow[i] = 0;
    for (int i = 0; i < 3000; i++) begin
      ra = 2'($urandom); rb = 2'($urandom);
      asel = $urandom_range(0, 1); dsel = $urandom_range(0, 1);
      load = $urandom_range(0, 1);
      zbus = byte_t'($urandom); inbus = byte_t'($urandom);
      a = asel ? rb : ra;
      #1;
      checks++;
      if (rdata !== shadow[a]) begin
        failures++;
        $display("FAIL read R%0d = %02h expected %02h", a, rdata, shadow[a]);
      end
      @(posedge clk);
      if (load) shadow[a] = dsel ? inbus : zbus;
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
