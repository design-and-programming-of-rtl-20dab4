// tb_m270_mem: self-checking test of primary memory at its full 32 KB size.
// Random writes and reads over the whole address range are checked against
// a sparse model; reads are combinational while read is high, and the data
// lines read 0 when read is low.
module tb_m270_mem;
  logic        clk = 0, read, write;
  logic [14:0] addr;
  logic [7:0]  din, dout;
  logic [7:0]  model [int];
  int          checks = 0, failures = 0;

  m270_mem dut (.clk, .read, .write, .addr, .din, .dout);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    read = 0; write = 0; addr = 0; din = 0;
    // write a known pattern at the two ends and random places
    for (int i = 0; i < 4000; i++) begin
      addr  = (i == 0) ? 15'h0000 : (i == 1) ? 15'h7FFF : 15'($urandom);
      din   = 8'($urandom);
      write = 1; read = 0;
      @(posedge clk); #1;
      model[int'(addr)] = din;
      write = 0;
    end
    for (int i = 0; i < 4000; i++) begin
      int k;
      void'(model.first(k));
      if (i > 0) begin
        k = $urandom_range(0, 32767);
        if (!model.exists(k)) void'(model.next(k));
        if (!model.exists(k)) void'(model.first(k));
      end
      addr = 15'(k);
      read = 1; #1;
      checks++;
      if (dout !== model[k]) begin
        failures++;
        $display("FAIL MEM[%04h] = %02h expected %02h", k, dout, model[k]);
      end
      read = 0; #1;
      checks++;
      if (dout !== 8'h00) begin failures++; $display("FAIL data not idle"); end
      @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
