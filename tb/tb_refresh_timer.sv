// tb_refresh_timer: the expire pulse must come once every 2**BITS cycles,
// the first one 2**BITS - 1 cycles after reset.
module tb_refresh_timer;
  localparam int unsigned BITS = 5;
  logic clk = 0, rst_n = 0;
  logic [BITS-1:0] value;
  logic expire;
  int checks = 0, failures = 0, last = -1, pulses = 0;

  refresh_timer #(.BITS(BITS)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int c = 0; c < 8 * (1 << BITS); c++) begin
      // c cycles after reset release
      if (expire !== (c % (1 << BITS) == (1 << BITS) - 1)) begin
        failures++; $display("cycle %0d: expire %0b", c, expire);
      end
      if (value !== BITS'((1 << BITS) - 1 - (c % (1 << BITS)))) failures++;
      checks++;
      if (expire) begin
        if (last >= 0 && c - last != (1 << BITS)) failures++;
        last = c; pulses++;
      end
      @(negedge clk);
    end
    if (pulses != 8) failures++;
    checks++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
