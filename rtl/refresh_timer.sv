// refresh_timer: periodic clear signal for the function behaviour buffer.
//
// A BITS-wide counter is loaded with its maximum at reset and decremented
// every cycle. In the cycle it holds zero it reloads its maximum and raises
// expire for one cycle, so expire comes once every 2**BITS cycles; the
// buffer is cleared at that edge. The period, and hence BITS, is this
// design's choice: about one million cycles, the time scale over which the
// resized structures are meant to stay switched off.
module refresh_timer #(
  parameter int unsigned BITS = 20
) (
  input  logic            clk,
  input  logic            rst_n,
  output logic [BITS-1:0] value,
  output logic            expire
);

  assign expire = (value == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) value <= '1;
    else        value <= value - BITS'(1);   // wraps from 0 to all ones
  end

endmodule
