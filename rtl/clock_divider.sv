// Clock divider: derives the 1000 Hz counting clock from PCLK.
//
// A modulo-DIVISOR counter runs on PCLK; the output is registered high for the
// second half of each count period, giving a square wave of PCLK_HZ/TICK_HZ.
// With the default 1 MHz PCLK, DIVISOR = 1000 and the counter is 10 bits wide.
// The output rises on the PCLK edge where the count passes from
// DIVISOR/2-1 to DIVISOR/2, i.e. DIVISOR/2 PCLK cycles after reset and every
// DIVISOR cycles after that.
// The 1000 Hz target follows the lab description; the 1 MHz PCLK setting, the
// duty cycle and the synchronous reset are this design's own choices.
module clock_divider #(
  parameter int unsigned PCLK_HZ = 1_000_000, // input clock frequency
  parameter int unsigned TICK_HZ = 1000       // output clock frequency
) (
  input  logic pclk,   // programmable board clock
  input  logic rst,    // asynchronous reset, active high
  output logic clk_out // TICK_HZ square wave
);

  localparam int unsigned DIVISOR = PCLK_HZ / TICK_HZ;
  localparam int unsigned CW      = (DIVISOR > 1) ? $clog2(DIVISOR) : 1;

  initial begin
    assert (DIVISOR >= 2) else $error("clock_divider: PCLK_HZ must be at least 2*TICK_HZ");
  end

  logic [CW-1:0] count;
  logic [CW-1:0] count_next;

  always_comb begin
    if (count == CW'(DIVISOR - 1)) count_next = '0;
    else                           count_next = count + 1'b1;
  end

  always_ff @(posedge pclk or posedge rst) begin
    if (rst) begin
      count   <= '0;
      clk_out <= 1'b0;
    end else begin
      count   <= count_next;
      clk_out <= (count_next >= CW'(DIVISOR / 2));
    end
  end

endmodule
