// START and STOP flip-flops: the whole state of the reaction timer.
//
// Both flip-flops are clocked by the rising edge of write_reg, so a host write
// to the timer register loads START from data bit 0 and STOP from data bit 1.
// STOP also has an asynchronous preset wired to the stop switch: while the
// switch reads 1, STOP is forced high at once, without waiting for a write.
// The mode output is {START, STOP} as a rt_mode_e value.
//
// Interface: write_reg acts as the clock, d0/d1 are the bus data bits, sw_stop
// is the switch. rst is a power-on reset added by this design (the lab text
// gives none): it clears START and presets STOP through the same preset pin
// as the switch, leaving the timer idle (LED off, no interrupt).
// Timing: mode changes on the rising edge of write_reg, while sw_stop or rst
// is high (STOP), and while rst is high (START), all independent of PCLK.
// In simulation the preset acts on its rising edge and on every write edge
// while it is held; a real preset flip-flop also holds STOP high between them,
// which gives the same result since nothing else changes STOP.
module start_stop_regs
  import reaction_timer_pkg::*;
(
  input  logic     rst,       // asynchronous power-on reset, active high
  input  logic     write_reg, // clock: rising edge loads d0/d1
  input  logic     d0,        // next START value
  input  logic     d1,        // next STOP value
  input  logic     sw_stop,   // stop switch, asynchronous preset of STOP
  output rt_mode_e mode       // {START, STOP}
);

  logic start_q;
  logic stop_q;
  logic stop_pre;

  assign stop_pre = sw_stop || rst;

  always_ff @(posedge write_reg or posedge rst) begin
    if (rst) start_q <= 1'b0;
    else     start_q <= d0;
  end

  always_ff @(posedge write_reg or posedge stop_pre) begin
    if (stop_pre) stop_q <= 1'b1;
    else          stop_q <= d1;
  end

  assign mode = rt_mode_e'({start_q, stop_q});

endmodule
