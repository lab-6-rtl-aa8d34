// Combinational control of the reaction timer.
//
// Decodes the {START, STOP} mode into the four drive signals:
//   RUN     (1,0): LED lit, counter enabled
//   STOPPED (1,1): LED dark, counter held, interrupt requested
//   IDLE    (0,1): everything off, interrupt withdrawn
//   CLEAR   (0,0): counter held in reset
// Equations: cnt_en = START & ~STOP, led_n = ~cnt_en,
// irq_n = ~(START & STOP), cnt_rst = ~START & ~STOP.
// The meaning of each mode follows the lab description; the LED and the
// interrupt being active low follows its block diagram.
// Timing: no clock, outputs follow the mode after gate delay.
module control_logic
  import reaction_timer_pkg::*;
(
  input  rt_mode_e mode,    // {START, STOP}
  output logic     cnt_en,  // counter enable
  output logic     cnt_rst, // counter reset, active high
  output logic     led_n,   // stimulus LED, active low
  output logic     irq_n    // interrupt request to the host, active low
);

  always_comb begin
    cnt_en  = (mode == MODE_RUN);
    cnt_rst = (mode == MODE_CLEAR);
    led_n   = !(mode == MODE_RUN);
    irq_n   = !(mode == MODE_STOPPED);
  end

endmodule
