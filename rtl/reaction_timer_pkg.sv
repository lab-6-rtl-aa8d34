// Shared constants and types of the reaction timer.
//
// The timer keeps its whole state in two flip-flops, START and STOP, which the
// host writes through bit 0 and bit 1 of the timer register. The four values of
// {START, STOP} are the four modes of the timer, named here by rt_mode_e. The
// register sits at byte address $B00000; the bus interface decodes only the
// upper address nibble A23..A20, so REG_NIBBLE is the one constant that
// selects it. The 1000 Hz counting rate and the 16-bit count width follow the
// lab description; the PCLK frequency is this design's own choice (1 MHz, which
// lies inside the 392 kHz..90 MHz range of the board's programmable clock).
package reaction_timer_pkg;

  // Upper nibble (A23..A20) of the timer register address $B00000.
  localparam logic [3:0] REG_NIBBLE = 4'hB;

  // Width of the reaction-time counter and of the host data bus.
  localparam int unsigned COUNT_WIDTH = 16;
  localparam int unsigned DATA_WIDTH  = 16;

  // Frequencies of the programmable board clock and of the counting clock.
  localparam int unsigned PCLK_HZ = 1_000_000;
  localparam int unsigned TICK_HZ = 1000;

  // {START, STOP} as written by the host or forced by the stop switch.
  typedef enum logic [1:0] {
    MODE_CLEAR   = 2'b00,  // START=0 STOP=0: counter held in reset
    MODE_IDLE    = 2'b01,  // START=0 STOP=1: idle, interrupt withdrawn
    MODE_RUN     = 2'b10,  // START=1 STOP=0: LED on, counter counting
    MODE_STOPPED = 2'b11   // START=1 STOP=1: LED off, count frozen, interrupt
  } rt_mode_e;

endpackage
