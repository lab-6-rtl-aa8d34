// Reaction timer: a memory-mapped 68000 peripheral that measures, in
// milliseconds, how long a person takes to flip a switch after an LED lights.
//
// The host writes {STOP, START} into bit 1 and bit 0 of the register at
// $B00000. Writing START=1, STOP=0 lights the LED and lets a 16-bit counter
// count 1000 Hz ticks. Flipping the stop switch presets STOP, which freezes the
// count, darkens the LED and pulls the active-low interrupt line. The host then
// reads the count from the same address (it appears on D15..D0 through a
// tri-state buffer), writes START=0, STOP=1 to withdraw the interrupt, and
// writes START=0, STOP=0 to clear the counter before the next test.
//
// Blocks, wired as in the lab's block diagram:
//   bus_interface   - address/strobe decoder, open-drain DTACK
//   start_stop_regs - START and STOP flip-flops clocked by write_reg
//   control_logic   - LED, counter enable, counter reset and interrupt
//   clock_divider   - PCLK to the 1000 Hz counting clock
//   ms_counter      - 16-bit millisecond counter
//   read_buffer     - drives the count onto D15..D0 during a read
//
// Ports: the 68000 bus (A23..A20, strobes, R/W, D15..D0, DTACK), the board
// clock PCLK, the stop switch, the LED and the interrupt line. rst is a
// power-on reset that this design adds: it leaves the timer idle
// (START=0, STOP=1), clears the counter and resets the divider.
// Timing: the register flip-flops are clocked by write_reg and the counter by
// the divided clock, as the diagram draws them; only the divider runs on PCLK.
// The count is read without synchronisation, so a read that lands on a tick
// edge while counting may see a changing value; the host reads after the
// interrupt, when the count is frozen.
module reaction_timer
  import reaction_timer_pkg::*;
#(
  parameter int unsigned PCLK_FREQ_HZ = PCLK_HZ,     // board clock setting
  parameter int unsigned TICK_FREQ_HZ = TICK_HZ,     // counting clock
  parameter int unsigned CNT_WIDTH    = COUNT_WIDTH  // reaction-time counter
) (
  input  logic                  pclk,     // programmable board clock
  input  logic                  rst,      // power-on reset, active high
  // 68000 bus
  input  logic [3:0]            addr_hi,  // A23..A20
  input  logic                  as_n,
  input  logic                  uds_n,
  input  logic                  lds_n,
  input  logic                  rw_n,
  inout  wire  [DATA_WIDTH-1:0] data,     // D15..D0
  output wire                   dtack_n,  // open drain
  output logic                  irqsf_n,  // interrupt request, active low
  // board I/O
  input  logic                  sw1,      // stop switch
  output logic                  led1_n    // stimulus LED, active low
);

  logic           read_reg;
  logic           write_reg;
  rt_mode_e       mode;
  logic           cnt_en;
  logic           cnt_rst;
  logic           cnt_clear;
  logic           clk_1khz;
  logic [CNT_WIDTH-1:0]  count;
  logic [DATA_WIDTH-1:0] count_bus;

  bus_interface u_bus (
    .addr_hi  (addr_hi),
    .as_n     (as_n),
    .uds_n    (uds_n),
    .lds_n    (lds_n),
    .rw_n     (rw_n),
    .read_reg (read_reg),
    .write_reg(write_reg),
    .dtack_n  (dtack_n)
  );

  start_stop_regs u_regs (
    .rst      (rst),
    .write_reg(write_reg),
    .d0       (data[0]),
    .d1       (data[1]),
    .sw_stop  (sw1),
    .mode     (mode)
  );

  control_logic u_ctrl (
    .mode   (mode),
    .cnt_en (cnt_en),
    .cnt_rst(cnt_rst),
    .led_n  (led1_n),
    .irq_n  (irqsf_n)
  );

  clock_divider #(
    .PCLK_HZ(PCLK_FREQ_HZ),
    .TICK_HZ(TICK_FREQ_HZ)
  ) u_div (
    .pclk   (pclk),
    .rst    (rst),
    .clk_out(clk_1khz)
  );

  ms_counter #(
    .WIDTH(CNT_WIDTH)
  ) u_cnt (
    .clk(clk_1khz),
    .rst(cnt_clear),
    .en (cnt_en),
    .q  (count)
  );

  // The counter is cleared by the clear mode and by the power-on reset.
  assign cnt_clear = cnt_rst || rst;

  // A counter narrower than the bus reads back zero-extended.
  assign count_bus = DATA_WIDTH'(count);

  read_buffer #(
    .WIDTH(DATA_WIDTH)
  ) u_rdbuf (
    .oe (read_reg),
    .a  (count_bus),
    .y  (data)
  );

endmodule
