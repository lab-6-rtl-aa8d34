// 68000 bus decoder for the reaction-timer register at $B00000.
//
// Purely combinational. A bus cycle selects the register when the upper
// address nibble A23..A20 equals B and the address strobe and both data
// strobes are low (a word access). R/W then tells a read (read_reg) from a
// write (write_reg). The data-transfer acknowledge is raised as soon as either
// select is active: dtack_n is an open-drain output that pulls the shared line
// low during a selected cycle and floats otherwise, so the board's pull-up
// and other slaves can share it.
//
// Interface: addr_hi = A23..A20, as_n/uds_n/lds_n/rw_n as on the 68000 bus.
// Timing: no clock; outputs follow the strobes after gate delay only.
// The decoding rule, the two select names and the open-drain DTACK follow the
// lab description; decoding only the upper nibble (so the register is mirrored
// across $B00000..$BFFFFF) is what that rule implies.
module bus_interface
  import reaction_timer_pkg::*;
(
  input  logic [3:0] addr_hi,   // A23..A20
  input  logic       as_n,      // address strobe, active low
  input  logic       uds_n,     // upper data strobe, active low
  input  logic       lds_n,     // lower data strobe, active low
  input  logic       rw_n,      // 1 = read, 0 = write
  output logic       read_reg,  // host reads the timer register
  output logic       write_reg, // host writes the timer register
  output wire        dtack_n    // open drain: 0 while selected, else high-Z
);

  logic selected;

  always_comb begin
    selected  = (addr_hi == REG_NIBBLE) && !as_n && !uds_n && !lds_n;
    read_reg  = selected &&  rw_n;
    write_reg = selected && !rw_n;
  end

  assign dtack_n = (read_reg || write_reg) ? 1'b0 : 1'bz;

endmodule
