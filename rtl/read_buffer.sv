// Tri-state read buffer between the counter and the host data bus.
//
// While oe (read_reg) is high the buffer drives the counter value onto the
// shared data lines D15..D0; otherwise its outputs are high impedance, so the
// host and other devices can drive the same lines. The parent connects the
// output to the bidirectional data bus, which also carries write data in.
// Follows the tri-state buffer of the lab's block diagram, enabled by
// read_reg. Timing: no clock.
module read_buffer #(
  parameter int unsigned WIDTH = 16
) (
  input  logic             oe,  // drive enable (read_reg)
  input  logic [WIDTH-1:0] a,   // value to drive (counter output)
  output wire  [WIDTH-1:0] y    // to the shared data bus D15..D0
);

  assign y = oe ? a : 'z;

endmodule
