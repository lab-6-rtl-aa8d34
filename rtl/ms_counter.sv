// Reaction-time counter: WIDTH-bit up-counter on the 1000 Hz clock.
//
// Counts one per rising edge of clk while en is high, so the value is the
// elapsed time in milliseconds; at 16 bits it reaches 65.535 s. rst clears it
// asynchronously, so a host write that selects the clear mode empties the
// counter at once rather than on the next millisecond edge. Past the largest
// value the count wraps to zero.
// The width, the clock rate and the enable and reset inputs follow the lab
// description; the asynchronous reset and wrapping are this design's choices.
module ms_counter #(
  parameter int unsigned WIDTH = 16
) (
  input  logic             clk, // 1000 Hz counting clock
  input  logic             rst, // asynchronous clear, active high
  input  logic             en,  // count enable
  output logic [WIDTH-1:0] q    // elapsed milliseconds
);

  always_ff @(posedge clk or posedge rst) begin
    if (rst)     q <= '0;
    else if (en) q <= q + 1'b1;
  end

endmodule
