// Self-checking testbench for clock_divider.
//
// Runs the divider at its default setting (1 MHz in, 1000 Hz out, a divisor
// of 1000) and at a small odd divisor (7). For each, it counts PCLK cycles and
// checks that the output rises DIVISOR/2 cycles after reset and every DIVISOR
// cycles after that, falls DIVISOR/2 cycles after each rise (rounded down),
// and that a reset in mid-period restarts the phase.
module tb_clock_divider;

  localparam int unsigned DIV_A = 1_000_000 / 1000;
  localparam int unsigned DIV_B = 7;

  logic pclk = 0;
  logic rst;
  logic out_a, out_b;

  int checks = 0;
  int failures = 0;

  clock_divider dut_a (.pclk, .rst, .clk_out(out_a));
  clock_divider #(.PCLK_HZ(7000), .TICK_HZ(1000)) dut_b (.pclk, .rst, .clk_out(out_b));

  always #500 pclk = !pclk;  // 1 MHz

  // Cycle counter since the last reset release, and edge bookkeeping.
  int n = 0;
  logic prev_a = 0, prev_b = 0;
  int rises_a = 0, rises_b = 0;

  task automatic expect_level(input string what, input logic got, input logic exp, input int cyc);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s at cycle %0d: got %b expected %b", what, cyc, got, exp);
    end
  endtask

  // Reference: after reset the output is high during cycles
  // [k*D + D/2, (k+1)*D) counted from the first edge after reset (n = 1).
  function automatic logic ref_level(input int cyc, input int unsigned d);
    return (cyc % int'(d)) >= int'(d / 2);
  endfunction

  always @(posedge pclk) begin
    if (!rst) begin
      n++;
      #1;
      expect_level("divide by 1000", out_a, ref_level(n, DIV_A), n);
      expect_level("divide by 7",    out_b, ref_level(n, DIV_B), n);
      if (out_a && !prev_a) rises_a++;
      if (out_b && !prev_b) rises_b++;
      prev_a = out_a;
      prev_b = out_b;
    end
  end

  initial begin
    #100_000_000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1;
    #1250;
    expect_level("reset a", out_a, 0, 0);
    expect_level("reset b", out_b, 0, 0);
    rst = 0;
    repeat (5300) @(negedge pclk);
    // reset in mid-period, then run again
    rst = 1; n = 0; prev_a = 0; prev_b = 0;
    #2000;
    expect_level("mid reset a", out_a, 0, 0);
    rst = 0;
    repeat (3700) @(negedge pclk);
    checks++;
    if (rises_a != 5 + 4 || rises_b < 1000) begin
      failures++;
      $display("FAIL edge counts: %0d rises of the 1000 Hz output, %0d of the /7 output",
               rises_a, rises_b);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
