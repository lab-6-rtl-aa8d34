// Self-checking testbench for control_logic.
//
// Applies each of the four {START, STOP} modes and compares the four outputs
// with the behaviour table of the reaction timer, written out literally here.
module tb_control_logic;
  import reaction_timer_pkg::*;

  rt_mode_e mode;
  logic     cnt_en, cnt_rst, led_n, irq_n;

  int checks = 0;
  int failures = 0;

  control_logic dut (.mode, .cnt_en, .cnt_rst, .led_n, .irq_n);

  // Expected {cnt_en, cnt_rst, led_n, irq_n}, indexed by {START, STOP}.
  localparam logic [3:0] EXPECTED [4] = '{
    4'b0111,  // 00: clear   - counter reset, LED off, no interrupt
    4'b0011,  // 01: idle    - all off, no interrupt
    4'b1001,  // 10: run     - counting, LED on
    4'b0010   // 11: stopped - frozen, LED off, interrupt
  };

  initial begin
    #10000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int rep = 0; rep < 3; rep++) begin
      for (int m = 0; m < 4; m++) begin
        int k;
        k = (rep == 1) ? 3 - m : m;  // also visit the modes in reverse order
        mode = rt_mode_e'(k);
        #10;
        checks++;
        if ({cnt_en, cnt_rst, led_n, irq_n} !== EXPECTED[k]) begin
          failures++;
          $display("FAIL mode %b: got %b expected %b", 2'(k),
                   {cnt_en, cnt_rst, led_n, irq_n}, EXPECTED[k]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
