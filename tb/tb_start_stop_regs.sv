// Self-checking testbench for start_stop_regs.
//
// Drives random write pulses with random data bits, random stop-switch
// activity and an occasional reset, and compares {START, STOP} after every
// event with a reference model kept here: a write edge loads d0/d1, a high
// switch forces STOP to 1 at once and holds it, reset clears START and
// sets STOP (the idle mode).
// Also checks that data changes without a write edge change nothing.
module tb_start_stop_regs;
  import reaction_timer_pkg::*;

  logic     rst, write_reg, d0, d1, sw_stop;
  rt_mode_e mode;
  logic     ref_start, ref_stop;

  int checks = 0;
  int failures = 0;
  int presets = 0;

  start_stop_regs dut (.rst, .write_reg, .d0, .d1, .sw_stop, .mode);

  task automatic check(input string what);
    checks++;
    if (mode !== rt_mode_e'({ref_start, ref_stop})) begin
      failures++;
      $display("FAIL %s: got %b expected %b", what, mode, {ref_start, ref_stop});
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    write_reg = 0; d0 = 0; d1 = 0; sw_stop = 0;
    rst = 0; #1;   // raise reset after time zero so its edge is seen
    rst = 1; #10;
    ref_start = 0; ref_stop = 1;
    check("reset");
    rst = 0; #10;
    check("after reset");

    for (int i = 0; i < 2000; i++) begin
      case ($urandom_range(0, 9))
        0, 1, 2, 3, 4: begin  // host write
          d0 = 1'($urandom); d1 = 1'($urandom); #5;
          check("data without clock");
          write_reg = 1; #5;
          ref_start = d0; ref_stop = d1 | sw_stop;
          check("write");
          write_reg = 0; #5;
          d0 = 1'($urandom); d1 = 1'($urandom); #5;
          check("data after write");
        end
        5, 6, 7: begin  // switch toggles
          sw_stop = !sw_stop; #5;
          if (sw_stop) begin ref_stop = 1; presets++; end
          check("switch");
        end
        8: begin  // preset while the start bit is being set
          if (sw_stop) begin
            d0 = 1; d1 = 0; write_reg = 1; #5;
            ref_start = 1; ref_stop = 1;
            check("write during preset");
            write_reg = 0; #5;
          end
        end
        default: begin  // reset
          rst = 1; #5;
          ref_start = 0; ref_stop = 1;
          check("reset pulse");
          rst = 0; #5;
          check("reset release");
        end
      endcase
    end
    checks++;
    if (presets == 0) begin
      failures++;
      $display("FAIL the switch preset was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
