// End-to-end testbench for reaction_timer at its default parameters.
//
// Plays the host: it performs 68000-style word bus cycles to $B00000 (address
// on A23..A20, data, then AS/UDS/LDS low, wait for DTACK, release), and plays
// the person by raising the stop switch a random time after the LED lights.
// Each trial follows the host sequence of the design: clear the counter
// (START=0 STOP=0), start (START=1 STOP=0), wait for the interrupt, read the
// count, withdraw the interrupt (START=0 STOP=1).
//
// The expected count is computed here from PCLK cycles alone: with a 1 MHz
// PCLK the 1000 Hz clock rises 500 cycles after reset and every 1000 cycles
// after that, and every such edge while the timer runs adds one millisecond.
// Also checked: LED and interrupt levels in every mode, that DTACK and the data
// bus are left alone by cycles to other addresses and by byte accesses, that
// the count stays frozen while stopped, and one trial close to the 65.535 s
// limit of the 16-bit counter. Each mechanism is counted and must occur.
`timescale 1ns/1ps
module tb_reaction_timer;
  import reaction_timer_pkg::*;

  localparam int unsigned DIV      = PCLK_HZ / TICK_HZ;  // 1000
  localparam time         PCLK_T   = 1000ns;              // 1 MHz
  localparam int          TRIALS   = 8;

  logic        pclk = 0;
  logic        rst;
  logic [3:0]  addr_hi;
  logic        as_n, uds_n, lds_n, rw_n;
  tri1  [15:0] data;
  tri1         dtack_n;
  logic        irqsf_n;
  logic        sw1;
  logic        led1_n;

  logic        host_drive;
  logic [15:0] host_data;
  assign data = host_drive ? host_data : 'z;

  reaction_timer dut (
    .pclk, .rst, .addr_hi, .as_n, .uds_n, .lds_n, .rw_n,
    .data, .dtack_n, .irqsf_n, .sw1, .led1_n
  );

  always #(PCLK_T / 2) pclk = !pclk;

  int checks = 0;
  int failures = 0;

  // Mechanism counters.
  int n_clear = 0, n_start = 0, n_switch_stop = 0, n_irq = 0, n_read = 0;
  int n_irq_withdrawn = 0, n_ignored = 0, n_frozen = 0, n_led_on = 0;

  // Reference millisecond count, advanced on the cycles where the divided
  // clock rises, while the host has the timer running.
  longint unsigned ncyc = 0;
  int unsigned     ref_count = 0;
  logic            ref_running = 0;

  always @(posedge pclk) begin
    if (!rst) begin
      ncyc++;
      if (ncyc % DIV == DIV / 2 && ref_running) ref_count = (ref_count + 1) % 65536;
    end
  end

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d (%h) expected %0d (%h) at %0t", what, got, got, exp, exp, $time);
    end
  endtask

  // Bus cycles are placed a quarter PCLK period off the clock edges so that
  // the reference above sees host actions strictly between edges.
  task automatic bus_idle();
    as_n = 1; uds_n = 1; lds_n = 1; rw_n = 1; host_drive = 0; addr_hi = 4'h0;
  endtask

  task automatic bus_write(input logic [3:0] a, input logic [15:0] d,
                           input logic udsn = 0, input logic ldsn = 0, output logic acked);
    addr_hi = a; rw_n = 0; host_data = d; host_drive = 1;
    #20ns as_n = 0;
    #10ns uds_n = udsn; lds_n = ldsn;
    #30ns acked = !dtack_n;
    as_n = 1; uds_n = 1; lds_n = 1;
    #10ns host_drive = 0; rw_n = 1;
    #10ns;
  endtask

  task automatic bus_read(input logic [3:0] a, output logic [15:0] d,
                          input logic udsn = 0, input logic ldsn = 0, output logic acked);
    addr_hi = a; rw_n = 1; host_drive = 0;
    #20ns as_n = 0; uds_n = udsn; lds_n = ldsn;
    #40ns acked = !dtack_n; d = data;
    as_n = 1; uds_n = 1; lds_n = 1;
    #20ns;
  endtask

  task automatic to_quarter();
    @(posedge pclk);
    #(PCLK_T / 4);
  endtask

  task automatic host_write_reg(input logic start, input logic stop);
    logic ack;
    to_quarter();
    bus_write(REG_NIBBLE, {14'h0, stop, start}, 0, 0, ack);
    check("DTACK on register write", ack, 1);
  endtask

  task automatic host_read_count(output logic [15:0] v);
    logic ack;
    to_quarter();
    bus_read(REG_NIBBLE, v, 0, 0, ack);
    check("DTACK on register read", ack, 1);
    n_read++;
  endtask

  task automatic check_outputs(input string what, input logic led_on, input logic irq);
    check({what, ": LED"}, !led1_n, led_on);
    check({what, ": IRQ"}, !irqsf_n, irq);
  endtask

  // One reaction test with a reaction time of ms milliseconds plus sub_cyc
  // PCLK cycles.
  task automatic trial(input int unsigned ms, input int unsigned sub_cyc);
    logic [15:0] v;
    // clear the counter
    host_write_reg(0, 0);
    n_clear++;
    ref_count = 0;
    host_read_count(v);
    check("count after clear", v, 0);
    check_outputs("clear", 0, 0);
    // start
    host_write_reg(1, 0);
    ref_running = 1;
    n_start++;
    #1ns;
    check_outputs("running", 1, 0);
    if (!led1_n) n_led_on++;
    // the person reacts
    repeat (ms * DIV + sub_cyc) @(posedge pclk);
    #(PCLK_T / 4);
    sw1 = 1;
    ref_running = 0;
    n_switch_stop++;
    #1ns;
    check_outputs("stopped", 0, 1);
    if (!irqsf_n) n_irq++;
    // the host takes the interrupt some time later and reads the count
    repeat ($urandom_range(10, 3000)) @(posedge pclk);
    sw1 = 0;
    host_read_count(v);
    check("reaction time (ms)", v, ref_count);
    check("reaction time within 1 ms of the applied delay",
          32'(v >= 16'(ms) && v <= 16'(ms + 1)), 1);
    repeat (2 * DIV) @(posedge pclk);
    host_read_count(v);
    check("count frozen while stopped", v, ref_count);
    n_frozen++;
    // withdraw the interrupt
    host_write_reg(0, 1);
    #1ns;
    check_outputs("idle", 0, 0);
    if (irqsf_n) n_irq_withdrawn++;
    host_read_count(v);
    check("count kept in idle", v, ref_count);
  endtask

  // Cycles that must not touch the timer: other addresses, byte accesses,
  // and no address strobe.
  task automatic foreign_cycles();
    logic ack;
    logic [15:0] v;
    logic [1:0] mode_before;
    mode_before = {!led1_n, !irqsf_n};
    to_quarter();
    for (int a = 0; a < 16; a++) begin
      if (a == REG_NIBBLE) continue;
      bus_write(4'(a), 16'h0001, 0, 0, ack);
      check("no DTACK for another address (write)", ack, 0);
      bus_read(4'(a), v, 0, 0, ack);
      check("no DTACK for another address (read)", ack, 0);
      check("data bus released for another address", v, 16'hFFFF);
      n_ignored++;
    end
    bus_write(REG_NIBBLE, 16'h0001, 1, 0, ack);
    check("no DTACK for a lower-byte write", ack, 0);
    bus_write(REG_NIBBLE, 16'h0001, 0, 1, ack);
    check("no DTACK for an upper-byte write", ack, 0);
    bus_read(REG_NIBBLE, v, 1, 0, ack);
    check("no DTACK for a lower-byte read", ack, 0);
    n_ignored++;
    #1ns;
    check("foreign cycles leave the mode alone", {!led1_n, !irqsf_n}, mode_before);
  endtask

  initial begin
    #400s;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] v;
    bus_idle();
    sw1 = 0;
    host_data = 0;
    rst = 0;
    #1ns;          // raise reset after time zero so its edge is seen
    rst = 1;
    #(3 * PCLK_T + PCLK_T / 4);
    check_outputs("reset", 0, 0);
    rst = 0;
    host_read_count(v);
    check("count after reset", v, 0);

    foreign_cycles();
    for (int t = 0; t < TRIALS; t++) begin
      trial($urandom_range(120, 450), $urandom_range(0, DIV - 1));
      if (t == 2) foreign_cycles();
    end
    // a slow reaction close to the 16-bit limit of 65.535 s
    trial(65_000, $urandom_range(0, DIV - 1));
    foreign_cycles();

    begin
      string names[9] = '{"counter clear", "start", "switch stop", "interrupt",
                          "count read", "interrupt withdrawn", "frozen count",
                          "LED lit", "ignored bus cycle"};
      int counts[9];
      counts = '{n_clear, n_start, n_switch_stop, n_irq, n_read, n_irq_withdrawn,
                 n_frozen, n_led_on, n_ignored};
      for (int i = 0; i < 9; i++) begin
        $display("mechanism %-20s occurred %0d times", names[i], counts[i]);
        checks++;
        if (counts[i] == 0) begin
          failures++;
          $display("FAIL mechanism %s never occurred", names[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
