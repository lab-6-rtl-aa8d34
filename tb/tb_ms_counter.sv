// Self-checking testbench for ms_counter.
//
// Clocks the 16-bit counter with random enable, checks every step against a
// reference count, checks that an asynchronous reset clears it between clock
// edges, and runs it through 65535 and back to 0.
module tb_ms_counter;

  logic        clk = 0;
  logic        rst, en;
  logic [15:0] q;
  int unsigned ref_q;

  int checks = 0;
  int failures = 0;

  ms_counter dut (.clk, .rst, .en, .q);

  always #5 clk = !clk;

  task automatic check(input string what);
    checks++;
    if (q !== 16'(ref_q)) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, q, 16'(ref_q));
    end
  endtask

  initial begin
    #10_000_000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 0; rst = 1; ref_q = 0;
    #12;
    check("reset");
    rst = 0;
    // random enable
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      en = 1'($urandom);
      @(posedge clk); #1;
      if (en) ref_q++;
      check("count");
    end
    // asynchronous clear between edges
    @(negedge clk); #2;
    rst = 1; #1;
    ref_q = 0;
    check("async clear");
    @(posedge clk); #1;
    check("held in clear");
    @(negedge clk);
    rst = 0;
    // run to the top of the range and wrap
    en = 1;
    for (int i = 0; i < 65536 + 3; i++) begin
      @(posedge clk); #1;
      ref_q = (ref_q + 1) % 65536;
      if (ref_q < 4 || ref_q > 65532) check("near wrap");
    end
    en = 0;
    repeat (3) @(posedge clk);
    #1 check("enable low holds");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
