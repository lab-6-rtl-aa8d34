// Self-checking testbench for read_buffer.
//
// With oe high the buffer must put random values on the bus; with oe low it
// must let go, which shows as the bus following another driver, or reading
// all ones from the pull-ups when nobody drives.
module tb_read_buffer;

  logic        oe;
  logic [15:0] a;
  tri1  [15:0] bus;
  logic        other_en;
  logic [15:0] other;

  assign bus = other_en ? other : 'z;

  int checks = 0;
  int failures = 0;

  read_buffer dut (.oe, .a, .y(bus));

  task automatic check(input string what, input logic [15:0] exp);
    checks++;
    if (bus !== exp) begin
      failures++;
      $display("FAIL %s: bus %h expected %h", what, bus, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 300; i++) begin
      a = 16'($urandom);
      other = 16'($urandom);
      case (i % 3)
        0: begin oe = 1; other_en = 0; #10; check("driving", a); end
        1: begin oe = 0; other_en = 1; #10; check("released, other driver", other); end
        default: begin oe = 0; other_en = 0; #10; check("released, pulled up", 16'hFFFF); end
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
