// Self-checking testbench for bus_interface.
//
// Walks every combination of A23..A20, AS, UDS, LDS and R/W (256 cases) and
// compares read_reg, write_reg and the open-drain DTACK line against a
// reference decode written here. DTACK is observed on a net with a pull-up,
// so "released" reads as 1 and "driven" as 0.
module tb_bus_interface;
  import reaction_timer_pkg::*;

  logic [3:0] addr_hi;
  logic       as_n, uds_n, lds_n, rw_n;
  logic       read_reg, write_reg;
  tri1        dtack_n;

  int checks = 0;
  int failures = 0;

  bus_interface dut (
    .addr_hi, .as_n, .uds_n, .lds_n, .rw_n, .read_reg, .write_reg, .dtack_n
  );

  task automatic check(input string what, input logic got, input logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: addr=%h as=%b uds=%b lds=%b rw=%b got %b expected %b",
               what, addr_hi, as_n, uds_n, lds_n, rw_n, got, exp);
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
    for (int v = 0; v < 256; v++) begin
      logic sel, exp_rd, exp_wr;
      {addr_hi, as_n, uds_n, lds_n, rw_n} = 8'(v);
      #10;
      sel    = (v >> 4) == 'hB && {as_n, uds_n, lds_n} == 3'b000;
      exp_rd = sel &&  rw_n;
      exp_wr = sel && !rw_n;
      check("read_reg",  read_reg,  exp_rd);
      check("write_reg", write_reg, exp_wr);
      check("dtack_n",   dtack_n,   !(exp_rd || exp_wr));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
