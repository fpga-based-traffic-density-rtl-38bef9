// tb_density_regs: self-checking test of the density register.
//
// Checks the reset value (all directions low, nothing seen), that a load
// replaces all four classes with the fields of the byte (West in [1:0] up
// to North in [7:6]), that values hold while load is low, and that reset
// clears them again.
module tb_density_regs;
  import traffic_pkg::*;

  logic                    clk = 1'b0;
  logic                    rst;
  logic                    load;
  logic [7:0]              byte_in;
  density_t [NUM_DIRS-1:0] density;
  logic [7:0]              raw;
  logic                    seen;

  int checks = 0, failures = 0;

  density_regs dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic expect_byte(logic [7:0] b);
    check(raw == b, $sformatf("raw %02h expected %02h", raw, b));
    check(density[DIR_WEST]  == density_t'(b[1:0]), "west field");
    check(density[DIR_SOUTH] == density_t'(b[3:2]), "south field");
    check(density[DIR_EAST]  == density_t'(b[5:4]), "east field");
    check(density[DIR_NORTH] == density_t'(b[7:6]), "north field");
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] cur;
    rst = 1'b1; load = 1'b0; byte_in = 8'hFF;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    @(negedge clk);
    expect_byte(8'h00);
    check(!seen, "nothing seen after reset");
    // Named example: N high, E medium, S low, W high(11).
    byte_in = {2'b10, 2'b01, 2'b00, 2'b11}; load = 1'b1;
    @(negedge clk); load = 1'b0;
    expect_byte(8'b10_01_00_11);
    check(density[DIR_NORTH] == DENS_HIGH && density[DIR_EAST] == DENS_MEDIUM &&
          density[DIR_SOUTH] == DENS_LOW && density[DIR_WEST] == DENS_HIGH2, "named classes");
    check(seen, "seen after a load");
    cur = 8'b10_01_00_11;
    for (int k = 0; k < 100; k++) begin
      byte_in = 8'($urandom);
      load = 1'($urandom);
      @(negedge clk);
      if (load) cur = byte_in;
      load = 1'b0;
      expect_byte(cur);
    end
    rst = 1'b1; @(negedge clk); rst = 1'b0;
    expect_byte(8'h00);
    check(!seen, "seen cleared by reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
