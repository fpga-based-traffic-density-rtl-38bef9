// tb_uart_rx: self-checking test of the serial receiver.
//
// Runs the receiver at 10 clocks per bit. A behavioural transmitter sends
// 8N1 frames with random bytes, back to back and with idle gaps, and the
// test checks that each frame yields exactly one valid pulse with the sent
// byte, that valid comes in the middle of the stop bit (9.5 bit times plus
// the two synchronizer clocks after the start edge, +-1 clock), that a
// frame with a low stop bit raises frame_err and no byte, and that a short
// low glitch on the idle line is ignored.
module tb_uart_rx;
  localparam int unsigned CLK_HZ = 1000;
  localparam int unsigned BAUD   = 100;
  localparam int unsigned CPB    = CLK_HZ / BAUD;

  logic       clk = 1'b0;
  logic       rst;
  logic       rx;
  logic [7:0] data;
  logic       valid, frame_err;

  int checks = 0, failures = 0;
  int n_valid = 0, n_err = 0;
  logic [7:0] last_data;
  longint cyc = 0, last_valid_cyc = 0, start_cyc = 0;

  uart_rx #(.CLK_HZ(CLK_HZ), .BAUD(BAUD)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (valid)     begin n_valid++; last_data = data; last_valid_cyc = cyc; end
    if (frame_err) n_err++;
  end

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic send(logic [7:0] b, bit stop_bit);
    @(negedge clk); rx = 1'b0; start_cyc = cyc;
    repeat (CPB) @(negedge clk);
    for (int i = 0; i < 8; i++) begin rx = b[i]; repeat (CPB) @(negedge clk); end
    rx = stop_bit; repeat (CPB) @(negedge clk);
    rx = 1'b1;
  endtask

  task automatic frame(logic [7:0] b, int gap);
    int v0, e0;
    longint lat;
    v0 = n_valid; e0 = n_err;
    send(b, 1'b1);
    repeat (gap) @(negedge clk);
    check(n_valid == v0 + 1, $sformatf("one valid per frame (byte %02h)", b));
    check(n_err == e0, "no frame error on good frame");
    check(last_data == b, $sformatf("byte %02h received as %02h", b, last_data));
    lat = last_valid_cyc - start_cyc;
    check(lat >= longint'(CPB*19/2 + 1) && lat <= longint'(CPB*19/2 + 4),
          $sformatf("valid latency %0d clocks", lat));
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int v0, e0;
    rx = 1'b1; rst = 1'b1;
    repeat (3) @(posedge clk);
    rst = 1'b0;
    repeat (5) @(negedge clk);
    frame(8'h00, 2);
    frame(8'hFF, 0);
    frame(8'hA5, 0);   // back to back
    frame(8'h1B, 7);
    for (int k = 0; k < 40; k++) frame(8'($urandom), int'($urandom_range(0, 12)));
    // Bad stop bit.
    v0 = n_valid; e0 = n_err;
    send(8'h3C, 1'b0);
    repeat (CPB) @(negedge clk);
    check(n_err == e0 + 1, "frame error flagged on low stop bit");
    check(n_valid == v0, "no byte from a bad frame");
    repeat (2*CPB) @(negedge clk);
    // Glitch shorter than half a bit.
    v0 = n_valid; e0 = n_err;
    rx = 1'b0; repeat (2) @(negedge clk); rx = 1'b1;
    repeat (12*CPB) @(negedge clk);
    check(n_valid == v0 && n_err == e0, "glitch ignored");
    frame(8'h5A, 3);
    // Reset in the middle of a frame, then a clean frame.
    @(negedge clk); rx = 1'b0; repeat (3*CPB) @(negedge clk);
    rst = 1'b1; rx = 1'b1; repeat (2) @(negedge clk); rst = 1'b0;
    repeat (3) @(negedge clk);
    v0 = n_valid;
    check(!valid && !frame_err, "outputs quiet after reset");
    frame(8'hC3, 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
