// uart_rx: serial receiver for the density byte sent by the host.
//
// Frame format is 8N1, least significant bit first, idle high. The line is
// first passed through a two-flop synchronizer. A falling edge starts a
// frame; the receiver waits half a bit time and checks that the start bit
// is still low (otherwise the edge was a glitch and it returns to idle),
// then samples the eight data bits and the stop bit one bit time apart,
// each in the middle of its bit cell.
//
// Interface: rx is the asynchronous serial input. data/valid present a
// byte for exactly one clock when a frame with a high stop bit has been
// received; a frame whose stop bit is low raises frame_err for one clock
// instead and its byte is dropped.
//
// Timing: CLKS_PER_BIT = CLK_HZ / BAUD clocks per bit. valid rises about
// 9.5 bit times (plus two synchronizer clocks) after the start edge, in the
// middle of the stop bit; the receiver is ready for the next start edge in
// the same clock.
//
// The design only says that densities travel from PC to FPGA over a UART
// serial link; the frame format, the baud rate (9600) and the board clock
// (50 MHz) are choices of this implementation.
module uart_rx #(
  parameter int unsigned CLK_HZ = 50_000_000,
  parameter int unsigned BAUD   = 9_600
) (
  input  logic       clk,
  input  logic       rst,        // synchronous, active high
  input  logic       rx,
  output logic [7:0] data,
  output logic       valid,
  output logic       frame_err
);

  localparam int unsigned CLKS_PER_BIT = CLK_HZ / BAUD;
  localparam int unsigned HALF_BIT     = CLKS_PER_BIT / 2;
  localparam int unsigned CNT_W        = $clog2(CLKS_PER_BIT + 1);

  typedef enum logic [1:0] {S_IDLE, S_START, S_DATA, S_STOP} state_t;

  state_t           state;
  logic [CNT_W-1:0] cnt;
  logic [2:0]       bit_idx;
  logic [7:0]       shreg;
  logic [1:0]       sync;
  logic             rx_s;

  initial begin
    assert (CLKS_PER_BIT >= 4)
      else $error("uart_rx: CLK_HZ/BAUD must be at least 4");
  end

  assign rx_s = sync[1];

  always_ff @(posedge clk) begin
    if (rst) begin
      sync      <= 2'b11;
      state     <= S_IDLE;
      cnt       <= '0;
      bit_idx   <= '0;
      shreg     <= '0;
      data      <= '0;
      valid     <= 1'b0;
      frame_err <= 1'b0;
    end else begin
      sync      <= {sync[0], rx};
      valid     <= 1'b0;
      frame_err <= 1'b0;
      unique case (state)
        S_IDLE: begin
          cnt <= '0;
          if (!rx_s) state <= S_START;
        end
        S_START: begin
          if (cnt == CNT_W'(HALF_BIT - 1)) begin
            cnt <= '0;
            if (!rx_s) begin
              bit_idx <= '0;
              state   <= S_DATA;
            end else begin
              state <= S_IDLE;
            end
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        S_DATA: begin
          if (cnt == CNT_W'(CLKS_PER_BIT - 1)) begin
            cnt   <= '0;
            shreg <= {rx_s, shreg[7:1]};
            if (bit_idx == 3'd7) state <= S_STOP;
            else                 bit_idx <= bit_idx + 1'b1;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        S_STOP: begin
          if (cnt == CNT_W'(CLKS_PER_BIT - 1)) begin
            cnt   <= '0;
            state <= S_IDLE;
            if (rx_s) begin
              data  <= shreg;
              valid <= 1'b1;
            end else begin
              frame_err <= 1'b1;
            end
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // A byte and a framing error are never reported in the same clock.
  assert property (@(posedge clk) disable iff (rst) !(valid && frame_err));

endmodule
