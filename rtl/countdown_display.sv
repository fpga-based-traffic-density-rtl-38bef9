// countdown_display: two-digit countdown on two 7-segment displays.
//
// The seconds value (0..99) is split into tens and units by a small
// divide-by-ten, and each digit is encoded for a common-anode digit, where a
// segment lights when its line is low. Bit i of a digit output drives
// segment a..g for i = 0..6. When show is low both digits are dark (all
// lines high). A leading zero is shown as a dark tens digit, so 3 reads
// " 3". Values above 99 are shown as 99.
//
// Interface: value, show in; hex0 (units) and hex1 (tens) out.
// Timing: purely combinational.
//
// Two digits on HEX0 and HEX1 showing the remaining time of the green and
// yellow phases follow the design; the active-low segment polarity and
// the segment order are those of the common development boards of this
// kind, and the blanking rules are choices of this implementation.
module countdown_display
  import traffic_pkg::*;
(
  input  logic [SEC_W-1:0] value,
  input  logic             show,
  output logic [6:0]       hex0,
  output logic [6:0]       hex1
);

  localparam logic [6:0] SEG_OFF = 7'h7F;

  // Active-low segments {g,f,e,d,c,b,a} of one decimal digit.
  function automatic logic [6:0] seg(logic [3:0] digit);
    unique case (digit)
      4'd0:    return 7'b100_0000;
      4'd1:    return 7'b111_1001;
      4'd2:    return 7'b010_0100;
      4'd3:    return 7'b011_0000;
      4'd4:    return 7'b001_1001;
      4'd5:    return 7'b001_0010;
      4'd6:    return 7'b000_0010;
      4'd7:    return 7'b111_1000;
      4'd8:    return 7'b000_0000;
      4'd9:    return 7'b001_0000;
      default: return SEG_OFF;
    endcase
  endfunction

  logic [SEC_W-1:0] v;
  logic [3:0]       tens, units;

  always_comb begin
    v     = (value > SEC_W'(99)) ? SEC_W'(99) : value;
    tens  = 4'(v / SEC_W'(10));
    units = 4'(v - SEC_W'(tens) * SEC_W'(10));
    if (!show) begin
      hex0 = SEG_OFF;
      hex1 = SEG_OFF;
    end else begin
      hex0 = seg(units);
      hex1 = (tens == 4'd0) ? SEG_OFF : seg(tens);
    end
  end

endmodule
