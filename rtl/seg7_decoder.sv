// Seven-segment character decoder for the error display.
//
// Maps a 5-bit character code to the segments {g,f,e,d,c,b,a} (bit 0 = a),
// active high. Codes 0-15 are the hexadecimal digits 0-9, A, b, C, d, E, F.
// Codes 16-21 are the symbols that introduce each field of an error record on
// the scrolling display (n, c, L, r, P) and a dash; every other code is blank.
// The symbols were chosen so that none of them looks like a hex digit.
// Purely combinational.
module seg7_decoder (
  input  logic [4:0] code,
  output logic [6:0] seg
);

  always_comb begin
    unique case (code)
      5'd0:  seg = 7'h3F;
      5'd1:  seg = 7'h06;
      5'd2:  seg = 7'h5B;
      5'd3:  seg = 7'h4F;
      5'd4:  seg = 7'h66;
      5'd5:  seg = 7'h6D;
      5'd6:  seg = 7'h7D;
      5'd7:  seg = 7'h07;
      5'd8:  seg = 7'h7F;
      5'd9:  seg = 7'h6F;
      5'd10: seg = 7'h77;  // A
      5'd11: seg = 7'h7C;  // b
      5'd12: seg = 7'h39;  // C
      5'd13: seg = 7'h5E;  // d
      5'd14: seg = 7'h79;  // E
      5'd15: seg = 7'h71;  // F
      5'd16: seg = 7'h54;  // n  number of errors
      5'd17: seg = 7'h58;  // c  read/write cycle count
      5'd18: seg = 7'h38;  // L  location (address)
      5'd19: seg = 7'h50;  // r  data read
      5'd20: seg = 7'h73;  // P  part of the test
      5'd21: seg = 7'h40;  // -  no error logged
      default: seg = 7'h00;
    endcase
  end

endmodule
