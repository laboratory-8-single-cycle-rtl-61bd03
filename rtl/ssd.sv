// ssd: driver for a four-digit, common-anode seven-segment display.
//
// Shows a 16-bit value as four hexadecimal digits, one digit at a time: the
// two top bits of a free-running CNT_W-bit counter choose which digit is
// lit (each digit for 2**(CNT_W-2) clocks), its anode is driven low and the
// nibble is decoded to segments. an[i] lights digit i (digit 0 shows
// digits[3:0]); cat[0..6] are segments a..g; both are active low, as on the
// Digilent Basys boards.
module ssd #(
  parameter int unsigned CNT_W = 16
) (
  input  logic        clk,
  input  logic [15:0] digits,
  output logic [3:0]  an,
  output logic [6:0]  cat
);
  logic [CNT_W-1:0] cnt = '0;  // power-up value; no reset needed
  logic [1:0]       sel;
  logic [3:0]       nib;

  always_ff @(posedge clk) cnt <= cnt + 1'b1;

  assign sel = cnt[CNT_W-1 -: 2];
  assign nib = digits[sel*4 +: 4];
  assign an  = ~(4'b0001 << sel);

  // Segment patterns, bit 0 = a ... bit 6 = g, active low.
  always_comb begin
    case (nib)
      4'h0: cat = 7'b1000000;
      4'h1: cat = 7'b1111001;
      4'h2: cat = 7'b0100100;
      4'h3: cat = 7'b0110000;
      4'h4: cat = 7'b0011001;
      4'h5: cat = 7'b0010010;
      4'h6: cat = 7'b0000010;
      4'h7: cat = 7'b1111000;
      4'h8: cat = 7'b0000000;
      4'h9: cat = 7'b0010000;
      4'hA: cat = 7'b0001000;
      4'hB: cat = 7'b0000011;
      4'hC: cat = 7'b1000110;
      4'hD: cat = 7'b0100001;
      4'hE: cat = 7'b0000110;
      default: cat = 7'b0001110;  // F
    endcase
  end
endmodule
