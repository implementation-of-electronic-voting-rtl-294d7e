// bin2bcd: converts an unsigned binary number into DIGITS decimal digits.
//
// Values larger than the DIGITS-digit maximum (9999 at the default) are
// clamped to it, so the display never shows a wrapped number. The
// conversion is the shift-and-add-3 ("double dabble") method unrolled into
// combinational logic: for each input bit, from the most significant down,
// every BCD digit of 5 or more has 3 added, then the whole BCD value shifts
// left by one and takes in the next bit. bcd[0] is the least significant
// digit. The original design asks for decimal counts on the display but
// does not say how they are converted; this converter is a choice made here.
module bin2bcd #(
  parameter int unsigned BIN_W  = 14,
  parameter int unsigned DIGITS = 4
) (
  input  logic [BIN_W-1:0] bin,
  output logic [3:0]       bcd [DIGITS]
);

  localparam longint unsigned MAXV = (10 ** DIGITS) - 1;

  logic [BIN_W-1:0]      clamped;
  logic [4*DIGITS-1:0]   acc;

  always_comb begin
    clamped = (64'(bin) > MAXV) ? BIN_W'(MAXV) : bin;
    acc     = '0;
    for (int b = BIN_W - 1; b >= 0; b--) begin
      for (int d = 0; d < DIGITS; d++)
        if (acc[4*d +: 4] >= 4'd5) acc[4*d +: 4] = acc[4*d +: 4] + 4'd3;
      acc = {acc[4*DIGITS-2:0], clamped[b]};
    end
    for (int d = 0; d < DIGITS; d++) bcd[d] = acc[4*d +: 4];
  end

endmodule
