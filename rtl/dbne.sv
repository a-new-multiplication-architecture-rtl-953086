// dbne: double-base number encoder for a 6-bit flash ADC.
//
// The encoder turns the 63-bit thermometer code of the comparator bank into
// one DBNS term 2^b * 3^t that approximates the sampled voltage, with 9-bit
// signed binary and ternary exponents. It is a ROM encoder: the 1-to-0
// transition of the thermometer code selects one word line (row k when
// exactly k comparators are on), and the selected row drives the bit lines of
// b and t. Rows that are not selected contribute nothing (wired-OR).
//
// ROM contents: for level DV = 1..63 with V(DV) = 0.55 + (DV-1)*0.5/62 volts,
// the word holds the pair (b, t), -256 <= b, t <= 255, that minimises
// |V(DV) - 2^b 3^t|. Row 0 (input below the first comparator) repeats row 1.
// Each hex word is {b[8:0], t[8:0]}. The selection rule, exponent width and
// ROM structure follow the source design; the behaviour of row 0 and the
// hex file layout are this design's choices.
//
// Interface: therm in, x out (sign always 0: the ADC range is positive),
// level out (the binary level number, 0..63, for observation).
// Timing: purely combinational.
module dbne
  import dbns_pkg::*;
#(
  parameter string ROM_FILE = "rtl/dbne_rom.hex"
) (
  input  logic [62:0] therm,
  output dbns_t       x,
  output logic [5:0]  level
);

  localparam int unsigned ROWS = 64;

  logic [2*EXP_W-1:0] rom [ROWS];
  initial $readmemh(ROM_FILE, rom);

  // word lines: one-hot decode of the thermometer transition
  logic [ROWS-1:0] row;
  always_comb begin
    row[0] = ~therm[0];
    for (int k = 1; k < ROWS - 1; k++)
      row[k] = therm[k-1] & ~therm[k];
    row[ROWS-1] = therm[ROWS-2];
  end

  // bit lines: OR of the selected rows
  logic [2*EXP_W-1:0] word;
  always_comb begin
    word  = '0;
    level = '0;
    for (int k = 0; k < ROWS; k++)
      if (row[k]) begin
        word  = word | rom[k];
        level = level | 6'(k);
      end
  end

  assign x.s = 1'b0;
  assign x.b = word[2*EXP_W-1:EXP_W];
  assign x.t = word[EXP_W-1:0];

endmodule
