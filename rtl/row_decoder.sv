// row_decoder: binary row address A[10:3] to one-hot word line.
//
// When en is high, word line wl[row] is raised for row < ROWS; addresses
// ROWS..2^AW-1 raise no word line, so an access there reads nothing and
// writes nothing. When en is low all word lines are low (word lines are
// only driven during an access). Combinational.
// Row count (160) and the A[10:3] field follow the published architecture;
// the handling of unused addresses and the enable are this design's choices.
module row_decoder #(
  parameter int unsigned ROWS = 160,
  parameter int unsigned AW   = 8
) (
  input  logic          en,
  input  logic [AW-1:0] row,
  output logic [ROWS-1:0] wl
);
  always_comb begin
    wl = '0;
    for (int unsigned i = 0; i < ROWS; i++)
      if (en && row == AW'(i)) wl[i] = 1'b1;
  end
endmodule
