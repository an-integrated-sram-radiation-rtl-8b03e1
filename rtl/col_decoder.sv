// col_decoder: column address A[2:0] to one-hot column-multiplexer select.
//
// With en high exactly one of the WORDS_PER_ROW select lines is high; with
// en low none is. Combinational. The 8 words per row and the A[2:0] field
// follow the published architecture; the enable is this design's choice.
module col_decoder #(
  parameter int unsigned WORDS_PER_ROW = 8,
  localparam int unsigned AW = $clog2(WORDS_PER_ROW)
) (
  input  logic                     en,
  input  logic [AW-1:0]            col,
  output logic [WORDS_PER_ROW-1:0] csel
);
  always_comb begin
    csel = '0;
    for (int unsigned i = 0; i < WORDS_PER_ROW; i++)
      if (en && col == AW'(i)) csel[i] = 1'b1;
  end
endmodule
