// column_mux: column multiplexers between the 128 bitline pairs and the 16
// sense amplifier / write slices.
//
// Each data bit b owns a group of WORDS_PER_ROW adjacent physical columns,
// 8b .. 8b+7, and the column select picks column 8b + A[2:0] of that group.
// Read side: sensed[b] is the bitline value of the selected column.
// Write side: when we is high, the selected column of every group gets a
// write enable and carries wdata[b]; all other columns are left alone.
// Combinational. The 16 groups of 8 columns follow the published
// architecture; which column within a group a given address uses (the
// logical-to-physical mapping) is this design's choice and matters when
// adjacent-cell multi-bit upsets are analysed.
module column_mux #(
  parameter int unsigned WORD_W        = 16,
  parameter int unsigned WORDS_PER_ROW = 8,
  localparam int unsigned COLS = WORD_W * WORDS_PER_ROW
) (
  input  logic [WORDS_PER_ROW-1:0] csel,
  input  logic [COLS-1:0]          bl,
  output logic [WORD_W-1:0]        sensed,
  input  logic                     we,
  input  logic [WORD_W-1:0]        wdata,
  output logic [COLS-1:0]          col_we,
  output logic [COLS-1:0]          col_wd
);
  always_comb begin
    for (int unsigned b = 0; b < WORD_W; b++) begin
      sensed[b] = |(bl[b*WORDS_PER_ROW +: WORDS_PER_ROW] & csel);
      col_we[b*WORDS_PER_ROW +: WORDS_PER_ROW] = we ? csel : '0;
      col_wd[b*WORDS_PER_ROW +: WORDS_PER_ROW] = {WORDS_PER_ROW{wdata[b]}};
    end
  end
endmodule
