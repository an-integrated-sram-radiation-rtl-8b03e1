// sram_array: BEHAVIOURAL MODEL of the 160 x 128 array of 6T SRAM cells.
// It stands for a full-custom analog macro and is not meant for synthesis.
//
// Each cell is one bit in cells[row][col]. The selected row (its word line
// high) drives its 128 values onto the bitlines (bl); a row with no word
// line leaves the bitlines at zero. On a clock edge, a cell whose word line
// and column write enable are both high takes its column write data.
//
// The array sits on its own supply, given as vddc_mv in millivolts. Reading
// at reduced supply can be destructive: a read (rd with a word line high)
// while vddc_mv < VDD_READ_MIN_MV leaves every cell of that row at a random
// value. This is why the chip is read only after the core supply is ramped
// back to nominal. Radiation is represented by the upset() task, which a
// testbench calls to flip one cell (a single-event upset); a multi-bit upset
// is several calls on neighbouring cells. Cell data is not lost at reduced
// supply, and no sensitivity versus supply is modelled.
// The geometry and the destructive-read behaviour follow the published
// description; the threshold (90% of the 1.8 V nominal) is this model's own.
module sram_array #(
  parameter int unsigned ROWS            = 160,
  parameter int unsigned COLS            = 128,
  parameter int unsigned VDD_W           = 11,
  parameter int unsigned VDD_READ_MIN_MV = 1620
) (
  input  logic             clk,
  input  logic [ROWS-1:0]  wl,
  input  logic [COLS-1:0]  col_we,
  input  logic [COLS-1:0]  col_wd,
  input  logic             rd,
  input  logic [VDD_W-1:0] vddc_mv,
  output logic [COLS-1:0]  bl
);
  logic [COLS-1:0] cells [ROWS];

  always_comb begin
    bl = '0;
    for (int unsigned r = 0; r < ROWS; r++)
      if (wl[r]) bl = bl | cells[r];
  end

  always @(posedge clk) begin
    for (int unsigned r = 0; r < ROWS; r++) begin
      if (wl[r]) begin
        if (rd && vddc_mv < VDD_W'(VDD_READ_MIN_MV)) begin
          for (int unsigned c = 0; c < COLS; c++)
            cells[r][c] <= 1'($urandom);
        end else begin
          for (int unsigned c = 0; c < COLS; c++)
            if (col_we[c]) cells[r][c] <= col_wd[c];
        end
      end
    end
  end

  // Flip one cell: a single-event upset at physical (row, col).
  task automatic upset(input logic [$clog2(ROWS)-1:0] row,
                         input logic [$clog2(COLS)-1:0] col);
    cells[row][col] <= ~cells[row][col];
  endtask

  // Read one cell directly, for testbenches.
  function automatic logic peek(input logic [$clog2(ROWS)-1:0] row,
                         input logic [$clog2(COLS)-1:0] col);
    return cells[row][col];
  endfunction
endmodule
