// tb_sram_array: writes random data into every row of the cell-array model
// through word lines and column write enables (partial-column writes
// included), reads the bitlines back against a reference copy, flips cells
// with upset(), and checks that a read at reduced core supply destroys only
// the row being read while a read at nominal supply leaves it intact.
module tb_sram_array;
  localparam int ROWS = 160, COLS = 128;
  logic clk = 0, rd = 0;
  logic [ROWS-1:0] wl = '0;
  logic [COLS-1:0] col_we = '0, col_wd = '0, bl;
  logic [10:0] vddc_mv = 11'd1800;
  logic [COLS-1:0] ref_mem [ROWS];
  int checks = 0, failures = 0;

  sram_array dut (.clk(clk), .wl(wl), .col_we(col_we), .col_wd(col_wd), .rd(rd),
                  .vddc_mv(vddc_mv), .bl(bl));

  always #5 clk = ~clk;

  function automatic logic [COLS-1:0] rnd128();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

  task automatic write_row(input int r, input logic [COLS-1:0] mask, input logic [COLS-1:0] v);
    wl = '0; wl[r] = 1'b1; col_we = mask; col_wd = v;
    @(negedge clk);
    wl = '0; col_we = '0;
    ref_mem[r] = (ref_mem[r] & ~mask) | (v & mask);
  endtask

  task automatic check_row(input int r, input string what);
    wl = '0; wl[r] = 1'b1; #1;
    checks++;
    if (bl !== ref_mem[r]) begin
      failures++;
      $display("FAIL %s row %0d", what, r);
    end
    wl = '0;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk);
    for (int r = 0; r < ROWS; r++) write_row(r, '1, rnd128());
    for (int r = 0; r < ROWS; r++) check_row(r, "full write");
    for (int r = 0; r < ROWS; r += 7) write_row(r, rnd128(), rnd128());
    for (int r = 0; r < ROWS; r++) check_row(r, "masked write");
    // no word line: bitlines low
    wl = '0; #1; checks++;
    if (bl !== '0) begin failures++; $display("FAIL idle bitlines"); end
    // upsets
    for (int i = 0; i < 50; i++) begin
      int r, c;
      r = $urandom_range(ROWS-1); c = $urandom_range(COLS-1);
      dut.upset(8'(r), 7'(c));
      @(negedge clk);
      ref_mem[r][c] = ~ref_mem[r][c];
      check_row(r, "upset");
      checks++;
      if (dut.peek(8'(r), 7'(c)) !== ref_mem[r][c]) begin failures++; $display("FAIL peek"); end
    end
    // read at nominal supply: harmless
    wl = '0; wl[3] = 1'b1; rd = 1;
    @(negedge clk);
    rd = 0; wl = '0;
    check_row(3, "nominal read");
    // read at reduced supply: row 5 destroyed, others intact
    vddc_mv = 11'd540;
    wl = '0; wl[5] = 1'b1; rd = 1;
    @(negedge clk);
    rd = 0; wl = '0;
    vddc_mv = 11'd1800;
    wl[5] = 1'b1; #1; checks++;
    if (bl === ref_mem[5]) begin failures++; $display("FAIL low-supply read not destructive"); end
    wl = '0;
    check_row(4, "neighbour row kept");
    check_row(6, "neighbour row kept");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
