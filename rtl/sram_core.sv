// sram_core: the SRAM macro — address decoders, 160 x 8 x 16 cell array with
// column multiplexers, 16 sense amplifier + write slices and gated Data Out.
//
// The 11-bit address splits into a row A[10:3] (row_decoder, 160 word lines)
// and a column A[2:0] (col_decoder, one of 8 words in the row). Each access
// moves one 16-bit word. Word lines and column selects are only active while
// rd or wr is high.
//   Write: with wr high, din is written into the addressed word at the clock
//          edge.
//   Read:  with rd high, the addressed word is latched by the sense
//          amplifiers at the clock edge; dout shows it while oe is high and
//          is zero otherwise.
// Following the chip's rule that all digital logic is TMR protected, the
// decoders are triplicated and their outputs voted, and the sense latch is
// a tmr_reg. rd and wr must not both be high. vddc_mv is the separate core
// supply; the digital logic keeps working whatever its value, but reads
// below the read-safe level corrupt the row (see sram_array).
// The block structure follows the published architecture; clocked access is
// this design's choice.
module sram_core #(
  parameter int unsigned ROWS          = radmon_pkg::ROWS,
  parameter int unsigned WORDS_PER_ROW = radmon_pkg::WORDS_PER_ROW,
  parameter int unsigned WORD_W        = radmon_pkg::WORD_W,
  localparam int unsigned COLS   = WORDS_PER_ROW * WORD_W,
  localparam int unsigned COL_AW = $clog2(WORDS_PER_ROW),
  localparam int unsigned ROW_AW = $clog2(ROWS),
  localparam int unsigned AW     = ROW_AW + COL_AW
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [AW-1:0]     addr,
  input  logic              rd,
  input  logic              wr,
  input  logic [WORD_W-1:0] din,
  input  logic              oe,
  output logic [WORD_W-1:0] dout,
  input  logic [radmon_pkg::VDD_W-1:0] vddc_mv
);
  logic [ROWS-1:0]          wl;
  logic [WORDS_PER_ROW-1:0] csel;
  logic [COLS-1:0]          bl, col_we, col_wd;
  logic [WORD_W-1:0]        sensed, wdata;
  logic                     we;
  logic                     access;

  always_comb access = rd | wr;

  // Triplicated decoders with voted word lines and column selects (TMR).
  logic [ROWS-1:0]          wl_c   [3];
  logic [WORDS_PER_ROW-1:0] csel_c [3];

  for (genvar i = 0; i < 3; i++) begin : g_dec
    row_decoder #(.ROWS(ROWS), .AW(ROW_AW)) u_row_dec (
      .en(access), .row(addr[AW-1:COL_AW]), .wl(wl_c[i])
    );
    col_decoder #(.WORDS_PER_ROW(WORDS_PER_ROW)) u_col_dec (
      .en(access), .col(addr[COL_AW-1:0]), .csel(csel_c[i])
    );
  end

  tmr_vote #(.WIDTH(ROWS)) u_wl_vote (
    .a(wl_c[0]), .b(wl_c[1]), .c(wl_c[2]), .y(wl)
  );
  tmr_vote #(.WIDTH(WORDS_PER_ROW)) u_csel_vote (
    .a(csel_c[0]), .b(csel_c[1]), .c(csel_c[2]), .y(csel)
  );

  sram_array #(
    .ROWS(ROWS), .COLS(COLS), .VDD_W(radmon_pkg::VDD_W), .VDD_READ_MIN_MV(radmon_pkg::VDD_READ_MIN_MV)
  ) u_array (
    .clk(clk), .wl(wl), .col_we(col_we), .col_wd(col_wd),
    .rd(rd), .vddc_mv(vddc_mv), .bl(bl)
  );

  column_mux #(.WORD_W(WORD_W), .WORDS_PER_ROW(WORDS_PER_ROW)) u_col_mux (
    .csel(csel), .bl(bl), .sensed(sensed),
    .we(we), .wdata(wdata), .col_we(col_we), .col_wd(col_wd)
  );

  sense_write #(.WORD_W(WORD_W)) u_sense_write (
    .clk(clk), .rst_n(rst_n), .rd(rd), .wr(wr), .din(din), .sensed(sensed),
    .oe(oe), .we(we), .wdata(wdata), .dout(dout)
  );

  a_rd_wr_exclusive: assert property (@(posedge clk) !(rd && wr));
endmodule
