// sram_radmon: SRAM radiation monitor chip.
//
// A 20480-bit SRAM (160 rows x 8 words x 16 bits) is written with a known
// pattern, left exposed with its core supply lowered to make its cells more
// sensitive, and read back at nominal supply; the number of flipped bits
// measures the particle fluence. This top joins the serial interface
// (serial_if) to the SRAM macro (sram_core).
//
// Pins: clk, rst_n, sen (shift enable), load (execute frame), sdi/sdo
// (serial data, daisy-chainable: sdo of one chip feeds sdi of the next),
// and vddc_mv, the level of the separate SRAM core supply in millivolts
// (nominal 1800). The digital interface runs from its own supply and is not
// affected by vddc_mv. See serial_if for the frame and its timing.
// Array size, word width, serial daisy-chained access, TMR and the separate
// core supply follow the chip description; the pin set and frame are this
// design's choices.
module sram_radmon
  import radmon_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             sen,
  input  logic             load,
  input  logic             sdi,
  output logic             sdo,
  input  logic [VDD_W-1:0] vddc_mv
);
  logic [ADDR_W-1:0] core_addr;
  logic              core_rd, core_wr, core_oe;
  logic [WORD_W-1:0] core_din, core_dout;

  serial_if u_sif (
    .clk(clk), .rst_n(rst_n), .sen(sen), .load(load), .sdi(sdi), .sdo(sdo),
    .core_addr(core_addr), .core_rd(core_rd), .core_wr(core_wr),
    .core_din(core_din), .core_oe(core_oe), .core_dout(core_dout)
  );

  sram_core u_core (
    .clk(clk), .rst_n(rst_n), .addr(core_addr), .rd(core_rd), .wr(core_wr), .din(core_din),
    .oe(core_oe), .dout(core_dout), .vddc_mv(vddc_mv)
  );
endmodule
