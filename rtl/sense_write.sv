// sense_write: the 16 sense amplifier + write logic slices and the Out
// Enable gating of Data Out.
//
// Read: on a clock edge with rd high, each slice latches the value on its
// selected column (the sense amplifier resolving the bitline difference),
// and holds it until the next read. The latch is a TMR register (tmr_reg)
// cleared by rst_n. Write: while wr is high the slices drive
// Data In onto the selected columns (we, wdata). Data Out shows the latched
// value while oe is high and is all zeros otherwise.
// Timing: read data is on dout from the clock edge that ends the Read cycle.
// The slice structure and the Read/Write/Data In/Out Enable/Data Out signals
// follow the published block diagram; the latching sense amplifier, its TMR
// protection, the clocking and the zero level of a disabled output are this design's choices.
module sense_write #(
  parameter int unsigned WORD_W = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              rd,
  input  logic              wr,
  input  logic [WORD_W-1:0] din,
  input  logic [WORD_W-1:0] sensed,
  input  logic              oe,
  output logic              we,
  output logic [WORD_W-1:0] wdata,
  output logic [WORD_W-1:0] dout
);
  logic [WORD_W-1:0] sa_q;

  // Sense latch, TMR protected like all digital state of the chip.
  tmr_reg #(.WIDTH(WORD_W)) u_sa (
    .clk(clk), .rst_n(rst_n), .en(rd), .d(sensed), .q(sa_q)
  );

  always_comb begin
    we    = wr;
    wdata = din;
    dout  = oe ? sa_q : '0;
  end
endmodule
