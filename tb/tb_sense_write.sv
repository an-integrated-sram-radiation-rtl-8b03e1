// tb_sense_write: the sense latch captures on a Read edge and holds
// otherwise; Data Out is the latched word with Out Enable high and zero with
// it low; the write path drives Data In with the Write strobe; reset
// clears the latch.
module tb_sense_write;
  logic clk = 0, rst_n = 0, rd = 0, wr = 0, oe = 0, we;
  logic [15:0] din = '0, sensed = '0, wdata, dout;
  int checks = 0, failures = 0;

  sense_write dut (.clk(clk), .rst_n(rst_n), .rd(rd), .wr(wr), .din(din), .sensed(sensed), .oe(oe),
                   .we(we), .wdata(wdata), .dout(dout));

  always #5 clk = ~clk;

  task automatic check(input logic [15:0] got, input logic [15:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got=%h exp=%h", what, got, exp);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] held;
    @(negedge clk);
    oe = 1; #1;
    check(dout, 16'h0000, "latch cleared by reset");
    oe = 0; rst_n = 1;
    @(negedge clk);
    for (int i = 0; i < 100; i++) begin
      logic [15:0] v;
      v = 16'($urandom);
      sensed = v; rd = 1; oe = 0;
      @(negedge clk);
      rd = 0; sensed = ~v;
      check(dout, 16'h0000, "out disabled");
      oe = 1; #1;
      check(dout, v, "read latched");
      held = v;
      @(negedge clk);
      check(dout, held, "hold without read");
      din = 16'($urandom); wr = 1; #1;
      check({15'd0, we}, 16'd1, "we follows wr");
      check(wdata, din, "write data");
      wr = 0; #1;
      check({15'd0, we}, 16'd0, "we low");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
