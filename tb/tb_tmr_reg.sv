// tb_tmr_reg: checks the TMR register: reset value, load on en, hold when
// en is low, and that an upset forced into any one copy does not reach q
// and is scrubbed away at the next clock edge.
module tb_tmr_reg;
  localparam int W = 8;
  logic clk = 0, rst_n = 0, en = 0;
  logic [W-1:0] d = '0, q;
  int checks = 0, failures = 0;

  tmr_reg #(.WIDTH(W), .RESET_VAL(8'hA5)) dut (.clk(clk), .rst_n(rst_n), .en(en), .d(d), .q(q));

  always #5 clk = ~clk;

  task automatic check(input logic [W-1:0] exp, input string what);
    checks++;
    if (q !== exp) begin
      failures++;
      $display("FAIL %s: q=%h exp=%h", what, q, exp);
    end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    check(8'hA5, "reset");
    rst_n = 1;
    @(negedge clk);
    check(8'hA5, "hold after reset");
    for (int i = 0; i < 30; i++) begin
      logic [W-1:0] v;
      v = 8'($urandom);
      d = v; en = 1;
      @(negedge clk);
      en = 0; d = ~v;
      check(v, "load");
      @(negedge clk);
      check(v, "hold");
      // Upset one copy, then let the register run one clock.
      case (i % 3)
        0: force dut.r0 = ~v;
        1: force dut.r1 = ~v;
        default: force dut.r2 = ~v;
      endcase
      #1;
      check(v, "vote masks upset");
      case (i % 3)
        0: release dut.r0;
        1: release dut.r1;
        default: release dut.r2;
      endcase
      @(negedge clk);
      check(v, "after scrub");
      checks++;
      if (dut.r0 !== v || dut.r1 !== v || dut.r2 !== v) begin
        failures++;
        $display("FAIL scrub: copies %h %h %h exp %h", dut.r0, dut.r1, dut.r2, v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
