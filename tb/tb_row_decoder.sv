// tb_row_decoder: every 8-bit row address with enable high and low; the
// word-line vector must be one-hot at the address for rows below 160 and
// all zero otherwise.
module tb_row_decoder;
  logic         en;
  logic [7:0]   row;
  logic [159:0] wl;
  int checks = 0, failures = 0;

  row_decoder dut (.en(en), .row(row), .wl(wl));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int e = 0; e < 2; e++) begin
      for (int r = 0; r < 256; r++) begin
        logic [159:0] exp;
        en = e[0]; row = 8'(r);
        exp = '0;
        if (e == 1 && r < 160) exp[r] = 1'b1;
        #1;
        checks++;
        if (wl !== exp) begin
          failures++;
          $display("FAIL en=%0d row=%0d", e, r);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
