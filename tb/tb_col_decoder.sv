// tb_col_decoder: every 3-bit column address with enable high and low;
// the select must be 1 << col when enabled and zero otherwise.
module tb_col_decoder;
  logic       en;
  logic [2:0] col;
  logic [7:0] csel;
  int checks = 0, failures = 0;

  col_decoder dut (.en(en), .col(col), .csel(csel));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int e = 0; e < 2; e++)
      for (int c = 0; c < 8; c++) begin
        en = e[0]; col = 3'(c);
        #1;
        checks++;
        if (csel !== (e == 1 ? 8'(1 << c) : 8'h00)) begin
          failures++;
          $display("FAIL en=%0d col=%0d csel=%b", e, c, csel);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
