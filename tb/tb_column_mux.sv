// tb_column_mux: random bitline and write patterns for each column select.
// The expected read bit b is bitline 8*b + col; the expected write enables
// are set exactly at columns 8*b + col when we is high, carrying wdata[b].
module tb_column_mux;
  logic [7:0]   csel;
  logic [127:0] bl, col_we, col_wd;
  logic [15:0]  sensed, wdata;
  logic         we;
  int checks = 0, failures = 0;

  column_mux dut (.csel(csel), .bl(bl), .sensed(sensed), .we(we), .wdata(wdata),
                  .col_we(col_we), .col_wd(col_wd));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 200; i++) begin
      int c;
      logic [15:0]  exp_s;
      logic [127:0] exp_we;
      c = i % 8;
      csel = 8'(1 << c);
      bl = {$urandom, $urandom, $urandom, $urandom};
      wdata = 16'($urandom);
      we = 1'($urandom);
      exp_we = '0;
      for (int b = 0; b < 16; b++) begin
        exp_s[b] = bl[b*8 + c];
        if (we) exp_we[b*8 + c] = 1'b1;
      end
      #1;
      checks++;
      if (sensed !== exp_s) begin
        failures++;
        $display("FAIL read col=%0d sensed=%h exp=%h", c, sensed, exp_s);
      end
      checks++;
      if (col_we !== exp_we) begin
        failures++;
        $display("FAIL write enables col=%0d", c);
      end
      for (int b = 0; b < 16; b++) begin
        checks++;
        if (col_wd[b*8 + c] !== wdata[b]) begin
          failures++;
          $display("FAIL write data col=%0d bit=%0d", c, b);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
