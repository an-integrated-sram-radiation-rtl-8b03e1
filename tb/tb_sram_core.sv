// tb_sram_core: random reads and writes over the whole 1280-word address
// space (plus unused addresses) against a reference word array. Checks the
// one-cycle read (data latched at the Read edge), Out Enable gating, that
// a physical upset at row r, column 8b+c flips bit b of word 8r+c, and that
// a read at reduced core supply corrupts the row it reads. One copy of
// each triplicated decoder is forced wrong to show that the vote masks it.
module tb_sram_core;
  logic clk = 0, rst_n = 0, rd = 0, wr = 0, oe = 0;
  logic [10:0] addr = '0;
  logic [15:0] din = '0, dout;
  logic [10:0] vddc_mv = 11'd1800;
  logic [15:0] ref_mem [1280];
  logic        ref_ok  [1280];
  int checks = 0, failures = 0;

  sram_core dut (.clk(clk), .rst_n(rst_n), .addr(addr), .rd(rd), .wr(wr), .din(din), .oe(oe),
                 .dout(dout), .vddc_mv(vddc_mv));

  always #5 clk = ~clk;

  task automatic do_write(input int a, input logic [15:0] v);
    addr = 11'(a); din = v; wr = 1;
    @(negedge clk);
    wr = 0;
    if (a < 1280) begin ref_mem[a] = v; ref_ok[a] = 1'b1; end
  endtask

  task automatic do_read(input int a, output logic [15:0] v);
    addr = 11'(a); rd = 1;
    @(negedge clk);
    rd = 0; oe = 0; #1;
    checks++;
    if (dout !== 16'h0) begin failures++; $display("FAIL oe low shows data"); end
    oe = 1; #1;
    v = dout;
    oe = 0;
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] v;
    for (int a = 0; a < 1280; a++) ref_ok[a] = 1'b0;
    @(negedge clk);
    rst_n = 1;
    for (int a = 0; a < 1280; a++) do_write(a, 16'($urandom));
    for (int i = 0; i < 4000; i++) begin
      int a;
      a = $urandom_range(1279);
      if ($urandom_range(1)) do_write(a, 16'($urandom));
      else begin
        do_read(a, v);
        checks++;
        if (v !== ref_mem[a]) begin failures++; $display("FAIL read %0d got %h exp %h", a, v, ref_mem[a]); end
      end
    end
    // unused addresses: writes go nowhere, reads give zero
    do_write(1300, 16'hFFFF);
    do_read(1300, v);
    checks++;
    if (v !== 16'h0) begin failures++; $display("FAIL unused address read %h", v); end
    for (int a = 0; a < 1280; a++) begin
      do_read(a, v);
      checks++;
      if (v !== ref_mem[a]) begin failures++; $display("FAIL sweep %0d", a); end
    end
    // logical-to-physical mapping
    for (int i = 0; i < 100; i++) begin
      int r, c, b;
      r = $urandom_range(159); c = $urandom_range(7); b = $urandom_range(15);
      dut.u_array.upset(8'(r), 7'(b*8 + c));
      @(negedge clk);
      ref_mem[r*8 + c][b] = ~ref_mem[r*8 + c][b];
      do_read(r*8 + c, v);
      checks++;
      if (v !== ref_mem[r*8 + c]) begin failures++; $display("FAIL mapping r=%0d c=%0d b=%0d", r, c, b); end
    end
    // TMR decoders: one faulty copy of each decoder is outvoted
    force dut.g_dec[1].u_row_dec.wl = 160'd1 << 9;
    force dut.g_dec[2].u_col_dec.csel = 8'h80;
    for (int i = 0; i < 50; i++) begin
      int a;
      a = $urandom_range(1279);
      do_write(a, 16'($urandom));
      do_read(a, v);
      checks++;
      if (v !== ref_mem[a]) begin failures++; $display("FAIL TMR decoder %0d", a); end
    end
    release dut.g_dec[1].u_row_dec.wl;
    release dut.g_dec[2].u_col_dec.csel;
    for (int a = 0; a < 1280; a++) begin
      do_read(a, v);
      checks++;
      if (v !== ref_mem[a]) begin failures++; $display("FAIL after TMR decoder test %0d", a); end
    end
    // destructive read at 0.3 x Vdd
    vddc_mv = 11'd540;
    do_read(42*8 + 1, v);
    vddc_mv = 11'd1800;
    begin
      int diff;
      diff = 0;
      for (int c = 0; c < 8; c++) begin
        do_read(42*8 + c, v);
        if (v !== ref_mem[42*8 + c]) diff++;
      end
      checks++;
      if (diff == 0) begin failures++; $display("FAIL low-supply read left row intact"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
