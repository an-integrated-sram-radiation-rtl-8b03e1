// tb_serial_if: drives the serial interface with a word-array core model.
// Sends write and read frames bit-serially, checks that the core sees
// exactly the framed address/data/strobe one cycle after load, that Out
// Enable follows one cycle later, that the response frame shifts out while
// the next frame shifts in, that sen/load are ignored while busy, and that an
// upset forced into one TMR copy of the shift register is voted away.
module tb_serial_if;
  import radmon_pkg::*;
  logic clk = 0, rst_n = 0, sen = 0, load = 0, sdi = 0, sdo;
  logic [ADDR_W-1:0] core_addr;
  logic core_rd, core_wr, core_oe;
  logic [WORD_W-1:0] core_din, core_dout, sa_q;
  logic [WORD_W-1:0] mem [WORDS];
  int checks = 0, failures = 0;
  int n_rd = 0, n_wr = 0;

  serial_if dut (.clk(clk), .rst_n(rst_n), .sen(sen), .load(load), .sdi(sdi), .sdo(sdo),
                 .core_addr(core_addr), .core_rd(core_rd), .core_wr(core_wr),
                 .core_din(core_din), .core_oe(core_oe), .core_dout(core_dout));

  // Core model: synchronous write, read latched at the Read edge, gated out.
  always_ff @(posedge clk) begin
    if (core_wr && core_addr < ADDR_W'(WORDS)) mem[core_addr] <= core_din;
    if (core_rd) sa_q <= (core_addr < ADDR_W'(WORDS)) ? mem[core_addr] : '0;
    if (core_rd) n_rd++;
    if (core_wr) n_wr++;
  end
  always_comb core_dout = core_oe ? sa_q : '0;

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // Shift one frame in (MSB first) and collect what comes out of sdo.
  task automatic shift_frame(input frame_t f, output frame_t got);
    sen = 1;
    for (int i = FRAME_W - 1; i >= 0; i--) begin
      sdi = f[i];
      got[i] = sdo;
      @(negedge clk);
    end
    sen = 0;
  endtask

  // load, then check the core strobes cycle by cycle.
  task automatic exec(input frame_t f);
    int rd0, wr0;
    rd0 = n_rd; wr0 = n_wr;
    load = 1;
    @(negedge clk);
    load = 0;
    sen = 1; // must be ignored while busy
    chk(core_rd == (f.cmd == CMD_READ) && core_wr == (f.cmd == CMD_WRITE) && !core_oe,
        "strobe one cycle after load");
    chk(core_addr == f.addr, "core address");
    if (f.cmd == CMD_WRITE) chk(core_din == f.data, "core write data");
    @(negedge clk);
    chk(!core_rd && !core_wr && core_oe, "out enable in capture cycle");
    @(negedge clk);
    sen = 0;
    chk(!core_oe && !core_rd && !core_wr, "idle after capture");
    chk(n_rd - rd0 == int'(f.cmd == CMD_READ) && n_wr - wr0 == int'(f.cmd == CMD_WRITE),
        "exactly one core access");
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    frame_t f, got, prev_resp;
    logic [WORD_W-1:0] ref_mem [WORDS];
    for (int a = 0; a < WORDS; a++) begin mem[a] = '0; ref_mem[a] = '0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(sdo == 1'b0, "reset clears shift register");
    prev_resp = '0;
    for (int i = 0; i < 300; i++) begin
      f.cmd  = (i < 60 || $urandom_range(1)) ? CMD_WRITE : CMD_READ;
      f.addr = ADDR_W'($urandom_range(63));
      f.data = WORD_W'($urandom);
      shift_frame(f, got);
      chk(got == prev_resp, "previous response shifted out");
      exec(f);
      prev_resp = f;
      if (f.cmd == CMD_READ) prev_resp.data = ref_mem[f.addr];
      else ref_mem[f.addr] = f.data;
      // the response now sits in the shift register
      chk(dut.sr_q == prev_resp, "response frame");
    end
    // TMR: corrupt one copy of the shift register, nothing visible
    force dut.u_sr.r1 = ~dut.u_sr.r1;
    #1;
    chk(dut.sr_q == prev_resp, "TMR masks one corrupted copy");
    release dut.u_sr.r1;
    @(negedge clk);
    chk(dut.u_sr.r1 == prev_resp, "TMR scrubs corrupted copy");
    f = '0;
    shift_frame(f, got);
    chk(got == prev_resp, "response after upset");
    $display("reads=%0d writes=%0d", n_rd, n_wr);
    chk(n_rd > 0 && n_wr > 0, "both commands exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
