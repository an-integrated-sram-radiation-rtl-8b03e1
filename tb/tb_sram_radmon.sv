// tb_sram_radmon: end-to-end test of four daisy-chained monitor chips at
// full size (160 x 8 x 16 bits each), run by a host model that performs the
// supply readout cycle:
//   1. core supply at 1.8 V: write a reference pattern to all 1280 words of
//      every chip, read it back (no upsets expected);
//   2. measure: core supply lowered (V1 = 0.4 V, later V2 = 0.6 V), upsets
//      injected into the cell arrays: isolated single-bit upsets and
//      two-cell multi-bit upsets on physically adjacent cells;
//   3. core supply back to 1.8 V: read the whole array of every chip, build
//      the physical error bitmap (word 8r+c, bit b sits at row r, column
//      8b+c), group adjacent errors into clusters and count single (SEU)
//      and multi-cell (MBU) events, which must equal what was injected;
//      rewrite the corrupted words.
// It also forces one TMR copy of a shift register while the chain is idle
// and checks that no data changes, and shows that a read done at reduced
// core supply corrupts the row it reads. Every mechanism must be seen at
// least once. The host shifts 4 x 29 bits per command; the frame for the
// last chip in the chain goes first.
module tb_sram_radmon;
  import radmon_pkg::*;
  localparam int NCHIP = 4;
  localparam int CHAIN_W = NCHIP * FRAME_W;

  logic clk = 0, rst_n = 0, sen = 0, load = 0, sdi = 0;
  logic [VDD_W-1:0] vddc_mv = VDD_W'(VDD_NOM_MV);
  logic [NCHIP:0] chain;

  always_comb chain[0] = sdi;

  for (genvar k = 0; k < NCHIP; k++) begin : g_chip
    sram_radmon u_chip (.clk(clk), .rst_n(rst_n), .sen(sen), .load(load),
                        .sdi(chain[k]), .sdo(chain[k+1]), .vddc_mv(vddc_mv));
  end

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cycles = 0;
  always @(posedge clk) cycles++;

  // mechanism counters
  int m_write = 0, m_read = 0, m_chain = 0, m_seu = 0, m_mbu = 0;
  int m_measure = 0, m_destructive = 0, m_tmr = 0;

  logic [WORD_W-1:0] pattern [NCHIP][WORDS];
  logic [WORD_W-1:0] rdback  [NCHIP][WORDS];
  bit               used    [NCHIP][ROWS][COLS];
  int inj_seu[NCHIP], inj_mbu[NCHIP];

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // One command for every chip: shift in, collect the previous responses,
  // load, wait out the two busy cycles.
  task automatic command(input frame_t f [NCHIP], output frame_t resp [NCHIP]);
    logic [CHAIN_W-1:0] out_bits, in_bits;
    for (int k = 0; k < NCHIP; k++) in_bits[k*FRAME_W +: FRAME_W] = f[k];
    sen = 1;
    for (int i = CHAIN_W - 1; i >= 0; i--) begin
      sdi = in_bits[i];
      out_bits[i] = chain[NCHIP];
      @(negedge clk);
    end
    sen = 0;
    for (int k = 0; k < NCHIP; k++) resp[k] = frame_t'(out_bits[k*FRAME_W +: FRAME_W]);
    load = 1;
    @(negedge clk);
    load = 0;
    repeat (2) @(negedge clk);
  endtask

  // Write every word of every chip from pattern[].
  task automatic write_all();
    frame_t f [NCHIP], r [NCHIP];
    for (int a = 0; a < WORDS; a++) begin
      for (int k = 0; k < NCHIP; k++) f[k] = '{cmd: CMD_WRITE, addr: ADDR_W'(a), data: pattern[k][a]};
      command(f, r);
      m_write += NCHIP;
    end
  endtask

  // Read every word of every chip into rdback[]; responses arrive one
  // command later, so a final NOP collects the last one.
  task automatic read_all();
    frame_t f [NCHIP], r [NCHIP];
    for (int a = 0; a <= WORDS; a++) begin
      for (int k = 0; k < NCHIP; k++)
        f[k] = (a < WORDS) ? '{cmd: CMD_READ, addr: ADDR_W'(a), data: '0} : '0;
      command(f, r);
      if (a > 0) begin
        for (int k = 0; k < NCHIP; k++) begin
          chk(r[k].cmd == CMD_READ && r[k].addr == ADDR_W'(a - 1), "response header");
          rdback[k][a-1] = r[k].data;
        end
        m_read += NCHIP;
        m_chain++;
      end
    end
  endtask

  task automatic upset_cell(input int k, input int r, input int c);
    case (k)
      0: g_chip[0].u_chip.u_core.u_array.upset(8'(r), 7'(c));
      1: g_chip[1].u_chip.u_core.u_array.upset(8'(r), 7'(c));
      2: g_chip[2].u_chip.u_core.u_array.upset(8'(r), 7'(c));
      default: g_chip[3].u_chip.u_core.u_array.upset(8'(r), 7'(c));
    endcase
  endtask

  function automatic bit region_free(input int k, input int r0, input int c0, input int r1, input int c1);
    for (int r = r0 - 1; r <= r1 + 1; r++)
      for (int c = c0 - 1; c <= c1 + 1; c++)
        if (r >= 0 && r < ROWS && c >= 0 && c < COLS && used[k][r][c]) return 0;
    return 1;
  endfunction

  // Exposure: inject n_seu isolated upsets and n_mbu two-cell upsets per chip.
  task automatic expose(input int n_seu, input int n_mbu);
    for (int k = 0; k < NCHIP; k++) begin
      for (int r = 0; r < ROWS; r++) for (int c = 0; c < COLS; c++) used[k][r][c] = 0;
      inj_seu[k] = 0; inj_mbu[k] = 0;
      while (inj_seu[k] < n_seu) begin
        int r, c;
        r = $urandom_range(ROWS-1); c = $urandom_range(COLS-1);
        if (region_free(k, r, c, r, c)) begin
          used[k][r][c] = 1; upset_cell(k, r, c); inj_seu[k]++;
          @(negedge clk);
        end
      end
      while (inj_mbu[k] < n_mbu) begin
        int r, c, dr, dc;
        bit horiz;
        horiz = 1'($urandom);
        dr = horiz ? 0 : 1; dc = horiz ? 1 : 0;
        r = $urandom_range(ROWS-1-dr); c = $urandom_range(COLS-1-dc);
        if (region_free(k, r, c, r + dr, c + dc)) begin
          used[k][r][c] = 1; used[k][r+dr][c+dc] = 1;
          upset_cell(k, r, c); upset_cell(k, r + dr, c + dc); inj_mbu[k]++;
          @(negedge clk);
        end
      end
    end
  endtask

  // Back-end analysis: physical error bitmap, 8-connected clusters.
  task automatic analyse(output int seu [NCHIP], output int mbu [NCHIP], output int bits [NCHIP]);
    for (int k = 0; k < NCHIP; k++) begin
      bit err [ROWS][COLS];
      bit seen [ROWS][COLS];
      seu[k] = 0; mbu[k] = 0; bits[k] = 0;
      for (int r = 0; r < ROWS; r++) for (int c = 0; c < COLS; c++) begin err[r][c] = 0; seen[r][c] = 0; end
      for (int a = 0; a < WORDS; a++) begin
        logic [WORD_W-1:0] x;
        x = rdback[k][a] ^ pattern[k][a];
        for (int b = 0; b < WORD_W; b++)
          if (x[b]) begin err[a / WORDS_PER_ROW][b * WORDS_PER_ROW + a % WORDS_PER_ROW] = 1; bits[k]++; end
      end
      for (int r = 0; r < ROWS; r++) for (int c = 0; c < COLS; c++)
        if (err[r][c] && !seen[r][c]) begin
          int size, qr [$], qc [$];
          size = 0;
          qr.push_back(r); qc.push_back(c); seen[r][c] = 1;
          while (qr.size() > 0) begin
            int rr, cc;
            rr = qr.pop_front(); cc = qc.pop_front(); size++;
            for (int i = -1; i <= 1; i++) for (int j = -1; j <= 1; j++) begin
              int nr, nc;
              nr = rr + i; nc = cc + j;
              if (nr >= 0 && nr < ROWS && nc >= 0 && nc < COLS && err[nr][nc] && !seen[nr][nc]) begin
                seen[nr][nc] = 1; qr.push_back(nr); qc.push_back(nc);
              end
            end
          end
          if (size == 1) seu[k]++; else mbu[k]++;
        end
    end
  endtask

  // Rewrite only the words that differ from the pattern.
  task automatic scrub();
    frame_t f [NCHIP], r [NCHIP];
    for (int a = 0; a < WORDS; a++) begin
      bit any;
      any = 0;
      for (int k = 0; k < NCHIP; k++) begin
        if (rdback[k][a] != pattern[k][a]) begin
          f[k] = '{cmd: CMD_WRITE, addr: ADDR_W'(a), data: pattern[k][a]};
          any = 1;
        end else f[k] = '0;
      end
      if (any) begin
        command(f, r);
        m_write++;
      end
    end
  endtask

  task automatic readout_cycle(input int vlow_mv, input int n_seu, input int n_mbu);
    int seu [NCHIP], mbu [NCHIP], bits [NCHIP];
    vddc_mv = VDD_W'(vlow_mv);
    m_measure++;
    expose(n_seu, n_mbu);
    repeat (100) @(negedge clk);
    vddc_mv = VDD_W'(VDD_NOM_MV);
    repeat (10) @(negedge clk);
    read_all();
    analyse(seu, mbu, bits);
    for (int k = 0; k < NCHIP; k++) begin
      $display("  V=%0d mV chip %0d: %0d upset bits, %0d SEU, %0d MBU (injected %0d / %0d)",
               vlow_mv, k, bits[k], seu[k], mbu[k], inj_seu[k], inj_mbu[k]);
      chk(seu[k] == inj_seu[k], "SEU count");
      chk(mbu[k] == inj_mbu[k], "MBU count");
      chk(bits[k] == inj_seu[k] + 2 * inj_mbu[k], "upset bit count");
      m_seu += seu[k];
      m_mbu += mbu[k];
    end
    scrub();
  endtask

  initial begin
    #200000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int seu [NCHIP], mbu [NCHIP], bits [NCHIP];
    longint c0;
    for (int k = 0; k < NCHIP; k++)
      for (int a = 0; a < WORDS; a++)
        pattern[k][a] = ((a + k) % 2 == 0) ? 16'h5555 : 16'hAAAA;  // checkerboard per row pair
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);

    // Read phase at nominal supply: initialise and verify.
    c0 = cycles;
    write_all();
    chk(cycles - c0 == longint'(WORDS) * (CHAIN_W + 3), "write pass cycle count");
    read_all();
    analyse(seu, mbu, bits);
    for (int k = 0; k < NCHIP; k++) chk(bits[k] == 0, "clean readback after write");

    // TMR: corrupt one copy of chip 2's shift register while idle.
    begin
      frame_t held_frame;
      held_frame = g_chip[2].u_chip.u_sif.sr_q;
      force g_chip[2].u_chip.u_sif.u_sr.r0 = ~held_frame;
      @(negedge clk);
      chk(g_chip[2].u_chip.u_sif.sr_q == held_frame, "TMR vote masks upset copy");
      release g_chip[2].u_chip.u_sif.u_sr.r0;
      @(negedge clk);
      chk(g_chip[2].u_chip.u_sif.u_sr.r0 == held_frame, "TMR copy scrubbed");
      m_tmr++;
    end

    // Two measurement phases at the two reduced supplies of the cycle.
    readout_cycle(400, 20, 6);
    readout_cycle(600, 12, 3);

    // After scrubbing the array is clean again.
    read_all();
    analyse(seu, mbu, bits);
    for (int k = 0; k < NCHIP; k++) chk(bits[k] == 0, "clean after scrub");

    // Reading at reduced supply corrupts the row (why the supply is raised first).
    begin
      frame_t f [NCHIP], r [NCHIP];
      int diff;
      vddc_mv = VDD_W'(540);
      for (int k = 0; k < NCHIP; k++) f[k] = (k == 0) ? '{cmd: CMD_READ, addr: ADDR_W'(77*8), data: '0} : '0;
      command(f, r);
      vddc_mv = VDD_W'(VDD_NOM_MV);
      read_all();
      diff = 0;
      for (int a = 77*8; a < 78*8; a++) if (rdback[0][a] != pattern[0][a]) diff++;
      chk(diff > 0, "low-supply read destroys row");
      if (diff > 0) m_destructive++;
    end

    $display("mechanisms: writes=%0d reads=%0d chained_responses=%0d measure_phases=%0d seu=%0d mbu=%0d destructive_reads=%0d tmr_masked=%0d",
             m_write, m_read, m_chain, m_measure, m_seu, m_mbu, m_destructive, m_tmr);
    chk(m_write > 0, "write seen");
    chk(m_read > 0, "read seen");
    chk(m_chain > 0, "daisy chain seen");
    chk(m_measure > 0, "reduced-supply exposure seen");
    chk(m_seu > 0, "SEU seen");
    chk(m_mbu > 0, "MBU seen");
    chk(m_destructive > 0, "destructive read seen");
    chk(m_tmr > 0, "TMR correction seen");
    $display("cycles=%0d", cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
