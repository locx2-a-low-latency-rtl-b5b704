// Orbit-length workload for locx2_top at its default parameters: BCR every
// 3564 LHC clocks, as on the LHC, for two full orbits of random ADC data on
// both channels. A reference receiver finds the frame phase from the first
// frames, then decodes every frame: descrambles, checks payload and CRC, and
// recovers the bunch-crossing number from the headers alone. It rebuilds the
// PRBS7 and PRBS5 states from the last 7 and 5 headers and looks the pair up
// in a table of the 3564 crossings of an orbit. The recovered number must
// equal the crossing count since BCR for every frame, and every one of the
// 3564 numbers must be seen in each orbit.
module tb_locx2_orbit;
  timeunit 1ps; timeprecision 1fs;
  import locx2_pkg::*;
  import locic_ref_pkg::*;

  localparam int NCH = 2;
  localparam int ORBITS = 2;
  localparam int BCR_PHASE = 50;
  localparam realtime T_BIT = 195.3125;

  logic ref_clk40 = 0, rst_n = 1, bcr = 0;
  initial #1 rst_n = 0;   // falling edge applies the asynchronous reset
  adc_word_t [NCH-1:0][1:0] adc_word;
  logic scl = 1, sda_oe;
  logic [NCH-1:0] ser_out, fifo_overflow, fifo_underflow;
  logic test_clk640, pll_lock;
  int checks = 0, failures = 0;

  locx2_top dut (.ref_clk40, .rst_n, .bcr, .adc_word, .scl, .sda_in(1'b1), .sda_oe,
                 .ser_out, .test_clk640, .pll_lock, .fifo_overflow, .fifo_underflow);

  always #12500 ref_clk40 = ~ref_clk40;

  initial begin
    #2_000_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", msg);
    end
  endtask

  // driven data, one entry per LHC clock
  typedef struct { payload_t p[NCH]; bit bcr; } lhc_t;
  lhc_t lhc_log[$];
  bit   bcr_enable = 0;
  int   m = 0;

  initial begin
    adc_word = '0;
    forever begin
      lhc_t e;
      @(negedge ref_clk40);
      for (int c = 0; c < NCH; c++)
        for (int a = 0; a < 2; a++)
          adc_word[c][a] = 56'({$urandom, $urandom});
      bcr = bcr_enable && (m % int'(ORBIT_BC) == BCR_PHASE);
      for (int c = 0; c < NCH; c++) e.p[c] = {adc_word[c][0], adc_word[c][1]};
      e.bcr = bcr;
      lhc_log.push_back(e);
      m++;
    end
  end

  bit record = 0;
  bit rx[NCH][$];
  always @(dut.clk_vco) begin
    #(T_BIT / 2.0);
    if (record) for (int c = 0; c < NCH; c++) rx[c].push_back(ser_out[c]);
  end

  // crossing number from the (PRBS7, PRBS5) state pair
  int bc_of[int];
  initial begin
    int a, b;
    a = 'h7f; b = 'h1f;
    for (int n = 0; n < int'(ORBIT_BC); n++) begin
      bc_of[a * 32 + b] = n;
      a = prbs7_next(a);
      b = prbs5_next(b);
    end
  end

  function automatic logic [127:0] frame_at(input int c, input int pos);
    logic [127:0] f;
    for (int i = 0; i < 128; i++) f[127 - i] = rx[c][pos + i];
    return f;
  endfunction

  task automatic decode(input int c);
    int best_off, best_ok, nf, idx, since_bcr, n_orbit_complete;
    scr_hist_t h;
    logic [127:0] f;
    payload_t d;
    logic [3:0] hist[$];
    bit seen[int];
    best_off = 0; best_ok = -1;
    for (int off = 0; off < 128; off++) begin
      int ok;
      ok = 0; h = '0;
      for (int k = 0; k < 40; k++) begin
        f = frame_at(c, off + 128 * k);
        d = descramble(f[119:8], h);
        if (k > 0 && f[127:124] == 4'b1010 && f[7:0] == crc8_ref(d)) ok++;
      end
      if (ok > best_ok) begin best_ok = ok; best_off = off; end
    end
    check(best_ok == 39, $sformatf("ch%0d frame alignment found (%0d of 39)", c, best_ok));
    nf = (rx[c].size() - best_off) / 128;
    h = '0; idx = -1; since_bcr = -1; n_orbit_complete = 0;
    for (int k = 0; k < nf; k++) begin
      f = frame_at(c, best_off + 128 * k);
      d = descramble(f[119:8], h);
      hist.push_back(f[123:120]);
      if (hist.size() > 7) void'(hist.pop_front());
      if (k == 0) continue;
      if (idx < 0) begin
        foreach (lhc_log[i]) if (lhc_log[i].p[c] == d) idx = i;
        check(idx >= 0, $sformatf("ch%0d first payload found", c));
        if (idx < 0) return;
      end else idx++;
      if (lhc_log[idx].bcr) begin
        if (since_bcr >= 0) begin
          check(seen.num() == int'(ORBIT_BC), $sformatf("ch%0d: %0d distinct BCIDs recovered in the orbit", c, seen.num()));
          if (seen.num() == int'(ORBIT_BC)) n_orbit_complete++;
        end
        seen.delete();
        since_bcr = 0;
      end else if (since_bcr >= 0) since_bcr++;
      check(d == lhc_log[idx].p[c] && f[127:124] == 4'b1010 && f[7:0] == crc8_ref(d),
            $sformatf("ch%0d frame %0d payload, header or CRC", c, k));
      if (since_bcr >= 0 && since_bcr >= 7 && hist.size() == 7) begin
        int a, b, bc;
        // the low bit of each state is the bit shifted in k frames ago
        a = 0; b = 0;
        for (int j = 0; j < 7; j++) a |= int'(hist[6 - j][2]) << j;
        for (int j = 0; j < 5; j++) b |= int'(hist[6 - j][0]) << j;
        bc = bc_of.exists(a * 32 + b) ? bc_of[a * 32 + b] : -1;
        check(bc == since_bcr, $sformatf("ch%0d frame %0d BCID recovered %0d, expected %0d", c, k, bc, since_bcr));
        if (bc >= 0) seen[bc] = 1;
        // the first 7 crossings after BCR follow from the count itself
        if (since_bcr == 7) for (int j = 0; j < 7; j++) seen[j] = 1;
      end
    end
    check(n_orbit_complete >= 1, $sformatf("ch%0d: %0d complete orbits decoded", c, n_orbit_complete));
    $display("ch%0d: %0d frames decoded, %0d complete orbits with all %0d BCIDs recovered",
             c, nf, n_orbit_complete, ORBIT_BC);
  endtask

  initial begin
    #60_000 rst_n = 1;
    wait (pll_lock);
    repeat (10) @(posedge ref_clk40);
    bcr_enable = 1;
    record = 1;
    repeat (ORBITS * int'(ORBIT_BC) + 200) @(posedge ref_clk40);
    record = 0;
    check(pll_lock && fifo_overflow == '0 && fifo_underflow == '0, "lock held, no FIFO errors");
    for (int c = 0; c < NCH; c++) decode(c);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
