// End-to-end testbench of locx2_top at its default parameters (two channels).
//
// A 40 MHz reference and random ADC words (new words at every falling edge
// of the reference) drive the chip. An I2C master first moves the PLL to a
// VCO band that cannot reach 2.56 GHz (lock must drop), then back (lock must
// return), and reads the register back. Both serial outputs are then sampled
// in the middle of every 5.12 Gbps bit and decoded by a reference receiver
// that knows nothing of the frame phase: it finds the frame boundary from
// the 1010 header pattern and the CRC, descrambles, and checks every frame's
// payload, CRC and BCID code against what was driven, the BCID counting
// crossings since the last BCR. The time from the reference edge that
// sampled a payload to the first bit of its frame must be 12.109375 ns
// (under the 27.2 ns the chip is specified for); the last bit follows 25 ns
// later. Each mechanism (lock, loss of lock in a wrong band, relock, I2C
// write and read, BCR, scrambling) is counted and must occur.
module tb_locx2_top;
  timeunit 1ps; timeprecision 1fs;
  import locx2_pkg::*;
  import locic_ref_pkg::*;

  localparam int NCH = 2;
  localparam logic [6:0] ADDR = 7'h20;
  localparam realtime Q = 100_000;   // quarter SCL period
  localparam realtime T_BIT = 195.3125;
  localparam realtime LAT_FIRST_BIT = 12_109.375;

  logic ref_clk40 = 0, rst_n = 1, bcr = 0;
  initial #1 rst_n = 0;   // falling edge applies the asynchronous reset
  adc_word_t [NCH-1:0][1:0] adc_word;
  logic scl = 1, sda_m = 1, sda_oe, sda;
  logic [NCH-1:0] ser_out, fifo_overflow, fifo_underflow;
  logic test_clk640, pll_lock;
  int checks = 0, failures = 0;

  assign sda = sda_m & !sda_oe;

  locx2_top dut (.ref_clk40, .rst_n, .bcr, .adc_word, .scl, .sda_in(sda), .sda_oe,
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
      if (failures < 20) $display("FAIL %s at %t", msg, $realtime);
    end
  endtask

  // ---------------- I2C master ----------------
  task automatic i2c_start();
    sda_m = 1; #Q; scl = 1; #Q; sda_m = 0; #Q; scl = 0; #Q;
  endtask
  task automatic i2c_stop();
    sda_m = 0; #Q; scl = 1; #Q; sda_m = 1; #Q;
  endtask
  task automatic i2c_wr(input logic [7:0] b, output bit ack);
    for (int i = 7; i >= 0; i--) begin
      sda_m = b[i]; #Q; scl = 1; #(2*Q); scl = 0; #Q;
    end
    sda_m = 1; #Q; scl = 1; #Q; ack = !sda; #Q; scl = 0; #Q;
  endtask
  task automatic i2c_rd(output logic [7:0] b, input bit ack);
    sda_m = 1;
    for (int i = 7; i >= 0; i--) begin
      #Q; scl = 1; #Q; b[i] = sda; #Q; scl = 0; #Q;
    end
    sda_m = !ack; #Q; scl = 1; #(2*Q); scl = 0; #Q; sda_m = 1;
  endtask
  task automatic reg_write(input logic [7:0] ptr, input logic [15:0] v, output bit ok);
    bit a0, a1, a2, a3;
    i2c_start();
    i2c_wr({ADDR, 1'b0}, a0);
    i2c_wr(ptr, a1);
    i2c_wr(v[15:8], a2);
    i2c_wr(v[7:0], a3);
    i2c_stop();
    ok = a0 & a1 & a2 & a3;
  endtask
  task automatic reg_read(input logic [7:0] ptr, output logic [15:0] v, output bit ok);
    bit a0, a1, a2;
    i2c_start();
    i2c_wr({ADDR, 1'b0}, a0);
    i2c_wr(ptr, a1);
    i2c_start();
    i2c_wr({ADDR, 1'b1}, a2);
    i2c_rd(v[15:8], 1'b1);
    i2c_rd(v[7:0], 1'b0);
    i2c_stop();
    ok = a0 & a1 & a2;
  endtask

  // ---------------- ADC data and BCR ----------------
  typedef struct { payload_t p[NCH]; bit bcr; realtime t; } lhc_t;
  lhc_t lhc_log[$];
  int   bcr_at[$];          // reference cycles (log indices) that carry BCR
  bit   bcr_enable = 0;

  initial begin
    int m;
    m = 0;
    adc_word = '0;
    forever begin
      lhc_t e;
      @(negedge ref_clk40);
      for (int c = 0; c < NCH; c++)
        for (int a = 0; a < 2; a++)
          adc_word[c][a] = 56'({$urandom, $urandom});
      bcr = bcr_enable && (m % 97 == 5);
      for (int c = 0; c < NCH; c++) e.p[c] = {adc_word[c][0], adc_word[c][1]};
      e.bcr = bcr;
      e.t = $realtime + 12500.0;     // the rising edge that samples it
      lhc_log.push_back(e);
      m++;
    end
  end

  // ---------------- serial capture ----------------
  bit      record = 0;
  bit      rx[NCH][$];
  realtime rx_t[$];

  always @(dut.clk_vco) begin
    realtime te;
    te = $realtime;
    #(T_BIT / 2.0);
    if (record) begin
      for (int c = 0; c < NCH; c++) rx[c].push_back(ser_out[c]);
      rx_t.push_back(te);
    end
  end

  // ---------------- mechanism counters ----------------
  int n_lock = 0, n_unlock_badband = 0, n_i2c_wr = 0, n_i2c_rd = 0;
  int n_bcr_frames = 0, n_scrambled = 0, n_frames[NCH];
  always @(posedge pll_lock) n_lock++;

  // ---------------- receiver ----------------
  function automatic logic [127:0] frame_at(input int c, input int pos);
    logic [127:0] f;
    for (int i = 0; i < 128; i++) f[127 - i] = rx[c][pos + i];
    return f;
  endfunction

  task automatic decode(input int c);
    int best_off, best_ok, nf, idx, since_bcr;
    scr_hist_t h;
    logic [127:0] f;
    payload_t d;
    best_off = -1; best_ok = -1;
    nf = (rx[c].size() - 128) / 128;
    for (int off = 0; off < 128; off++) begin
      int ok;
      ok = 0; h = '0;
      for (int k = 0; k < nf; k++) begin
        f = frame_at(c, off + 128 * k);
        d = descramble(f[119:8], h);
        if (k > 0 && f[127:124] == 4'b1010 && f[7:0] == crc8_ref(d)) ok++;
      end
      if (ok > best_ok) begin best_ok = ok; best_off = off; end
    end
    check(best_ok == nf - 1, $sformatf("ch%0d: %0d of %0d frames pass header and CRC at the best alignment", c, best_ok, nf - 1));
    h = '0;
    idx = -1;
    since_bcr = -1;
    for (int k = 0; k < nf; k++) begin
      realtime lat;
      f = frame_at(c, best_off + 128 * k);
      d = descramble(f[119:8], h);
      if (k == 0) continue;       // descrambler history not yet filled
      if (idx < 0) begin
        foreach (lhc_log[i]) if (lhc_log[i].p[c] == d) idx = i;
        check(idx >= 0, $sformatf("ch%0d: first payload found among the driven ones", c));
        if (idx < 0) return;
        for (int i = idx; i >= 0; i--) if (lhc_log[i].bcr) begin since_bcr = idx - i; break; end
      end else begin
        idx++;
        if (lhc_log[idx].bcr) since_bcr = 0;
        else if (since_bcr >= 0) since_bcr++;
      end
      check(d == lhc_log[idx].p[c], $sformatf("ch%0d frame %0d payload", c, k));
      check(f[127:124] == 4'b1010, $sformatf("ch%0d frame %0d header pattern", c, k));
      check(f[7:0] == crc8_ref(lhc_log[idx].p[c]), $sformatf("ch%0d frame %0d CRC", c, k));
      if (since_bcr >= 0) begin
        check(f[123:120] == bcid_code(since_bcr),
              $sformatf("ch%0d frame %0d BCID code %h, expected %h", c, k, f[123:120], bcid_code(since_bcr)));
        if (since_bcr == 0) n_bcr_frames++;
      end
      if (f[119:8] != d) n_scrambled++;
      lat = rx_t[best_off + 128 * k] - lhc_log[idx].t;
      check(lat > LAT_FIRST_BIT - 1.0 && lat < LAT_FIRST_BIT + 1.0 && lat < 27_200.0,
            $sformatf("ch%0d frame %0d latency %f ps", c, k, lat));
      if (k == 1)
        $display("ch%0d: first bit %0.3f ns, last bit ends %0.3f ns after the sampling reference edge",
                 c, lat / 1000.0, (lat + 128.0 * T_BIT) / 1000.0);
      n_frames[c]++;
    end
  endtask

  initial begin
    bit ok;
    logic [15:0] v;
    pll_cfg_t cfg;
    #60_000 rst_n = 1;
    // 1. lock with the reset settings
    wait (pll_lock);
    check(fifo_overflow == '0 && fifo_underflow == '0, "FIFO flags after lock");
    // 2. wrong VCO band: lock must drop
    cfg = PLL_CFG_DEFAULT;
    cfg.vco_band = 2'd0;
    reg_write(8'd0, 16'(cfg), ok);
    check(ok, "I2C write to register 0 acknowledged");
    n_i2c_wr++;
    repeat (4) @(posedge ref_clk40);
    #20_000;
    check(!pll_lock, "PLL still locked in band 0");
    if (!pll_lock) n_unlock_badband++;
    repeat (50) @(posedge ref_clk40);
    check(!pll_lock, "PLL locked in band 0");
    // 3. back to band 2, faster loop: relock
    cfg.vco_band = 2'd2;
    cfg.lpf_bw = 3'd7;
    reg_write(8'd0, 16'(cfg), ok);
    check(ok, "I2C write acknowledged");
    n_i2c_wr++;
    wait (pll_lock);
    reg_read(8'd0, v, ok);
    check(ok && v == 16'(cfg), $sformatf("register 0 read back %h", v));
    n_i2c_rd++;
    // 4. data: record the serial lines for 300 LHC clocks, with BCRs
    repeat (10) @(posedge ref_clk40);
    bcr_enable = 1;
    @(posedge ref_clk40);
    record = 1;
    repeat (300) @(posedge ref_clk40);
    record = 0;
    check(pll_lock, "PLL lost lock during the data run");
    check(fifo_overflow == '0 && fifo_underflow == '0, "FIFO flags after the data run");
    for (int c = 0; c < NCH; c++) decode(c);
    // mechanisms
    check(n_lock >= 2, $sformatf("PLL locked %0d times", n_lock));
    check(n_unlock_badband == 1, "loss of lock in a wrong band seen");
    check(n_i2c_wr == 2 && n_i2c_rd == 1, "I2C writes and read done");
    check(n_bcr_frames >= 2 * NCH, $sformatf("%0d frames at BCR", n_bcr_frames));
    check(n_scrambled > 0, "payload scrambled on the line");
    for (int c = 0; c < NCH; c++)
      check(n_frames[c] > 250, $sformatf("ch%0d decoded %0d frames", c, n_frames[c]));
    $display("mechanisms: lock=%0d unlock_bad_band=%0d i2c_wr=%0d i2c_rd=%0d bcr_frames=%0d scrambled=%0d frames=%0d/%0d",
             n_lock, n_unlock_badband, n_i2c_wr, n_i2c_rd, n_bcr_frames, n_scrambled, n_frames[0], n_frames[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
