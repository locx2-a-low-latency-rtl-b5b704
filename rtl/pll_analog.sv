// Behavioural model (not synthesizable logic) of the analog core of the
// LOCx2 PLL: phase-frequency detector, programmable charge pump, 2nd/3rd-order
// loop filter and four-band LC-VCO. The divide-by-64 chain is real logic
// (pll_div64) and closes the loop through `fb_clk`.
//
// The model does not solve the loop equations. It measures the reference
// period, and if the selected VCO band can reach 64 x the reference
// frequency it pulls the VCO to exactly that frequency after an acquisition
// time set by the loop bandwidth, then removes the phase error between
// `fb_clk` and `ref_clk` with one phase step, as the loop would. `locked`
// rises after LOCK_COUNT consecutive reference edges with the feedback edge
// within LOCK_TOL_FS of the reference edge, and falls at the first edge
// that misses. If the band cannot reach the target the VCO sits at the
// nearest end of the band and never locks.
//
// From LOCx2: 40 MHz in, 2.56 GHz out, /64 feedback, four VCO bands
// spanning 1.86-2.98 GHz, loop bandwidth programmable 0.5-2.5 MHz, charge-pump
// current programmable, 2nd- or 3rd-order filter. This model's own choices:
// the band edges (four overlapping bands, 340 MHz wide, every 260 MHz), the mapping of
// the codes to bandwidth, and acquisition time = 4 / bandwidth (x1.25 for
// the 3rd-order filter, which has less phase margin).
// Time unit is 1 fs so the 390.625 ps VCO period is exact.
module pll_analog #(
  parameter int unsigned LOCK_COUNT  = 8,
  parameter longint      LOCK_TOL_FS = 10_000
) (
  input  logic       ref_clk,     // 40 MHz reference
  input  logic       fb_clk,      // VCO / 64
  input  logic [1:0] vco_band,
  input  logic [3:0] cp_cur,
  input  logic [2:0] lpf_bw,
  input  logic       lpf_3rd,
  output logic       vco_clk,     // 2.56 GHz
  output logic       locked
);
  timeunit 1fs; timeprecision 1fs;

  // Band edges in kHz.
  function automatic longint band_lo_khz(input logic [1:0] b);
    return 64'd1_860_000 + longint'(b) * 64'd260_000;
  endfunction
  function automatic longint band_hi_khz(input logic [1:0] b);
    return band_lo_khz(b) + 64'd340_000;
  endfunction

  longint t_ref_last, t_ref_per, t_fb_rise;
  longint vco_per;         // current VCO period in fs
  longint extra_low;       // one-time phase step, fs
  longint acq_left;        // reference cycles left in acquisition
  int     ref_edges;
  int     good;
  logic   acquired;
  logic [1:0] band_q;
  logic [3:0] cp_q;
  logic [2:0] bw_q;
  logic       ord_q;
  logic       align_pending;

  function automatic longint acq_cycles();
    real bw_mhz;
    bw_mhz = (0.5 + real'(lpf_bw) * 2.0 / 7.0) * real'(int'(cp_cur) + 1) / 9.0;
    if (bw_mhz < 0.1) bw_mhz = 0.1;
    // 4 / bandwidth, in 25 ns reference cycles
    return longint'(4.0 / bw_mhz * 40.0 * (lpf_3rd ? 1.25 : 1.0));
  endfunction

  initial begin
    vco_clk = 1'b0;
    locked = 1'b0;
    t_ref_last = -1; t_ref_per = 0; t_fb_rise = -1;
    vco_per = 64'd1_000_000_000_000 / ((band_lo_khz(vco_band) + band_hi_khz(vco_band)) / 2);
    extra_low = 0; acq_left = 0; ref_edges = 0; good = 0;
    acquired = 1'b0; align_pending = 1'b0;
    band_q = vco_band; cp_q = cp_cur; bw_q = lpf_bw; ord_q = lpf_3rd;
  end

  // VCO: one period per pass; a pending phase step stretches the low phase.
  bit started = 1'b0;
  always begin : vco
    longint step;
    if (!started) begin
      #1;                      // let the initial block set the start period
      started = 1'b1;
    end
    vco_clk = 1'b1;
    #((vco_per + 1) / 2);
    vco_clk = 1'b0;
    step = extra_low;
    extra_low = 0;
    #(vco_per / 2 + step);
  end

  always @(posedge fb_clk) t_fb_rise = $time;

  always @(posedge ref_clk) begin
    longint now, tgt_per, tgt_khz, d;
    logic   cfg_changed, in_band;
    now = $time;
    if (t_ref_last >= 0) t_ref_per = now - t_ref_last;
    t_ref_last = now;
    if (ref_edges < 1000) ref_edges++;
    cfg_changed = (band_q != vco_band) || (cp_q != cp_cur) || (bw_q != lpf_bw) || (ord_q != lpf_3rd);
    band_q = vco_band; cp_q = cp_cur; bw_q = lpf_bw; ord_q = lpf_3rd;
    if (ref_edges >= 2) begin
      tgt_per = t_ref_per / 64;
      tgt_khz = 64'd1_000_000_000_000 / tgt_per;
      in_band = (tgt_khz >= band_lo_khz(vco_band)) && (tgt_khz <= band_hi_khz(vco_band));
      if (!in_band) begin
        acquired = 1'b0;
        align_pending = 1'b0;
        vco_per = 64'd1_000_000_000_000 /
                  ((tgt_khz < band_lo_khz(vco_band)) ? band_lo_khz(vco_band) : band_hi_khz(vco_band));
        acq_left = acq_cycles();
      end else if (!acquired) begin
        if (cfg_changed || acq_left == 0) acq_left = acq_cycles();
        acq_left--;
        if (acq_left <= 0) begin
          vco_per = tgt_per;
          acquired = 1'b1;
          align_pending = 1'b1;
          acq_left = 0;
        end
      end else if (align_pending) begin
        // One full reference period at the exact frequency has passed.
        d = (now - t_fb_rise) % t_ref_per;
        if (d > LOCK_TOL_FS && d < t_ref_per - LOCK_TOL_FS) extra_low = d;
        align_pending = 1'b0;
      end else if (cfg_changed) begin
        acq_left = acq_cycles();
        acquired = 1'b0;
      end
    end
    // Lock detector: look just after the edge so a coincident feedback edge is seen.
    #(LOCK_TOL_FS);
    d = $time - t_fb_rise;
    if (t_fb_rise >= 0 && d <= 2 * LOCK_TOL_FS && acquired && !align_pending) begin
      if (good < int'(LOCK_COUNT)) good++;
    end else begin
      good = 0;
    end
    locked = (good >= int'(LOCK_COUNT));
  end
endmodule
