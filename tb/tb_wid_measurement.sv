// tb_wid_measurement: runs the within-die variation measurement on a chain of
// logic blocks whose LB-to-LB paths carry delays, and checks every count.
//
// The logic blocks are the synthesizable logic_block; only this testbench
// adds timing.  Each Mout -> next A connection gets a transport delay
// dly(i) = D0 * (1 + CENTRE_GAIN * centrality(site)) * (1 + noise(i)).
// centrality is 1 at the array centre and 0 at the corners, which makes
// central LBs slow and peripheral ones fast.  noise(i) is a fixed hash of
// the chain position in +-NOISE/2.  D0, CENTRE_GAIN and NOISE are numbers
// chosen for this test, not measured values.  The LBs sit on the same
// Hilbert-curve sites as in lut_array.
//
// For every 4x4 region (16 consecutive chain positions):
//   * shift in the measurement configuration: first LB always true, second
//     follows B, the other 14 follow A, every LB outside the region false;
//   * for clock intervals T = 4.0 ns .. 8.0 ns in 0.1 ns steps, REPEATS
//     times each: give a launch pulse on clk_s, then a capture edge T plus a
//     random dither of +-DITHER later, scan the chain out and count the ones;
//   * compare every count with the count worked out from the delay model:
//     2 + the number of LBs s+2.. whose accumulated delay from LB s+1 is
//     below the interval, at most 16;
//   * average the counts per T and fit a least-squares line of average count
//     against T; its gradient, in LBs per ns, is the region's speed.
// The gradient must lie within 15 % of 1 / (mean delay of the region's
// path), and the central regions must come out slower than the peripheral
// ones.  The gradient table is printed.
module tb_wid_measurement;
  timeunit 1ns;
  timeprecision 1ps;
  import lut_array_pkg::*;

  localparam int unsigned ROWS    = 8;
  localparam int unsigned COLS    = 16;
  localparam int unsigned N       = ROWS * COLS;
  localparam int unsigned REGIONS = N / 16;
  localparam int          REPEATS = 100;     // repeats per clock interval
  localparam int          STEPS   = 41;      // 4.0 ns .. 8.0 ns in 0.1 ns steps
  localparam real         D0          = 0.55;  // ns per LB at the corners
  localparam real         CENTRE_GAIN = 0.35;
  localparam real         NOISE       = 0.10;
  localparam int          DITHER_PS   = 150;

  function automatic real centrality(int unsigned i);
    site_t st;
    real dx, dy, dmax;
    st   = hilbert_d2xy(ROWS, i);
    dx   = real'(st.x) + 0.5 - real'(COLS) / 2.0;
    dy   = real'(st.y) + 0.5 - real'(ROWS) / 2.0;
    dmax = (real'(COLS) * real'(COLS) + real'(ROWS) * real'(ROWS)) / 4.0;
    return 1.0 - (dx * dx + dy * dy) / dmax;
  endfunction

  function automatic real noise_of(int unsigned i);
    int unsigned h;
    h = (i + 1) * 32'd2654435761;
    return (real'((h >> 12) % 1000) / 1000.0 - 0.5) * NOISE;
  endfunction

  // delay in whole picoseconds, so that the reference below is exact
  function automatic int lb_delay_ps(int unsigned i);
    return int'(1000.0 * D0 * (1.0 + CENTRE_GAIN * centrality(i)) * (1.0 + noise_of(i)));
  endfunction

  logic clk_l = 0, clk_s = 0, rst = 0, scan = 0, enable = 0, lin = 0, c = 0, d = 0;
  logic [N:0] l_chain, s_chain, m_chain, a_chain;
  logic [N-1:0] dout;

  assign l_chain[0] = lin;
  assign s_chain[0] = 1'b0;
  assign a_chain[0] = 1'b0;

  for (genvar i = 0; i < N; i++) begin : g_lb
    localparam int DLY = lb_delay_ps(i);
    logic_block u_lb (
      .clk_l(clk_l), .clk_s(clk_s), .rst(rst), .scan(scan), .enable(enable),
      .lin(l_chain[i]), .lout(l_chain[i+1]), .a(a_chain[i]), .sin(s_chain[i]),
      .c(c), .d(d), .mout(m_chain[i+1]), .sout(s_chain[i+1]), .dout(dout[i])
    );
    assign #(DLY * 1ps) a_chain[i+1] = m_chain[i+1];
  end

  int checks = 0, failures = 0;
  int n_meas = 0, n_edge_ties = 0, n_partial = 0, n_full = 0;
  real gradient[REGIONS];
  real expect_g[REGIONS];

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  initial begin
    #50ms;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int arrive_ps[16];
    #1 rst = 1;
    #1 rst = 0;
    for (int r = 0; r < int'(REGIONS); r++) begin
      int s;
      real sum_t, sum_n, sum_tt, sum_tn, mean_d;
      s = 16 * r;
      // accumulated arrival time at position s+j, j >= 2, after the launch
      arrive_ps[0] = 0;
      arrive_ps[1] = 0;
      for (int j = 2; j < 16; j++) arrive_ps[j] = arrive_ps[j-1] + lb_delay_ps(s + j - 1);
      mean_d = real'(arrive_ps[15]) / 14.0 / 1000.0;
      expect_g[r] = 1.0 / mean_d;
      // configuration, last LB first
      for (int i = N - 1; i >= 0; i--) begin
        lut_cfg_t cw;
        cw = (i == s) ? CFG_ALWAYS : (i == s + 1) ? CFG_FOLLOW_B :
             (i > s + 1 && i < s + 16) ? CFG_FOLLOW_A : CFG_ZERO;
        for (int k = LUT_SIZE - 1; k >= 0; k--) begin
          lin = cw[k];
          #1 clk_l = 1;
          #1 clk_l = 0;
        end
      end
      sum_t = 0; sum_n = 0; sum_tt = 0; sum_tn = 0;
      for (int step = 0; step < STEPS; step++) begin
        int t_ps, total;
        real avg;
        t_ps  = 4000 + 100 * step;
        total = 0;
        for (int rep = 0; rep < REPEATS; rep++) begin
          int iv_ps, cnt, exp_cnt;
          bit tie;
          iv_ps = t_ps + int'($urandom_range(2 * DITHER_PS)) - DITHER_PS;
          // launch and capture
          scan = 0; enable = 1;
          #20;
          clk_s = 1;
          #(0.5) clk_s = 0;
          #((iv_ps - 500) * 1ps) clk_s = 1;
          #(0.5) clk_s = 0;
          // reference count
          exp_cnt = 2;
          tie = 0;
          for (int j = 2; j < 16; j++) begin
            if (arrive_ps[j] < iv_ps) exp_cnt++;
            if (arrive_ps[j] == iv_ps) tie = 1;
          end
          // serial read-out; shifting zeros in also clears the chain
          #1 scan = 1;
          cnt = 0;
          for (int i = 0; i < int'(N); i++) begin
            #1 cnt += int'(s_chain[N]);
            clk_s = 1;
            #1 clk_s = 0;
          end
          scan = 0;
          if (tie) begin
            n_edge_ties++;
            check(cnt == exp_cnt || cnt == exp_cnt + 1, "count at an exact tie");
          end else
            check(cnt == exp_cnt, $sformatf("region %0d T=%0d ps: count %0d, expected %0d", r, iv_ps, cnt, exp_cnt));
          if (cnt == 16) n_full++; else n_partial++;
          n_meas++;
          total += cnt;
        end
        avg = real'(total) / real'(REPEATS);
        sum_t  += real'(t_ps) / 1000.0;
        sum_n  += avg;
        sum_tt += (real'(t_ps) / 1000.0) * (real'(t_ps) / 1000.0);
        sum_tn += (real'(t_ps) / 1000.0) * avg;
      end
      gradient[r] = (real'(STEPS) * sum_tn - sum_t * sum_n) / (real'(STEPS) * sum_tt - sum_t * sum_t);
      check(gradient[r] > 0.85 * expect_g[r] && gradient[r] < 1.15 * expect_g[r],
            $sformatf("region %0d gradient %f vs %f", r, gradient[r], expect_g[r]));
    end

    // report, and centre against periphery
    begin
      real g_mean, g_centre, g_edge;
      int n_centre, n_edge;
      g_mean = 0; g_centre = 0; g_edge = 0; n_centre = 0; n_edge = 0;
      for (int r = 0; r < int'(REGIONS); r++) g_mean += gradient[r] / real'(REGIONS);
      for (int r = 0; r < int'(REGIONS); r++) begin
        site_t st;
        st = hilbert_d2xy(ROWS, 16 * r);
        $display("region %0d at x=%0d..%0d y=%0d..%0d: gradient %.3f LB/ns (model %.3f), speed ratio %.3f",
                 r, st.x & ~16'd3, (st.x & ~16'd3) + 3, st.y & ~16'd3, (st.y & ~16'd3) + 3,
                 gradient[r], expect_g[r], gradient[r] / g_mean);
        if ((st.x & ~16'd3) >= 16'(COLS / 4) && (st.x & ~16'd3) < 16'(3 * COLS / 4)) begin
          g_centre += gradient[r]; n_centre++;
        end else begin
          g_edge += gradient[r]; n_edge++;
        end
      end
      check(n_centre > 0 && n_edge > 0 && g_centre / n_centre < g_edge / n_edge,
            "central regions slower than peripheral ones");
    end
    check(n_partial > 0, "captures with the signal still inside the region occurred");
    $display("measurements=%0d partial=%0d full=%0d ties=%0d", n_meas, n_partial, n_full, n_edge_ties);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
