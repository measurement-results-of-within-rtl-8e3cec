// lut_array_exerciser: stimulus and checking for the LUT array testbenches
// (tb_lut_array at reduced size, tb_lut_array_full at full size).  It drives
// every input of the array, checks its outputs against expectations it works
// out itself (see tb_lut_array for the list of checks), counts how often each
// mechanism occurred, prints the TB_RESULT line and ends the simulation.
module lut_array_exerciser
  import lut_array_pkg::*;
#(
  parameter int unsigned ROWS = 4,
  parameter int unsigned COLS = 8,
  // number of 4x4 regions measured, spread evenly over the array; 0 = all
  parameter int unsigned MEAS_REGIONS = 0
) (
  output logic                 clk_l,
  output logic                 clk_s,
  output logic                 rst,
  output logic                 scan,
  output logic                 enable,
  output logic                 lin,
  input  logic                 lout,
  output logic                 sin,
  input  logic                 sout,
  output logic                 a_in,
  input  logic                 mout_last,
  output logic                 c,
  output logic                 d,
  input  logic [ROWS*COLS-1:0] dout
);
  localparam int unsigned N       = ROWS * COLS;
  localparam int unsigned REGIONS = N / 16;
  localparam int unsigned MEAS_N  = (MEAS_REGIONS == 0 || MEAS_REGIONS > REGIONS) ? REGIONS : MEAS_REGIONS;

  int checks = 0, failures = 0;
  // mechanism counters
  int n_cfg_shift = 0, n_launch = 0, n_hold = 0, n_capture = 0, n_scan_read = 0;
  int n_stop_at_edge = 0, n_run_on = 0, n_placement = 0, n_a_chain = 0, n_reset = 0;

  // chain position -> site, as observed through dout
  int site_x[N];
  int site_y[N];

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  task automatic pulse_l();
    #1 clk_l = 1; #1 clk_l = 0;
  endtask

  task automatic pulse_s();
    #1 clk_s = 1; #1 clk_s = 0; #1;
  endtask

  // shift one configuration word per LB into the chain; cfg_of[i] is LB i's
  lut_cfg_t cfg_of[N];
  task automatic load_config();
    for (int i = N - 1; i >= 0; i--)
      for (int k = LUT_SIZE - 1; k >= 0; k--) begin
        lin = cfg_of[i][k];
        pulse_l();
      end
  endtask

  // read the N captured bits out of the scan chain; got[i] is LB i's bit
  logic got[N];
  task automatic scan_out();
    scan = 1; enable = 1; sin = 0;
    for (int i = N - 1; i >= 0; i--) begin
      #1 got[i] = sout;
      pulse_s();
    end
    scan = 0;
    n_scan_read++;
  endtask

  initial begin
    #(64'd200 * N * LUT_SIZE * 64'(2 * MEAS_N + 3) + 64'd100000);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clk_l = 0; clk_s = 0; rst = 0; scan = 0; enable = 0; lin = 0; sin = 0; a_in = 0; c = 0; d = 0;
    #1 rst = 1;  // rising edge of the asynchronous reset
    #2 rst = 0;
    #1;
    check(dout == '0 && sout == 1'b0 && lout == 1'b0, "reset clears the array");
    n_reset++;

    // ---- 1. placement, by walking a single 1 down the scan chain
    begin
      bit seen[ROWS][COLS];
      int ones, px, py;
      scan = 1; enable = 1;
      for (int i = 0; i < N; i++) begin
        sin = (i == 0);
        pulse_s();
        ones = 0; px = -1; py = -1;
        for (int y = 0; y < ROWS; y++)
          for (int x = 0; x < COLS; x++)
            if (dout[y * COLS + x]) begin ones++; px = x; py = y; end
        check(ones == 1, $sformatf("one-hot scan walk at step %0d (%0d ones)", i, ones));
        site_x[i] = px; site_y[i] = py;
        if (px >= 0) begin
          check(!seen[py][px], $sformatf("site (%0d,%0d) visited twice", px, py));
          seen[py][px] = 1;
        end
        if (i == 0) check(px == 0 && py == 0, "chain starts at site (0,0)");
        else check((px - site_x[i-1]) * (px - site_x[i-1]) + (py - site_y[i-1]) * (py - site_y[i-1]) == 1,
                   $sformatf("chain step %0d is not to a neighbouring site", i));
        n_placement++;
      end
      // every aligned group of 16 fills an aligned 4x4 square
      for (int r = 0; r < REGIONS; r++) begin
        int x0, y0;
        x0 = site_x[16 * r] & ~3;
        y0 = site_y[16 * r] & ~3;
        for (int j = 0; j < 16; j++)
          check((site_x[16 * r + j] & ~3) == x0 && (site_y[16 * r + j] & ~3) == y0,
                $sformatf("region %0d position %0d outside its 4x4 square", r, j));
      end
      sin = 0;
      scan = 0;
      pulse_s();  // capture: all LUTs are zero after reset, so this clears the chain
      check(dout == '0, "chain cleared by a capture of all-zero LUTs");
    end

    // ---- 2. configuration chain latency
    begin
      logic stream[$];
      logic bitv;
      for (int t = 0; t < N * LUT_SIZE + 64; t++) begin
        bitv = 1'($urandom);
        stream.push_back(bitv);
        if (t >= N * LUT_SIZE) begin
          check(lout == stream[t - N * LUT_SIZE], $sformatf("lout at shift %0d", t));
          n_cfg_shift++;
        end
        lin = bitv;
        pulse_l();
      end
    end

    // ---- 3. measurement in MEAS_N regions, with the signal stopped at the
    //         region's edge and with it running on to the end of the chain
    for (int mode = 0; mode < 2; mode++)
      for (int j = 0; j < int'(MEAS_N); j++) begin
        int s, r;
        logic exp_bits[N];
        int count;
        r = (MEAS_N == REGIONS) ? j : (MEAS_N == 1) ? 0 : j * (int'(REGIONS) - 1) / (int'(MEAS_N) - 1);
        s = 16 * r;
        for (int i = 0; i < N; i++) begin
          if (i < s)           cfg_of[i] = CFG_ZERO;
          else if (i == s)     cfg_of[i] = CFG_ALWAYS;
          else if (i == s + 1) cfg_of[i] = CFG_FOLLOW_B;
          else if (i < s + 16) cfg_of[i] = CFG_FOLLOW_A;
          else                 cfg_of[i] = (mode == 0) ? CFG_ZERO : CFG_FOLLOW_A;
        end
        load_config();
        // clear the SDFFs by scanning zeros in (a reset would also clear
        // the configuration just loaded)
        scan = 1; enable = 1; sin = 0;
        for (int i = 0; i < N; i++) pulse_s();
        check(dout == '0, "scan-in of zeros clears the SDFFs");
        c = 1'($urandom); d = 1'($urandom);
        a_in = 1'($urandom);
        // launch pulse
        scan = 0; enable = 1;
        pulse_s();
        n_launch++;
        for (int i = 0; i < N; i++) begin
          logic exp;
          exp = (i == s);
          check(dout[site_y[i] * COLS + site_x[i]] == exp,
                $sformatf("launch: region %0d LB %0d holds %b", r, i, !exp));
        end
        // hold pulse: enable low, nothing changes
        enable = 0;
        pulse_s();
        n_hold++;
        for (int i = 0; i < N; i++)
          check(dout[site_y[i] * COLS + site_x[i]] == (i == s), "hold with enable low");
        // capture pulse
        enable = 1;
        pulse_s();
        n_capture++;
        count = 0;
        for (int i = 0; i < N; i++) begin
          exp_bits[i] = (i >= s) && (i < s + 16 || mode == 1);
          count += int'(exp_bits[i]);
          check(dout[site_y[i] * COLS + site_x[i]] == exp_bits[i],
                $sformatf("capture: mode %0d region %0d LB %0d", mode, r, i));
        end
        if (mode == 0) n_stop_at_edge++; else n_run_on++;
        // serial read-out
        scan_out();
        begin
          int ones;
          ones = 0;
          for (int i = 0; i < N; i++) begin
            check(got[i] == exp_bits[i], $sformatf("scan read-out region %0d LB %0d", r, i));
            ones += int'(got[i]);
          end
          check(ones == count, "transmission count");
        end
      end

    // ---- 4. the A chain end to end, and reset
    for (int i = 0; i < N; i++) cfg_of[i] = CFG_FOLLOW_A;
    load_config();
    for (int t = 0; t < 8; t++) begin
      a_in = 1'(t); c = 1'($urandom); d = 1'($urandom);
      #1;
      check(mout_last == a_in, "mout_last follows a_in through every LB");
      n_a_chain++;
    end
    scan = 0; enable = 1; a_in = 1;
    pulse_s();
    check(dout == '1, "capture of a_in everywhere");
    #1 rst = 1; #1;
    check(dout == '0 && lout == 1'b0 && mout_last == 1'b0, "asynchronous reset clears SDFFs and configuration");
    n_reset++;
    rst = 0;

    check(n_cfg_shift > 0, "config shift exercised");
    check(n_launch > 0 && n_hold > 0 && n_capture > 0, "launch/hold/capture exercised");
    check(n_scan_read > 0, "scan read-out exercised");
    check(n_stop_at_edge > 0 && n_run_on > 0, "both region modes exercised");
    check(n_placement == N && n_a_chain > 0 && n_reset == 2, "placement, A chain and reset exercised");
    $display("mechanisms: cfg_shift=%0d launch=%0d hold=%0d capture=%0d scan_read=%0d stop_at_edge=%0d run_on=%0d placement=%0d a_chain=%0d reset=%0d",
             n_cfg_shift, n_launch, n_hold, n_capture, n_scan_read, n_stop_at_edge, n_run_on,
             n_placement, n_a_chain, n_reset);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
