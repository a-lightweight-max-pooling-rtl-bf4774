// tb_mp_maxpool_np3: the end-to-end test of tb_mp_maxpool, run on a build of
// the block for pool sizes up to 3 x 3 (32 x 32 maximum frame), so that the
// 3 x 3 window (pool size and stride set at run time) is exercised too.
//
// A reference model in the testbench computes every pooled output of a frame
// (highest potential of the window, spike of that neuron; on equal
// potentials the neuron latest in raster order) and the input index that
// completes each window. The driver streams frames in raster order; each
// output must appear exactly one clock after its completing input, in order,
// with the reference value. Scenarios:
//  1. a worked 4x4 max-pooling example, 2x2 windows with stride 2 and with
//     stride 1, against its known results;
//  2. a worked spiking example (threshold 30): pooled potentials
//     20 25 / 40 50 with spikes 0 0 / 1 1;
//  3. random frames of every shape and configuration, with idle gaps,
//     negative potentials and ties, and configuration inputs changed while
//     a frame streams (they must only take effect at the next frame);
//  4. a layer of integrate-and-fire neurons with reset by subtraction
//     (a behavioural stand-in for the convolutional core) run for several
//     time steps, frames back to back, as in the evaluated MNIST network
//     (24 x 24 feature map, 2 x 2 pooling, stride 2);
//  5. full 32 x 32 frames back to back with no gaps: the frame period must be
//     32*32 cycles.
// Every mechanism (mid-frame configuration change, overlapping and
// non-overlapping windows, pool size 1 and the largest pool size, frames
// smaller than the maximum, full-size frame, idle gaps, back-to-back frames,
// forwarded spikes, ties, negative maxima, rows/columns that no window
// covers) is counted and must occur at least once.
module tb_mp_maxpool_np3;
  import mp_pkg::*;
  localparam int unsigned N = MP_N, DW = MP_DW, NP_MAX = 3;
  localparam int unsigned CW = cnt_w(N);

  logic clk = 1'b0, rst_n = 1'b0;
  logic [CW-1:0] cfg_frame_w = CW'(N), cfg_frame_h = CW'(N);
  logic [CW-1:0] cfg_pool_size = CW'(2), cfg_stride = CW'(2);
  logic in_valid = 1'b0, in_spike = 1'b0;
  logic signed [DW-1:0] in_pot = '0;
  logic out_valid, out_spike, out_last;
  logic signed [DW-1:0] out_pot;

  mp_maxpool #(.NP_MAX(NP_MAX)) dut (
    .clk, .rst_n, .cfg_frame_w, .cfg_frame_h, .cfg_pool_size, .cfg_stride,
    .in_valid, .in_pot, .in_spike, .out_valid, .out_pot, .out_spike, .out_last);

  always #5 clk = ~clk;

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  int checks = 0, failures = 0;

  // mechanism counters
  int m_overlap = 0, m_nonoverlap = 0, m_pool1 = 0, m_small = 0, m_full = 0;
  int m_poolmax = 0, m_cfgchg = 0;
  bit scramble_cfg = 1'b0;
  int m_gap = 0, m_b2b = 0, m_spike = 0, m_tie = 0, m_neg = 0, m_leftover = 0;

  // frame under test
  int fr_pot [N][N];
  bit fr_spk [N][N];

  // expected outputs, keyed by completing input index
  typedef struct { int pot; bit spk; bit last; } exp_t;
  exp_t exp_at [int];
  typedef struct { int pot; bit spk; bit last; int due; } pend_t;
  pend_t pending [$];
  int outs_seen = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0d: %s", cyc, what);
    end
  endtask

  // Reference pooling of fr_pot/fr_spk.
  function automatic void model(input int fw, input int fh, input int np, input int s);
    int nwr, nwc;
    exp_at.delete();
    nwr = (fh - np) / s + 1;
    nwc = (fw - np) / s + 1;
    for (int a = 0; a < nwr; a++) begin
      for (int b = 0; b < nwc; b++) begin
        int wr, wc, best, nbest, k;
        bit spk;
        exp_t e;
        wr = a * s; wc = b * s;
        best = 0; spk = 0; nbest = 0;
        // latest neuron in raster order wins ties: scan backwards, keep first max
        for (int r = wr + np - 1; r >= wr; r--)
          for (int c = wc + np - 1; c >= wc; c--) begin
            if (nbest == 0 || fr_pot[r][c] > best) begin
              best = fr_pot[r][c]; spk = fr_spk[r][c]; nbest = 1;
            end else if (fr_pot[r][c] == best) nbest++;
          end
        if (nbest > 1) m_tie++;
        if (best < 0) m_neg++;
        if (spk) m_spike++;
        e.pot = best; e.spk = spk; e.last = (a == nwr - 1) && (b == nwc - 1);
        k = (wr + np - 1) * fw + (wc + np - 1);
        exp_at[k] = e;
      end
    end
    if (np < s || (fw - np) % s != 0 || (fh - np) % s != 0) m_leftover++;
    if (s < np) m_overlap++; else m_nonoverlap++;
    if (np == 1) m_pool1++;
    if (np == NP_MAX) m_poolmax++;
    if (fw == N && fh == N) m_full++; else m_small++;
  endfunction

  // Stream the frame; gap_pct = chance (percent) of an idle cycle before an input.
  task automatic send_frame(input int fw, input int fh, input int np, input int s,
                            input int gap_pct);
    model(fw, fh, np, s);
    cfg_frame_w = CW'(fw); cfg_frame_h = CW'(fh);
    cfg_pool_size = CW'(np); cfg_stride = CW'(s);
    for (int r = 0; r < fh; r++) begin
      for (int c = 0; c < fw; c++) begin
        int k;
        while (gap_pct > 0 && $urandom_range(0, 99) < gap_pct) begin
          in_valid = 1'b0;
          m_gap++;
          @(negedge clk);
        end
        in_valid = 1'b1;
        in_pot = DW'(fr_pot[r][c]);
        in_spike = fr_spk[r][c];
        k = r * fw + c;
        @(posedge clk);
        if (exp_at.exists(k)) begin
          pend_t p;
          p.pot = exp_at[k].pot; p.spk = exp_at[k].spk; p.last = exp_at[k].last;
          p.due = cyc + 1;
          pending.push_back(p);
        end
        @(negedge clk);
        // the configuration is sampled with the first neuron: changing it
        // now must not disturb this frame
        if (k == 0 && scramble_cfg) begin
          int nnp;
          nnp = $urandom_range(1, NP_MAX);
          cfg_pool_size = CW'(nnp);
          cfg_frame_w = CW'($urandom_range(nnp, N));
          cfg_frame_h = CW'($urandom_range(nnp, N));
          cfg_stride = CW'($urandom_range(1, 3));
          m_cfgchg++;
        end
      end
    end
  endtask

  task automatic idle(input int n);
    in_valid = 1'b0;
    repeat (n) @(negedge clk);
  endtask

  task automatic drain();
    idle(3);
    check(pending.size() == 0, $sformatf("%0d outputs never appeared", pending.size()));
    pending.delete();
  endtask

  // Output monitor: compares at each negedge (outputs are registered).
  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      outs_seen++;
      if (pending.size() == 0) begin
        check(0, "unexpected output");
      end else begin
        pend_t p;
        p = pending.pop_front();
        check(int'(out_pot) == p.pot && out_spike == p.spk && out_last == p.last,
              $sformatf("output %0d/%b/last %b, expected %0d/%b/last %b",
                        out_pot, out_spike, out_last, p.pot, p.spk, p.last));
        check(cyc == p.due, $sformatf("output at cycle %0d, expected %0d", cyc, p.due));
      end
    end
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // worked 4x4 example frame and its results
  localparam int EX1 [4][4] = '{'{52,  8,  6, 70}, '{15, 26, 25, 30},
                                '{26, 90,  5, 10}, '{95, 12, 20, 37}};
  localparam int EX1_S2 [4] = '{52, 70, 95, 37};
  localparam int EX1_S1 [9] = '{52, 26, 70, 90, 90, 30, 95, 90, 37};
  // worked spiking example (threshold 30)
  localparam int EX2 [4][4] = '{'{20, 15, 12, 17}, '{16,  2, 15, 25},
                                '{ 7,  5, 21, 30}, '{20, 40, 20, 50}};
  localparam int EX2_P [4] = '{20, 25, 40, 50};
  localparam bit EX2_S [4] = '{0, 0, 1, 1};

  // Capture of pooled outputs for the worked examples.
  int cap_pot [$];
  bit cap_spk [$];
  always @(negedge clk) if (rst_n && out_valid) begin
    cap_pot.push_back(int'(out_pot));
    cap_spk.push_back(out_spike);
  end

  initial begin
    int t0, t1;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    // 1. worked 4x4 example
    for (int r = 0; r < 4; r++) for (int c = 0; c < 4; c++) begin
      fr_pot[r][c] = EX1[r][c]; fr_spk[r][c] = 0;
    end
    cap_pot.delete();
    send_frame(4, 4, 2, 2, 0);
    drain();
    check(cap_pot.size() == 4, "example stride 2: output count");
    for (int k = 0; k < 4 && k < cap_pot.size(); k++)
      check(cap_pot[k] == EX1_S2[k], $sformatf("example stride 2 output %0d = %0d", k, cap_pot[k]));
    cap_pot.delete();
    send_frame(4, 4, 2, 1, 0);
    drain();
    check(cap_pot.size() == 9, "example stride 1: output count");
    for (int k = 0; k < 9 && k < cap_pot.size(); k++)
      check(cap_pot[k] == EX1_S1[k], $sformatf("example stride 1 output %0d = %0d", k, cap_pot[k]));

    // 2. spiking example, first time step
    for (int r = 0; r < 4; r++) for (int c = 0; c < 4; c++) begin
      fr_pot[r][c] = EX2[r][c]; fr_spk[r][c] = (EX2[r][c] >= 30);
    end
    cap_pot.delete(); cap_spk.delete();
    send_frame(4, 4, 2, 2, 0);
    drain();
    check(cap_pot.size() == 4, "spiking example: output count");
    for (int k = 0; k < 4 && k < cap_pot.size(); k++)
      check(cap_pot[k] == EX2_P[k] && cap_spk[k] == EX2_S[k],
            $sformatf("spiking example output %0d = %0d/%b", k, cap_pot[k], cap_spk[k]));

    // 3. random frames and configurations
    for (int f = 0; f < 60; f++) begin
      int fw, fh, np, s, mode;
      np = $urandom_range(1, NP_MAX);
      s  = $urandom_range(1, 3);
      fw = $urandom_range(np, N);
      fh = $urandom_range(np, N);
      mode = $urandom_range(0, 2);
      for (int r = 0; r < fh; r++) for (int c = 0; c < fw; c++) begin
        case (mode)
          0: fr_pot[r][c] = $urandom_range(0, 3);
          1: fr_pot[r][c] = int'($urandom_range(0, 65535)) - 32768;
          default: fr_pot[r][c] = int'($urandom_range(0, 120)) - 60;
        endcase
        fr_spk[r][c] = 1'($urandom);
      end
      scramble_cfg = (f % 4 < 2);
      send_frame(fw, fh, np, s, (f % 2 == 1) ? 30 : 0);
      if (f % 3 == 0) drain();
    end
    drain();
    scramble_cfg = 1'b0;

    // 4. integrate-and-fire layer, several time steps, frames back to back
    begin
      localparam int FM = 24, VTH = 64, STEPS = 6;
      int vmem [FM][FM];
      int cur [FM][FM];
      for (int r = 0; r < FM; r++) for (int c = 0; c < FM; c++) begin
        vmem[r][c] = 0;
        cur[r][c] = $urandom_range(0, 40);
      end
      for (int t = 0; t < STEPS; t++) begin
        for (int r = 0; r < FM; r++) for (int c = 0; c < FM; c++) begin
          vmem[r][c] += cur[r][c];
          fr_pot[r][c] = vmem[r][c];
          fr_spk[r][c] = (vmem[r][c] >= VTH);
          if (fr_spk[r][c]) vmem[r][c] -= VTH;   // reset by subtraction
        end
        send_frame(FM, FM, 2, 2, 0);
        if (t > 0) m_b2b++;
      end
      drain();
    end

    // 5. full-size frames back to back: frame period and throughput
    for (int r = 0; r < N; r++) for (int c = 0; c < N; c++) begin
      fr_pot[r][c] = int'($urandom_range(0, 4000)) - 2000;
      fr_spk[r][c] = 1'($urandom);
    end
    outs_seen = 0;
    t0 = cyc;
    send_frame(N, N, 2, 2, 0);
    send_frame(N, N, 2, 2, 0);
    t1 = cyc;
    m_b2b++;
    check(t1 - t0 == 2 * N * N,
          $sformatf("two %0dx%0d frames took %0d cycles, expected %0d", N, N, t1 - t0, 2 * N * N));
    drain();
    check(outs_seen == 2 * (N / 2) * (N / 2),
          $sformatf("full frames gave %0d outputs, expected %0d", outs_seen, 2 * (N / 2) * (N / 2)));

    // every mechanism must have occurred
    check(m_overlap > 0, "no overlapping pooling");
    check(m_nonoverlap > 0, "no non-overlapping pooling");
    check(m_pool1 > 0, "no pool size 1");
    check(m_poolmax > 0, "no window of the largest pool size");
    check(m_cfgchg > 0, "no configuration change during a frame");
    check(m_small > 0, "no frame smaller than the maximum");
    check(m_full > 0, "no full-size frame");
    check(m_gap > 0, "no idle gaps");
    check(m_b2b > 0, "no back-to-back frames");
    check(m_spike > 0, "no forwarded spike");
    check(m_tie > 0, "no tie");
    check(m_neg > 0, "no negative maximum");
    check(m_leftover > 0, "no frame with uncovered rows/columns");
    $display("mechanisms: cfgchg=%0d poolmax=%0d overlap=%0d nonoverlap=%0d pool1=%0d small=%0d full=%0d gaps=%0d b2b=%0d spikes=%0d ties=%0d neg=%0d leftover=%0d",
             m_cfgchg, m_poolmax, m_overlap, m_nonoverlap, m_pool1, m_small, m_full, m_gap, m_b2b, m_spike, m_tie,
             m_neg, m_leftover);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
