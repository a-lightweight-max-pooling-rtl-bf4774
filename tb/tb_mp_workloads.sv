// tb_mp_workloads: the pooling layers of the two evaluated networks, run
// through the block at its default size (32 x 32 maximum frame, 2 x 2 pooling,
// stride 2), fed by a behavioural integrate-and-fire layer with reset by
// subtraction that stands in for the convolutional core.
//   MNIST shallow network 12c5-MP-64c5-MP-FC120-FC10, 28 x 28 input:
//     MP1 pools 12 maps of 24 x 24, MP2 pools 64 maps of 8 x 8; 10 time steps.
//   VGG16 on CIFAR-10 (3 x 3 convolutions, padding 1), 32 x 32 input:
//     MP1..MP4 pool 64 maps of 32 x 32, 128 of 16 x 16, 256 of 8 x 8 and
//     512 of 4 x 4; 100 time steps.
// The map sizes follow from the layer list and the usual input sizes of the
// two datasets. Channels and time steps stream back to back; for every layer
// each pooled output is compared with the reference model, and the cycle
// count must equal time steps x channels x map size (one neuron per cycle).
// The neurons' input currents are random: only the pooling is under test.
module tb_mp_workloads;
  import mp_pkg::*;
  localparam int unsigned N = MP_N, DW = MP_DW, NP_MAX = MP_NP_MAX;
  localparam int unsigned CW = cnt_w(N);

  logic clk = 1'b0, rst_n = 1'b0;
  logic [CW-1:0] cfg_frame_w = CW'(N), cfg_frame_h = CW'(N);
  logic [CW-1:0] cfg_pool_size = CW'(2), cfg_stride = CW'(2);
  logic in_valid = 1'b0, in_spike = 1'b0;
  logic signed [DW-1:0] in_pot = '0;
  logic out_valid, out_spike, out_last;
  logic signed [DW-1:0] out_pot;

  mp_maxpool dut (
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
    repeat (20000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end


  task automatic run_layer(input string name, input int ch, input int fm, input int steps,
                           input int vth);
    int vmem [];
    int cur [];
    int t0, outs0, spikes;
    vmem = new[ch * fm * fm];
    cur  = new[ch * fm * fm];
    foreach (vmem[k]) begin
      vmem[k] = 0;
      cur[k] = $urandom_range(0, vth / 2);
    end
    outs0 = outs_seen;
    spikes = m_spike;
    t0 = cyc;
    for (int t = 0; t < steps; t++) begin
      for (int q = 0; q < ch; q++) begin
        for (int r = 0; r < fm; r++) for (int c = 0; c < fm; c++) begin
          int k;
          k = (q * fm + r) * fm + c;
          vmem[k] += cur[k];
          fr_pot[r][c] = vmem[k];
          fr_spk[r][c] = (vmem[k] >= vth);
          if (fr_spk[r][c]) vmem[k] -= vth;
        end
        send_frame(fm, fm, 2, 2, 0);
      end
    end
    check(cyc - t0 == steps * ch * fm * fm,
          $sformatf("%s: %0d cycles, expected %0d", name, cyc - t0, steps * ch * fm * fm));
    drain();
    check(outs_seen - outs0 == steps * ch * (fm / 2) * (fm / 2),
          $sformatf("%s: %0d outputs", name, outs_seen - outs0));
    check(m_spike > spikes, $sformatf("%s: no spike passed", name));
    $display("%s: %0d maps of %0dx%0d, %0d steps, %0d cycles, %0d pooled outputs, %0d spikes passed",
             name, ch, fm, fm, steps, steps * ch * fm * fm, outs_seen - outs0, m_spike - spikes);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    run_layer("MNIST MP1", 12, 24, 10, 256);
    run_layer("MNIST MP2", 64, 8, 10, 256);
    run_layer("VGG16 MP1", 64, 32, 100, 256);
    run_layer("VGG16 MP2", 128, 16, 100, 256);
    run_layer("VGG16 MP3", 256, 8, 100, 256);
    run_layer("VGG16 MP4", 512, 4, 100, 256);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
