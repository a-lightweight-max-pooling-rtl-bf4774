// tb_mp_controller: self-checking test of the position/stride controller.
// Frames with random size, pool size (1..3) and stride (1..4) are streamed
// back to back with random idle cycles. For every cycle the combinational
// win_done and win_last are compared with a reference computed from the
// pooling arithmetic: a window ends at (r,c) when r,c >= Np-1 and
// (r-Np+1), (c-Np+1) are multiples of the stride; the last one ends at
// (Np-1 + s*floor((H-Np)/s), Np-1 + s*floor((W-Np)/s)). In every other frame
// the configuration inputs are changed after the first neuron; the frame must
// keep the configuration it started with, also on the multiplexer selects.
module tb_mp_controller;
  localparam int unsigned N = 8, NP_MAX = 3;
  localparam int unsigned CW = mp_pkg::cnt_w(N);
  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic [CW-1:0] frame_w = CW'(N), frame_h = CW'(N), pool_size = CW'(2), stride = CW'(2);
  logic win_done, win_last;
  logic [CW-1:0] sel_frame_w, sel_pool_size;
  int checks = 0, failures = 0, windows = 0;

  mp_controller #(.N(N), .NP_MAX(NP_MAX)) dut (
    .clk, .rst_n, .in_valid, .frame_w, .frame_h, .pool_size, .stride, .win_done, .win_last,
    .sel_frame_w, .sel_pool_size);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int f = 0; f < 150; f++) begin
      int fw, fh, np, s, lr, lc;
      bit scramble;
      logic [CW-1:0] ref_np;
      np = $urandom_range(1, NP_MAX);
      s  = $urandom_range(1, 4);
      fw = $urandom_range(np, N);
      fh = $urandom_range(np, N);
      frame_w = CW'(fw); frame_h = CW'(fh); pool_size = CW'(np); stride = CW'(s);
      scramble = (f % 2 == 1);
      ref_np = CW'(np);
      lr = np - 1 + s * ((fh - np) / s);
      lc = np - 1 + s * ((fw - np) / s);
      for (int r = 0; r < fh; r++) begin
        for (int c = 0; c < fw; c++) begin
          bit exp_done, exp_last;
          // idle cycles: nothing may be reported
          while ($urandom_range(0, 3) == 0) begin
            in_valid = 1'b0;
            #1;
            checks++;
            if (win_done !== 1'b0 || win_last !== 1'b0) begin
              failures++;
              $display("window reported while idle");
            end
            @(negedge clk);
          end
          in_valid = 1'b1;
          #1;
          exp_done = (r >= np - 1) && (c >= np - 1) &&
                     ((r - np + 1) % s == 0) && ((c - np + 1) % s == 0);
          exp_last = exp_done && (r == lr) && (c == lc);
          if (exp_done) windows++;
          checks++;
          checks++;
          if (sel_frame_w != CW'(fw) || sel_pool_size != CW'(np)) begin
            failures++;
            if (failures < 10) $display("selects %0d/%0d, expected %0d/%0d",
                                        sel_frame_w, sel_pool_size, fw, np);
          end
          if (win_done !== exp_done || win_last !== exp_last) begin
            failures++;
            if (failures < 10)
              $display("frame %0dx%0d np=%0d s=%0d at (%0d,%0d): done/last %b%b expected %b%b",
                       fw, fh, np, s, r, c, win_done, win_last, exp_done, exp_last);
          end
          @(negedge clk);
          // after the first neuron the inputs may change: the frame must
          // keep the configuration it started with
          if (scramble) begin
            np = $urandom_range(1, NP_MAX);
            frame_w = CW'($urandom_range(np, N)); frame_h = CW'($urandom_range(np, N));
            pool_size = CW'(np); stride = CW'($urandom_range(1, 4));
            np = int'(ref_np);
          end
        end
      end
    end
    in_valid = 1'b0;
    checks++;
    if (windows == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
