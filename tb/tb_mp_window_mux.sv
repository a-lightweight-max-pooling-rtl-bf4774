// tb_mp_window_mux: self-checking test of the window multiplexer.
// Random frames of random width are streamed through a testbench copy of the
// stream history; at each position (r,c) where a full window fits, the
// multiplexer's element (i,j) must equal frame[r-i][c-j], and the mask must
// cover exactly the configured pool size. Uses NP_MAX = 3 and n = 8.
module tb_mp_window_mux;
  localparam int unsigned N = 8, NP_MAX = 3, W = 10;
  localparam int unsigned LEN = mp_pkg::sr_len(N, NP_MAX);
  localparam int unsigned CW = mp_pkg::cnt_w(N);
  logic [CW-1:0] frame_w, pool_size;
  logic [W-1:0] din;
  logic [LEN-1:0][W-1:0] taps;
  logic [NP_MAX-1:0][NP_MAX-1:0][W-1:0] win;
  logic [NP_MAX-1:0][NP_MAX-1:0] mask;
  logic [W-1:0] frame [N][N];
  int checks = 0, failures = 0;

  mp_window_mux #(.N(N), .NP_MAX(NP_MAX), .W(W)) dut (
    .frame_w, .pool_size, .din, .taps, .win_o(win), .mask_o(mask));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int f = 0; f < 40; f++) begin
      int fw, fh, np;
      np = $urandom_range(1, NP_MAX);
      fw = $urandom_range(np, N);
      fh = $urandom_range(np, N);
      frame_w = CW'(fw);
      pool_size = CW'(np);
      foreach (taps[k]) taps[k] = W'($urandom);
      for (int r = 0; r < fh; r++)
        for (int c = 0; c < fw; c++) frame[r][c] = W'($urandom);
      for (int r = 0; r < fh; r++) begin
        for (int c = 0; c < fw; c++) begin
          din = frame[r][c];
          #1;
          if (r >= np - 1 && c >= np - 1) begin
            for (int i = 0; i < NP_MAX; i++) begin
              for (int j = 0; j < NP_MAX; j++) begin
                checks++;
                if (mask[i][j] !== (i < np && j < np)) begin
                  failures++;
                  $display("mask(%0d,%0d) wrong np=%0d", i, j, np);
                end
                if (i < np && j < np) begin
                  checks++;
                  if (win[i][j] !== frame[r-i][c-j]) begin
                    failures++;
                    if (failures < 10)
                      $display("fw=%0d np=%0d at (%0d,%0d) elem (%0d,%0d): got %h expected %h",
                               fw, np, r, c, i, j, win[i][j], frame[r-i][c-j]);
                  end
                end
              end
            end
          end
          // shift: behave like the line buffer
          for (int k = LEN - 1; k > 0; k--) taps[k] = taps[k-1];
          taps[0] = din;
          #1;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
