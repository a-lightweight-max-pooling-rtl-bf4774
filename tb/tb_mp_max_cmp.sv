// tb_mp_max_cmp: self-checking test of the max comparator.
// Random 3x3 windows (with many equal and negative potentials) and the masks
// of pool sizes 1..3 are applied; the registered result must appear exactly
// one clock after load with the highest signed potential among the masked
// entries and the spike of that entry (ties: first in (i,j) scan order).
// Also checks that valid_o follows load and last_o follows load && last_i.
module tb_mp_max_cmp;
  localparam int unsigned NP_MAX = 3, DW = 16;
  logic clk = 1'b0, rst_n = 1'b0, load = 1'b0, last_i = 1'b0;
  logic [NP_MAX-1:0][NP_MAX-1:0][DW:0] win;
  logic [NP_MAX-1:0][NP_MAX-1:0] mask;
  logic valid_o, last_o, spike_o;
  logic signed [DW-1:0] max_pot_o;
  int checks = 0, failures = 0;

  mp_max_cmp #(.NP_MAX(NP_MAX), .DW(DW)) dut (
    .clk, .rst_n, .load, .last_i, .win, .mask, .valid_o, .last_o, .max_pot_o, .spike_o);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    win = '0;
    mask = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 3000; t++) begin
      int np, best, bi, bj, mode;
      logic exp_spk, exp_last, exp_load;
      np = $urandom_range(1, NP_MAX);
      mode = $urandom_range(0, 2);
      @(negedge clk);
      for (int i = 0; i < NP_MAX; i++)
        for (int j = 0; j < NP_MAX; j++) begin
          int v;
          case (mode)
            0: v = $urandom_range(0, 3);                  // many ties
            1: v = int'($urandom_range(0, 65535)) - 32768; // full range
            default: v = int'($urandom_range(0, 200)) - 100;
          endcase
          win[i][j] = {1'($urandom), 16'(v)};
          mask[i][j] = (i < np) && (j < np);
        end
      load = ($urandom_range(0, 4) != 0);
      last_i = 1'($urandom);
      // reference: scan masked entries, first strictly greater wins
      best = -65536; bi = 0; bj = 0;
      for (int i = 0; i < np; i++)
        for (int j = 0; j < np; j++)
          if (int'($signed(win[i][j][DW-1:0])) > best) begin
            best = int'($signed(win[i][j][DW-1:0]));
            bi = i; bj = j;
          end
      exp_spk = win[bi][bj][DW];
      exp_last = load && last_i;
      exp_load = load;
      @(negedge clk);
      checks++;
      if (valid_o !== exp_load || last_o !== exp_last) begin
        failures++;
        $display("t=%0d valid/last %b%b expected %b%b", t, valid_o, last_o, exp_load, exp_last);
      end
      if (exp_load) begin
        checks++;
        if (int'(max_pot_o) != best || spike_o !== exp_spk) begin
          failures++;
          if (failures < 10) $display("t=%0d np=%0d got %0d/%b expected %0d/%b",
                                      t, np, max_pot_o, spike_o, best, exp_spk);
        end
      end
      load = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
